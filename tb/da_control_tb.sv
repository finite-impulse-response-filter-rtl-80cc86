// da_control_tb: offers samples with random gaps and checks the control
// unit's strobes cycle by cycle against a reference sequence worked out in
// the testbench: load on accept, exactly DATA_W run cycles after it, sub and
// out_load only in the last of them, out_valid one cycle later, in_ready in
// IDLE and in the last run cycle. Counts back-to-back accepts (accept during
// the last bit cycle) and accepts from idle; both must happen.
module da_control_tb;
  import fir_da_pkg::*;
  localparam int unsigned DATA_W = 16;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  da_ctrl_t ctrl;
  int checks = 0, failures = 0;
  int overlap_accepts = 0, idle_accepts = 0;

  da_control #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%t %s: got %b want %b", $time, what, got, want);
    end
  endtask

  // reference: remaining run cycles (0 = idle), and whether out_valid is due
  int remaining = 0;
  logic valid_due = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      logic ready_ref, last_ref, acc;
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      #1;
      last_ref  = (remaining == 1);
      ready_ref = (remaining == 0) || last_ref;
      acc       = in_valid && ready_ref;
      check(in_ready, ready_ref, "in_ready");
      check(ctrl.load, acc, "load");
      check(ctrl.run, remaining != 0, "run");
      check(ctrl.sub, last_ref, "sub");
      check(ctrl.out_load, last_ref, "out_load");
      check(out_valid, valid_due, "out_valid");
      if (acc && last_ref) overlap_accepts++;
      else if (acc) idle_accepts++;
      valid_due = last_ref;
      if (acc) remaining = DATA_W;
      else if (remaining != 0) remaining--;
    end
    checks++;
    if (overlap_accepts == 0 || idle_accepts == 0) failures++;
    $display("accepts from idle=%0d back-to-back=%0d", idle_accepts, overlap_accepts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
