// da_datapath_tb: runs the datapath unit without the control unit. The
// testbench sequences the strobes itself (load, DATA_W run cycles with sub in
// the last, out_load with it; sometimes the next load in that same last
// cycle, sometimes idle gaps) and compares y after every sample with the
// direct-form reference filter.
module da_datapath_tb;
  import fir_da_pkg::*;
  import fir_ref_pkg::*;
  localparam int unsigned DATA_W = 16, OUT_W = 35;

  logic clk = 0, rst_n = 0;
  logic [DATA_W-1:0] sample_in = '0;
  da_ctrl_t ctrl = '0;
  logic signed [OUT_W-1:0] y;
  int checks = 0, failures = 0;

  da_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NS = 400;

  initial begin
    fir_ref ref_m = new();
    longint want [NS];
    int b [NS];
    logic overlap;
    for (int n = 0; n < NS; n++) begin
      // an impulse of the most negative value, then the most positive, then random
      if (n == 0) b[n] = -32768;
      else if (n == 8) b[n] = 32767;
      else if (n < 16) b[n] = 0;
      else b[n] = int'($signed(16'($urandom)));
      want[n] = ref_m.step(b[n]);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    ctrl = '0;
    ctrl.load = 1;
    sample_in = 16'(b[0]);
    @(negedge clk);
    for (int n = 0; n < NS; n++) begin
      overlap = (n + 1 < NS) && ($urandom_range(0, 1) == 1);
      for (int j = 0; j < DATA_W; j++) begin
        ctrl = '0;
        ctrl.run = 1;
        if (j == DATA_W - 1) begin
          ctrl.sub = 1;
          ctrl.out_load = 1;
          if (overlap) begin
            ctrl.load = 1;
            sample_in = 16'(b[n+1]);
          end
        end
        @(negedge clk);
      end
      ctrl = '0;
      checks++;
      if (longint'(y) != want[n]) begin
        failures++;
        if (failures < 10) $display("n=%0d: got %0d want %0d", n, y, want[n]);
      end
      if (!overlap && n + 1 < NS) begin
        repeat ($urandom_range(0, 2)) @(negedge clk);
        ctrl.load = 1;
        sample_in = 16'(b[n+1]);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
