// fir_da_top_tb: end-to-end test of the DA FIR filter at its default
// parameters (8 taps, 16-bit samples and coefficients).
//
// A source offers samples with valid/ready, sometimes back to back and
// sometimes with gaps; every output is compared with a direct-form
// reference filter that multiplies. The stimulus opens with impulses of the
// extreme values (the output then walks through the coefficients), a step,
// and continues with random samples. Timing checks: out_valid comes exactly
// DATA_W cycles after the accepting edge, back-to-back samples are taken
// every DATA_W cycles, and y holds between results.
// Mechanisms counted, each must occur: accept from idle, accept in the last
// bit cycle (back to back), a sample offered while the filter is busy
// (in_valid high, in_ready low), and a sign-bit cycle that subtracts a
// non-zero ROM word (a negative sample among the eight taps).
module fir_da_top_tb;
  import fir_ref_pkg::*;
  localparam int unsigned DATA_W = 16, OUT_W = 35;
  localparam int NS = 3000;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [DATA_W-1:0] sample_in = '0;
  logic signed [OUT_W-1:0] y;
  int checks = 0, failures = 0;

  fir_da_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint want [NS];
  int     b    [NS];
  int cyc = 0;
  int accept_cyc [$];
  int n_out = 0;
  int idle_accepts = 0, overlap_accepts = 0, busy_waits = 0, neg_sign_words = 0;
  int last_accept = -100;
  logic signed [OUT_W-1:0] y_prev = '0;

  always @(posedge clk) cyc <= cyc + 1;

  // output side: value and latency of every result, y steady in between
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      int acyc;
      checks += 2;
      if (n_out >= NS || longint'(y) != want[n_out]) begin
        failures++;
        if (failures < 10) $display("out %0d: got %0d want %0d", n_out, y, want[n_out]);
      end
      acyc = accept_cyc.pop_front();
      if (cyc - acyc != DATA_W) begin
        failures++;
        if (failures < 10) $display("out %0d: latency %0d", n_out, cyc - acyc);
      end
      n_out++;
      y_prev = y;
    end else begin
      checks++;
      if (y !== y_prev) failures++;
    end
  end

  // input side
  initial begin
    fir_ref ref_m = new();
    for (int n = 0; n < NS; n++) begin
      if (n == 0) b[n] = -32768;
      else if (n == 8) b[n] = 32767;
      else if (n < 16) b[n] = 0;
      else if (n < 32) b[n] = 12345;
      else b[n] = int'($signed(16'($urandom)));
      want[n] = ref_m.step(b[n]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      // gaps now and then; otherwise keep the sample offered
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 20)) @(negedge clk);
      in_valid  = 1;
      sample_in = 16'(b[n]);
      #1;
      while (!in_ready) begin
        busy_waits++;
        @(negedge clk);
        #1;
      end
      // accepted at the coming edge
      // from idle the earliest accept is DATA_W+1 cycles after the last
      // one; exactly DATA_W means it was taken in the last bit cycle
      checks++;
      if (cyc + 1 - last_accept == DATA_W) overlap_accepts++;
      else if (cyc + 1 - last_accept > DATA_W) idle_accepts++;
      else begin
        failures++;
        $display("accept interval %0d", cyc + 1 - last_accept);
      end
      // the sign-bit cycle subtracts a non-zero word when a tap is negative
      for (int k = 0; k < 8; k++) begin
        if (n - k >= 0 && b[n-k] < 0) begin
          neg_sign_words++;
          break;
        end
      end
      last_accept = cyc + 1;
      accept_cyc.push_back(cyc + 1);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (DATA_W + 3) @(negedge clk);
    checks++;
    if (n_out != NS) begin
      failures++;
      $display("outputs %0d of %0d", n_out, NS);
    end
    $display("accepts from idle=%0d back-to-back=%0d busy waits=%0d sign-bit subtractions=%0d",
             idle_accepts, overlap_accepts, busy_waits, neg_sign_words);
    checks += 4;
    if (idle_accepts == 0) failures++;
    if (overlap_accepts == 0) failures++;
    if (busy_waits == 0) failures++;
    if (neg_sign_words == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
