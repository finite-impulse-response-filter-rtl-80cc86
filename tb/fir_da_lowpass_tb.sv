// fir_da_lowpass_tb: runs the filter as the design intends it to be used, an
// 8-tap low pass at a 16 MHz sample rate. The clock is 256 MHz (16 bit cycles
// per 16-bit sample) and a sample is offered every cycle, so the filter
// streams back to back; the testbench measures the achieved sample rate.
// Three tones are filtered, at 1, 4 and 7 MHz, each with amplitude 16000
// (Q15 samples). Every output is compared with the direct-form reference,
// and the gain of each tone, measured by correlating 96 steady-state outputs
// with the tone, is compared with |H(f)| = |sum_k A_k e^{-j 2 pi f k / fs}|
// worked out here from the coefficients. The low tone must pass (gain > 0.9)
// and the high tone must be attenuated (gain < 0.1).
module fir_da_lowpass_tb;
  import fir_ref_pkg::*;
  localparam int unsigned DATA_W = 16, OUT_W = 35;
  localparam realtime T_CLK = 1000.0 / 256.0;  // ns
  localparam real FS = 16.0e6;
  localparam int NS = 200;
  localparam real TONES [3] = '{1.0e6, 4.0e6, 7.0e6};
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [DATA_W-1:0] sample_in = '0;
  logic signed [OUT_W-1:0] y;
  int checks = 0, failures = 0;

  fir_da_top dut (.*);

  always #(T_CLK / 2) clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real gain(input real f);
    real re, im;
    re = 0.0;
    im = 0.0;
    for (int k = 0; k < 8; k++) begin
      re += REF_COEFS[k] / 32768.0 * $cos(2.0 * PI * f / FS * k);
      im -= REF_COEFS[k] / 32768.0 * $sin(2.0 * PI * f / FS * k);
    end
    return $sqrt(re * re + im * im);
  endfunction

  initial begin : run
    for (int t = 0; t < 3; t++) begin
      fir_ref ref_m;
      int b [NS];
      longint want [NS];
      real sc, ss, g;
      realtime t_first, t_last;
      int n_in, n_out;
      ref_m = new();
      for (int n = 0; n < NS; n++) begin
        b[n] = int'($rtoi(16000.0 * $sin(2.0 * PI * TONES[t] / FS * n)));
        want[n] = ref_m.step(b[n]);
      end
      rst_n = 0;
      in_valid = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      n_in = 0;
      n_out = 0;
      sc = 0.0;
      ss = 0.0;
      in_valid = 1;
      sample_in = 16'(b[0]);
      while (n_out < NS) begin
        @(posedge clk);
        if (in_valid && in_ready) begin
          if (n_in == 0) t_first = $realtime;
          t_last = $realtime;
          n_in++;
        end
        if (out_valid) begin
          checks++;
          if (longint'(y) != want[n_out]) begin
            failures++;
            if (failures < 10) $display("tone %0d out %0d: got %0d want %0d", t, n_out, y, want[n_out]);
          end
          // steady state: correlate 96 outputs (whole periods of every tone)
          if (n_out >= 100 && n_out < 196) begin
            sc += real'(y) / 32768.0 * $cos(2.0 * PI * TONES[t] / FS * n_out);
            ss += real'(y) / 32768.0 * $sin(2.0 * PI * TONES[t] / FS * n_out);
          end
          n_out++;
        end
        #0.1;
        if (n_in < NS) sample_in = 16'(b[n_in]);
        else in_valid = 0;
      end
      // achieved sample rate over the streamed samples
      checks++;
      if (fabs(1.0e9 * (NS - 1) / (t_last - t_first) - FS) > 1.0e-3 * FS) begin
        failures++;
        $display("sample rate %f", 1.0e9 * (NS - 1) / (t_last - t_first));
      end
      g = 2.0 / 96.0 * $sqrt(sc * sc + ss * ss) / 16000.0;
      $display("tone %0.1f MHz: measured gain %0.4f, expected %0.4f", TONES[t] / 1.0e6, g, gain(TONES[t]));
      checks++;
      if (fabs(g - gain(TONES[t])) > 0.002) failures++;
      checks++;
      if (t == 0 && g < 0.9) failures++;
      if (t == 2 && g > 0.1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
