// da_rom_tb: reads every one of the 2^TAPS addresses and compares the word
// with the sum of the selected coefficients, computed here from the
// coefficient list in plain integers.
module da_rom_tb;
  localparam int unsigned TAPS = 8, COEF_W = 16, LUT_W = 19;
  localparam int COEF [TAPS] = '{-169, -750, 3170, 14133, 14133, 3170, -750, -169};

  logic [TAPS-1:0] addr;
  logic signed [LUT_W-1:0] data;
  int checks = 0, failures = 0;

  da_rom #(.TAPS(TAPS), .COEF_W(COEF_W), .LUT_W(LUT_W)) dut (.addr, .data);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2 ** TAPS; a++) begin
      int s;
      s = 0;
      for (int k = 0; k < TAPS; k++) if (a[k]) s += COEF[k];
      addr = TAPS'(a);
      #1;
      checks++;
      if (int'(data) != s) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %0d want %0d", a, data, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
