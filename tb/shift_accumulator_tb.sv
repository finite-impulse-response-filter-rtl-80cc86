// shift_accumulator_tb: feeds DATA_W random signed words (the last one
// subtracted, as for a sign bit) and checks result against
// sum_j 2^j w_j - 2^(DATA_W-1) w_last, worked out in 64-bit integers. Also
// checks result_next at the last step, that en=0 holds the sum, and that
// clear restarts it.
module shift_accumulator_tb;
  localparam int unsigned LUT_W = 19, DATA_W = 16, OUT_W = LUT_W + DATA_W;

  logic clk = 0, rst_n = 0, clear = 0, en = 0, sub = 0;
  logic signed [LUT_W-1:0] lut = '0;
  logic signed [OUT_W-1:0] result, result_next;
  int checks = 0, failures = 0;

  shift_accumulator #(.LUT_W(LUT_W), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rand_word(input int mode);
    case (mode)
      0: return longint'(-(2 ** (LUT_W - 1)));   // most negative
      1: return longint'(2 ** (LUT_W - 1) - 1);  // most positive
      default: return longint'($signed(LUT_W'($urandom)));
    endcase
  endfunction

  initial begin
    longint expect_v, w;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      int mode;
      mode = (n < 2) ? n : 2;
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      expect_v = 0;
      for (int j = 0; j < DATA_W; j++) begin
        w = rand_word(mode);
        lut = LUT_W'(w);
        en = 1;
        sub = (j == DATA_W - 1);
        if (sub) expect_v -= w <<< j;
        else     expect_v += w <<< j;
        #1;
        if (j == DATA_W - 1) begin
          checks++;
          if (longint'(result_next) != expect_v) failures++;
        end
        @(negedge clk);
        // stall a cycle now and then: the sum must hold
        if ($urandom_range(0, 7) == 0) begin
          en = 0;
          lut = LUT_W'($urandom);
          @(negedge clk);
        end
      end
      en = 0;
      sub = 0;
      checks++;
      if (longint'(result) != expect_v) begin
        failures++;
        if (failures < 10) $display("n=%0d: got %0d want %0d", n, result, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
