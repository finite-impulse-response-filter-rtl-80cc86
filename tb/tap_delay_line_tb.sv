// tap_delay_line_tb: drives random samples into the delay line with random
// shift enables and checks taps[] and taps_next[] against a queue model of
// the last TAPS samples taken (zeros after reset).
module tap_delay_line_tb;
  localparam int unsigned TAPS = 8, DATA_W = 16;

  logic clk = 0, rst_n = 0, shift = 0;
  logic [DATA_W-1:0] sample_in = '0;
  logic [DATA_W-1:0] taps [TAPS], taps_next [TAPS];
  int checks = 0, failures = 0;
  logic [DATA_W-1:0] model [TAPS];

  tap_delay_line #(.TAPS(TAPS), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < TAPS; k++) model[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      sample_in = DATA_W'($urandom);
      #1;
      // taps_next is the combinational next contents
      if (taps_next[0] !== sample_in) failures++;
      checks++;
      for (int k = 1; k < TAPS; k++) begin
        checks++;
        if (taps_next[k] !== model[k-1]) failures++;
      end
      @(posedge clk);
      if (shift) begin
        for (int k = TAPS - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = sample_in;
      end
      #1;
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (taps[k] !== model[k]) begin
          failures++;
          if (failures < 10) $display("tap %0d: got %h want %h", k, taps[k], model[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
