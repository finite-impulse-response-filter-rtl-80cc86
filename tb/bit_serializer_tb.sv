// bit_serializer_tb: loads random samples, shifts them out with occasional
// stall cycles, and checks that bits[k] equals bit j of sample k for the j-th
// shift, LSB first; also checks that a load overrides a shift.
module bit_serializer_tb;
  localparam int unsigned TAPS = 8, DATA_W = 16;

  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [DATA_W-1:0] taps_in [TAPS];
  logic [TAPS-1:0] bits;
  int checks = 0, failures = 0;

  bit_serializer #(.TAPS(TAPS), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bits(input logic [DATA_W-1:0] w [TAPS], input int j);
    logic [TAPS-1:0] e;
    for (int k = 0; k < TAPS; k++) e[k] = w[k][j];
    checks++;
    if (bits !== e) begin
      failures++;
      if (failures < 10) $display("bit %0d: got %b want %b", j, bits, e);
    end
  endtask

  initial begin
    logic [DATA_W-1:0] w [TAPS];
    for (int k = 0; k < TAPS; k++) taps_in[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int k = 0; k < TAPS; k++) begin
        w[k] = DATA_W'($urandom);
        taps_in[k] = w[k];
      end
      load = 1;
      shift = (n % 2 == 1);  // load must win over shift
      @(negedge clk);
      load = 0;
      for (int j = 0; j < DATA_W; j++) begin
        // optional stall: shift low, bits must hold
        if ($urandom_range(0, 4) == 0) begin
          shift = 0;
          expect_bits(w, j);
          @(negedge clk);
        end
        expect_bits(w, j);
        shift = 1;
        @(negedge clk);
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
