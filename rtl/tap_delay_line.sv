// tap_delay_line: the sample delay line of the FIR filter.
//
// Holds b(n), b(n-1), ..., b(n-TAPS+1), the current and previous input
// samples of y(n) = sum_k A_k b(n-k). When `shift` is high the new sample
// enters tap 0 and every older sample moves one tap along; the oldest drops
// out. `taps` is the registered contents; `taps_next` is what the taps will
// hold after a shift, so a unit that loads from the delay line can do so in
// the same cycle as the shift.
//
// Timing: one register stage; taps change on the clock edge where shift=1.
// Reset (synchronous, active low) clears every tap to zero, which is this
// design's choice.
module tap_delay_line #(
  parameter int unsigned TAPS   = 8,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift,
  input  logic [DATA_W-1:0] sample_in,
  output logic [DATA_W-1:0] taps      [TAPS],
  output logic [DATA_W-1:0] taps_next [TAPS]
);

  always_comb begin
    taps_next[0] = sample_in;
    for (int k = 1; k < TAPS; k++) taps_next[k] = taps[k-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) taps[k] <= '0;
    end else if (shift) begin
      taps <= taps_next;
    end
  end

endmodule
