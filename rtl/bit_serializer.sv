// bit_serializer: parallel-in, serial-out shift registers, one per tap.
//
// Distributed arithmetic processes the samples one bit position at a time:
// in bit cycle j it needs bit j of every tap at once. This unit loads the
// TAPS samples in parallel (`load`) and then shifts each one right by a bit
// per clock (`shift`); `bits[k]` is the current least significant bit of
// tap k, so the TAPS-bit vector `bits` is the DA ROM address. Bits come out
// LSB first; the sign bit (bit DATA_W-1) comes last, in the DATA_W-th cycle
// after the load. The LSB-first order and one bit per clock are this
// design's choices.
//
// Timing: `bits` is valid from the cycle after the load edge; load has
// priority over shift. Synchronous active-low reset clears the registers.
module bit_serializer #(
  parameter int unsigned TAPS   = 8,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              shift,
  input  logic [DATA_W-1:0] taps_in [TAPS],
  output logic [TAPS-1:0]   bits
);

  logic [DATA_W-1:0] sreg [TAPS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) sreg[k] <= '0;
    end else if (load) begin
      sreg <= taps_in;
    end else if (shift) begin
      for (int k = 0; k < TAPS; k++) sreg[k] <= sreg[k] >> 1;
    end
  end

  always_comb begin
    for (int k = 0; k < TAPS; k++) bits[k] = sreg[k][0];
  end

endmodule
