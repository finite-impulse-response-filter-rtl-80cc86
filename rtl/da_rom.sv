// da_rom: the distributed-arithmetic look-up table.
//
// For a TAPS-bit address a, the ROM holds  P(a) = sum over k with a[k]=1 of
// A_k, every partial sum of the filter coefficients that one bit position of
// the samples can select. With it the inner product needs no multiplier:
// y = sum_j 2^j P(bit j of every tap), with the sign bit's term negated.
// The table has 2^TAPS words (256 for 8 taps) of LUT_W bits; it is computed
// from the coefficient parameter COEFS at elaboration, so changing the filter
// means changing COEFS only.
//
// Coefficient k is COEFS[k*COEF_W +: COEF_W], two's complement. LUT_W
// defaults to COEF_W + clog2(TAPS), wide enough for any sum of TAPS
// coefficients. The read is combinational (this design's choice) so one
// table access fits in each bit cycle.
module da_rom
  import fir_da_pkg::*;
#(
  parameter int unsigned            TAPS   = fir_da_pkg::FIR_TAPS,
  parameter int unsigned            COEF_W = fir_da_pkg::FIR_COEF_W,
  parameter int unsigned            LUT_W  = COEF_W + $clog2(TAPS),
  parameter logic [TAPS*COEF_W-1:0] COEFS  = fir_da_pkg::DEFAULT_COEFS
) (
  input  logic [TAPS-1:0]         addr,
  output logic signed [LUT_W-1:0] data
);

  localparam int unsigned DEPTH = 2 ** TAPS;

  function automatic logic [DEPTH*LUT_W-1:0] build_table();
    logic [DEPTH*LUT_W-1:0] t;
    logic signed [LUT_W-1:0] s;
    t = '0;
    for (int a = 0; a < DEPTH; a++) begin
      s = '0;
      for (int k = 0; k < TAPS; k++) begin
        if (((a >> k) & 1) == 1) s = s + LUT_W'($signed(COEFS[k*COEF_W +: COEF_W]));
      end
      t[a*LUT_W +: LUT_W] = s;
    end
    return t;
  endfunction

  localparam logic [DEPTH*LUT_W-1:0] TABLE = build_table();

  assign data = $signed(TABLE[addr*LUT_W +: LUT_W]);

endmodule
