// da_datapath: the datapath unit (DU) of the DA FIR filter.
//
// Chain: tap_delay_line (b(n)..b(n-7)) -> bit_serializer (bit j of every tap)
// -> da_rom (partial sum of coefficients for that bit pattern) ->
// shift_accumulator (weights the words by 2^j, subtracting the sign-bit word)
// -> output register y. Every unit is steered by the control unit's strobes:
//   ctrl.load      shift the delay line, load the serializer with the new
//                  taps (same edge, from the delay line's next contents) and
//                  clear the accumulator;
//   ctrl.run       one bit cycle: accumulate, shift the serializer;
//   ctrl.sub       the bit cycle of the sign bit;
//   ctrl.out_load  capture the finished sum in y.
// load may coincide with the last run cycle: the finished sum still goes to
// y (it is taken from the accumulator's next value) while the serializer
// and accumulator start the new sample.
//
// y is the full-precision OUT_W-bit result; scaling or rounding to a shorter
// word is left to the user (the output width is this design's choice).
module da_datapath
  import fir_da_pkg::*;
#(
  parameter int unsigned            TAPS   = fir_da_pkg::FIR_TAPS,
  parameter int unsigned            DATA_W = fir_da_pkg::FIR_DATA_W,
  parameter int unsigned            COEF_W = fir_da_pkg::FIR_COEF_W,
  parameter logic [TAPS*COEF_W-1:0] COEFS  = fir_da_pkg::DEFAULT_COEFS,
  localparam int unsigned           LUT_W  = COEF_W + $clog2(TAPS),
  localparam int unsigned           OUT_W  = LUT_W + DATA_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [DATA_W-1:0]       sample_in,
  input  da_ctrl_t                ctrl,
  output logic signed [OUT_W-1:0] y
);

  logic [DATA_W-1:0]       taps_next [TAPS];
  logic [TAPS-1:0]         rom_addr;
  logic signed [LUT_W-1:0] rom_data;
  logic signed [OUT_W-1:0] acc_next;

  tap_delay_line #(.TAPS(TAPS), .DATA_W(DATA_W)) u_delay (
    .clk, .rst_n,
    .shift     (ctrl.load),
    .sample_in (sample_in),
    .taps      (),
    .taps_next (taps_next)
  );

  bit_serializer #(.TAPS(TAPS), .DATA_W(DATA_W)) u_ser (
    .clk, .rst_n,
    .load    (ctrl.load),
    .shift   (ctrl.run),
    .taps_in (taps_next),
    .bits    (rom_addr)
  );

  da_rom #(.TAPS(TAPS), .COEF_W(COEF_W), .LUT_W(LUT_W), .COEFS(COEFS)) u_rom (
    .addr (rom_addr),
    .data (rom_data)
  );

  shift_accumulator #(.LUT_W(LUT_W), .DATA_W(DATA_W)) u_acc (
    .clk, .rst_n,
    .clear       (ctrl.load),
    .en          (ctrl.run),
    .sub         (ctrl.sub),
    .lut         (rom_data),
    .result      (),
    .result_next (acc_next)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)             y <= '0;
    else if (ctrl.out_load) y <= acc_next;
  end

endmodule
