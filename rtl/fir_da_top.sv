// fir_da_top: 8-tap low-pass FIR filter on a distributed-arithmetic (DA)
// architecture, the control unit (da_control) joined to the datapath unit
// (da_datapath).
//
// Computes y(n) = sum_{k=0}^{TAPS-1} A_k b(n-k) for 16-bit two's-complement
// samples b and 16-bit coefficients A_k without a multiplier: the samples are
// processed one bit position per clock, each bit position addresses a ROM of
// precomputed coefficient sums, and a shifting accumulator adds the words.
//
// Interface: offer a sample on sample_in with in_valid; it is taken on a
// clock edge where in_ready is also high. DATA_W (16) clocks after that edge
// out_valid pulses for one cycle and y holds the full-precision result
// (OUT_W = 35 bits, coefficients in Q15 give y in Q15 of the input scale).
// y keeps its value until the next result. A sample may be offered every
// DATA_W clocks back to back. Reset: rst_n, synchronous, active low; it
// clears the delay line, so the filter starts from zero history.
// The 8 taps, 16-bit samples and 16-bit coefficients are the design's
// specification; the handshake, the coefficient values and the output width
// are this implementation's choices.
module fir_da_top
  import fir_da_pkg::*;
#(
  parameter int unsigned            TAPS   = fir_da_pkg::FIR_TAPS,
  parameter int unsigned            DATA_W = fir_da_pkg::FIR_DATA_W,
  parameter int unsigned            COEF_W = fir_da_pkg::FIR_COEF_W,
  parameter logic [TAPS*COEF_W-1:0] COEFS  = fir_da_pkg::DEFAULT_COEFS,
  localparam int unsigned           OUT_W  = COEF_W + $clog2(TAPS) + DATA_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [DATA_W-1:0]       sample_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y
);

  da_ctrl_t ctrl;

  da_control #(.DATA_W(DATA_W)) u_cu (
    .clk, .rst_n,
    .in_valid, .in_ready,
    .ctrl,
    .out_valid
  );

  da_datapath #(.TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .COEFS(COEFS)) u_du (
    .clk, .rst_n,
    .sample_in,
    .ctrl,
    .y
  );

endmodule
