// da_control: the control unit (CU) of the DA FIR filter, a two-state FSM.
//
// IDLE waits for a sample. When a sample is accepted (in_valid && in_ready)
// the CU raises ctrl.load: the delay line takes the sample, the serializer is
// loaded with the new taps and the accumulator is cleared. RUN then lasts
// DATA_W clock cycles, one per bit position of the samples (ctrl.run); the
// last of them is the sign bit (ctrl.sub) and also strobes the output
// register (ctrl.out_load). out_valid is a one-cycle pulse in the cycle after
// that, when the output register holds y(n).
//
// in_ready is high in IDLE and in the last bit cycle of RUN, so a new sample
// can be accepted while the previous one finishes: with samples always
// offered the filter takes one sample every DATA_W clocks (16 with 16-bit
// samples, so a 16 MHz sample rate needs a 256 MHz bit clock). Latency from
// the accept edge to out_valid is DATA_W cycles. The state encoding, the
// valid/ready handshake and the overlap are this design's choices.
// Synchronous active-low reset returns to IDLE.
module da_control
  import fir_da_pkg::*;
#(
  parameter int unsigned DATA_W = fir_da_pkg::FIR_DATA_W
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  output da_ctrl_t ctrl,
  output logic     out_valid
);

  typedef enum logic {IDLE, RUN} state_t;

  localparam int unsigned CNT_W = $clog2(DATA_W);

  state_t           state;
  logic [CNT_W-1:0] bit_cnt;
  logic             last_bit;
  logic             accept;

  assign last_bit = (state == RUN) && (bit_cnt == CNT_W'(DATA_W - 1));
  assign in_ready = (state == IDLE) || last_bit;
  assign accept   = in_valid && in_ready;

  always_comb begin
    ctrl.load     = accept;
    ctrl.run      = (state == RUN);
    ctrl.sub      = last_bit;
    ctrl.out_load = last_bit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      bit_cnt   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= last_bit;
      if (accept) begin
        state   <= RUN;
        bit_cnt <= '0;
      end else if (last_bit) begin
        state   <= IDLE;
        bit_cnt <= '0;
      end else if (state == RUN) begin
        bit_cnt <= bit_cnt + 1'b1;
      end
    end
  end

  // The datapath is reloaded only when the previous sample is done.
  a_load_when_free: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.load |-> (state == IDLE || last_bit));
  // An accepted sample starts RUN at bit 0 and reaches its sign bit exactly
  // DATA_W cycles later.
  a_run_start: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.load |=> (state == RUN && bit_cnt == '0));
  a_run_length: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.load |-> ##DATA_W last_bit);

endmodule
