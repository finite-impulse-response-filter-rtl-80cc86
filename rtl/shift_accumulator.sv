// shift_accumulator: adds the DA ROM words into the filter output, one bit
// position per clock, using an adder and shifters instead of multipliers.
//
// For two's-complement samples the output is
//   y = sum_{j=0}^{DATA_W-2} 2^j P_j  -  2^{DATA_W-1} P_{DATA_W-1},
// where P_j is the ROM word for bit position j. Bits arrive LSB first, so the
// sum is built by a right-shifting accumulator: each cycle the high part
// `hi` (LUT_W+1 bits) gets P_j added (or subtracted when `sub` is high, for
// the sign bit), the sum is shifted right one place, and the bit that falls
// out enters the top of the DATA_W-bit low register `lo`. After DATA_W cycles
// {hi, lo} is the exact OUT_W = LUT_W + DATA_W bit result, nothing rounded.
// The shift-right form and the subtraction for the sign bit are this design's
// choices.
//
// Interface: `clear` starts a new sum (priority over `en`); `en` adds this
// cycle's word. `result` is registered; `result_next` is the value `result`
// takes at the coming edge, which lets the caller capture the finished sum in
// the same cycle the last bit is added. `result` is only meaningful after
// exactly DATA_W enabled cycles since the clear.
module shift_accumulator #(
  parameter int unsigned LUT_W  = 19,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned OUT_W = LUT_W + DATA_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    en,
  input  logic                    sub,
  input  logic signed [LUT_W-1:0] lut,
  output logic signed [OUT_W-1:0] result,
  output logic signed [OUT_W-1:0] result_next
);

  logic signed [LUT_W:0]    hi, hi_next;
  logic        [DATA_W-1:0] lo, lo_next;
  logic signed [LUT_W+1:0]  sum;

  always_comb begin
    // |hi| < 2^LUT_W (a geometric sum of ROM words halved each step), so hi
    // needs LUT_W+1 bits and hi +/- lut needs LUT_W+2.
    if (sub) sum = (LUT_W+2)'(hi) - (LUT_W+2)'(lut);
    else     sum = (LUT_W+2)'(hi) + (LUT_W+2)'(lut);
    hi_next = sum[LUT_W+1:1];
    lo_next = {sum[0], lo[DATA_W-1:1]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      hi <= '0;
      lo <= '0;
    end else if (en) begin
      hi <= hi_next;
      lo <= lo_next;
    end
  end

  assign result      = $signed({hi[LUT_W-1:0], lo});
  assign result_next = $signed({hi_next[LUT_W-1:0], lo_next});

endmodule
