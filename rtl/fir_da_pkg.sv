// fir_da_pkg: shared sizes, the default coefficient set and the control
// strobe type of the distributed-arithmetic (DA) FIR filter.
//
// The filter is an 8-tap low pass with 16-bit signed samples and 16-bit
// signed coefficients, as the design specifies. The coefficient values are
// this design's own choice (the original set came from a filter-design tool
// and is not reproduced): an 8-tap Hamming-windowed sinc with cutoff 0.25 fs,
// quantised to Q15 so that the taps sum to 32768 (unity DC gain).
//
// The DA table built from these coefficients (see da_rom) has 2^TAPS words of
// LUT_W = COEF_W + clog2(TAPS) bits, so a sum of all eight taps is exact; the
// filter output keeps full precision, OUT_W = LUT_W + DATA_W bits.
package fir_da_pkg;

  localparam int unsigned FIR_TAPS   = 8;
  localparam int unsigned FIR_DATA_W = 16;
  localparam int unsigned FIR_COEF_W = 16;

  // Coefficient k sits at bits [k*COEF_W +: COEF_W] (k = 0 multiplies b(n)).
  localparam logic [FIR_TAPS*FIR_COEF_W-1:0] DEFAULT_COEFS = {
    16'shff57,   // A7 = -169
    16'shfd12,   // A6 = -750
    16'sh0c62,   // A5 =  3170
    16'sh3735,   // A4 = 14133
    16'sh3735,   // A3 = 14133
    16'sh0c62,   // A2 =  3170
    16'shfd12,   // A1 = -750
    16'shff57    // A0 = -169
  };

  // Strobes from the control unit to the datapath unit.
  typedef struct packed {
    logic load;      // accept a sample: shift delay line, load serializer, clear sum
    logic run;       // a bit cycle: accumulate the ROM word, shift the serializer
    logic sub;       // this bit cycle is the sign bit: subtract the ROM word
    logic out_load;  // last bit cycle: capture the finished sum in the output register
  } da_ctrl_t;

endpackage
