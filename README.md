# 8-tap FIR filter on distributed arithmetic

An 8-tap low-pass FIR filter for 16-bit signed samples and 16-bit signed
coefficients that uses no multiplier. It computes

    y(n) = sum_{k=0}^{7} A_k * b(n-k)

with a look-up table of precomputed coefficient sums, one adder and shift
registers. This technique is called distributed arithmetic (DA). The filter
processes one bit position of the samples per clock. A 16-bit sample
therefore takes 16 clocks. To reach the target sample rate of 16 MHz the
clock must run at 256 MHz.

## The idea: distributed arithmetic

Write each two's-complement sample with its bits b_k,j (bit j of tap k):

    b(n-k) = -2^15 b_k,15 + sum_{j=0}^{14} 2^j b_k,j

Swap the two sums of the inner product:

    y = sum_{j=0}^{14} 2^j P(j)  -  2^15 P(15),   P(j) = sum_k A_k b_k,j

P(j) depends only on the 8 bits {b_0,j ... b_7,j}. So there are only 2^8 =
256 possible values. They are stored in a ROM that the 8 bits address. The
filter then works like this:

1. In each clock, one bit from every tap forms a ROM address.
2. The ROM word is added into an accumulator, weighted by 2^j.
3. In the 16th clock, which handles the sign bit, the word is subtracted.

The ROM size is 2^TAPS words, so this structure suits short filters. With 8
taps the ROM holds 256 words of 19 bits.

## Structure

The design has a control unit (CU) and a datapath unit (DU).

```
              +------------------- da_datapath (DU) -------------------+
 sample_in -->| tap_delay_line -> bit_serializer -> da_rom -> shift_    |--> y
              |  b(n)..b(n-7)      bit j of 8 taps   P(j)     accumulator|
              +--------------------------^-------------------------------+
 in_valid  -->  da_control (CU) ---------+ ctrl = {load, run, sub, out_load}
 in_ready  <--                                                        --> out_valid
```

| module | file | role |
|---|---|---|
| `fir_da_top` | `rtl/fir_da_top.sv` | Top level: joins the CU and the DU |
| `da_control` | `rtl/da_control.sv` | CU: two-state FSM (IDLE, RUN) with a 4-bit bit counter |
| `da_datapath` | `rtl/da_datapath.sv` | DU: the chain below plus the output register |
| `tap_delay_line` | `rtl/tap_delay_line.sv` | Holds the last 8 samples |
| `bit_serializer` | `rtl/bit_serializer.sv` | 8 parallel-load shift registers that put out bits LSB first |
| `da_rom` | `rtl/da_rom.sv` | 256 x 19-bit table of coefficient sums, computed from `COEFS` at elaboration |
| `shift_accumulator` | `rtl/shift_accumulator.sv` | Exact shift-and-add accumulator with subtraction for the sign bit |
| `fir_da_pkg` | `rtl/fir_da_pkg.sv` | Sizes, default coefficients, and the `da_ctrl_t` strobe struct |

### The accumulator

The bits arrive LSB first, so the accumulator shifts right rather than
left. Each cycle it computes `sum = hi ± P(j)`. The high part `hi` then
becomes `sum >> 1`. The bit shifted out of `sum` enters a 16-bit low
register from the top. After 16 cycles, `{hi, lo}` holds the exact result.
Nothing is rounded or dropped.

The widths are:

- `hi` has LUT_W+1 = 20 bits.
- `sum` has LUT_W+2 bits.
- The output has LUT_W + DATA_W = 35 bits.

35 bits are enough for any sum of eight 16x16-bit products.

### Timing

- **Accept.** A sample is taken on a clock edge where `in_valid` and
  `in_ready` are both high. On that same edge:
  - the delay line shifts;
  - the serializer loads the new set of eight taps, taken from the delay
    line's next contents;
  - the accumulator clears.
- **RUN.** This lasts 16 cycles, one per bit. The last of them subtracts
  (the sign bit). It also writes the finished sum into the output register.
  The sum comes from the accumulator's next value, so nothing is lost.
- **Output.** `out_valid` pulses for one cycle 16 clocks after the accepting
  edge. `y` holds its value until the next result.
- **Back to back.** `in_ready` is also high in the last RUN cycle. A source
  that always has data is served every 16 clocks. Starting from IDLE, the
  gap between accepts is 17 clocks or more.

Reset is synchronous and active low (`rst_n`). It clears the delay line, so
the filter starts with zero history.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `TAPS` | 8 | filter length |
| `DATA_W` | 16 | sample width, which is also the number of clocks per sample |
| `COEF_W` | 16 | coefficient width |
| `COEFS` | see below | packed coefficients: A_k is in bits `[k*COEF_W +: COEF_W]` |

The default coefficients are an 8-tap Hamming-windowed sinc low pass with
cutoff 0.25 fs, in Q15. They sum to 32768, which gives unity DC gain:

    A = {-169, -750, 3170, 14133, 14133, 3170, -750, -169}

With a 16 MHz sample rate, the gain is 0.98 at 1 MHz, 0.50 at 4 MHz and
0.033 at 7 MHz.

To use another filter, change `COEFS`. The ROM contents follow
automatically. `y` is in the same Q format as the coefficients relative to
the input. If you want a 16-bit result, take `y[30:15]` after checking for
saturation.

## Departures and choices

The filter's specification fixes the following:

- 8 taps;
- 16-bit samples and 16-bit signed coefficients;
- a ROM-based DA datapath built from memory, adders and shifters;
- a 16 MHz sample rate;
- the split into a control unit and a datapath unit.

These are this implementation's own choices:

- **Coefficient values.** The original coefficients came from a filter
  design tool and are not reproduced. The defaults above are a stand-in
  with the same length and format.
- **ROM organisation.** There is one full 2^8-word table, built from the
  eight 16-bit coefficients. It is not partitioned. The read is
  combinational.
- **Bit order and signed samples.** One bit per clock, LSB first. Two's
  complement is handled by subtracting the sign-bit word; offset-binary
  coding is not used.
- **Handshake.** The interface is valid/ready, and a new sample can be
  accepted during the last bit cycle.
- **Output.** `y` is full precision (35 bits), with no rounding.
- **Clock.** Reaching 16 Msample/s needs a 256 MHz clock. Whether a given
  device reaches it has not been checked. The critical path is the ROM read
  followed by a 21-bit add.

## Simulation

All files are SystemVerilog 2017 and are self-checking. Each testbench
prints `TB_RESULT checks=N failures=M`. Modules are found by file name, so
plain Verilator works:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/fir_da_pkg.sv tb/fir_ref_pkg.sv tb/fir_da_top_tb.sv \
  --top-module fir_da_top_tb -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb/fir_da_top_tb.sv` | The whole filter at its default sizes. It runs 3000 samples: impulses of -32768 and 32767, a step, then random values. Every output is compared with a direct-form model that uses multiplications (`tb/fir_ref_pkg.sv`). It also checks that the latency is exactly 16 clocks, that the back-to-back interval is 16 clocks and that `y` stays steady between results. It counts accepts from idle, back-to-back accepts, busy waits and sign-bit subtractions. |
| `tb/fir_da_lowpass_tb.sv` | The filter streaming at 256 MHz with 1, 4 and 7 MHz tones. It checks that the measured rate is 16 Msample/s and that each tone's gain matches \|H(f)\| of the coefficients. |
| `tb/da_control_tb.sv` | The CU's strobes, cycle by cycle, against a reference sequence. |
| `tb/da_datapath_tb.sv` | The DU, driven by strobes from the testbench instead of the CU, against the reference filter. |
| `tb/tap_delay_line_tb.sv`, `tb/bit_serializer_tb.sv`, `tb/da_rom_tb.sv`, `tb/shift_accumulator_tb.sv` | Each unit against an independent model. The ROM test covers all 256 addresses. The accumulator test includes the extreme ROM words. |

`da_control` also contains concurrent assertions for its handshake rules.
They are active when you simulate with `--assert`.
