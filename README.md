# Unified forward / inverse quantizer for H.264/AVC

An H.264/AVC codec quantizes transform coefficients in two places. The encoder
loop runs a forward quantizer followed by an inverse quantizer (rescaler), and
the decoder runs the inverse quantizer alone. Both involve a multiplication by a
QP-dependent rational factor, which is replaced in practice by an integer
multiply, a rounding offset and a shift. This design notes that the two
operations have the same shape:

    O = (S * sigma + phi) * 2^eps

It builds one small datapath for that expression, with one multiplier, one
adder and one barrel shifter. Small ROMs and a little control logic around them
supply `sigma`, `phi` and `eps` for whichever operation is requested. The
opcode can change on every clock, so a single instance serves the forward and
the inverse path of an encoder in alternation. Two instances run them in
parallel. Throughput is one coefficient per clock. An elaboration parameter
selects one of four pipeline depths, which trades latency against clock rate.

## The arithmetic

`k = QP/6` (integer division) and `m = QP%6`. The position class `n` of a
coefficient in its 4x4 block is 0 when the row and column indexes are both
even, 1 when both are odd, and 2 otherwise. DC coefficients always use `n = 0`.

| operation | coefficient type | sigma | phi | shift |
|---|---|---|---|---|
| forward | core (AC) | MF(m,n) | f = 2^(15+k)/3 (INTRA) or 2^(15+k)/6 (INTER) | right by 15+k |
| forward | 4x4 luma DC, 2x2 chroma DC | MF(m,0) | 2f | right by 16+k |
| inverse | core (AC) | V(m,n) | 0 | left by k |
| inverse | 4x4 luma DC, QP < 6 | V(m,0) | 2 | right by 2-k |
| inverse | 4x4 luma DC, 6 <= QP < 12 | V(m,0) | 1 | right by 2-k |
| inverse | 4x4 luma DC, QP >= 12 | V(m,0) | 0 | left by k-2 |
| inverse | 2x2 chroma DC, QP < 6 | V(m,0) | 0 | right by 1 |
| inverse | 2x2 chroma DC, QP >= 6 | V(m,0) | 0 | left by k-1 |

MF (14 bits) and V (5 bits) are the usual H.264 tables:

| m | 0 | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|---|
| MF, n=0 | 13107 | 11916 | 10082 | 9362 | 8192 | 7282 |
| MF, n=1 | 5243 | 4660 | 4194 | 3647 | 3355 | 2893 |
| MF, n=2 | 8066 | 7490 | 6554 | 5825 | 5243 | 4559 |
| V, n=0 | 10 | 11 | 13 | 14 | 16 | 18 |
| V, n=1 | 16 | 18 | 20 | 23 | 25 | 29 |
| V, n=2 | 13 | 14 | 16 | 18 | 20 | 23 |

Only the INTRA offset `f` is stored, nine values `floor(2^(15+k)/3)`. The INTER
offset `2^(15+k)/6` is the same value shifted right by one (`beta = 1`). The
doubling for DC coefficients is a left shift by `h = 1`. So the forward offset
is `phi = (f >> beta) << h`.

**Signs.** Forward quantization works on the magnitude:
`Z = sign(W) * ((|W| * MF + phi) >> shift)`. This is what the H.264 reference
encoder does, and it keeps the dead zone symmetric about zero. Inverse
quantization is done in two's complement with an arithmetic right shift, as
the standard specifies. The 32-bit result is clipped to a signed 16-bit
output.

**Example.** Take W = 100, QP = 28 (k = 4, m = 4), position (0,0), INTRA.
Then `(100*8192 + 174762) >> 19 = 1`. Rescaling that level gives
`(1*16) << 4 = 256`.

## The datapath: four phases

`unified_quant` is split into four phases, A to D. A pipeline register may sit
between each pair of phases.

* **A: constants and control.** `qp_rom` splits QP into `k` and `m`. The
  position class is derived from the row and column parities. `mf_rom` and
  `v_rom` are read in parallel, and the opcode selects one of them as
  `sigma`. `f_rom` supplies `f`, and `deadzone_gen` turns it into `phi`.
  `shift_calc` computes the shift amount and direction. Inside it, `eta_unit`
  implements the direction table:

  | opcode | T_TYPE | QP<12 | QP<6 | eta (1 = right) |
  |---|---|---|---|---|
  | 0 (forward) | any | - | - | 1 |
  | 1 | 00 (2x2 DC) | - | x | x |
  | 1 | 01 (4x4 DC) | x | - | x |
  | 1 | 10, 11 | - | - | 0 |

  One 5-bit adder then produces every shift amount. For forward quantization
  it adds `15+h` and `k`. For inverse quantization it subtracts `tau` (2 for
  luma DC, 1 for chroma DC, 0 for AC) from `k`, or `k` from `tau`, as eta
  says.
* **B: multiply and select.** This is a 16x15 signed product. For forward
  quantization the magnitude of the product is selected, and the sign is
  carried along to phase D.
* **C: round.** A 31-bit adder adds `phi`. The worst forward product is
  32768 x 13107, below 2^29. With `phi` below 2^23, the sum cannot overflow.
* **D: shift and deliver.** The 32-bit barrel shifter (`barrel_shifter`, five
  stages of 2:1 multiplexers) shifts left or arithmetically right. The sign is
  then restored for forward results, and the value is clipped to 16 bits.

## Pipeline configurations and timing

`N_STAGES` (default 4) places the registers as follows:

| N_STAGES | A/B | B/C | C/D | latency |
|---|---|---|---|---|
| 1 (non-pipelined) | - | - | - | 1 |
| 2 | - | reg | - | 2 |
| 3 | reg | reg | - | 3 |
| 4 (fully pipelined) | reg | reg | reg | 4 |

Latency is counted in clock cycles, including the cycle in which the
coefficient is presented. The input is not registered. A coefficient presented
in cycle t appears on `out_coef`, with `out_valid` high, in cycle
t + N_STAGES - 1. With `N_STAGES = 1` the block is purely combinational and has
no flip-flops. There is no stall and no back-pressure. Every input cycle with
`in_valid` set yields exactly one output cycle, in order. The registers are
`pipe_reg` instances. They load every clock and clear on the asynchronous
active-low `rst_n`. With a register disabled, the instance is a wire.

Published implementation figures for this architecture give the following
clock rates:

* FPGA: about 127, 143, 216 and 311 MHz for 1 to 4 stages.
* ASIC: about 254 MHz in 90 nm for all four depths. The constant multiplier
  limits the ASIC clock, so the non-pipelined version is the best ASIC choice
  there.

These figures come from that source, not from this RTL.

## Two multipliers

`USE_MUX_MCM` selects how phase B multiplies:

* `0` (default): `signed_mult`, a plain `a * b` for synthesis to map to a DSP
  slice or a multiplier generator. This suits FPGAs.
* `1`: `mux_mcm`, a multiplexed multiple-constant multiplier meant for ASICs.
  The multiplier only ever sees 36 constants (18 MF, 18 V), so no general
  multiplier is needed. Each constant is stored as its canonical signed-digit
  recoding, at most 8 non-zero digits (13107 needs all 8). The product is the
  sum of 8 shifted copies of the coefficient. For each term, a multiplexer
  driven by (opcode, m, n) picks the shift and the sign, or drops the term. The
  digit tables are computed at elaboration from the MF and V tables. A
  tool-optimized MCM graph would also share partial sums between constants.
  This one does not, so it is correct but not area-optimal.

## Interface of `unified_quant`

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst_n | in | 1 | asynchronous active-low reset of the pipeline registers |
| in_valid | in | 1 | a coefficient is presented |
| in_op | in | 1 | 0 forward quantization, 1 inverse quantization |
| in_ttype | in | 2 | 00 2x2 chroma DC, 01 4x4 luma DC, 10/11 core transform |
| in_intra | in | 1 | INTRA macroblock (forward offset 1/3, otherwise 1/6) |
| in_qp | in | 6 | QP, 0..51 (an assertion flags larger values) |
| in_row, in_col | in | 2, 2 | position of the coefficient in its 4x4 block |
| in_coef | in | 16 | signed W (forward) or level Z (inverse) |
| out_valid | out | 1 | out_coef holds a result |
| out_coef | out | 16 | signed level Z or rescaled coefficient |

Shared types, widths and the MF/V tables are in `quant_pkg`. They include the
`op_e` and `ttype_e` enums and the `mf_const`/`v_const` functions.

## Interpretation points and departures

The following are choices made here, where the architecture as published is
silent, ambiguous or self-contradictory.

* **Inverse rounding outside the 4x4 luma DC.** One statement of the inverse
  rounding value gives 2 for every case other than the luma DC with QP >= 6.
  This design uses 0 there, which is what H.264 requires. A rounding value of
  2 followed by a left shift would be wrong for AC coefficients.
* **Inverse DC left shifts.** The shift is `k - tau`, not `k`: `k-2` for luma
  DC at QP >= 12 and `k-1` for chroma DC at QP >= 6. Again, this follows the
  standard.
* **Forward quantization sign.** Forward quantization uses sign and magnitude,
  not a plain arithmetic shift of the signed sum. A plain arithmetic shift
  would round negative coefficients away from zero and break the match with
  the reference encoder.
* **DC position class.** DC coefficients use the `n = 0` constants, whatever
  their position.
* **Shift-amount adder width.** The adder is 5 bits wide, because 15+8+1 = 24
  does not fit in the 4 bits given for it.
* **Where `phi` is finished.** `phi` is fully formed in phase A. In the
  published design its final value is settled in phase B, in the multiplier's
  multiply-accumulate. The result is the same; only the register boundary
  differs.
* **Additions with no published counterpart.** The valid bit, the reset, the
  16-bit output clipping and the QP range assertion are this design's own.
* **Not built.** Parallel arrays of several quantizers that share their
  QP-dependent logic are sketched as an extension, for example four instances
  for 7680x4320 at 30 fps. They are not built. Instantiate several
  `unified_quant` blocks for that.

## Throughput against video formats

At one coefficient per clock, counting one coefficient per pixel:

* **4096x2048 at 30 fps:** 251.7 Mcoefs/s, so a clock of at least 252 MHz.
  The 4-stage FPGA figure (311 MHz) and the ASIC figure (about 254 MHz) meet
  it.
* **1080p30:** 62.2 Mcoefs/s.
* **7680x4320 at 30 fps:** 995 Mcoefs/s, which needs four instances.

If 4:2:0 chroma coefficients are counted as well, multiply these rates by 1.5.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* **Unit tests.** The ROM, eta, shift-amount and dead-zone tests are
  exhaustive over their inputs. The multipliers and the shifter are checked
  on corner and random operands against integer arithmetic. The mux-MCM test
  covers all 36 constants.
* **`tb_unified_quant`** runs the top at its default parameters. It sweeps
  every QP, transform type, INTRA/INTER, position and several coefficient
  values, with the opcode alternating every cycle and random idle cycles.
  That is 53,248 results, each compared with an independent model of the
  H.264 formulas:
  * forward in the reference-encoder form;
  * inverse in the standard's `LevelScale = 16*v` form, with its own shifts
    and rounding.

  It checks that the latency is exactly N_STAGES cycles (three register
  delays at the default). It also fails if any of these cases never occurred:
  * forward INTRA, INTER and DC, and negative inputs;
  * inverse AC left shift;
  * the three luma-DC cases;
  * chroma-DC right and left shifts;
  * output clipping;
  * opcode switches, idle cycles and back-to-back issue.

  The stimulus and scoreboard are in `uq_stim_check`.
* **`tb_unified_quant_cfg`** runs all four depths with both multipliers, eight
  instances side by side.

To build and run a testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb rtl/quant_pkg.sv \
        tb/tb_unified_quant.sv --top-module tb_unified_quant -Mdir obj -o sim
    ./obj/sim

Any other `tb_*` file works the same way. Each simulation takes well under a
second.

## Files

| file | contents |
|---|---|
| rtl/quant_pkg.sv | widths, opcode and T_TYPE enums, MF and V tables |
| rtl/unified_quant.sv | top: phases A-D, pipeline configuration, multiplier choice |
| rtl/qp_rom.sv | QP/6 and QP%6 |
| rtl/mf_rom.sv, rtl/v_rom.sv | forward and inverse scale factors |
| rtl/f_rom.sv | INTRA dead-zone offsets |
| rtl/eta_unit.sv | shift direction table |
| rtl/shift_calc.sv | shift amount adder (uses eta_unit) |
| rtl/deadzone_gen.sv | rounding value phi |
| rtl/signed_mult.sv | generic 16x15 signed multiplier |
| rtl/mux_mcm.sv | multiplexed constant multiplier |
| rtl/barrel_shifter.sv | 32-bit bidirectional shifter |
| rtl/pipe_reg.sv | optional pipeline register |
| tb/uq_stim_check.sv | stimulus, reference model and scoreboard for the top |
| tb/tb_*.sv | testbenches |

To change the pipeline depth or the multiplier, override `N_STAGES` (1-4) or
`USE_MUX_MCM` on `unified_quant`. To change the constant tables, edit
`quant_pkg`. The mux-MCM derives its digit tables from those tables, but its
term count `K` must cover the constant with the most non-zero signed digits.
