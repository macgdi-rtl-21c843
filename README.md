# MACGDI: a folded MAC FIR filter whose arithmetic is made of GDI cells

A hearing aid splits and shapes sound with FIR filters, and on a battery the
power of the multiply-accumulate (MAC) datapath dominates. This design
attacks that in two ways:

* **Architecture.** A linear-phase FIR filter has a symmetric impulse
  response, h[k] = h[N-1-k]. The filter adds the two samples that share a
  coefficient *before* multiplying ("folded direct form"), so an N-tap filter
  needs only N/2 multiplications per output, done one per clock by a single
  MAC unit.
* **Logic style.** Every gate of the MAC datapath (pre-adder, sign-magnitude
  converters, multiplier, accumulator adder) is built from one primitive,
  the Gate Diffusion Input (GDI) cell: two transistors that realise
  `D = G ? N : P`. AND, OR and MUX cost one cell (2 transistors) instead of
  6 to 12 in static CMOS; XOR costs two cells (4 transistors) instead of
  up to 16.

The RTL is a logic-level model: it is bit-exact and cycle-exact, and the
GDI structure is kept visible in the hierarchy (each `gdi_cell` instance is
one two-transistor cell), but electrical effects (reduced voltage swing,
delay, power) are not represented.

## The GDI cell and the gates made from it

A GDI cell is a PMOS and an NMOS transistor with a common gate input **G**.
Unlike a CMOS inverter, the PMOS source is a signal input **P** and the NMOS
source a signal input **N**. When G is 0 the PMOS conducts and the output D
follows P; when G is 1 the NMOS conducts and D follows N. Logically the cell
is a 2:1 multiplexer, and every gate comes from choosing what to feed into
P and N (`rtl/gdi_cell.sv`, `rtl/gdi_gate.sv`):

| `gdi_func_e` | G | P  | N  | D         | cells |
|--------------|---|----|----|-----------|-------|
| `GDI_INV`    | a | 1  | 0  | a'        | 1 |
| `GDI_F1`     | a | b  | 0  | a'b       | 1 |
| `GDI_F2`     | a | 1  | b  | a' + b    | 1 |
| `GDI_OR`     | a | b  | 1  | a + b     | 1 |
| `GDI_AND`    | a | 0  | b  | ab        | 1 |
| `GDI_MUX`    | a | b  | c  | a ? c : b | 1 |
| `GDI_XOR`    | a | b  | b' | a ⊕ b     | 2 (inverter cell makes b') |
| `GDI_XNOR`   | a | b' | b  | (a ⊕ b)'  | 2 |
| `GDI_NAND`   | a | 0  | b  | (ab)'     | 2 (AND cell, then inverter cell) |
| `GDI_NOR`    | a | b  | 1  | (a + b)'  | 2 (OR cell, then inverter cell) |

The "modified GDI" variant ties the PMOS bulk to VDD and the NMOS bulk to
ground instead of to P and N. That changes the electrical behaviour only;
the logic function is the same, so one `gdi_cell` model serves both styles.

On top of the gates:

* `gdi_half_adder`: sum = GDI XOR, carry = GDI AND (3 cells).
* `gdi_full_adder`: two half adders and a GDI OR merging their carries
  (7 cells). The two carries are never both 1, so OR is enough.
* `gdi_adder #(W)`: ripple-carry adder/subtractor; each b bit goes through a
  GDI XOR with `sub`, and `sub` is the carry into bit 0.
* `gdi_twos_to_sm #(W)`: two's complement to sign-magnitude,
  `mag = (x ⊕ sign) + sign`, XOR cells plus a half-adder increment chain.
  The magnitude keeps all W bits, so -2^(W-1) converts exactly.
* `gdi_sm_to_twos #(W)`: the reverse, one bit wider; negative zero becomes 0.
* `gdi_array_mult #(AW, BW)`: unsigned array multiplier. Row j of partial
  products is `a & b[j]` (GDI AND cells); each row is added to the running
  sum by an AW-bit `gdi_adder`, whose low bit is product bit j.

## The folded MAC unit

`rtl/mac_unit.sv` computes, once per enabled clock,

    acc <= acc + h[k] * (x[k] + x[N-1-k])

through this combinational chain (widths at the defaults, 16-bit data and
16-bit coefficients):

| step | block | width |
|------|-------|-------|
| pre-add the folded pair, two's complement | `gdi_adder` | 17 |
| sum → sign + magnitude | `gdi_twos_to_sm` | 1 + 17 |
| coefficient → sign + magnitude | `gdi_twos_to_sm` | 1 + 16 |
| multiply magnitudes; product sign = XOR of signs | `gdi_array_mult`, GDI XOR | 33 |
| product → two's complement | `gdi_sm_to_twos` | 34 |
| sign-extend and add to accumulator | `gdi_adder` | 37 |

Working in sign-magnitude lets the multiplier be a plain unsigned array of
AND cells and full adders, with the sign handled by one XOR; the
conversions on both sides cost two W-bit increment chains.

The accumulator is `ACC_W = DATA_W + COEF_W + 2 + log2(N/2)` = 37 bits wide,
so no input sequence can overflow it: the worst case, 8 products of
(-32768 + -32768) × -32768 = 2^31 each, needs 35 bits plus sign. `clr` loads 0
and has priority over `en`.

The critical path is long (17-bit ripple pre-adder, 17-bit increment,
15 rows of 17-bit ripple adders, 34-bit increment, 37-bit ripple adder). That
is fine at audio sample rates: at 16 taps one output needs 10 clocks, so even
a 1 MHz clock serves 100 ksample/s. If you need a faster clock, the places to
add pipeline registers are after the pre-adder and after the multiplier.

## The filter: memories, control and timing

`rtl/macgdi_filter.sv` wires five blocks together:

    sample_in ─► data_memory ──x[k], x[N-1-k]──► mac_unit ──acc──► output_register ─► y_out
                 (delay line,   coef_rom ──h[k]──►   ▲                    ▲
                  2 read ports)      ▲               │ clr, en            │ load
                                     └──── fir_control ───────────────────┘
                                          (tap index k, shift, handshake)

* `data_memory`: the last N samples, x[0] newest. A new sample shifts every
  entry one place older. Two asynchronous read ports give x[k] and x[N-1-k]
  in the same cycle.
* `coef_rom`: the N/2 distinct coefficients, from the `COEFS` parameter,
  asynchronous read.
* `fir_control`: a three-state machine, IDLE → MAC (N/2 cycles, tap
  0 … N/2-1) → OUT (1 cycle) → IDLE.
* `output_register`: holds the result; `valid` pulses for one cycle after each
  load.

Timing for one sample (N = 16):

    edge:          E0        E1 … E8            E9
    state:   IDLE  │  MAC tap0 … tap7  │  OUT   │ IDLE
                   ▲ sample taken,     ▲ last product     ▲ y_out loaded,
                     delay line shifts,  accumulated        y_valid = 1,
                     acc cleared                            sample_ready = 1

* A sample is taken at a rising edge where `sample_valid` and `sample_ready`
  are both high. `sample_ready` is high only in IDLE. A source that offers a
  sample while the filter is busy must hold it until it is taken.
* The result is in `y_out` after edge E(N/2+1), with `y_valid` high for that
  one cycle. `y_out` then holds until the next result.
* `sample_ready` is back in the same cycle as `y_valid`, so the filter takes
  a sample every N/2 + 2 = 10 clocks at most.
* `rst_n` is asynchronous and active low. It clears the delay line, the
  accumulator and the output register.

The output is the full-precision sum, `y = Σ_{n=0}^{N-1} h[n]·x[n-th newest]`.
With the default Q15 coefficients it is the filtered sample scaled by 2^15.
The top checks two handshake rules with assertions: `y_valid` is a single
cycle pulse, and `sample_ready` is high whenever `y_valid` is.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N_TAPS`  | 16 | filter length. Must be even and ≥ 4 |
| `DATA_W`  | 16 | sample width, two's complement |
| `COEF_W`  | 16 | coefficient width, two's complement |
| `COEFS`   | `macgdi_pkg::DEF_COEFS` | packed array, element k = h[k], k < N/2 |
| `ACC_W`   | 37 (derived) | accumulator and output width |

The default coefficients are a 16-tap low-pass filter with a Hamming-window
sinc, cutoff 0.22 × the sample rate. They are scaled so that the 16 taps sum
to 32767 ≈ 1.0 in Q15:

    h[n] = round(32767 · w[n]·s[n] / Σ w·s),  w[n] = 0.54 − 0.46·cos(2πn/15),
    s[n] = sin(2π·0.22·m)/(π·m),  m = n − 7.5
    h[0..7] = −90, 82, 427, −58, −1742, −995, 5569, 13190

If you change `N_TAPS` or `COEF_W`, you must pass a matching `COEFS`.

## What is this design's own choice

The filter structure follows the source design: a data memory, a coefficient
ROM, a MAC unit, an output register and a control unit. The MAC folds the
symmetric taps and converts to and from sign-magnitude around the
multiplier, and its gates are GDI cells configured as in the GDI function
tables. The following were not specified and are choices made here:

* the filter length, the word widths, the coefficients and full-precision
  output;
* one filter channel. A bank of hearing-aid bands is several instances with
  their own `COEFS`; the number of bands and their edges are left to you;
* the valid/ready handshake, the one-product-per-clock schedule and the
  asynchronous reset;
* the adder, converter and multiplier structures (ripple carry, increment
  chains, array multiplier) and the full adder as two half adders plus OR;
* converting the coefficient to sign-magnitude in hardware, so that the ROM
  holds ordinary two's complement values;
* single-edge flip-flops throughout. The source design pairs the folded
  structure with a dual-edge-triggered flip-flop from earlier work, which
  is not reproduced here;
* the two-microphone noise-suppression front end of a typical hearing aid is
  outside this design.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_gdi_cell` | all 8 input combinations; the single-cell GDI wirings and the modified-GDI AND/OR/XOR/XNOR wirings |
| `tb_gdi_gate` | all 10 gate configurations, exhaustively |
| `tb_gdi_half_adder`, `tb_gdi_full_adder` | exhaustive |
| `tb_fig6_half_adders` | three half adders on the operand pairs (1,0), (1,1), (0,1); note that (1,1) gives S = 0, C = 1 |
| `tb_gdi_adder` | 16-bit add and subtract, corner values and 5000 random |
| `tb_gdi_twos_to_sm` | every 17-bit input, including −65536 |
| `tb_gdi_sm_to_twos` | 33-bit, both signs, 0 / 1 / max, random |
| `tb_gdi_array_mult` | 17×16, corner values and 5000 random |
| `tb_mac_unit` | worst-case products of both signs, clear priority, hold, 500 random 8-product sums |
| `tb_data_memory` | random shift pattern, both ports, folded pairs |
| `tb_coef_rom` | default half-set and DC gain; an overridden 8-tap ROM |
| `tb_output_register` | load, hold, valid pulse, reset |
| `tb_fir_control` | cycle-by-cycle schedule, busy offers ignored |
| `tb_macgdi_filter` | full design at default parameters, see below |

`tb_macgdi_filter` compares every output with a direct-form (unfolded)
convolution, so it shares no arithmetic with the design. It drives an
impulse (the output must replay h), full-scale positive and negative steps,
a full-scale alternating sequence, and 400 random samples with random gaps.
It checks that each result arrives exactly N/2+1 edges after the sample was
taken. It also counts these events and fails if any never happens:

* samples offered while the filter is busy;
* back-to-back samples at the first ready cycle;
* negative folded sums, coefficients and products;
* the most negative folded sum, −65536;
* the delay line dropping its oldest sample.

Running a testbench with Verilator 5 (from the directory holding `rtl/`
and `tb/`):

    verilator --binary --timing --assert -Irtl -Itb rtl/macgdi_pkg.sv \
        tb/tb_macgdi_filter.sv --top-module tb_macgdi_filter -Mdir obj -o sim
    ./obj/sim

The same command works for the other testbenches after changing the
testbench name. Each one runs in well under a second.

## Limits

* Logic-level only. The transistor and power savings of GDI come from the
  circuit, not from this RTL. If you synthesise it to a standard-cell
  library, each `gdi_cell` becomes a multiplexer, and the tool will collapse
  the hierarchy into ordinary gates. To keep the GDI structure, map
  `gdi_cell` to a custom two-transistor cell.
* `gdi_adder` instances with `sub` tied to 0 still contain their input XOR
  cells. Synthesis removes them; a hand layout would omit them.
* There is no rounding or saturation of the output. Take the bits you need
  from `y_out` (with Q15 coefficients, `y_out[30:15]` is the 16-bit result
  when it is in range).
