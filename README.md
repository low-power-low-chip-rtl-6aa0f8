# Programmable parallel PID controller with two-phase latch storage

This is a discrete-time digital PID controller built for small area, low power and short
latency, not for generality. Its main ideas:

- The proportional, integral and derivative terms are computed by three independent channels
  working in parallel on the same error sample.
- All arithmetic between the error input and the output is combinational.
- The only storage is two 16-bit delay lines, for the integrator and for the previous D product.
  Each is a pair of latches driven by a two-phase, non-overlapping clock.

A new sample can therefore be taken as soon as the combinational logic has settled. No pipeline
and no multi-cycle sequencer is involved.

The controller computes

    Y(n) = K_P * e(n)  +  K_I * sum_{m<=n} e(m)  +  K_D * (e(n) - e(n-1))

for an 8-bit two's complement error `e(n)`. Each coefficient is programmable as a fraction:

    K = E / 2^k,   E = 0..255 (unsigned 8 bit),   k = 0..8

so a coefficient can be anything from 1/256 to 255 in steps fine enough for most loops. Some
examples: K = 1/2 is E = 1 with k = 1. K = 17/32 is E = 17 with k = 5. K = 7/256 is E = 7 with
k = 8.

The architecture, the channel structure and all widths follow a published transistor-level
design. That design keeps bits on the gate capacitance of inverters and uses transmission-gate
switch fields. This RTL expresses the same structure as synthesizable logic with latches. The
places where it had to choose for itself are listed under "Choices and departures" below.

## Number format

Every channel result is a 24-bit two's complement word with **8 fractional bits**, so read as an
integer it is the exact result times 256. No bit is ever lost to the division. Examples:

- With K = 91/256 and e = 9, Y_P reads as the integer 819 (= 91*9), i.e. 3.199.
- With K = 17/32 and e = 100, Y_P = 53.125 reads as `24'h003520`.

The output `y` is 26 bits wide, also with 8 fractional bits. You can instead treat `y` as having
16 fractional bits, which divides every coefficient by a further 256. The coefficients are then
normalised to the range 1/65536..1. That is only a different reading of the same wires, and no
hardware is involved.

## Datapath

```
e(n) ─┬─> [ x E_P ] ───────────────────────────────> [ shift / D_P ] ──┐ 24b
      │                                                                [ + ] 25b ─┐
      ├─> [ x E_I ] ─> [ + ] ─> [ OCB ] ─┬────────> [ shift / D_I ] ──┘          [ + ] ─> y (26b)
      │                  ^               │                                       │
      │                  └─ [delay line]<┘                                       │
      │                                                                          │
      └─> [ x E_D ] ─┬──────────> [ - ] ──────────> [ shift / D_D ] ─────────────┘ 24b
                     └─ [delay line] ─^
```

### Binary-tree multiplier (`bt_multiplier`)

Each channel has its own 8x8 multiplier: signed error times unsigned numerator, giving a 16-bit
signed product. It is a tree of adders, not a shift-and-add sequence, so it needs no clock.

- Leaf j of the tree is `e` if bit j of E is set, else 0.
- A node adds a lower group A to an upper group B that weighs 2^h more.
- The h low bits of A go straight through. The adder only adds `A >> h` to B, and the vacated
  top bits of `A >> h` are filled with the sign of the error.
- With 8 leaves there are three adder levels: four 9-bit, two 10-bit and one 12-bit adders, 68
  one-bit full adders in all. These are the narrowest widths that cannot overflow.

All adders in the design are ripple chains of one-bit full adders (`mbfa` of `full_adder`
cells).

### Dividing block (`shift_block`)

Division by 2^k places the 16-bit value inside a 24-bit word:

- k = 0 puts it at bits 23..8.
- k = 8 puts it at bits 15..0.
- Bits below the value are 0, and bits above it repeat the sign bit.

The divisor is selected by a **one-hot** 9-bit word `d`, where `d[k]` selects division by 2^k.
This models the switch field of the original design, where one switch per output bit and setting
is closed. An all-zero `d` gives 0. An assertion reports a select with more than one bit set.
`pid_pkg::shift_sel(k)` builds the select word.

### Integral channel and overflow control block (`i_channel`, `ocb`)

The product E_I*e(n) is added to the running sum from the delay line. The overflow control block
clamps that 16-bit sum:

- An overflow is detected when both addends have the same sign and the sum's sign differs.
- The output is then 32767 or -32768, and `i_ovf` is high.

The clamped sum feeds back into the delay line and, separately, goes to the dividing block. The
accumulator therefore holds the *undivided* sum, and the divisor D_I can be changed without
disturbing the integrator state.

### Derivative channel (`d_channel`)

The delay line stores the *product* E_D*e(n-1), not the error. The subtraction adds the inverted
stored product with carry-in 1, in a single 16-bit adder. Two consequences follow:

- After E_D is reprogrammed, the first difference uses a product formed with the old E_D.
- There is no clamp in this channel. A difference outside the 16-bit range wraps around. This
  needs |E_D*(e(n)-e(n-1))| > 32767, which only a very large step with a large E_D can produce.

### Output stage

A 24-bit adder adds Y_P and Y_I, and its carry-out gives the 25-bit sum. A 25-bit adder then adds
the sign-extended Y_D, giving 26 bits. In each case the extra top bit is
`sign(a) ^ sign(b) ^ carry_out`.

## Two-phase timing and the delay lines

This is the least conventional part of the design. Each delay line bit is two latches in series:

- the first latch is transparent while `ck1` is high;
- the second latch is transparent while `ck2` is high.

`ck1` and `ck2` never overlap. One sample period works like this:

| phase (master cycles) | ck1 | ck2 | what happens |
|---|---|---|---|
| 0 .. SAMPLE_CYCLES-4 | 1 | 0 | new e(n) is applied at the rising edge. All channels compute. The first latches follow the new I sum and D product. The second latches still present sample n-1. |
| SAMPLE_CYCLES-3 | 0 | 0 | `y_valid`: everything has settled. Read `y`, `y_p`, `y_i`, `y_d`, `i_ovf` here. |
| SAMPLE_CYCLES-2 | 0 | 1 | the second latches take the new values. The outputs change now and are not valid. |
| SAMPLE_CYCLES-1 | 0 | 0 | `sample_req`: the next sample goes in at the clock edge that ends this cycle. |

`clock_gen_2ph` derives the two phases from a master clock `clk` with a phase counter. The phases
come straight from flip-flops, so they are glitch-free. `ck1` is long and `ck2` is one cycle
long, because `ck2` only has to copy the delay lines. With the default `SAMPLE_CYCLES = 8`, one
sample is taken every 8 master cycles.

The sample rate is set by the master clock and `SAMPLE_CYCLES`. The `ck1` phase must be longer
than the combinational path from `e` to `y`. That path is a multiplier (three adder levels), a
16-bit adder with the clamp, the shift and two wide adders.

Lint tools that treat latches as transparent report the integrator path
adder -> OCB -> delay line -> adder as a combinational loop. The loop is never closed in
operation, because its two latches are never open at the same time.

Reset: `rst_n` is synchronous for the phase generator and asynchronous for the delay lines. It
clears the integrator and the stored D product. During reset both phases are low and
`sample_req` is held high, so the first sample enters at the first edge after reset is released.

## Interface of `pid_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | master clock of the phase generator |
| `rst_n` | in | 1 | active-low reset; clears the I and D history |
| `e` | in | 8 | error sample, two's complement. Hold it from the sample edge until `ck1` falls. |
| `cfg` | in | `pid_cfg_t` | `e_p, e_i, e_d` (8 bit each), `d_p, d_i, d_d` (one-hot, 9 bit each). Keep it stable while a sample is computed. |
| `y` | out | 26 | Y = Y_P + Y_I + Y_D, 8 fractional bits |
| `y_p`, `y_i`, `y_d` | out | 24 | channel results, 8 fractional bits |
| `i_ovf` | out | 1 | integrator clamp active for this sample |
| `ck1`, `ck2` | out | 1 | the two clock phases |
| `y_valid` | out | 1 | outputs valid in this cycle |
| `sample_req` | out | 1 | apply the next sample at the edge ending this cycle |

Parameter: `SAMPLE_CYCLES` (default 8, at least 5). The widths are fixed in `pid_pkg`: error 8,
numerator 8, largest shift 8. The channel modules and the multiplier take their widths as
parameters, so they can be reused at other sizes.

Example configuration, with K_P = 91/256, K_I = 127/256 and K_D = 80/256:

```systemverilog
cfg = '{e_p: 8'd91, e_i: 8'd127, e_d: 8'd80,
        d_p: shift_sel(8), d_i: shift_sel(8), d_d: shift_sel(8)};
```

## Choices and departures

The structure and all widths follow the original design. The following were decided here:

- **Overflow rule.** The original only says the block prevents overflow. Two's complement
  saturation was chosen.
- **Clock generator.** The original asks only for a simple two-phase generator with a short second
  phase. The master-clock counter, the idle cycles, the default of 8 cycles per sample and the
  `sample_req` / `y_valid` handshake are this design's choices.
- **Reset.** A reset was added. The original stores charge and has none.
- **Multiplier adder widths.** These were derived here as the narrowest safe widths. They agree
  with the original's size estimate for the multiplier.
- **Empty divisor select.** With no divisor bit set the channel output is 0. The original's switch
  field would leave the outputs floating.
- **Coefficient loading.** The coefficients are plain inputs. The original does not say how they
  are loaded.
- **Not modelled.** Analog and physical properties are outside the RTL: storage on parasitic
  capacitance, transmission gates, the 180 nm timing (3-7 ns per sample, 200-330 MHz), power and
  area.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the module with integer
arithmetic written from the equations. The shared model is in `tb/pid_ref_pkg.sv`. Each
testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_mbfa` | adder against integer sum and carry, corner and random operands |
| `tb_bt_multiplier` | all 65536 combinations of error and numerator; also 5x3 (exhaustive) and 10x6 (random) instances |
| `tb_shift_block` | every divisor, sign fill, exact bit placement for k = 0 and k = 8 |
| `tb_ocb` | exact sums and both clamps |
| `tb_delay_line` | output holds the previous value during `ck1`, updates during `ck2`, reset |
| `tb_clock_gen_2ph` | phase lengths, no overlap, idle cycles, sample period |
| `tb_p_channel` | worked coefficient examples and random settings |
| `tb_i_channel` | random sequences with runs that hit both clamps, reprogramming, reset |
| `tb_d_channel` | random sequences, reprogramming between blocks |
| `tb_pid_top` | end-to-end at default size (details below) |

`tb_pid_top` works in two parts:

- **Triangle run.** It runs two periods of a 36-sample triangular error (0 up to 9, down to -9,
  back to 0) with K_P = 91/256, K_I = 127/256 and K_D = 80/256, and checks every output against
  the model. Over a period the peaks are 819 for Y_P and 10287 for Y_I, i.e. 127 times the
  largest partial sum 81, both in units of 1/256.
- **Reprogramming run.** It reprograms 45 times, covering all nine divisors in all three channels.
  Runs of large errors drive the integrator into both clamps, and it resets once. It counts each
  of these events and fails if one never happens. It also checks the sample period of 8 master
  cycles.

To simulate with Verilator (version 5, with timing support), from the folder holding `rtl/` and
`tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_pid_top rtl/pid_pkg.sv tb/pid_ref_pkg.sv tb/tb_pid_top.sv -o sim
./obj_dir/sim
```

Replace `tb_pid_top` with any other testbench name to run that one. Every run takes well under a
second.

## Files

- `rtl/pid_pkg.sv`: widths, the configuration struct `pid_cfg_t`, `shift_sel()`
- `rtl/full_adder.sv`, `rtl/mbfa.sv`: one-bit full adder and the ripple multi-bit adder
- `rtl/bt_multiplier.sv`: binary-tree multiplier
- `rtl/shift_block.sv`: dividing block
- `rtl/ocb.sv`: overflow control block
- `rtl/delay_line.sv`: two-latch one-sample delay
- `rtl/clock_gen_2ph.sv`: two-phase clock generator
- `rtl/p_channel.sv`, `rtl/i_channel.sv`, `rtl/d_channel.sv`: the three channels
- `rtl/pid_top.sv`: complete controller
- `tb/`: testbenches and the reference package
