# LUT-shift-register random number generator with D flip-flop inputs

This design is a uniform pseudo-random bit generator built for FPGAs. It
produces a new 4-bit random word on every clock edge. The generator is a
binary linear recurrence over GF(2), like an LFSR. Its state is not one long
shift register, though. It is spread across several short shift registers,
which map onto LUTs configured as shift registers (SRL primitives). A small
XOR network mixes the outputs of these shift registers, so every output bit
depends on several lanes. The output word feeds back into the lanes through
programmable delay lines and a row of D flip-flops.

The default configuration has four lanes, with shift registers of depth 4,
4, 3 and 2. With the XOR wiring chosen here, its 21-bit state has the
maximal period of 2^21 − 1 = 2,097,151 clocks for every non-zero seed.

## The feedback loop

```
          +-------------------------------------------------------------+
          |                                                             |
 q[i] ---> delay_line ---> D-FF ---> shift register (DEPTH[i]) ---> o[i]  |
 (lane i)   (dly_sel[i])   (seed on rst)                            |    |
                                                                    v    |
                               o[0..3] ---> XOR network ---> a[0..3]     |
                                                                    |    |
                                           output register <--------+    |
                                                  |                      |
                                                  +---> q[0..3] ---------+
```

Each clock:

1. Each lane's D flip-flop captures that lane's output bit q[i]. The bit
   arrives through the lane's delay line.
2. Each lane's shift register moves its contents one stage along. The
   flip-flop's bit enters the first stage, and the lane output o[i] is the
   last stage.
3. The XOR network forms a[j] as the XOR of a fixed subset of the o[i].
4. The output register stores a as the next q.

Counting from the output register, bit q[i] comes back to the XOR network
1 + DEPTH[i] clocks later. The whole generator is therefore

```
q_j(t+1) = XOR over i with TAPS[j][i] = 1 of q_i(t - 1 - DEPTH[i])
```

It is linear over GF(2). Its state is every register bit in the loop:
4 flip-flops, 4+4+3+2 = 13 shift stages and 4 output bits, 21 bits in all.

## The XOR taps and the period

The period depends entirely on the tap matrix. The default wiring is in
`rng_pkg`:

| output | inputs        |
|--------|---------------|
| a0     | o0 ^ o1       |
| a1     | o0 ^ o1 ^ o2  |
| a2     | o0 ^ o2 ^ o3  |
| a3     | o0 ^ o1 ^ o3  |

This wiring was chosen so that the 21×21 transition matrix T of the loop has
a primitive characteristic polynomial. It was checked in two ways:

- T^(2^21−1) = I.
- T^((2^21−1)/p) ≠ I for each prime factor p of 2^21 − 1 = 7² · 127 · 337.

With this loop structure, no wiring gives full period if every XOR has three
inputs. Some outputs must use two.

If you change DEPTH, N_LANES or TAPS, you need a new tap matrix that passes
the same test. A wrong choice still simulates, but its period is shorter.
Every bit of the output is a linear function of the state. So in one full
period, each output bit is one exactly 2^20 times and zero 2^20 − 1 times.
The end-to-end testbench checks this.

## Seeding and reset

`rst` is synchronous and active high. While it is held:

- the D flip-flops load the `seed` input;
- the shift registers and the output register clear to zero.

After `rst` falls, q stays zero until the seed has passed through the
shortest lane. With the default depths, the seed first reaches q on the
third clock. For example, seed `1000` gives q = `0000, 0000, 1100, ...`.
An all-zero seed leaves the generator at zero for ever, as in any linear
recurrence, so use a non-zero seed.

Real LUT shift registers have no reset. The clear exists only so that
simulation starts from a known state. If you drop it from `lut_shift_reg`,
the shift registers can map to SRLs, and the flip-flop seed alone then sets
the start state.

## Delay lines

In the intended FPGA implementation, each lane's feedback path goes through
a programmable delay line. The line is a chain of programmable interconnect
points, and its delay is set in 1 ps steps by reconfiguring the routing at
run time. The intent is fine control of signal timing against the clock.

`delay_line` is a behavioural model of that part and is not synthesizable.
It is a pure transport delay of `sel` × 1 ps, with a 6-bit setting
(0–63 ps). That delay is far below any practical clock period, so it never
changes the generated sequence. Its effect is only on timing inside the
clock cycle. For synthesis, each delay line is just a wire. The synthesizable
part of the generator is everything else in `lutsr_rng`.

The following parts are not modelled:

- the calibration of the delay lines against process variation and
  clock-tree skew;
- the run-time reconfiguration mechanism itself;
- multiple staggered sets of parallel delay lines.

None of them has a defined algorithm or interface.

## Interface of the top, `lutsr_rng`

| port      | dir | width      | meaning                                        |
|-----------|-----|------------|------------------------------------------------|
| clk       | in  | 1          | clock                                          |
| rst       | in  | 1          | synchronous reset, loads `seed`                |
| seed      | in  | N_LANES    | start value for the D flip-flops               |
| dly_sel   | in  | N_LANES×6  | per-lane delay-line setting, 1 ps per step     |
| q         | out | N_LANES    | random word, a new one every clock             |

The parameters are `N_LANES` (4), `DEPTH` (packed, 8 bits per lane,
default {2,3,4,4} for lanes 3..0), `TAPS` (packed N_LANES×N_LANES matrix,
where `TAPS[j][i]` means o[i] feeds a[j]) and `DSEL_W` (6).

Throughput is N_LANES bits per clock. At the default size the generator holds
21 flip-flops and uses four XOR gates of 2–3 inputs each.

## Where this design goes beyond its source

Taken from the reference design:

- the lane structure: delay line, then D flip-flop with reset, then shift
  register, then XOR network, then clocked output register feeding back;
- four lanes;
- shift-register depths of 4, 4, 3 and 2;
- the 1 ps delay step.

Chosen here:

- the XOR tap matrix. The source shows a fixed fan-out network but does not
  list the taps. The reference drawing suggests three inputs per XOR, but
  that cannot reach full period with these depths.
- the reset behaviour and the seed input;
- the width of the delay setting;
- modelling the delay line as a transport delay.

The source also reports results for a larger generator, about 64 output bits
per clock using 66 flip-flops and 65 LUTs, and sweeps sizes from 32 to 256
registers. It gives no depths or taps for those sizes, so only the 4-lane
configuration is built. `N_LANES`, `DEPTH` and `TAPS` are parameters, so a
larger generator needs only a tap matrix that passes the primitivity test
above.

## Files

- `rtl/rng_pkg.sv`: lane count, default depths and tap matrix.
- `rtl/dff_bank.sv`: the row of D flip-flops, with the seed loaded on reset.
- `rtl/lut_shift_reg.sv`: one lane's shift register.
- `rtl/xor_network.sv`: the tap matrix and XOR gates.
- `rtl/output_memory.sv`: the output register.
- `rtl/delay_line.sv`: the behavioural delay-line model.
- `rtl/lutsr_rng.sv`: the top, which wires all of the above into the loop.
- `tb/tb_<module>.sv`: a self-checking testbench for each module. Each
  prints `TB_RESULT checks=N failures=M`.

## Simulating

Testbenches need `--timing` for the delay-line model. The delay-line model
uses a run-time delay that may be zero, and Verilator warns about that
(ZERODLY). Pass `-Wno-fatal` so the warning does not stop the build. From the
project root:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/rng_pkg.sv tb/tb_lutsr_rng.sv --top-module tb_lutsr_rng
./obj_dir/Vtb_lutsr_rng
```

Use the same pattern for the other testbenches.

`tb_lutsr_rng` runs the top at its default parameters. It checks the
following:

- **Reference model.** A model written directly from the recurrence predicts
  the output on every clock. The run covers a whole period plus a margin,
  about 2.1 million clocks, which takes a few seconds.
- **Start-up.** The hand-worked value after reset described above.
- **Period.** The output repeats after exactly 2^21 − 1 clocks, and not after
  that number divided by 7, 127 or 337.
- **Balance.** Each output bit is one exactly 2^20 times per period.
- **Coverage.** Reset with seed load, re-seeding, and changes of the
  delay-line settings each happen, and are counted.

This covers only the balance part of statistical quality. Fuller tests, such
as a statistical test suite, need the output captured to a file and run in
software.
