# Logistic-map PRNG with self-perturbation

A chaotic map computed in finite precision stops being chaotic: every
orbit of a 24-bit logistic map falls into a cycle after a few thousand
steps, and its values cluster. This generator wraps the logistic map
`x -> r*x*(1-x)` in a small circuit meant to counter both effects without
any outside noise source:

* a **processing block** scrambles each map value bit by bit (a toggle
  flip-flop running over the bits, XORed with the value's LSB); the
  scrambled word is the generator's output and is what the map is fed next;
* a **perturbation block** watches the map value and, at moments chosen by
  the value itself, feeds the map a word built from the LSBs of the last
  M values instead.

The generator produces one M-bit word (M = 24 by default) per clock.

## One step of the generator

```
           +-------------------- x_n register ------------------+
           |                                                     |
           v                                                     |
   +---------------+ x'_n (output)   +-----+                     |
   |  processing   |---------------->| MUX |  y   +-----------+  |
   |  block        |                 |     |----->| logistic  |--+ x_{n+1}
   +---------------+          P_n -->|     |      | map r*y*  |
   x_n ---> shift register ----------+  ^  |      | (1-y)     |
   x_n ---> AND of every 2nd bit ---C---+  +      +-----------+
```

Each enabled clock:

1. `x'_n = process(x_n, q)` where `q` is the toggle flip-flop state left
   by the previous word;
2. `C = AND(x_n[0], x_n[2], ..., x_n[M-2])`;
3. `y = C ? P_n : x'_n`;
4. `x_{n+1} = r*y*(1-y)`; `P` shifts right taking `x_n[0]` into its MSB;
   `q` becomes `q ^ parity(x_n)`; `x'_n` is registered onto the output.

So `x_{n+1} = r*x'_n*(1-x'_n)` normally and `r*P_n*(1-P_n)` at a
perturbation moment. The whole loop (processing, multiplexer, two
multipliers) is combinational between two registers, which is what allows a
word per clock.

## Number formats

All M-bit words (`x_n`, `x'_n`, `P_n`, `y`) are unsigned fixed point with
one integer bit and M-1 fraction bits, so they cover `[0, 2)`. The control
parameter `r` has three integer bits (`[0, 8)`, so 4.0 fits). The map
computes `1 - y`, `y*(1-y)` and `r*(...)` with wrap-around modulo 2 and
truncation of the dropped fraction bits. Since the processing block can
produce words of 1 or more, the wrap-around is part of the normal dynamics,
not an error case.

## The processing block

The circuit is described bit-serially: the word is shifted out MSB first, each
bit `S` drives both J and K of a J-K flip-flop (so it toggles on a 1 and
holds on a 0), the flip-flop output is XORed with the word's LSB, and the
results are shifted back into a word, first bit into the MSB. The
flip-flop is not reset between words.

`processing_block` does the same in one clock by unrolling the M serial
steps. Because the flip-flop output is registered, a bit sees only the
bits sent before it:

```
x'[i] = x[0] ^ q ^ x[M-1] ^ x[M-2] ^ ... ^ x[i+1]
q_next = q ^ x[M-1] ^ ... ^ x[0]
```

The top bit of `x'` is therefore `x[0] ^ q`, and each lower bit adds one
more higher bit of `x` into a running XOR. This is a prefix-XOR (a "Gray
decode") of the word, offset by the LSB and the carried flip-flop state. It
costs M XOR gates in a chain of depth M.

## Perturbation

`perturb_shift_reg` is an M-bit right shift register loaded with the LSB of
each map value; its contents are `P_n`, the LSBs of the last M values, newest
in the MSB. `perturb_controller` ANDs every second bit of `x_n`; the
default takes positions 0, 2, ..., M-2 (the odd positions are a parameter
option). `perturbation_block` holds both and the multiplexer that picks
`P_n` over `x'_n` when the AND is 1. For a uniformly spread 24-bit value the
AND fires with probability 2^-12.

The even positions are the default because the odd set contains bit M-1,
the integer bit. A map value `r*y*(1-y)` with r < 4 reaches 1 only
through wrap-around, so an odd-position controller would almost never fire.

## Interface (`chaotic_prng`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; everything is on its rising edge |
| `rst` | in | 1 | synchronous reset, active high: state 0, output invalid |
| `load` | in | 1 | store `seed` as `x_0`, clear shift register and flip-flop |
| `seed` | in | M | `x_0`, U1.(M-1), must not be 0 |
| `r` | in | M | control parameter, U3.(M-3); keep steady while running |
| `en` | in | 1 | take one step this clock |
| `rnd` | out | M | `x'_n`, the random word |
| `rnd_valid` | out | 1 | `rnd` was produced by the previous clock's step |
| `perturbed` | out | 1 | that step fed `P_n` to the map |
| `state` | out | M | `x_n`, for observation |

Timing: the word of the step taken on clock edge k is on `rnd` with
`rnd_valid` high after edge k. With `en` held high there is one new word per
clock. `load` takes priority over `en`. The all-zero state maps to itself,
so a seed of 0 produces zeros forever.

Parameters: `M` (24), `R_INT_BITS` (3), `SLICE` (`SLICE_EVEN`),
`FEEDBACK_MODIFIED` (1: the map is fed `x'_n` when no perturbation is due;
0: it is fed `x_n`, the other possible reading of the circuit).

## Where this RTL makes its own choices

The structure (the processing chain, the LSB shift register, the
AND-of-alternate-bits controller, the multiplexer in front of the map, the
two-multiplier map, 24-bit words, one word per clock) follows the published
circuit. The following are choices made here:

* **Single clock.** The original runs the serial path on a clock four times
  faster than the system clock. Four fast cycles cannot carry 24 bits, yet the
  circuit is stated to deliver 24 bits per system clock. The unrolled block
  gives the same bit function at the full word rate, so no second clock is
  needed.
* **What the map is fed.** The multiplexer is described as choosing between
  the *modified* value and `P_n`, while the map equation is written with
  the unmodified `x_n`. The default follows the first description.
  `FEEDBACK_MODIFIED = 0` gives the second.
* Serial bit order (MSB first), the registered flip-flop output, the
  flip-flop carried across words, the even slice, the fixed-point formats of
  `r` and of the intermediate products, wrap-around and truncation, the
  `load`/`en` interface, the output register and the reset values.

## Behaviour measured in simulation

Read this before relying on the generator. The testbenches check that the RTL
matches the bit-level model of the circuit described above. They do not show
that it is a good random source, and with the choices above it is not:

| experiment | result with this RTL |
|---|---|
| state period, r = 3.9, seed 0.3, M = 12 / 16 / 24 / 32 | 4 / 4 / 16 / 50 steps |
| M = 24, seed 0.3, 1e5 words, r = 0.2 / 0.8 / 1.2 / 2.3 / 3.2 / 3.5 / 3.9 | periods 1 / 1 / 3 / 18 / 8 / 2 / 16 |

The published circuit claims periods beyond 1e9 at 16 bits and above, and
3.6 million at 12 bits. In these runs the orbit falls into a short cycle
before the perturbation controller fires, so the perturbation never breaks
it. Seeds with all even bits set fire it at once (the testbenches use this).
A sweep at M = 12, r = 3.9 and two seeds over all 128 combinations of the open choices (what the
map is fed, whether the controller and the shift register look at `x_n` or
`x'_n`, odd or even slice, bit order, registered or transparent flip-flop,
flip-flop carried or cleared per word) found no period longer than 25
steps. So none of those choices explains the gap. It presumably lies in
details of the original arithmetic model that are not described.
`tb_cycle_length` and `tb_randomness` measure the effect of any change.

## Files

| file | contents |
|---|---|
| `rtl/prng_pkg.sv` | default width, `r` integer bits, slice-select enum |
| `rtl/logistic_map.sv` | combinational `r*y*(1-y)` |
| `rtl/processing_block.sv` | unrolled J-K toggle chain and XOR, carried flip-flop |
| `rtl/perturb_shift_reg.sv` | LSB history register (`P_n`) |
| `rtl/perturb_controller.sv` | alternate-bit AND (`C`) |
| `rtl/perturbation_block.sv` | shift register + controller + multiplexer |
| `rtl/chaotic_prng.sv` | top: state register, the three blocks, output register |
| `tb/prng_ref_pkg.sv` | bit-serial reference model (class) |
| `tb/cycle_meter.sv`, `tb/cycle_length_lane.sv` | period measurement helpers |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_chaotic_prng.sv` | end-to-end test at default size |
| `tb/tb_chaotic_prng_modes.sv` | end-to-end test at M = 12, odd slice, map fed `x_n` |
| `tb/tb_cycle_length.sv` | period at M = 12, 16, 24, 32 |
| `tb/tb_randomness.sv` | 1e5 words per r, bit balance, lag-1 correlation, period |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and ends itself; a
watchdog counts a failure if it hangs. From the directory holding `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/prng_pkg.sv tb/prng_ref_pkg.sv tb/tb_chaotic_prng.sv \
    --top-module tb_chaotic_prng -Mdir obj
./obj/Vtb_chaotic_prng
```

Replace `tb_chaotic_prng` with any other testbench name. The per-block
testbenches need only `rtl/prng_pkg.sv` and their own file in front of the
`-y` search paths. Every testbench runs in well under a second.

What is verified: each block against an independent model (the map against
real-valued arithmetic and a 64-bit integer model; the processing block
against a bit-serial J-K model; the shift register against a bit queue;
the controller exhaustively at M = 8). The top is checked word for word
against the reference model over 51 200 words and 32 seed/r pairs, with
stalls, reloads, perturbation moments, one word per clock and one cycle of
latency. Timing closure and resource use on an FPGA are not modelled.
