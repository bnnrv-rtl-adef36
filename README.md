# Uniform weight sampling for Bayesian neural networks on a small RISC-V core

A Bayesian neural network (BNN) keeps a distribution for every weight and
runs many stochastic forward passes, drawing a fresh weight sample each time.
On a small microcontroller-class core, drawing those samples costs far more
than the multiply-accumulates themselves. Two ideas remove that cost:

1. **Uniform instead of Gaussian weights.** A neuron's output is a sum of many
   products, so by the central limit theorem its distribution depends only on
   the mean and the variance of each weight. A Gaussian weight
   `N(mu, sigma)` can therefore be replaced after training by a uniform one
   with the same two moments, `w = a + b * U(0,1)`, where
   `b = sigma * sqrt(12)` and `a = mu - b/2`. That takes the same two
   parameters per weight, and a uniform sample is just random bits.
2. **Three custom instructions.** A uniform random number generator and a
   fixed-point multiply-add reduce one *Bayesian operation* (draw a weight,
   multiply it by an input, accumulate) to three single-cycle instructions:

```
fxg.unif u, 22          # u   = random >> 22       : U(0,1) with 10 fraction bits
fx.madd  w, a, b, u, 10 # w   = a   + (b*u) >> 10  : weight sample
fx.madd  y, y, w, x, 10 # acc = acc + (w*x) >> 10  : accumulate
```

This repository holds the RTL of that extension: the random number unit, the
multiply-add unit, a merged unit that shares hardware with the core's
multiplier, the decoder, and the integer register file with the extra read
port. They are assembled into `bnnrv_ext`, the execute-stage slice that a
5-stage in-order RV32IM core gains. The base core itself is not included.
Its side of the slice is a set of ports: instruction, stall, write-back,
register read data and multiplier product.

## The instructions

All three use the RISC-V R4 layout. Bits `{funct2, funct3}` form a 5-bit
immediate `I`. `I` is the fixed-point shift: the number of fraction bits for
`fx.madd`, or `32 - fraction bits` to turn 32 random bits into `U(0,1)` for
`fxg.unif`.

| bits      | 31:27 | 26:25  | 24:20 | 19:15 | 14:12  | 11:7 | 6:0       |
|-----------|-------|--------|-------|-------|--------|------|-----------|
| field     | rs3   | funct2 | rs2   | rs1   | funct3 | rd   | opcode    |
| `fx.madd` | addend| I[4:3] | factor| factor| I[2:0] | rd   | `1011011` |
| `fxg.unif`| 0     | I[4:3] | 0     | 0     | I[2:0] | rd   | `0001011` |
| `fxg.seed`| 0     | 0      | 0     | seed  | 0      | 0    | `0101011` |

* `fx.madd rd, rs1, rs2, rs3, I`: `rd = rs3 + ((rs1 * rs2)[31:0] >>> I)`.
  The product is signed. Only its low word is kept, and the shift is
  arithmetic. There is no rounding (the shift truncates toward minus
  infinity) and no saturation.
* `fxg.unif rd, I`: `rd = sample >> I`, then the generator advances.
* `fxg.seed rs1`: reloads the generator from `rs1`.

The opcodes are the RISC-V `custom-0/1/2` slots. These slots, the order of
`funct2` and `funct3` inside `I`, and the field layout of the two RNG
instructions are this design's choices. In assembler terms, the addend is
encoded in `rs3` and the two factors in `rs1` and `rs2`. All of these are
constants in `rtl/bnnrv_pkg.sv`.

## The random number generator: a 39-bit look-ahead LFSR

`lfsr39_la` has three parts: a seed generator, a 39-bit state register, and
a feedback network. A plain LFSR produces one new bit per clock, and
consecutive states are shifted copies of each other, so reading 32 bits of
it every cycle would give highly correlated samples. The look-ahead form
unrolls the recurrence 32 times into one XOR network. Each clock then
advances the LFSR by 32 steps, and the 32 bits read out are all new.

* Recurrence: `x^39 + x^35 + 1` in Fibonacci form, shifting left. The new
  bit is `s[38] ^ s[34]` and enters at bit 0. After 32 steps, bits `[31:0]`
  are exactly the 32 new bits. They are the sample.
* Seed generator: `state = {~seed[6:0], seed}`. This can never be all-zero,
  so no seed can lock the LFSR in its dead state.
* Reset value: `39'h12_3456_789A` (parameter `RESET_STATE`).
* Timing: `sample` is read straight from the state register. The value an
  `fxg.unif` returns is therefore the state before the 32-step advance
  that the same instruction triggers at the clock edge. Seeding has priority
  over stepping.

The state width (39) and the look-ahead depth (32) are the extension's. The
polynomial, the seed expansion and the choice of the low 32 bits are this
design's choices. Any maximal-length 39-bit polynomial would do. After
changing the polynomial, update the reference models in the testbenches.
They use a bit-serial copy of the recurrence.

## Two implementations of the functional units

`bnnrv_ext` has one parameter, `OPTIMIZED`.

**`OPTIMIZED = 0`, modular.** Two independent units sit side by side in the
execute stage:
* `urng_fu`: the LFSR followed by a *logical* right shift. With
  `I = 32 - F`, it returns a uniform value in `[0, 1)`.
* `fxmac_fu`: its own signed 32x32 multiplier (low word), then an
  arithmetic shifter, then an adder.

**`OPTIMIZED = 1`, merged (the default).** `fx_fused_fu` has no multiplier.
It takes the low word of `rs1 * rs2` from the multiplier the base core
already has for `mul`. A multiplexer feeds a single *signed* shifter with
either that product (`fx.madd`) or the LFSR sample (`fxg.unif`). The
shifter output is the `fxg.unif` result. The shifter output plus `rs3` is
the `fx.madd` result. This saves the multiplier and one shifter.

**Watch out: the two implementations are not bit-compatible on `fxg.unif`.**
The merged unit's shifter is signed, so it returns
`$signed(sample) >>> I`, a value uniform in `[-0.5, 0.5)` when
`I = 32 - F`. The modular unit returns `[0, 1)`. Software compensates
through the weight offset:
`a = mu - b/2` for the modular unit, and `a = mu` for the merged one. The
variance is the same. Both testbenches check that the Monte-Carlo output
statistics match the intended Gaussian moments in their own configuration.
If one binary must run on both, make the shared shifter logical for the RNG
path in `fx_fused_fu`. That costs one multiplexer on the shifter's fill bit.

## The execute-stage slice `bnnrv_ext`

Inside: `ext_decoder`, `regfile_3r` (32 x 32 bits, three asynchronous read
ports, one write port, `x0` fixed at zero), and the functional units chosen
by `OPTIMIZED`. `fx.madd` reads three registers in one cycle, which is why
the register file needs a third read port.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `instr`, `instr_valid`, `stall` | in | 32,1,1 | instruction in execute; it acts only when valid and not stalled |
| `rs1_data`, `rs2_data`, `rs3_data` | out | 32 each | register file read data for the instruction's rs1/rs2/rs3 fields, for the rest of the core |
| `core_we`, `core_wa`, `core_wd` | in | 1,5,32 | the base core's own write-back |
| `mul_lo` | in | 32 | low word of signed `rs1_data * rs2_data` from the core's multiplier (used when `OPTIMIZED = 1`) |
| `is_ext` | out | 1 | `instr` is one of the three extension instructions |
| `ext_we`, `ext_rd`, `ext_result` | out | 1,5,32 | extension result and the register it is written to |

Timing: every extension instruction reads its operands, computes and writes
`rd` within the cycle in which it is valid and not stalled. The next
instruction sees the result, so a Bayesian operation takes three cycles
back to back. While `stall` is high, nothing is written and the LFSR
does not advance. The register file has one write port, shared with the
core's write-back. The two must never write in the same cycle, and an
assertion checks this.

This single-cycle write-back is a simplification. In a real 5-stage core
the result travels through MEM and WB, and the core's existing forwarding
paths must cover `rs3` as well as `rs1` and `rs2`. Integrating the slice
means:
* routing the core's forwarded operand values into the functional units
  instead of the raw read data;
* adding an `rs3` forwarding comparator;
* writing `ext_result` through the core's normal write-back.

## Simulating

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/bnnrv_pkg.sv rtl/*.sv \
          tb/tb_bnnrv_ext.sv --top-module tb_bnnrv_ext -o sim
./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_lfsr39_la` | state equals a bit-serial reference after reset, seeding (including seed 0) and 2000 random steps/holds; bit balance of the samples |
| `tb_urng_fu` | logical-shift samples for random `I`, holds, re-seed replay, `I = 22` range |
| `tb_fxmac_fu` | directed fixed-point cases (e.g. 1.5 x -2.25 + 0.25) and 7000 random operand/shift sets against 64-bit arithmetic |
| `tb_fx_fused_fu` | both multiplexer modes, stalled `fxg.unif` does not step |
| `tb_regfile_3r` | three read ports against a reference array, `x0`, reset |
| `tb_ext_decoder` | random extension and non-extension encodings |
| `tb_bnnrv_ext` | the default slice end to end (see below) |
| `tb_bnnrv_ext_modular` | the same test with `OPTIMIZED = 0` |
| `tb_bnn_hyper_mlp` | three-layer Bayesian MLP forward passes through the instruction stream |
| `tb_bnn_conv` | first convolution layer of three CIFAR-10 CNNs through the instruction stream |

`tb_bnnrv_ext` plays the base core. It writes operands, issues
instructions, stalls, inserts bubbles and writes `x0`, and it supplies the
multiplier product. It compares every result with a reference model. It
times one 8-input Bayesian neuron (exactly `3 x 8` cycles) and checks that
re-seeding replays the sequence. It then runs 2000 Monte-Carlo passes and
checks that the output's mean and variance match the Gaussian weights the
uniform parameters came from. It counts seeds, samples, multiply-adds,
stalls, bubbles, `x0` writes, core writes, back-to-back dependences,
replays and shared-shifter mode switches, and fails if any never happened.
It runs in well under a second.

`tb_bnn_hyper_mlp` runs networks of the shape used for hyperspectral pixel
classification: three fully connected layers, with inputs = spectral bands
and outputs = classes of five public scenes (145/14, 200/16, 176/13, 103/9
and 204/16). The hidden width of 32 is an assumption. Each pass is 4.6k to
8.1k Bayesian operations. Every neuron is checked bit-exactly, and the test
confirms three extension cycles per operation.

`tb_bnn_conv` runs the first convolution layer of three CIFAR-10
networks on one 32x32x3 image:
* LeNet-5: 5x5 kernels, 6 channels;
* a tiny ResNet: 3x3 kernels, 16 channels;
* a VGG-like network: 3x3 kernels, 128 channels.

That is 4.2 million multiply-adds in about 12 seconds of simulation. In a
convolution, each weight is sampled once per pass (two instructions) and
then reused at every output position, one `fx.madd` per tap. Every output
is checked bit-exactly, and the test checks the extension's cycle count.
The deeper layers of these networks use the same instructions in the same
loop. Full passes, hundreds of millions of cycles each, are not simulated.

## What to trust, and where this RTL makes its own choices

Taken from the extension's definition: the three instructions and their
semantics; the R4 layout with a `{funct2, funct3}` immediate; the 39-bit,
32-step look-ahead LFSR with a seed generator and a shifter; the modular
units (multiplier -> signed shifter -> adder, 32-bit paths); the merged unit
that reuses the core multiplier and shares a signed shifter; the third
register-file read port; single-cycle execution of each instruction.

Chosen here: the opcodes; the LFSR polynomial, seed expansion, output bits
and reset value; logical shift in the modular RNG; the low product word
without rounding; asynchronous active-low reset everywhere (the register
file is reset to zero); the `instr_valid`/`stall` handshake; the shared
write port; and the single-cycle write-back of the slice.

Not included: the base RV32IM core (fetch, decode of the base ISA, ALU,
multiplier, memories, forwarding). For reference, a published FPGA implementation
of the merged unit added about 308 LUTs and 44 flip-flops, with no DSP
blocks, to such a core. This slice has 39 flip-flops of RNG state plus the
register file.
