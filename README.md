# LeNet-5 C1 convolution + ReLU accelerator (float16, SystemVerilog)

This is a hardware accelerator for the first convolution layer (C1) of the
LeNet-5 network and the ReLU activation that follows it. It takes one
32x32 single-channel image and six 5x5 kernels, all in IEEE half precision
(float16). It produces the 28x28x6 feature map (stride 1, no padding), then
streams that map through six parallel ReLU channels.

The design spends area to save time. It has 42 convolution units (CUs), each
with its own float16 multiply-accumulate element, and all 42 run at once.
Inside one CU the 25 products of a 5x5 window are taken one per cycle, which
keeps each unit small. The ReLU side is the opposite: it needs only a sign-bit
test per value, and its clocks are gated off whenever it has no work.

The structure, sizes, cycle counts and port names follow a published
description of the accelerator. That description gives the blocks and what
they do, but not every bit layout, handshake or arithmetic detail. The
choices made here to fill those gaps are listed in
[Departures and own choices](#departures-and-own-choices).

## Block structure

```
lenet_c1_accel
 ├─ c1_conv_layer ........................ C1 layer
 │   ├─ input_selector ................... kernel batches, starts the CONs
 │   ├─ conv_calc  x3  (CON1..CON3) ...... one output channel at a time
 │   │   ├─ FILTER register (current kernel)
 │   │   ├─ conv_rf (RF) ................. window sliding + pass counter
 │   │   └─ conv_unit x14 (CU) ........... one 5x5 window each
 │   │       └─ processing_element16 ..... float16 MAC
 │   │           ├─ fp16_mul
 │   │           └─ fp16_add
 │   └─ output_controller ................ 28x28x6 map register, done
 ├─ streamer (inside lenet_c1_accel) ..... map -> ReLU, one position/cycle
 └─ relu_layer ........................... six channels
     └─ gated_clock_relu x6
         └─ clock_gate
```

`fp16_pkg` holds the float16 type, its field struct, the LeNet-5 C1
constants and the `relu16` function.

## How the convolution is scheduled

This is the part that needs the most explanation.

**Kernels in two batches.** There are six kernels but only three calculation
modules (CONs). The input selector runs the kernels in two batches. In batch
0, CON *c* gets kernel *c*. In batch 1, it gets kernel 3+*c*. Each CON
computes one whole 28x28 output channel for its kernel. When all three CONs
have reported the end of their kernel, the selector switches to the next
batch.

**Passes inside a CON.** An output row has 28 pixels, and a CON has 14 CUs,
so each row is split into two segments of 14 pixels. In one *pass*, CU *j*
computes output pixel (row, seg·14 + *j*). The RF keeps the row and segment
in registers and steps through them in raster order: row 0 segment 0, row 0
segment 1, row 1 segment 0, and so on. That is 56 passes per channel. From
these registers it builds the 14 windows of 5x5 pixels, 400 bits each, and
gives them to the CUs in parallel. All 14 CUs share the 400-bit kernel held
in the CON's FILTER register.

**Inside a CU.** A CU has a small state machine (IDLE, CLEAR, MAC, DONE) and
one `processing_element16`. After `start` it spends 2 cycles clearing the
accumulator. It then spends 25 cycles on `acc <= acc + filter[i]*window[i]`
for i = 0..24, where i = ky·5 + kx. That is 27 cycles in all, and `done`
then stays high until the next start. Each product and each sum is rounded
to float16, so the result is exactly an in-order float16 dot product, not an
exact sum rounded once.

**Cycle count.** The RF sees `done` and reports the pass (`pass_valid`). In
the same cycle it restarts the CUs on the next position, so one pass takes
28 cycles. The output controller writes the 14 results into the map on that
same edge.

| step | cycles |
|---|---|
| one CU window | 2 clear + 25 MAC = 27 |
| one pass (window + hand-over) | 28 |
| one channel per CON (56 passes) | 1568 |
| whole layer (2 batches + start-up and batch switch) | 3141 from reset release to `done` |
| ReLU stream | 784 positions, one per cycle, plus pause cycles, plus 1 drain cycle |

The layer starts by itself on the first clock edge after `reset` is released
and runs once. `done` then stays high until the next reset. `image` and
`filters` must not change while it runs.

## Bus layouts

All values are float16, 16 bits each.

| bus | width | element at bits |
|---|---|---|
| `image` | 16,384 | pixel (r, c): `(r*32 + c)*16 +: 16` |
| `filters` | 2,400 | kernel k, element (ky, kx): `(k*25 + ky*5 + kx)*16 +: 16` |
| `fmap` | 75,264 | channel k, pixel (r, c): `((k*28 + r)*28 + c)*16 +: 16` |
| `act_data` / ReLU `x_input`, `Output` | 96 | channel k: `16*k +: 16` |

There is no bias term: output = Σ kernel·window.

## Float16 arithmetic

`fp16_mul` and `fp16_add` are combinational, with one of each per CU.

- Rounding: to nearest, ties to even. The multiplier uses a guard bit and a
  sticky bit. The adder aligns into a 24-bit field whose lowest bit collects
  everything shifted out.
- Subnormals: inputs with exponent 0 count as zero. Results below 2^-14
  (judged before rounding) become a zero with the result's sign.
- Overflow gives ±infinity. A NaN input, inf·0 or inf − inf gives 7E00.
- Signed zeros: x + (−x) = +0. (−0) + (−0) = −0. A product of zeros takes the
  XOR of the signs.

The whole datapath is combinational between registers: an 11x11-bit significand
multiply, an alignment shift, an add, a leading-one search and a rounding add,
all in one cycle. For a high clock rate this path would need pipelining,
which changes the 27-cycle CU schedule.

## The ReLU layer and its gated clocks

`relu_layer` has six `gated_clock_relu` channels. Each channel's registers
run on its own gated clock, made by `clock_gate` as `clk AND enable`. The
enable goes through a latch that is transparent while `clk` is low, so
changing `enable` during the high phase of the clock cannot produce a short
clock pulse. This latch is the only latch in the design, and it is intended.

On each edge of its gated clock, a channel registers 0 if the input's sign
bit is set, and the input unchanged if it is not. So −0 (8000) becomes +0.
The result appears one cycle after the input.

Each channel also keeps a **completion flag**. It also stores the input it
last processed. `Finished` is high when a result has been produced and the
present input still equals that stored input. A new input therefore clears
the flag at once, with no controller involved, and the next enabled edge sets
it again. The layer's `Finished` is the AND of the six flags, and it is forced
low while `enable` is low. With `enable` low the clocks stop: `Output` keeps
its value and inputs are ignored.

## Joining the two layers

`lenet_c1_accel` waits for the convolution to finish. It then reads the map
position by position in raster order (index = row·28 + column). Each cycle
it sends the six channel values of one position to the ReLU layer.

- `act_data`, `act_valid` and `act_index` give the activated position one
  cycle later.
- `act_ready` low pauses the stream. The ReLU enable drops, so its clocks are
  gated off and `act_data` holds.
- After the last position, the ReLU stays enabled for one more cycle, with
  its input unchanged. `act_finished` rises in that cycle, and then `done`.
- The pre-activation map also stays readable on `fmap`.

## Departures and own choices

Following the published description:

- 3 CONs of 14 CUs each.
- Six kernels handled three at a time.
- The CU's 25 + 2 cycles.
- 400-bit kernel and window inputs and a 16-bit CU output.
- The bus widths 16,384, 2,400 and 75,264 bits.
- The sign-bit ReLU with one-cycle latency.
- Six parallel channels.
- Gating by ANDing the enable with the clock.
- The AND of the six completion flags.
- The port names `image`, `filters`, `done`, `x_input`, `Output`,
  `Finished`, `OutputFinal`.

Choices made in this design:

- All bit layouts (table above).
- No bias.
- The row/segment split of work between the 14 CUs.
- All start/done handshakes and the one-cycle hand-over per pass.
- Start on reset release.
- Asynchronous active-high reset everywhere.
- The float16 rounding and subnormal rules.
- The latch in the clock gate.
- The exact rule for the completion flag.
- The whole streamer between the layers, and the `act_ready` pause.

One deliberate difference concerns the ReLU output register. The published
schematic of the ReLU layer shows a further register on `Output` and
`Finished`, clocked by the free-running clock. The description, however,
gives the layer a one-cycle latency. This implementation keeps the
one-cycle latency, so the six channel registers are the only stage.

Not covered: the later LeNet-5 layers (pooling, C3, C5, fully connected).
The layer is a single-image, single-layer engine.

## Cost

This is a fully parallel design, and it is large.

- Each of the 3 RFs first picks the five image rows under the kernel out of
  the 16,384-bit image (a 28-way choice per row slot, 512 bits wide). It
  then cuts the 14 windows out of those rows (a 2-way choice per window
  pixel).
- The output controller holds the full 75,264-bit map in flip-flops. Each
  16-bit element has its own write-enable decode.
- The top-level streamer reads the map through a 28-way row choice followed
  by a 28-way column choice.

Synthesis of the top level is slow for the same reason.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. The float16 reference in
`tb/tb_fp16_ref_pkg.sv` does not use the RTL's method: it works through
double-precision reals. Sums and products of two float16 values are exact in a
double, and the result is rounded back from the double's fraction bits.

| testbench | checks |
|---|---|
| `tb_fp16_mul`, `tb_fp16_add` | directed corner cases + 20,000 random operand pairs each |
| `tb_processing_element16` | random clear / accumulate / hold sequences against a running reference |
| `tb_conv_unit` | 200 random windows: result, latency exactly 27 edges, busy/done |
| `tb_conv_rf` | pass order, all 14 windows of every pass (image holds pixel indices), kernel_done |
| `tb_conv_calc` | a full 28x28 channel against the reference; 28 edges per pass, 1568 total |
| `tb_input_selector` | kernel per CON per batch, batch switch only after all three CONs finish |
| `tb_output_controller` | a whole layer's passes with random timing; full map compare; done timing |
| `tb_c1_conv_layer` | full layer at LeNet-5 sizes: all 4,704 outputs, 3141 cycles, one batch switch |
| `tb_clock_gate` | gated pulses only on enabled cycles, no glitch on mid-cycle enable change |
| `tb_gated_clock_relu` | ReLU values, hold when disabled, completion flag set/cleared, async reset |
| `tb_relu_layer` | reference waveform vectors, then random traffic with random enable |
| `tb_lenet_c1_accel` | whole accelerator at default sizes (see below) |

`tb_lenet_c1_accel` runs the complete accelerator at its default sizes. It
checks:

- the convolution time;
- the whole pre-activation map;
- each of the 784 activated positions, in order.

It also counts that each mechanism happened at least once: the kernel batch
switch, the CU clear cycles, negative values zeroed, positive values passed,
stream pauses with the output held, and the completion flag. It runs in well under
a second.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fp16_pkg.sv tb/tb_fp16_ref_pkg.sv tb/tb_lenet_c1_accel.sv \
    --top-module tb_lenet_c1_accel
./obj_dir/Vtb_lenet_c1_accel
```

Replace the testbench name to run any other one. The testbenches use
`$urandom` only, with no constrained randomisation.

The async resets act on a reset *edge*, because the ReLU channel registers sit
on a gated clock that may not tick during reset. For that reason the
testbenches raise `reset` just after time 0 rather than starting with it high.

## Changing the design

Module parameters:

- `IMG` (image side, 32)
- `K` (kernel side, 5)
- `NKERNEL` (6)
- `NCON` (3)
- `NCU` (14)

Two conditions must hold:

- `IMG-K+1` must be a multiple of `NCU`.
- `NKERNEL` must be a multiple of `NCON`.

`c1_conv_layer` stops elaboration with an error if either fails. The
clear-cycle count of the CU is `RST_CYC` (2). The ReLU layer's channel count
is `NCH` (6). Some testbenches hard-code the default sizes in their
reference loops and would need the same change.
