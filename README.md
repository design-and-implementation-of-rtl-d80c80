# A compact convolution accelerator for a RISC-V soft CPU

FOMO ("Faster Objects, More Objects") is a small int8 object-detection
network. When it runs on a 32-bit RISC-V soft core on a low-end FPGA, about
95 % of the time goes into the convolution and depthwise-convolution layers.
Most of that time is spent in one inner loop: fetch input and filter bytes,
form a quantized dot product, then add the bias, rescale and store. This
accelerator takes over that loop. It is a *custom function unit* (CFU): a
small coprocessor that sits beside the CPU's execute stage and is driven by
custom R-type instructions. Each instruction sends two 32-bit register
operands and gets one 32-bit result back.

The unit keeps no image or weight data. The CPU still walks the loops,
loads the bytes and stores the outputs. Each step that costs many
instructions in software costs the CPU one instruction here:

| software step (per output value)                          | accelerator command |
|-----------------------------------------------------------|---------------------|
| set up the channel: offsets, bias, activation limits       | `INIT0`, `INIT1`    |
| `acc += w[i] * (x[i] + input_offset)` for 4 channels       | `ACC`               |
| `acc += bias; acc = rescale(acc); acc += output_offset; clamp` | `READ`          |

The system this unit was designed for is a VexRiscv CPU (8 KB I-cache and
8 KB D-cache) at 100 MHz on an Artix-7 35T. That system reported a full
96x96 grayscale frame in about 65 M cycles with the accelerator, against
236 M cycles for the original code and 110 M cycles with software tuning
alone. That is about 3.7x faster overall, at about 5.5 K LUTs and 4.2 K
flip-flops for the whole system. The CPU, its caches and the SoC are not
part of this RTL. The CFU bus is brought out as the ports of the top module.

## Structure

```
            cmd (funct3, rs1, rs2)
                 |
            +----v-----+  enables
            | cfu_ctrl |------------------------------------------+
            +----------+                                          |
                 |                                                |
   rs1,rs2  +----v-----+  acc   +-----------+  sum  +-----------+ |
  --------->| simd_mac |------->| bias_unit |------>| quantizer | |
            +----------+        +-----------+       +-----------+ |
                 | acc_next                               | out   |
                 +---------------->  result_reg  <--------+ <-----+
                                        |
                                  rsp (rd value)
```

| module       | role |
|--------------|------|
| `fomo_cfu`   | Top level. CFU bus ports, operand unpacking, the response multiplexer. |
| `cfu_ctrl`   | Control unit. Runs the handshakes, decodes `funct3`, sequences a `READ`. |
| `simd_mac`   | Four int8 lanes: `w * (x + input_offset)`. Sums the four products into a 32-bit accumulator in one cycle. |
| `bias_unit`  | Stores the channel's bias. Registers `acc + bias` when a `READ` starts. |
| `quantizer`  | Fixed-point rescale, output offset and clamp, in two steps. |
| `result_reg` | One-entry response buffer, held until the CPU takes it. |
| `cfu_pkg`    | Widths, the command enum, and the payload and offset structs. |

## Commands

The CPU selects a command with `funct3`, the low three bits of
`cmd_payload_function_id`. `funct7` is ignored.

| funct3 | name  | rs1 (`inputs_0`)                                   | rs2 (`inputs_1`) | result |
|--------|-------|----------------------------------------------------|------------------|--------|
| 0      | INIT0 | `{output_offset[15:0], input_offset[15:0]}`, signed | bias (int32)     | 0; also clears the accumulator |
| 1      | INIT1 | activation minimum (int32)                          | activation maximum (int32) | 0 |
| 2      | ACC   | input bytes `x3 x2 x1 x0` (int8, x0 in bits 7:0)     | filter bytes `w3 w2 w1 w0` | new accumulator value |
| 3      | READ  | output multiplier (Q31, int32)                      | output shift (int32, negative shifts right) | quantized output, sign-extended; clears the accumulator |
| 4-7    | -     | ignored                                             | ignored          | 0 |

`input_offset` is the negated zero point of the input tensor.
`output_offset` is the zero point of the output tensor.

A convolution with C input channels is run as follows (C a multiple of 4;
pad the last word with zero filter bytes otherwise):

```
for each output channel z:
    INIT0 {out_zp, -in_zp}, bias[z]
    INIT1 act_min, act_max
    for each output pixel (x, y):
        for each filter tap (h, w), 4 channels at a time:
            ACC  input[x+h][y+w][c..c+3], filter[z][h][w][c..c+3]
        out[x][y][z] = READ multiplier[z], shift[z]
```

`READ` clears the accumulator, so the next pixel needs no new `INIT0`. With
8 input channels, each filter tap takes exactly two `ACC` commands. A
depthwise 3x3 filter packs its nine taps into three `ACC` words.

## The requantization in `quantizer`

This is the least obvious part of the design. Its rounding must match
the int8 inference runtime bit for bit, or the network's outputs drift.
The scale of a layer is a real number below 1. It is carried as a Q31
multiplier `M` (in `[2^30, 2^31)` for normal layers) and a power-of-two
`shift`. For a biased sum `s`:

1. `x = s << max(shift, 0)`, wrapping in 32 bits.
2. `h = (x * M + nudge) / 2^31`, with division truncating toward zero.
   `nudge` is `2^30` for a non-negative product and `1 - 2^30` otherwise.
   The single overflow case `x = M = -2^31` gives `2^31 - 1`.
3. `y = h / 2^r` with `r = max(-shift, 0)`, rounded to nearest with ties away
   from zero. This is done as an arithmetic shift plus one when the dropped
   bits exceed half (`mask >> 1`, plus one for negative `h`).
4. `out = clamp(y + output_offset, act_min, act_max)`.

Steps 1-2 are registered: this is the 32x32 multiply, the long path.
Steps 3-4 are combinational and feed the response buffer directly. Shift
amounts are limited to 31.

## Timing

Both channels use valid/ready. A command is accepted when
`cmd_valid && cmd_ready`. `cmd_ready` is high when the control unit is idle
and the response buffer is empty or being emptied in the same cycle. So
each command gets exactly one response, in order. A response stays on
`rsp_payload_outputs_0` until `rsp_valid && rsp_ready`.

| command            | accepting edge                                              | response valid |
|--------------------|-------------------------------------------------------------|----------------|
| INIT0, INIT1, ACC, unknown | configuration or accumulator updated, response written | next cycle |
| READ               | bias unit registers `acc + bias`; multiplier and shift captured; accumulator cleared | 3 cycles later (states MUL, SHIFT) |

With `rsp_ready` held high, the unit takes one command per cycle. A `READ`
blocks new commands for two extra cycles. A layer therefore costs
`#ACC + 3 * #READ + #INIT` cycles in the unit. For FOMO's first layer
(96x96x1 in, 3x3 stride 2, 16 channels, 48x48x16 out) that is 221,217
cycles. This counts only the unit's time. The CPU's loads, loop overhead
and instruction issue are not included, and on the real system they
dominate.

Reset is synchronous and active high, as on the CFU bus. It clears the
accumulator, bias, offsets, multiplier and response buffer. The limits
reset to the full int32 range.

## Where this RTL comes from, and what is its own

Taken from the design as described:
- the CFU attachment;
- the split into mac, bias and quantizer units, a control unit and a result
  register;
- the command set: two init commands carrying offset, bias, min and max;
  an accumulate command with four input bytes and four filter bytes; a read
  command that adds the bias, quantizes and returns the result;
- the per-lane arithmetic `W * (I + O)`, and bias, scale, output offset,
  clamp in that order.

Choices made here, where the description gives no detail:
- The `funct3` numbering and operand packing, including the two 16-bit
  offsets sharing one word.
- Passing the multiplier and shift as the `READ` operands. The description
  lists only offset, bias, min and max as configuration.
- The CFU bus port names and handshake. These are the usual ones for this
  kind of CPU coprocessor port.
- All latencies, the three-state controller and the two-step quantizer.
- The Q31 multiplier/shift format and the runtime-exact rounding.
- Clearing the accumulator on `INIT0` and `READ`.
- Answering unknown commands with 0.
- 32-bit wrap-around accumulation. It cannot overflow for any FOMO layer:
  each term is at most 128 x 255 in magnitude, so about 65,000 terms per
  output are safe, and FOMO's dot products have a few hundred.

Not included: the CPU, caches, SoC interconnect, memory, and the board's
power monitors. The reported LUT, flip-flop, power and frame-time figures
are for the whole system and cannot be reproduced from this RTL alone.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog. Build one with Verilator 5, for example the end-to-end
test:

```
verilator --binary --timing --assert --top-module tb_fomo_cfu \
    -y rtl -y tb +libext+.sv rtl/cfu_pkg.sv tb/tb_ref_pkg.sv tb/tb_fomo_cfu.sv
./obj_dir/Vtb_fomo_cfu
```

| testbench         | what it covers |
|-------------------|----------------|
| `tb_simd_mac`     | random and extreme byte vectors and offsets, clear, hold, clear+accumulate |
| `tb_bias_unit`    | bias load and add, int32 extremes, hold |
| `tb_quantizer`    | 3,000+ vectors against the reference: saturating multiply, rounding ties, both shift directions, both clamps; two-cycle latency |
| `tb_result_reg`   | cycle model of the buffer under random load and ready |
| `tb_cfu_ctrl`     | every output, every cycle, against a cycle model, under random commands and back-pressure |
| `tb_fomo_cfu`     | end to end: an 8-channel 3x3 convolution and a 3x3 depthwise layer through the CFU bus, with every response and latency checked. It counts stalls, held responses, back-to-back commands, read-cleared accumulators, both clamps, both shift directions and the unknown-command reply, and fails if any never happened. |
| `tb_fomo_layer0`  | FOMO's first layer on a full 96x96 frame (36,864 outputs), with the cycle count |

`tb/tb_ref_pkg.sv` holds the reference arithmetic. It uses 64-bit
integers and is written differently from the RTL (for example,
magnitude-based rounding), so it checks the RTL rather than copying it.
The layer testbenches use random images and weights. No trained network
weights are included.

To change the lane count, `simd_mac` has a `LANES_P` parameter. The command
packing in `fomo_cfu` assumes four bytes per 32-bit operand.
