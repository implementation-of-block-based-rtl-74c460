# Block-based neural networks in hardware

A block-based neural network (BbNN) is a neural network built as a 2-D grid of small,
identical-looking blocks. Each block has four nodes (top, left, right, bottom). Every node is
either an input or an output, which gives three block types:

| Block     | Inputs          | Outputs                    | Node function                           |
|-----------|-----------------|----------------------------|-----------------------------------------|
| `block22` | x1 (top), x2 (left) | y3 (right), y4 (bottom) | y_j = f(w1j·x1 + w2j·x2 + b_j)          |
| `block13` | x1 (top)        | y2 (left), y3 (right), y4 (bottom) | y_j = f(w1j·x1 + b_j)        |
| `block31` | x1, x2, x3      | y4 (bottom)                | y4 = f(w14·x1 + w24·x2 + w34·x3 + b4)   |

Neighbouring blocks are wired output-to-input. Because signals can run left *and* right along a row,
and around the row ends, a network can contain feedback loops. In this design every block output
is a register, so one clock edge is one iteration of the whole grid. A network is evaluated by:

1. clearing all block outputs to zero;
2. letting the grid iterate for a fixed number of clocks;
3. reading the outputs.

This repository holds the building blocks and two complete networks built from them. Each network
has its own batch controller and a RAM shared with a host:

* **XOR classifier**: a 2 × 2 grid of `block22` with a saturating-ramp activation.
* **Robot navigation controller**: a 1 × 5 row of mixed blocks with a step activation. It maps
  five obstacle sensors to four ±1 motor-control outputs.

A small fixed-function 4-bit data path is also included. It is a stand-alone `y = f(w1·x1 + w2·x2 + b)`
circuit.

## Arithmetic

### Sum of products (`bbnn_sop`)
`bbnn_sop` computes `SUM = Σ A_i·B_i` over `NUM_INPUTS` packed word pairs. The pin `tc` selects
two's complement (1) or unsigned (0). The result is taken modulo 2^`SUM_W`.

### Nodes (`bbnn_node`)
A node feeds its inputs and weights to a sum of products. The bias enters as one more product: it
is shifted left by `FRAC` bits and multiplied by 1. The sum has
`max(X_W, B_W+FRAC) + W_W + 3` bits. That is enough for up to four product terms in either
number format. The extra top bit keeps an unsigned sum (`tc = 0`) positive when the activation
reads it as two's complement. The published networks use two's complement (`tc = 1`). The `tc`
pin of each block also allows unsigned data.

### Activations (`bbnn_act`)
There are four shapes, selected by the `KIND` parameter (`act_kind_e` in `bbnn_pkg`):

| KIND           | Output                                              |
|----------------|-----------------------------------------------------|
| `ACT_STEP_UNI` | 1 if s ≥ 0, else 0                                  |
| `ACT_STEP_BI`  | +1 if s ≥ 0, else −1                                |
| `ACT_RAMP_UNI` | s·SLOPE_NUM/SLOPE_DEN, clamped to [0, +1]           |
| `ACT_RAMP_BI`  | s·SLOPE_NUM/SLOPE_DEN, clamped to [−1, +1]          |

Some details of the activations:

* The input and output share `FRAC` fraction bits, so 1.0 is `2^FRAC`.
* If +1 cannot be represented in `OUT_W` bits, the largest positive word is used instead. In the
  9-bit Q.8 format (1 sign bit, 8 fraction bits) that is 255/256.
* Division truncates toward zero.
* The slope is a ratio (`SLOPE_NUM`/`SLOPE_DEN`) so that the XOR network's slope of 1/20 is exact.
* The clamping compares `s·NUM` with the limits times `DEN`, so no divider is needed in the
  saturated regions.

### Blocks (`bbnn_block22`, `bbnn_block13`, `bbnn_block31`)
Each block is built from one node per output.

* **Parameters:** `X_W` (data width), `W_W`, `B_W` (weight and bias widths), `FRAC`, `KIND`,
  the slope, and `REG_OUT`.
* **Registered outputs (`REG_OUT = 1`, the default):** the outputs are flip-flops. They have an
  asynchronous reset and a synchronous clear `clr`; the controller uses `clr` to restart the grid
  from zero.
* **Combinational outputs (`REG_OUT = 0`):** the block has no registers. Such blocks must not be
  wired into a loop.

## The XOR network (`xor_bbnn`)

The four blocks are A and B in the top row, C and D in the bottom row. They are connected like this:

```
 x1 ─► A.x1      A.y3 ─► B.x2      B.y3 ─► A.x2  (around the row end)
 x2 ─► B.x1      A.y4 ─► C.x1      B.y4 ─► D.x1
                 C.y3 ─► D.x2      D.y3 ─► C.x2  (lateral feedback)
 y = D.y4        (C.y4 is not used)
```

* **Number format:**
  * Data is 9-bit two's complement with 8 fraction bits.
  * Weights and biases are 8-bit integers.
  * The activation is the bipolar ramp with slope 1/20.
* **Iteration:** both rows contain a loop (A↔B and C↔D), so the result depends on the number of
  iterations. The core takes D.y4 after **3** clock edges from cleared outputs.
* **Output:** a positive y means class 0; a negative y means class 1.

The network's published weights are used as test vectors. They are listed in `tb/tb_ref_pkg.sv`
as `XOR_A` to `XOR_D`, in the order w13, w23, w14, w24, b3, b4.

With these weights and three iterations, the corner inputs give the following y (in 1/256 units):

| x1 | x2 | y    |
|----|----|------|
| 0  | 0  | +180 |
| 0  | 1  | −115 |
| 1  | 0  | +126 |
| 1  | 1  | −169 |

So three of the four corners are classified correctly and (1, 0) is not. The hardware reproduces
the reference model exactly either way. Treat this weight set as a functional test, not as a
trained solution.

## The robot network (`robot_bbnn`)

The network is one row of five blocks: A (`block22`), B (`block13`), C (`block22`), D (`block22`)
and E (`block31`). Sensors S1…S5 drive the top inputs. The connections are:

```
 A: x1=S1  x2=B.y2     y3 ─► E.x3 (around the row end)   y4 unused
 B: x1=S2              y2 ─► A, y3 ─► C                  y4 = y1
 C: x1=S3  x2=B.y3     y3 ─► D                           y4 = y2
 D: x1=S4  x2=C.y3     y3 ─► E                           y4 = y3
 E: x1=S5  x2=D.y3  x3=A.y3                              y4 = y4
```

* **Number format:** everything is an 8-bit integer with no fraction bits.
* **Activation:** the bipolar step, so every output is +1 or −1. A sum of exactly zero gives +1.
* **Settling:** the graph has no loop. Its longest chain is B → C → D → E, which needs four clock
  edges. The outputs therefore become final after 4 iterations (A and C after 2, D after 3, E
  after 4).

## Batch controller (`bbnn_ctrl`)

One parameterised state machine serves both networks. Its parameters are the number of parameter
rows `R`, the number of data sets `N_SETS` (64), and the number of settle clocks `S`.

| State     | Clocks | What happens |
|-----------|--------|--------------|
| IDLE      | –      | Wait for `start`. |
| LOAD      | R + 2  | Issue addresses 0 … R (the last one is the first input row). Each parameter row is stored in a holding register two clocks after its address, because both the RAM read and the address are registered. |
| CHECK     | 1      | Take the first input row, which is already on the RAM output. |
| FETCH     | 1      | Take the next input row (every set after the first). |
| SETTLE ×S | S      | `net_clr` is low and the grid iterates. |
| WRITE     | 1      | Capture the network output row. |
| NEXT      | 1      | Write it to the output row and issue the next input address. `net_clr` is high again. When the last set is done, raise `finish` and return to IDLE. |

The XOR core uses R = 3 and S = 3, which gives states 0 … 12:

* 1 clock for start detection, 5 for the load, 6 for the first set and 7 for each later set;
* 455 clock edges in total, from the host's start write to `finish`.

The robot core uses R = 5 and S = 4: 1 + 1 + 7 + 7 + 63·8 + 1 = 521 clock edges.

Other behaviour:

* `finish` stays high until the next start.
* A start while busy is ignored.
* An assertion checks that the controller writes only to output rows.

## Cores and RAM maps (`xor_core`, `robot_core`, `dpram256x64`)

Each core pairs its network and controller with a 256 × 64 true dual-port RAM:

* Port A belongs to the host and port B to the controller.
* Reads are synchronous: data appears one clock after the address.
* Reads are write-first: a written word also appears on `dout`.

The host loads rows through port A and starts the core by writing any value to **row 255**. That
write is registered into a one-clock start pulse. The host then waits for `finish` (or polls the
last output row) and reads the results. Byte k of a row is bits 8k+7 … 8k.

| Rows     | XOR core                                                        | Robot core |
|----------|-----------------------------------------------------------------|------------|
| 0        | biases A.b3 A.b4 B.b3 B.b4 C.b3 C.b4 D.b3 D.b4 (bytes 0–7)      | biases A.b3 A.b4 B.b2 B.b3 B.b4 C.b3 C.b4 |
| 1        | weights A.w13 A.w23 A.w14 A.w24 B.w13 B.w23 B.w14 B.w24         | biases D.b3 D.b4 E.b4 |
| 2        | weights of C then D, same order                                 | weights A.w13 A.w23 A.w14 A.w24 B.w12 B.w13 B.w14 |
| 3        | inputs start                                                    | weights C.w13 … C.w24 D.w13 … D.w24 |
| 4        |                                                                 | weights E.w14 E.w24 E.w34 |
| inputs   | rows 3–66: x2 in byte 0, x1 in byte 1, unsigned fractions /256  | rows 5–68: S1 … S5 in bytes 0 … 4 (0 or 1) |
| outputs  | rows 67–130: bits 15:0 = y (D.y4), bits 31:16 = D.y3, each sign-extended | rows 69–132: y4 in byte 0, y3 in byte 1, y2 in byte 2, y1 in byte 3 (01 = +1, FF = −1) |
| 255      | start                                                           | start |

An 8-bit XOR input is widened to the 9-bit data word with a zero sign bit.

## Fixed-function data path (`asic_dp22`)

`asic_dp22` computes one output of a 2-input block, `y = min(m·(w1·x1 + w2·x2 + b), 15)`:

* x1, x2, w1, w2 and b are 4-bit unsigned values; m is a 3-bit slope.
* Each product is 8 bits and the sum of the products is 9 bits.
* The output y is 4 bits and saturates at 15.
* The circuit is purely combinational.

## Top level (`bbnn_top`)

`bbnn_top` places the XOR core, the robot core and `asic_dp22` side by side. They share only
`clk` and the asynchronous, active-low `rst_n`. Each has its own ports: `xor_*`, `rob_*` and
`asic_*`.

Some parts of a complete system are not in this repository:

* the host computer and its program;
* the memory-bus interface that would drive the RAM host ports;
* the clock divider;
* the decoder that turns y1…y4 into wheel angles.

## Where this design departs from its source description

* **Robot settle count.** The robot controller settles for **4** clocks, one state more than the
  source's state table. That table allows three clocks, which is not enough for E, at the end of
  the B→C→D→E chain.
* **E's bias byte.** E's bias is read from **byte 2** of the D/E bias row, the byte after D's two
  biases. The source's code places it in a byte that D already uses.
* **Single clock.** The host port runs on the core clock. The source's RAM had a separate host
  clock, and `dpram256x64` still has one clock per port.
* **Clearing the blocks.** The outputs are cleared by a synchronous `clr` on the block registers,
  instead of by forcing the feedback wires to zero.
* **Weight scaling.** Weights are kept as plain 8-bit integers, and the bias is scaled up by
  2^FRAC. This is numerically the same as giving every weight 8 fraction bits and scaling the
  whole sum.
* **Upper limit of +1.** In 9-bit Q.8 the ramp's +1 limit is 255/256.
* **Not specified in the source.** The byte order inside the parameter and output rows, the value
  of a step at exactly zero, the rounding of the ramp division, and the handling of a start during
  a run are all this design's choices.
* **Sum width.** The sum-of-products result has one bit more than the source's formula
  (inputs + data width + weight width) in some configurations. The extra bit keeps unsigned sums
  from being read as negative.
* **Data path signedness.** `asic_dp22` treats all of its operands as unsigned.
* **Default widths.** The blocks default to the XOR sizes: 9-bit data and 8-bit weights. The
  4-bit and 16-bit library variants need parameter overrides.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

* **Shared reference model:** `tb/tb_ref_pkg.sv` models the activations and both networks with
  plain integers, iterated clock by clock.
* **Blocks:** tested with random inputs and weights, including `clr` and the registered timing.
  `tb_bbnn_block_sizes` also runs all three block types at 4, 8 and 16 bits. It covers signed
  and unsigned data, with a fixed-point ramp and an integer step.
* **Networks:** compared with the reference model after every clock edge. This uses the published
  weights and also random weight sets.
* **Controller:** tested with a counting stand-in for the network, which shows the exact number of
  settle clocks. The cycle count is checked in both configurations.
* **Cores:** run through the host port. The run time and all 64 result rows are checked.
* **Top level (`tb_bbnn_top`):** runs both cores at full size with their default parameters. It
  also exercises the data path, and it counts how often each mechanism occurred:
  * parameter loads, the first-set shortcut and the input fetches;
  * settle clocks and block clears;
  * ramp saturation at +1 and at −1, and the linear region;
  * both step levels;
  * a start ignored while busy, and `finish`;
  * data-path saturation and the data path's linear range.

  A mechanism that never occurred counts as a failure.

To simulate one testbench with Verilator (5.x), from the repository root:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/bbnn_pkg.sv tb/tb_ref_pkg.sv tb/tb_bbnn_top.sv --top-module tb_bbnn_top
./obj_dir/Vtb_bbnn_top
```

`-y rtl -y tb` lets Verilator find every other module (including `tb/tb_ctrl_env.sv`) by its
name. Only the two packages are listed explicitly. Replace `tb_bbnn_top` with any other
testbench name.

To change a network's sizes or weights,
change the parameters of `xor_core` / `robot_core` (`X_W`, `FRAC`, slope, `SETTLE`) or the rows
the host writes. The row layout is fixed in `xor_bbnn` / `robot_bbnn`.
