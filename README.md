# Word-level multi-precision systolic array

This is an output-stationary systolic array for deep neural network
inference. It does two things differently from an ordinary systolic array.

* **Word-parallel PEs.** Every processing element (PE) has sixteen 4-bit x
  4-bit multipliers. Depending on a global precision setting, they form one
  16x16 MAC, four 8x8 MACs, or eight 2-term 4-bit dot products per clock.
  Ifmaps and weights may also use different precisions, for example 16-bit
  ifmaps with four 4-bit weights.
  In 4-bit mode all sixteen multipliers stay busy even when a layer offers
  only two input channels.
* **Ring-based diagonal dataflow.** Operands enter at the PEs on the main
  diagonal, not at the array edge. From there they travel both ways along
  their row (ifmaps) and column (weights), and wrap around at the edge. No
  operand travels more than N/2 hops, so the array fills in about half the
  time of a diagonally fed array. It also fills much faster than an array fed
  from the edges, which needs 2N-1 cycles.

The default configuration is a 16 x 16 array. In 16-bit mode that is the
equivalent of 256 16-bit MACs. It is all synthesizable SystemVerilog-2017.

## Arithmetic: how one PE uses its 16 multipliers

An ifmap word `X` is 16 bits, split into nibbles `x0..x3`. A weight word `W` is
32 bits: nibbles `w0..w3` in bits 15:0, plus a second set `v0..v3` in bits
31:16 that only 4-bit mode uses.

The multipliers are paired into eight *words* (`mp_word`). Word k (k = 0..3)
multiplies weight nibble k with the ifmap pair `x1:x0`. Word k+4 multiplies
the same weight nibble with `x3:x2`. Each word adds its two products:

* in 16-bit and 8-bit mode, the second product is shifted left by 4, so the
  word yields a 4-bit x 8-bit product;
* in 4-bit mode, the second multiplier uses `v_k` instead of `w_k` and the
  products are added without a shift, so the word yields `w_k*x_lo + v_k*x_hi`.

The *selective-precision* tree (`mp_selprec`) then combines the eight word
results into output lanes. With equal ifmap and weight precision:

| mode   | operands packed in X / W                                              | lanes (one accumulator each)                                                                           |
|--------|-----------------------------------------------------------------------|--------------------------------------------------------------------------------------------------------|
| 16-bit | X = one value; W[15:0] = one value                                    | lane0 = W*X                                                                                            |
| 8-bit  | Xa = X[7:0], Xb = X[15:8]; W0 = W[7:0], W1 = W[15:8]                  | lane0 = W1*Xa, lane1 = W0*Xa, lane2 = W1*Xb, lane3 = W0*Xb                                             |
| 4-bit  | x_i = X[4i+3:4i]; filter k: w_k = W[4k+3:4k], v_k = W[16+4k+3:16+4k]  | lane j = w_k*x0 + v_k*x1 and lane 4+j = w_k*x2 + v_k*x3, where k = 3-j (j = 0..3)                       |

The ifmap and weight precisions are set separately (`mode_t`, fields `x` and
`w`). When they differ, the lanes enumerate the pairs (ifmap element, weight
element). The ifmap element is the major index, Xa before Xb. Weight elements
run from the most significant down: W1, W0 or w3..w0.

| ifmap / weight | lanes                                           |
|----------------|-------------------------------------------------|
| X16 / W8       | lane0 = W1*X, lane1 = W0*X                      |
| X16 / W4       | lane j = w_(3-j) * X, j = 0..3                  |
| X8 / W16       | lane0 = W*Xa, lane1 = W*Xb                      |
| X8 / W4        | lane j = w_(3-j)*Xa, lane 4+j = w_(3-j)*Xb       |

4-bit ifmaps work only with 4-bit weights, because a word adds its two
products. The control flags any other pair with an assertion.

All values are two's complement. A nibble that is the top nibble of an element
in the current mode is sign-extended to a 5-bit multiplier operand; every other
nibble is zero-extended. Shifting and adding the sixteen signed 5x5 products
then gives exact signed results in every mode. Lanes that a mode does not use
read as zero.

In matrix terms, PE (r, c) accumulates `O[r][c] = sum_m X_r[m] * W_c[m]`. Here
row r supplies the ifmap words and column c the weight words. In 8-bit mode
each PE row covers two ifmap rows (Xa and Xb) and each PE column covers two
weight columns. In 4-bit mode each PE row also covers two ifmap rows, each PE
column covers four weight columns, and each step consumes two reduction
indices.

## Dataflow: diagonal injection on rings

Row r's ifmap stream enters at PE (r, r), and column c's weight stream enters
at PE (c, c). Every PE holds four operand registers, one for each travel
direction: X east, X west, W south and W north. A diagonal PE drives all four
chains from the injection buses. Every other PE copies each chain from its
neighbour one hop per clock. Column N-1 connects back to column 0, and row N-1
to row 0, which closes each row and column into a ring.

PE (r, c) lies `e = (c - r) mod N` hops east of its row's entry PE and the same
e hops north of its column's entry PE. It uses the east-travelling X chain and
the north-travelling W chain when `e <= N/2`, and the other two chains
otherwise. As a result:

* the X and W of the same reduction step always reach a PE in the same clock,
  so the inputs need no skew;
* the last PE receives the operands N/2 clocks after the diagonal PE, so a
  5 x 5 array is completely filled in its 3rd clock.

A 2-bit token (`valid`, `first`) travels with X. `first` makes the
accumulators restart, so back-to-back tiles need no clearing pass. For drain,
the accumulators shift one row down per clock into the output buffers below
the array. Drain is not a ring.

## One tile, cycle by cycle

`mp_ctrl` runs one output tile for each `start`:

1. **FEED**, `m_len` clocks. Word m of every IBUF and WBUF is read. One clock
   later it is on the diagonal injection buses.
2. **WAVE**, N/2 + 1 clocks. The last step finishes its trip around the rings.
3. **DRAIN**, N clocks. The bottom row is written into the output buffers,
   row N-1 first.
4. `done` pulses, and `last_cycles` reports the tile's length.

A tile takes `m_len + N/2 + 1 + N` clocks. The analytical model of this
dataflow is `R + M + ceil(max(R,C)/2) - 1`. The RTL is one clock slower for
odd N, because of the buffer read latency, and two clocks slower for even N.
A boundary-fed array needs `2R + C + M - 2` clocks.

For the 49x16 by 16x49 matrix product on the 16 x 16 array, the simulation
measures:

| mode   | tiles | busy cycles | ring model | boundary-fed model |
|--------|-------|-------------|------------|--------------------|
| 16-bit | 16    | 656         | 624        | 992                |
| 8-bit  | 4     | 164         | 156        | 248                |
| 4-bit  | 2     | 66          | 62         | 108                |

Buffer loading is not counted. The host writes the buffers while the array is
idle.

## Host interface (`mp_top`)

| port                                  | use                                                                       |
|---------------------------------------|---------------------------------------------------------------------------|
| `ib_we, ib_row, ib_addr, ib_wdata`    | write ifmap word `ib_addr` (the reduction step) of row `ib_row`'s IBUF     |
| `wb_we, wb_col, wb_addr, wb_wdata`    | write weight word `wb_addr` of column `wb_col`'s WBUF                      |
| `start, m_len, mode_in`               | start a tile of `m_len` (1..DEPTH) steps with precision pair `mode_in` (ignored while busy) |
| `busy, done, last_cycles`             | status; `done` pulses once at the end of the tile                          |
| `ob_row, ob_col` -> `ob_rdata`        | the 8 lanes of PE (ob_row, ob_col), valid one clock after the address      |

`mode_in` is an `mp_pkg::mode_t`: `{x, w}`, where each field is `PREC16`,
`PREC8` or `PREC4`.
Matrices larger than one tile are handled by reloading the buffers and
starting again.

## Parameters

| parameter | default | meaning                                                                                              |
|-----------|---------|------------------------------------------------------------------------------------------------------|
| `N`       | 16      | array side (square arrays only)                                                                      |
| `DEPTH`   | 4608    | words per IBUF/WBUF, the longest reduction in one tile (covers a ResNet-18 3x3x512 convolution)       |
| `ACC_W`   | 48      | bits per lane accumulator (enough for 4608 steps of 16x16 products)                                  |

## Files

| file                   | contents                                                              |
|------------------------|-----------------------------------------------------------------------|
| `rtl/mp_pkg.sv`        | precision enum, widths, token type, nibble extension helpers          |
| `rtl/mp_word.sv`       | one word: two multipliers, shifter, adder                             |
| `rtl/mp_selprec.sv`    | selective-precision adder tree                                        |
| `rtl/mp_pe.sv`         | PE: ring registers, eight words, tree, accumulators, drain             |
| `rtl/mp_array.sv`      | N x N array, ring wiring, choice of chain for each PE                 |
| `rtl/mp_opbuf.sv`      | IBUF / WBUF memory                                                    |
| `rtl/mp_obuf.sv`       | output buffer below one column                                        |
| `rtl/mp_ctrl.sv`       | tile sequencer, injection, precision broadcast, drain                 |
| `rtl/mp_top.sv`        | top level                                                             |
| `tb/mp_tb_pkg.sv`      | element-level reference arithmetic shared by the testbenches          |
| `tb/tb_*.sv`           | one self-checking testbench per module, plus workload tests           |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog. Packages must come first on the command line:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/mp_pkg.sv tb/mp_tb_pkg.sv rtl/mp_word.sv rtl/mp_selprec.sv rtl/mp_pe.sv \
    rtl/mp_array.sv rtl/mp_opbuf.sv rtl/mp_obuf.sv rtl/mp_ctrl.sv rtl/mp_top.sv \
    tb/tb_mp_top.sv --top-module tb_mp_top -Mdir obj
./obj/Vtb_mp_top
```

* `tb_mp_word`, `tb_mp_selprec`, `tb_mp_pe`: arithmetic for all seven
  precision pairs, checked against whole-element integer products.
* `tb_mp_array`: 5 x 5 and 6 x 6 arrays. The drain starts only N/2 clocks after
  the last step, so a PE that received its operands late would fail.
* `tb_mp_opbuf`, `tb_mp_obuf`, `tb_mp_ctrl`: memories and sequencing, including
  exact phase lengths.
* `tb_mp_top`: the whole core at N = 5 over 40 random tiles. It checks every
  lane and the cycle count of every tile. It also counts each precision pair,
  precision switches, back-to-back tiles, the shortest and longest `m_len`, and ignored
  starts.
* `tb_mp_matmul`: the full-size core with default parameters. It runs the
  49x16 by 16x49 product in all three modes, checked element by element.
* `tb_mp_layer`: the full-size core. It runs one tile of the longest reduction
  of each evaluated network: ResNet-18 (4608), DQN (3136), MobileNetV1
  pointwise (1024) and depthwise (9), and SAC (256).

## What is this design's own choice

The word organisation, the three groupings, the lane order, the diagonal ring
dataflow, the output-stationary accumulation and the edge buffers follow the
published architecture. The following were chosen here:

* **4-bit weights.** In 4-bit mode each word computes a 2-term dot product.
  That needs two weight nibbles per word column, so the weight word is 32 bits
  wide. The upper half is ignored in 8-bit and 16-bit mode. A design with a
  16-bit weight bus would have to share one weight between both multipliers
  of a word.
* **Precision pairs.** The broadcast setting carries both precisions. The
  lane order for mixed pairs extends the order of the equal pairs. 4-bit
  ifmaps combined with 8-bit or 16-bit weights are not supported.
* **Square arrays only.** There is one main diagonal.
* **Signed numbers and nibble extension.** Values are two's complement, with a
  5-bit signed multiplier per nibble pair.
* **Buffers and host interface.** Buffer organisation, depth, one-clock read
  latency, the host ports and the start/done handshake are all choices made
  here. One tile runs per start, and the host does the tiling.
* **Drain.** Results shift down the columns in N clocks.
* **Accumulators and reset.** Accumulators are 48 bits. Reset is synchronous
  and active low. Operand registers are not reset, because the valid token
  qualifies them.
* **One-cycle MAC.** The multiply, the adder tree and the accumulate happen in
  one clock. Timing closure at a given frequency would probably need a
  pipeline stage before the accumulators.

No area, power or frequency figures come with this RTL.
