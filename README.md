# ConfASR-style conformer block accelerator

This is synthesizable SystemVerilog for an edge accelerator that runs one
conformer block of a speech-recognition encoder. A conformer block is a
half-step feed-forward module, multi-head self-attention with learned
positional encoding, a convolution module (pointwise conv, GLU, depthwise
conv, pointwise conv), a second half-step feed-forward module and a final
normalization. Every part of the block runs on a **single 64 x 64 INT8
output-stationary MAC array**, and all activations of the block stay on
chip. The design follows the ConfASR architecture (Wabnitz et al., RWTH
Aachen), rebuilt from its published description. Wherever that description
is silent, this RTL makes its own choices, and the sections below say which.

Main configuration: sequence length s = 64 (= head size d_h = array edge),
feature size d = 512, feed-forward size d_ff = 512, h = 8 heads, INT8
weights and activations.

## Block diagram

```
          a (64 x int8)                gamma
              |                           |
        +-----v---------+           +-----v------+
        | input memory  |--port 0-->| MA norm    |---------------------+
        | 64 x 512 x 8  |<--+       +------------+                     |
        +---------------+   |                                          |
              ^ port 1      | residual sums                            |
              |             |                                          v
        +-----+------+      |   w (64 x int8)      +-----------------------------+
        | residual   |<-----+-----------+--------->| input control (select, skew)|
        +------------+                  |          +------+--------------+-------+
              ^                         |            left |          top | + flags
              |                         |                 v              v
        +-----+--------------+   +------+------+   +-------------------------+
        | bias & requant     |<--| MAC array   |<--+ 64 x 64 PEs, output     |
        | (+pos. enc. term)  |   | readout     |   | stationary              |
        +--+---+---+---+--+--+   +-------------+   +-------------------------+
           |   |   |   |  +---- feedback to the top edge (transposes)
           |   |   |   +------- softmax -> buffer (64 x 64 x 10 bit) -> softmax -> left edge
           |   |   +----------- GLU (first tile from the buffer) -> activation memory
           |   +--------------- buffer (Q, first GLU tile) -> left edge
           +------------------- activation memory 64 x 512 x 8 -> left edge / depthwise
                          top_control: instruction words -> flags, addresses, slots
```

## The central trick: memories and the array are both diagonal

The three stores (`row_memory`: input memory, activation memory, buffer)
each have **one bank per sequence position**, and every bank has its own
address. In cycle `T + t`, bank r reads word `base + t - r`. Row r of the
data therefore leaves the memory r cycles behind row r-1, which is exactly
the skew an output-stationary array needs at its left edge (or top edge).
No skew registers are needed for memory operands. Only the external weight
vector, which arrives whole in one cycle, passes a triangle of skew
registers in `input_control`.

The array (`mac_array`) moves A to the right and B down. The stream flags
(`valid`, `first`, `last`, a 2-bit slot, a row tag) move down with B. A PE
that accumulates its `last` product raises `done` for one cycle. Because the
flags move diagonally, each row has at most one PE done per cycle. The row
presents that PE's sum with its column index. For a K-long product whose
edge feeding started in cycle T:

* row r, column c leaves the array in cycle **T + K + 1 + r + c**;
* after the requantizer it is available one cycle later;
* a new accumulation can follow immediately, because `first` restarts the
  accumulator. There is no clear or drain phase.

So results also leave as a diagonal wavefront. Written back with per-bank
addresses, they form the same pattern the memories are read in.

### Transposition by feedback

Row r of a result leaves element by element (c = 0, 1, ...), and row r+1
leaves one cycle later. Fed into **top lane r**, this is the skewed
right-hand operand whose column r is that row: the array multiplies by the
**transpose** of its previous result with no extra storage. The controller
starts the next word exactly **K + 2 cycles** after the previous one, so
the fed-back values meet the new left operands:

* `K_i` is computed (left: normalised input, top: weights) and fed back
  while `Q_i` streams from the buffer on the left, giving `Q_i K_i^T`.
* `V_i^T` is computed (left: weights, top: normalised input) and fed back
  while the softmax streams the attention scores on the left, giving
  `A_i V_i`.

A fed-back word that cannot start on its cycle sets the sticky `err` output.

## Array modes

| mode | A (multiplier input 1) | B (input 2) | PE(r,c) result |
|---|---|---|---|
| `MODE_MM` | from the left neighbour | from above | sum_k L[r][k] * T[k][c] |
| `MODE_DW` | left lane c, broadcast to all of column c | from above (kernel taps) | y_c[r] = sum_j w_c[j] * x_c[r+j-P], zero padded |
| `MODE_POS` | from the left neighbour | top lane c directly, only in the row named by the row tag | row r times its own s x s matrix |

For the depthwise convolution, channel c's sequence is spread across all
64 banks at word c. The activation memory is read along the anti-diagonal
(bank b at word `t - P - b`), and `input_control` rotates the banks so that
lane c receives channel c one position per cycle. For positional encoding,
the rows run one after another (s x s cycles). This is the long phase of
every head.

When the mode changes, the controller waits until the array is empty.

## Units on the result path

All results are INT8, one lane per sequence position.

* **bias_requant**: `y = sat8(((acc + bias[col] + pe) * mult + 2^(shift-1)) >>> shift)`,
  with optional ReLU. `pe` is the positional-encoding score read from the
  activation memory. This is how positional scores are added to
  `Q K^T`. A batch normalization folds into bias and multiplier. Settings are
  stored per slot, so several words can be in flight.
* **softmax**: the same input scale for every head and block (1/16 here)
  allows one exp LUT and a **constant maximum of 32** in place of the row
  maximum, so the scores are read only once.
  `e = LUT[clip(32 - score, 0, 255)]` (10 bit) goes into the buffer and
  into a row sum. When column 63 arrives, the lane stores `2^24 / sum`.
  Read back from the buffer, `p = min(127, round(e * recip / 2^17))` is a
  probability with scale 2^-7.
* **glu**: the pointwise conv to 2d is computed tile by tile. Tile t of the
  first half goes to the buffer. The matching tile of the second half goes
  through an 8-bit sigmoid LUT, is multiplied with the buffered value and
  written to the activation memory:
  `out = sat8((g1 * sigLUT[g2] + 128) >>> 8)`.
* **residual**: `sat8(x + y)`, or `sat8(x + (y >>> 1))` for the half-step
  feed-forward modules. The sum is written back to the input memory.

## Normalization (ma_norm)

Layer normalization needs a square root. Mean-absolute (MA) normalization
replaces it, computed from only the **first half** of each row's features
and with no bias:

```
mu    = (sum_{j<256} x_j) >>> 8
ma    = max(1, (sum_{j<256} |x_j - mu| << 2) >> 8)        (S_ma = 2)
recip = 2^16 / ma
y_j   = sat8( (((((x_j - mu) << 7) * recip) >>> 16) * gamma_j) >>> 8 )   (S_norm = 7, S_cut = 8)
```

An `OP_NORM` word runs two statistics passes over words 0..255 of all rows
at once. After that, mu and recip sit in registers, and every later read of
the input memory through the norm lanes is normalised on the fly. The
shifts and the 50 % subset are the published values. The two-pass order
(mean first, then mean absolute deviation) and the reciprocal form are this
design's reading of the normalization datapath.

## Programming

`instr_t` (in `confasr_pkg`) holds one word:

| field | meaning |
|---|---|
| `op` | `OP_MAC` (array pass), `OP_NORM` (statistics), `OP_DUMP` (input memory to `out`, raw or normalised) |
| `mode` | array mode |
| `lsrc`, `tsrc` | left / top operand source |
| `k_len` | accumulation length (taps in depthwise mode) |
| `src_base` | first word of the streamed memory operand |
| `dst`, `dst_base` | activation memory, residual into the input memory, buffer, GLU, softmax, output, or none (feedback only) |
| `pe_base`, `add_pe` | activation tile added as the positional term |
| `relu`, `res_half`, `req_mult`, `req_shift` | requantization settings |

`instr_bias` (one value per output column) comes with the word. Words are
taken on a valid/ready handshake. While `w_req` is high, the host must drive
weight vector `w_idx` of the running word on `w` in the same cycle. It
drives `gamma[gamma_idx]` the same way. For a matrix product, vector k is
row k of the 64-column weight tile. For positional encoding, vector
`i*64 + k` is row k of row i's matrix. For depthwise convolution, vector j
holds tap j of the 64 channels.

A conformer block is this program (`tb/tb_confasr_top.sv` builds it):

1. `OP_NORM`. FF1 tiles: left = norm, top = W, to activation tile, ReLU.
   FF2 tiles: left = activation, top = W, residual with half.
2. `OP_NORM`. Per head: Q to buffer; positional encoding (`MODE_POS`, left
   = buffer) to activation tile i; K (dst none); `Q K^T` (left = buffer,
   top = feedback, add positional term, dst softmax); `V^T` (left = W, top
   = norm); `A V` (left = softmax, top = feedback) to activation tile i.
   Then the output FC with residual.
3. `OP_NORM`. Per tile: first GLU half to the buffer, second half to the
   GLU. Depthwise (`MODE_DW`) per tile, with batch norm folded and ReLU.
   Pointwise conv with residual.
4. `OP_NORM`, FF as in 1.
5. `OP_NORM`, `OP_DUMP` with normalization: the block output.

Up to four words may have results in flight. Each is tagged with a 2-bit
slot that travels through the array with its operands. The slot selects
where results go and how they are requantized.

## Where this RTL departs from or adds to the published design

* The memories have **two read ports** per bank instead of 1R/1W. The
  second port serves residual, GLU and positional-term reads while port 0
  streams operands.
* The instruction word format, the slot mechanism, the K + 2 issue spacing,
  the mode-switch wait and the read-out word are this design's own.
* The LUT scale 1/16, the softmax reciprocal and output scale, the
  requantizer's multiplier and shift widths, and the 32-bit accumulators
  are choices; the published text does not give them.
* The PE's clock-gated registers are modelled as enables.
* Cycle counts are close to, but not the same as, the published timing
  diagram (about 84 k cycles per block). This RTL needs 90.8 k cycles for
  the full-size block (363 us at 250 MHz). The array must be empty before
  its mode changes, so the positional-encoding and depthwise words do not
  overlap their neighbours. The positional-encoding phase costs s x s
  cycles per head, as in the published design.
* Not modelled: the 22 nm implementation (register-file macros, clock
  gating cells, layout). Dropout is an inference no-op and has no hardware.

## Files

| file | content |
|---|---|
| `rtl/confasr_pkg.sv` | sizes, shifts, flag/instruction types, LUT generators (integer arithmetic) |
| `rtl/confasr_top.sv` | the accelerator |
| `rtl/top_control.sv` | sequencer: flag generator, address generators, slot table |
| `rtl/mac_array.sv`, `rtl/mac_pe.sv` | the array and its PE |
| `rtl/input_control.sv` | operand selection and skew |
| `rtl/row_memory.sv` | banked register file (input / activation memory, buffer) |
| `rtl/ma_norm.sv`, `rtl/bias_requant.sv`, `rtl/softmax.sv`, `rtl/glu.sv`, `rtl/residual.sv` | result and operand units |
| `tb/tb_*.sv` | self-checking testbenches, one per unit |
| `tb/tb_confasr_top.sv` | whole conformer block at s = 4, d = 16 against an integer reference |
| `tb/tb_confasr_full.sv` | the same block at the default size (s = 64, d = 512, 31-tap depthwise) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself (it
also has a watchdog). With Verilator 5:

```
verilator --binary --timing -Irtl rtl/confasr_pkg.sv tb/tb_confasr_top.sv \
          --top-module tb_confasr_top -Mdir obj_top
./obj_top/Vtb_confasr_top
```

Replace the testbench name for the unit tests. `tb_confasr_top` runs a
complete block in about 1.3 k cycles. It checks the block output bit for
bit and checks that each mechanism occurred at least once: mode switch,
feedback, back-to-back issue, positional encoding, depthwise, softmax, GLU,
residual with and without halving, ReLU, statistics and read-out. It also
checks that fed-back words start exactly K + 2 cycles after their producer.
`tb_confasr_full` does the same at full size: 127 instruction words and
78 k weight vectors. It finishes in 90,794 cycles with 65,567 checks and
no failures. The simulation takes seconds; the C++ build takes a few
minutes.

To scale the design, change `N` (array edge = sequence length = head size,
a power of two), `DEPTH` (d) and `NP_LOG2` on `confasr_top`. The heads are
`DEPTH / N`.
