# Unrolled RCQ min-sum decoder for the IEEE 802.11n (648,540) LDPC code

This is a fully unrolled, fully parallel LDPC decoder. Every one of the 10 decoding
iterations has its own hardware: 108 check nodes, 648 variable nodes and all 2376 edges
between them, laid out one iteration after the next. A new 648-LLR frame can therefore enter
on every clock cycle, and the result comes out 31 cycles later.

An unrolled decoder usually spends most of its area on wires, because every edge carries a
full-width message from one iteration to the next. This design uses
**Reconstruction–Computation–Quantization (RCQ)** to cut that cost:

- Messages entering and leaving the check nodes are only **3 bits**: a sign and a 2-bit
  index.
- The variable nodes compute with **7-bit** two's-complement values.
- Between the two sides, per-iteration tables translate in both directions:
  - a **reconstruction table (R)** turns a 3-bit index into a 7-bit value;
  - a **quantization table (Q)** turns a 7-bit value into a 3-bit index.
- Because the tables can change from one iteration to the next, the coarse 3-bit alphabet
  can follow the growth of the message magnitudes as decoding proceeds.

The decoding algorithm is flooded min-sum, with an optional offset (offset min-sum).

## The code and its graph

The parity-check matrix is the 802.11n rate-5/6 matrix for n = 648:

- It is a 4 × 24 base matrix, lifted by Z = 27.
- A base entry s ≥ 0 stands for a 27 × 27 identity matrix rotated by s. An entry of −1 is an
  all-zero block.
- Check node m = j·27 + z connects to variable node n = y·27 + ((z + s) mod 27), where
  s = H_BASE[j][y].

The base matrix:

```
17 13  8 21  9  3 18 12 10  0  4 15 19  2  5 10 26 19 13 13  1  0  -  -
 3 12 11 14 11 25  5 18  0  9  2 26 26 10 24  7 14 20  4  2  -  0  0  -
22 16  4  3 10 21 12  5 21 14 19  5  -  8  5 18 11  5  5 15  0  -  0  0
 7  7 14 14  4 16 16 24 24 10  1  7 15  6 10 26  8 18 21 14  1  -  -  0
```

Node degrees:

- Every check node has degree 22.
- Variable nodes have degree 4, except block columns 12 and 20 (degree 3) and columns 21–23
  (degree 2).
- The first 540 code bits are the information bits.

`ldpc_pkg` derives everything else from `H_BASE` during elaboration:

- the degree of each block row and column;
- the base column behind each check-node input slot;
- the base row behind each variable-node input slot;
- the slot an edge occupies on the other side.

Inputs are numbered in a fixed order. A check node's inputs follow ascending base column; a
variable node's inputs follow ascending base row. Three pure-wiring modules use these tables:

- `initial_layer` sends the quantized channel LLRs to the check nodes of iteration 1.
- `c2v_connection` routes check-node outputs to variable-node inputs.
- `v2c_connection` routes variable-node outputs to the next iteration's check nodes.

Unused slots are driven to zero.

## Message formats and the RCQ tables

| Signal | Width | Format |
|---|---|---|
| channel LLR, VN input/output, a-posteriori LLR | 7 | two's complement, limited to ±63 |
| check-node input/output (RCQ message) | 3 | sign-magnitude: bit 2 = sign, bits 1:0 = level index |

**Reconstruction** (`r_module`, `r_layer`): index k maps to ±R*[k], with the sign taken from
the sign bit.

**Quantization** (`q_module`, `q_layer`): magnitude |h| maps to the largest k with
|h| > threshold[k−1], and the sign is kept.

Both are small ROMs that `ldpc_pkg` fills during elaboration. There are three table versions:

| Version | Used for | R* levels | Q thresholds |
|---|---|---|---|
| 1 | channel LLRs (Q_0 and R_0) | 2, 8, 16, 30 | 4, 11, 22 |
| 2 | iterations 1–5 | 2, 7, 14, 28 | 4, 10, 20 |
| 3 | iterations 6–10 | 4, 12, 24, 48 | 7, 17, 35 |

`RCQ_TABLE_SEL` holds the per-iteration schedule of versions. The structure of the tables
follows the design this RTL implements: a channel table, per-iteration versions, and a switch
from version 2 to version 3 after iteration 5. **The numbers in the tables are this design's
own choice.** The levels roughly double, and each threshold lies between its two neighbouring
levels. They were not optimised for error rate. An optimised set can be dropped into
`R_TABLE` and `Q_THRESH` in `ldpc_pkg` without touching anything else.

The check node computes directly on indices. Minimum and XOR work on the index just as they
would on the value, because every table is monotone. So the check node never needs the
reconstructed values.

## Exclusive-operation networks

Each node has to produce, for every edge, a result over all of its *other* edges:

- a check node needs the minimum and the sign XOR of all other inputs;
- a variable node needs the sum of all other inputs.

All three node types use one structure: a binary tree walked in both directions.

- The **forward pass** combines inputs pairwise towards the root.
- At the **root**, the two halves exchange their values.
- The **backward pass** combines each subtree's "everything outside me" value with its
  sibling's forward value, until each leaf holds the result over all the other inputs.

Each cell (`min_unit`, `xor_unit`, `adder_unit`) contains three operators:

- `up = a∘b`, one step of the forward pass;
- `down_a = p∘b` and `down_b = p∘a`, one step of the backward pass.

For a network of SIZE = 2^K inputs this gives SIZE − 2 cells, or 3·SIZE − 6 operators. The
logic depth is 2(K − 1) operators. The networks are `min_network`, `xor_network` and
`adder_network`:

- The adder network widens its results by K bits, so no sum overflows.
- A node whose degree is not a power of two uses the next power of two. The spare inputs
  get a neutral value: the largest magnitude for min, 0 for XOR and for sums.
- A check node of degree 22 therefore uses 32-input networks. A variable node uses a 4-input
  network.

## Node arithmetic

**`check_node`** (DEG 22, SIZE 32):

- output magnitude index = max(exclusive minimum − OFFSET, 0);
- output sign = exclusive XOR of the signs.

OFFSET defaults to 0, which is plain min-sum.

**`variable_node`** (DEG 2–4):

- Let t be the reconstructed channel LLR and r the exclusive sum of the reconstructed
  check-to-variable messages.
- The output is clip(r, −63 − t, 63 − t) + t. This equals t + r limited to ±63, but the
  limit is applied to r, so the wide sum never reaches the output width.
- The result is then quantized by the iteration's Q table into a 3-bit message for the next
  check-node layer.

**`outllr_node`** is used after the last iteration:

- It computes the a-posteriori LLR: t plus the sum of *all* incoming messages, limited the
  same way.
- `conversion_layer` takes the hard decision of the first 540 LLRs from the sign bit, so a
  negative LLR gives bit 1.
- An LLR of exactly 0 decodes as 0.

## Pipeline and timing

`ldpc_datapath` chains the layers and places the pipeline registers as follows:

| Level | Register after… |
|---|---|
| 0 | input register (7-bit channel LLRs); Q_0 follows it in the same stage as the first CN layer |
| 3t+1 | CN layer of iteration t+1 |
| 3t+2 | C2V wiring + R layer + VN layer (iterations 1..9) |
| 3t+3 | Q layer + V2C wiring (iterations 1..9) |
| 3·N_ITER−1 | C2V + R + OutLLR layer of the last iteration |
| 3·N_ITER | output register (LLRs and bits) |

This gives 3·N_ITER + 1 = **31 register levels**, so a frame's latency is 31 cycles, one per
level.

Each iteration is cut into three stages. The check-node layer, whose 32-input networks are the
deepest logic, gets a stage of its own.

The channel LLRs are needed again by every variable-node layer:

- They travel down the pipeline in their **quantized 3-bit form**, beside the messages.
- An R_0 layer (table version 1) rebuilds the 7-bit value in front of every VN layer and the
  OutLLR layer.

This keeps the pipeline narrow: each channel LLR is stored in 3 bits per level instead of 7.
The variable nodes therefore see the channel LLR as the table reconstructs it, not the exact
input value.

## Handshake and control

The top module `ldpc_rcq_decoder` has a valid/ready interface on both sides:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | `llr_in` holds a frame |
| `decoder_ready` | out | 1 | the decoder takes the frame at this clock edge |
| `llr_in` | in | 648 × 7 | channel LLRs, positive means bit 0 |
| `out_valid` | out | 1 | `llr_out`/`bits_out` hold a result |
| `receiver_ready` | in | 1 | the receiver takes the result at this clock edge |
| `llr_out` | out | 648 × 7 | a-posteriori LLRs |
| `bits_out` | out | 540 | decoded information bits |

**`control_unit`** handles the flow through the pipeline:

- A valid bit travels with each frame, in a shift register of 31 stages.
- The whole pipeline advances (`enable = 1`) unless a result is waiting that the receiver does
  not take: `enable = !out_valid || receiver_ready`.
- `decoder_ready` equals `enable`, so the decoder takes a new frame whenever the pipeline
  moves.
- A stall freezes every level, bubbles included. There is no bubble squeezing.

**Enable fan-out.** Each enable drives one level's 648 × 4 message registers. Rather than one
huge net, the top instantiates **one control unit per pipeline level**; each copy drives the
enable of its own level. Every copy sees the same inputs, so all copies agree. An assertion
(`a_cu_agree`) checks this in simulation. Copy 0 provides `decoder_ready` and `out_valid`.

## Parameters

- `N_ITER` on the top and the datapath: unrolled iterations. The default is 10, and it may be
  at most 10, because `RCQ_TABLE_SEL` has 10 entries.
- All other sizes are package constants in `ldpc_pkg`:

  | Constant | Default |
  |---|---|
  | `Z` | 27 |
  | `H_BASE` | see above |
  | `DWIDTH` | 7 |
  | `LLR_BITS` | 7 |
  | `QBITS` | 3 |
  | `OFFSET` | 0 |
  | `R_TABLE` | see table above |
  | `Q_THRESH` | see table above |
  | `RCQ_TABLE_SEL` | 2,2,2,2,2,3,3,3,3,3 |

- The number of iterations is fixed when the design is built. There is no early termination
  and no run-time iteration count.

## Where this design departs from, or fills in, its source

The following follow the design this RTL implements:

- unrolled flooded min-sum with RCQ on the check-node side;
- the bidirectional exclusive-operation networks;
- the widths (7-bit LLRs, 3-bit RCQ messages);
- 10 iterations, with table version 2 for iterations 1–5 and version 3 after them;
- 3·N+1 pipeline levels with the check-node layer in a stage of its own;
- a control unit per pipeline level;
- the valid/ready signal names.

The following are this design's own choices:

- **The contents of the RCQ tables**, see above.
- **The base matrix** is entered from the 802.11n standard.
- **The exact position of each pipeline register** within an iteration, as in the table
  above.
- **Carrying the quantized channel LLRs down the pipeline**, rebuilt by table version 1 in
  front of every VN layer.
- **The message formats**: sign-magnitude 3-bit, two's-complement 7-bit, clipping to ±63
  applied before adding the channel LLR.
- **Asynchronous active-low reset.** Every pipeline register clears to 0.
- **`decoder_ready = enable`** and the valid shift register inside the control unit.
- **Ordering of node inputs**: by ascending base column or row.
- **OFFSET = 0.** The source describes offset min-sum but gives no offset value.
- **One width for all iterations.** The source allows a different RCQ width per iteration.
  Here every iteration uses 3 bits, which is the main configuration.
- **No wrapper level around the nodes.** The nodes are instantiated directly in the layers.
- The C++ bit-accurate model and the UVM environment that accompanied the original design are
  not part of this RTL. The SystemVerilog reference model in `tb/tb_ldpc_ref_pkg.sv` takes
  their place for verification.

## Verification

`tb/tb_ldpc_ref_pkg.sv` is an independent behavioural model. It does not instantiate any RTL
and rebuilds the graph as a plain edge list. It contains:

- a flooded RCQ min-sum decoder, bit-exact to the RTL;
- an encoder for the code, using the dual-diagonal parity part of the base matrix;
- a syndrome check;
- a simple channel model.

Every block has a self-checking testbench `tb/tb_<block>.sv` ending in a
`TB_RESULT checks=… failures=…` line:

| Testbench | What it checks |
|---|---|
| `tb_min_network`, `tb_xor_network`, `tb_adder_network` | every output against a brute-force exclusive min, XOR or sum, for several sizes and random inputs |
| `tb_check_node`, `tb_variable_node`, `tb_outllr_node` | node outputs against direct formulas, including clipping and the offset |
| `tb_r_module`, `tb_q_module` | every table entry of every version |
| `tb_ldpc_pkg` | the base matrix against an independent copy, the degrees, and consistency of the slot tables |
| layer testbenches | every output of the full 648/108-node layer against the model's routing or arithmetic |
| `tb_control_unit` | latency of a single frame, then random in_valid/receiver_ready traffic against a cycle-level model: every frame out once and in order, stalls seen |
| `tb_ldpc_datapath` | one frame per cycle through a 2-iteration datapath, all 648 LLRs and 540 bits of every frame against the model, with a stall while frames are in flight |
| `tb_ldpc_rcq_decoder` | the end-to-end check, described below |

The end-to-end check `tb_ldpc_rcq_decoder` uses the full-size code with 2 iterations:

- It checks the idle latency of 3·N+1 cycles.
- It sends noisy codewords and random-LLR frames back to back.
- It holds `receiver_ready` low in mid-stream and compares every result bit-exactly.
- It counts each mechanism and fails if any of them never happened:
  - output stalls;
  - input held off by `decoder_ready`;
  - several frames in flight;
  - message clipping;
  - frames whose channel errors were all corrected.

**Largest size simulated.** End to end, the largest configuration simulated is the full
648-bit code with **2 unrolled iterations** (7 pipeline levels). The default build, with 10
iterations, lints and elaborates cleanly but was not simulated. With verilator, the C++ model
of the 10-iteration netlist (about 500 source files) takes far longer to compile than a
practical test run. The iteration stages are identical generate instances, with the table
version as their only difference, so the 2-iteration runs cover every kind of logic in the
10-iteration build. One exception: the switch from table version 2 to 3 happens only after
iteration 5. It is covered by the R/Q tests of every version, not by an end-to-end run.

Running a test with plain verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ldpc_pkg.sv tb/tb_ldpc_ref_pkg.sv tb/tb_ldpc_rcq_decoder.sv \
    --top-module tb_ldpc_rcq_decoder -Mdir obj -o sim
./obj/sim
```

The 2-iteration end-to-end test builds and runs in about 4 minutes. The block tests take
seconds.

## Resource notes

- At 10 iterations the design holds:
  - 31 levels of pipeline registers;
  - about 10 × 648 × 4 3-bit and 7-bit messages;
  - 1080 check nodes with two 32-input networks each;
  - 6480 variable nodes.
- Elaborating the full design needs several gigabytes of memory in both verilator and yosys.
- Each message bus is an unpacked array per node and slot, not a single wide packed vector.
  With packed vectors, lint memory grows several-fold.
