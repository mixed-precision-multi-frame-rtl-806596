# Multi-frame, mixed-precision, fully parallel LDPC decoder

This is a decoder for the rate-1/2 quasi-cyclic LDPC code of IEEE 802.16e (WiMAX), at a code
length of 1152 bits. It gives every variable node and every check node of the Tanner graph
its own hardware unit, so one decoding iteration is a single pass through the two node arrays.
In a plain fully parallel decoder that pass is one long path, made mostly of wire, and it sets
a low clock rate. This design makes two changes to that.

* **Multi-frame pipelining.** Registers cut the iteration loop into three stages. A frame
  cannot use the stages back to back, because each stage depends on the result of the stage
  before it. The decoder therefore keeps three independent frames in flight, one per stage,
  and rotates them. Every stage does useful work every clock, and the clock can be about
  twice as fast.
* **Mixed check-node precision.** All messages leaving the variable nodes are 6 bits wide.
  Half of the check nodes work at that precision. The other half work at 5 bits and drop the
  fraction bit. Which check nodes are which is fixed when the design is built. Coarse
  messages lower the error floor, and fine messages help at low SNR. Mixing the two aims at
  both.

The algorithm is normalized min-sum with a scaling factor of 0.75 and flooding schedule. A
frame stops as soon as its hard decisions satisfy every parity check, or after 32 iterations.

## The code

The parity-check matrix is built from a 12 x 24 base matrix (`ldpc_pkg::BASE`). Each entry of
the base matrix is either a Z x Z zero block or a Z x Z identity matrix shifted cyclically by
p. Row k of a shifted block has its single one in column (k + p) mod Z. The values stored are
the standard's shifts for Z = 96. For another Z the shift used is floor(p * Z / 96), which is
the standard's rule for rate 1/2. With the default Z = 48 the code has N = 1152 variable
nodes and 576 check nodes:

* check node degrees are 6 or 7;
* variable node degrees are 2, 3 or 6;
* the graph has 76 * Z = 3648 edges.

Changing `Z` gives the other code lengths of the standard, from 576 bits (Z = 24) to
2304 bits (Z = 96).

Every message lives on an edge. An edge is numbered `Z*(ROW_PRE[r] + s) + k`, where:

* r is the base row;
* s is the position of the nonzero within that row;
* k is the row offset inside the block;
* `ROW_PRE[r]` is the number of nonzeros in the base rows above r.

Check node r*Z+k therefore owns a block of consecutive edge numbers. The variable-node side
finds its edges with the tables `COL_ROW` and `COL_SLOT`. All these tables are computed from
`BASE` at elaboration.

## Number formats

| signal | width | meaning |
|---|---|---|
| channel LLR `in_llr`, VNU messages, R messages | 6 bits, signed | (5,1) fixed point: value = code / 2 |
| VNU sums P and Q = P - R | 9 bits, signed | same units, cannot overflow |
| high-precision CNU | 6 bits: sign + 5-bit magnitude | (5,1) |
| low-precision CNU | 5 bits: sign + 4-bit magnitude | (5,0), integers |

A positive LLR means bit 0, and the hard decision is the sign of P.

The 0.75 scaling is done as `(x>>>1) + (x>>>2)`, with a carry-in equal to `x[1] | x[0]`. This
equals `floor((3x+2)/4)`, which rounds halves up. The result is then clipped to ±31. The clip
is symmetric, so a magnitude never needs more than 5 bits.

Ahead of a 5-bit CNU, the precision control unit adds half an LSB and drops the fraction bit,
then clips to ±15. Behind a 5-bit CNU, the precision alignment unit appends a zero bit, which
doubles the code value and puts it back in (5,1) units.

## Pipeline and frame ring

```
             slot A (LLRs)                    slot B (tag, iter)          slot C
in_llr --> [mux] ---------> stage 1: VNU array ----> stage 2: CNU stage 1 ----> stage 3: CNU stage 2 --+
             ^               (P, hard decision,       scale 0.75 + saturate       min / sub-min finder   |
             |                Q = P - R)              precision control           select, sign XOR       |
             |                      ^                 2's compl. -> sign-mag      sign-mag -> 2's compl. |
             |                      |                 parity check -> done?       precision alignment    |
             |                      +--------------------- R messages <----------------------------------+
             +-------------------- slot C: frame goes round again, or the slot is empty
```

There is one register per stage:

* `q_reg` and `hd_reg`: unscaled extrinsic sums and hard decisions, after the VNU array;
* `sgn_reg` and `mag_reg`: sign-magnitude messages, after CNU stage 1;
* `r_reg`: check-to-variable messages, after CNU stage 2.

The frame memory (`frame_memory`) is a ring of three slots: A, B and C. It shifts one step per
clock, so the frame in slot X is always the frame whose messages are in the matching stage:

* **A → B**: the frame's iteration count goes up by one. B's count is therefore the number of
  VNU passes done, including the one whose result is now in stage 2.
* **Stage 2 check**: the parity check runs on the registered hard decisions, in parallel with
  CNU stage 1. If the checks all hold, or the count has reached `MAX_ITER`, the frame is
  finished. Its hard decisions, tag, count and converged flag are registered onto the outputs.
  Its valid bit is cleared as it moves from B to C, so slot C is marked empty.
* **Slot C to A**: if C holds a frame, the frame goes back to A for another iteration. If C is
  empty, the input multiplexer takes a new frame (`in_ready = 1`). At the same time `c_empty`
  forces the R registers to zero, so the new frame's first VNU pass sees only its channel
  LLRs. If no frame is offered, A simply stays empty.

A frame therefore gets one iteration every three clocks. Frames leave in the order they
converge, not the order they arrived, so each frame carries a tag.

Only the valid bits, the tag and the iteration count travel as control state. The LLR array
moves with them as a plain shift register, and there is no stall logic anywhere.

## Check node unit

`cnu_stage1` handles one check node. For each edge it does, in order: scaling and saturation,
precision control (5-bit nodes only), then conversion to sign and magnitude.

`cnu_stage2` finds the minimum, the second minimum and the index of the minimum. Each edge
gets the second minimum if it is the edge of the minimum, and the minimum otherwise. Its sign
is the XOR of all input signs with its own sign removed. The result is converted back to
two's complement and, for 5-bit nodes, aligned.

`min_finder` is organized like a merge sort:

* `mf_find3` orders groups of three inputs with 3 comparators each.
* `mf_merge` merges two ordered pairs with 3 comparators: min against min, and each loser
  against the other pair's second value.
* A degree-6 node uses two 3-input finders and one merger, 9 comparators in all. A degree-7
  node merges its seventh input at the end.

## Variable node unit

`vnu` adds the channel LLR and the incoming messages with ternary adders (groups of three),
then subtracts each edge's own message. The 0.75 scaling of those differences sits in CNU
stage 1, on the far side of the pipeline register.

## Files

| file | content |
|---|---|
| `rtl/ldpc_pkg.sv` | base matrix, derived tables, formats, precision selection |
| `rtl/ldpc_mf_decoder.sv` | top: node arrays, pipeline registers, check, output |
| `rtl/frame_memory.sv` | three-slot frame ring with input multiplexer |
| `rtl/vnu.sv` | variable node unit |
| `rtl/cnu_stage1.sv`, `rtl/scale_sat.sv`, `rtl/prec_ctrl.sv` | CNU stage 1 and its scaling and precision control units |
| `rtl/cnu_stage2.sv`, `rtl/min_finder.sv`, `rtl/mf_find3.sv`, `rtl/mf_merge.sv` | CNU stage 2 and the min / sub-min tree |
| `rtl/parity_check.sv` | syndrome of the hard decisions |
| `tb/ldpc_tb_pkg.sv` | encoder, AWGN channel, bit-accurate behavioural decoder |
| `tb/tb_<block>.sv` | self-checking testbench of each block |
| `tb/tb_ldpc_mf_decoder.sv` | end-to-end test at full size |
| `tb/tb_precision_modes.sv`, `tb/tb_prec_lane.sv` | the three precision arrangements side by side |

## Interface of the top, `ldpc_mf_decoder`

| parameter | default | |
|---|---|---|
| `Z` | 48 | expansion factor; N = 24*Z |
| `MAX_ITER` | 32 | iterations before a frame is given up (at most 63) |
| `TAG_W` | 8 | frame tag width |
| `PREC_MODE` | `PREC_MIXED` | `PREC_HIGH`: all CNUs 6-bit; `PREC_LOW`: all 5-bit |

**Input.** A frame (`in_llr[0:N-1]`, `in_tag`) is taken at a rising edge where `in_valid` and
`in_ready` are both high. `in_ready` depends only on internal state. It is high in the cycles
when slot C is empty, which happens no more often than once every three clocks while three
frames are in flight.

**Output.** `out_valid` pulses for one clock together with:

* `out_bits` (bit i is code bit i, information bits first);
* `out_tag`;
* `out_iter`;
* `out_converged`, which is 0 when the frame stopped at the iteration limit.

A frame accepted at edge t that stops after k iterations is output at edge t + 3k - 1. There
is no back-pressure on the output.

**Reset.** `rst_n` is asynchronous and active low, and empties the decoder.

With an average of k iterations per frame, the decoder delivers one frame every k clocks on
average, since three frames share three clocks per iteration.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. It has a watchdog. For
example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ldpc_pkg.sv tb/ldpc_tb_pkg.sv tb/tb_ldpc_mf_decoder.sv --top-module tb_ldpc_mf_decoder
./obj_dir/Vtb_ldpc_mf_decoder
```

`tb_ldpc_mf_decoder` runs the top at its default parameters. Verilator takes a few minutes to
build it, and it runs in seconds. It decodes 12 frames:

* one frame of pure noise, which has to be given up after 32 iterations;
* eleven codewords sent at Eb/N0 between 2.0 and 3.5 dB.

Input offers are held back at random. For every frame it checks:

* the decoded bits, the iteration count and the converged flag, against a bit-accurate model;
* the parity of converged frames;
* the latency, 3k clocks.

It also checks that each of these mechanisms happened at least once: three frames in flight,
an empty slot, an out-of-order exit, a give-up and scaler saturation.

`tb_precision_modes` puts the three precision arrangements side by side and checks each
against the model. It uses the 192-bit member of the code family (Z = 8), so that three
decoders build in a few minutes, and decodes 8 frames per SNR point at 1.5, 2.0 and 2.5 dB. It
reports frame and bit errors and mean iterations for each point. These counts only check
that the three arrangements work. They are far too few to reproduce error-rate curves or to
rank the arrangements: at 1.5 and 2.0 dB the 6-bit array happened to make the fewest errors
in one run.

The behavioural model in `ldpc_tb_pkg::ref_decode` is the easiest place to try changes to
the arithmetic before changing the RTL.

## How this relates to the published design

These parts follow the published design:

* the code;
* normalized min-sum with 0.75 scaling;
* the shift-add scaler with OR-ed carry-in, and its saturation;
* the two-minimum CNU with the 3-input / 4-input merge tree;
* the ternary VNU adder tree;
* the three-stage cut (VNU | scale, saturate and convert | find, select and convert back);
* the three-slot frame ring with iteration count, empty mark and reset of the check messages;
* the precision control and alignment units around 5-bit CNUs mixed 1:1 with 6-bit CNUs.

These are choices of this implementation:

* the symmetric saturation limits;
* round-half-up in precision control;
* the fixed pseudo-random placement of 5-bit CNUs, with exactly one of each pair (2i, 2i+1);
* the 32-iteration limit (taken from a companion design with the same code);
* the valid/ready input, the frame tag and the registered output;
* evaluating the parity check in stage 2, on the registered hard decisions;
* merging the seventh input of degree-7 check nodes last.

Not included:

* the single-stage and two-stage versions of the decoder;
* a 2304-bit partially parallel decoder (two-way folded node arrays sharing Q and R memories
  under a memory-access state machine), which is a different architecture for longer codes;
* FPGA-specific elements: clocking, debug cores and the error-rate measurement set-up.
