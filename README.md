# Layered LDPC decoder for DVB-S2-style quasi-cyclic codes

This is a massively parallel LDPC decoder: 360 processors each update one
checknode at a time. It follows the **horizontal shuffle** (layered) schedule.
The flooding schedule updates every check message from the previous
iteration's bit messages. Here, each checknode instead works on bit estimates
that the checknodes before it in the same iteration have already updated.
Such a decoder needs fewer iterations than a flooding decoder to reach the
same error rate.

The DVB-S2 parity-check matrices are built from 360x360 circulant blocks. That
structure maps naturally onto 360 lanes. It also causes one problem for a
layered decoder: two processors of the same layer can read the same bit
estimate, and the second write-back would then erase the first. The decoder
solves this with *alternate copies* that are merged later, with no stall
cycles. Most of this document explains that mechanism.

Default configuration:

- 360 processors;
- 64800-bit frames (180 bit groups of 360 bits);
- 6-bit channel LLRs and check messages, 8-bit a-posteriori sums;
- offset min-sum with offset 1;
- up to 135 layers, checknode degree up to 16, and up to 792 circulant
  blocks. That covers the normal-frame rates 1/4, 1/3, 1/2, 3/5 and 3/4.

## The algorithm, in fixed point

Each bit `i` keeps one a-posteriori sum `S_i`. It starts as the channel LLR
and equals the LLR plus all check messages `u` that reach the bit. A checknode
of degree `dc` is updated in three steps:

1. For each edge `j`, compute `v_j = S_j - u_j(old)`. This is the bit-to-check
   message, with this check's own previous contribution taken out. In the
   first iteration `u_j(old) = 0`.
2. Compute the new check messages with offset min-sum:
   `|u_j| = max(min over k != j of |v_k| - OFFSET, 0)`, and
   `sign(u_j)` = the product of the signs of the other `v_k`. The magnitudes
   `|v_k|` are saturated to 5 bits first.
3. Write back `S_j = sat8(v_j + u_j(new))`.

Because `S` is updated at once, the next checknode that touches the same bit
already sees the new value. The processor therefore does the bitnode update
and the checknode update in one pass.

Hard decision: bit `i` is 1 when `S_i < 0`; zero or positive means 0.

## Data layout and schedule

```
              common address bus (bit group g)
   +---------+---------+-- ... --+---------+
   | S mem 0 | S mem 1 |         | S mem P-1|   word g, lane l = S of bit g*P+l
   +----+----+----+----+         +----+----+   (+ alternate words, see below)
        |  rotate by the block's shift (barrel shifter, both directions)
   +----+----+----+----+         +----+----+       +---------------+
   | proc 0  | proc 1  |   ...   | proc P-1 |<------| matrix table  |
   | u_j mem | u_j mem |         | u_j mem  |       | + controller  |
   +---------+---------+         +----------+       +---------------+
```

- **Bits.** Bit `b = g*P + l` lives in lane `l` of S memory `l`, at word
  `g`.
- **Layers.** A *layer* is P consecutive checknodes, one per processor. The
  code is described layer by layer as a list of circulant blocks, each given
  as `(bit group g, rotation s)`. Processor `p` of the layer is connected to
  bit `g*P + (p+s) mod P` of every block.
- **Read phase.** There is one cycle per block. All memories read word `g`
  on the shared address bus. The barrel shifter rotates the P values so that
  processor `p` receives lane `(p+s) mod P`. The processor performs step 1
  and the running minimum search.
- **Write phase.** There is one cycle per block, in the same order. Each
  processor produces `v + u(new)`. The inverse rotation sends it back to the
  lane it came from.
- **Cost.** A layer of degree `dc` takes `2*dc` cycles. One iteration takes
  `2 * (number of blocks)` cycles. Layers do not overlap, so every write of a
  layer is done before the next layer reads. Conflicts between layers are
  therefore impossible by construction.

Each processor keeps one compressed record per layer in its **u_j memory**
(see below). The memory is addressed by the layer number.

## Same-layer conflicts: alternate copies and merging

Within a layer, the same bit group can occur in two blocks with different
rotations. The DVB-S2 matrices contain such layers. Every bit of that group
is then read by two processors in the same layer, and both return an update.
A plain write-back would keep only the second update. This is why a
straightforward layered decoder has to stall in such cases.

In this decoder, the matrix table marks each such block with a **write slot**
`k = 1..m`, where `m` is the number of times the group occurs in the layer.
During the write phase:

- the update from the k-th occurrence goes to *alternate word* `k` of the
  group, not to the regular word;
- the regular word keeps the value `S` that both processors read.

Each alternate copy is `S^k = S + (u_k(new) - u_k(old))`. The controller
records that group `g` has `m` pending copies.

The next time any layer reads group `g`, the S memory combines the copies:

```
S_merged = S^1 + ... + S^m - (m-1) * S        (saturated to 8 bits)
```

This value contains every processor's update. It goes out to the processors
in the same cycle. On the same clock edge it is also written into the
regular word, and the pending count is cleared. If the group occurs twice in
the reading layer as well, its second read sees the merged regular word
directly. The final read-out of the hard decisions merges too, so no pending
update is lost.

Three points about where this happens:

- All copies of a bit are in the same lane memory. The inverse rotation
  always returns a bit to its own lane, whichever processor updated it.
- So the merge is a small adder per lane memory, placed **before** the
  shifter. The shifter carries one value, not `m+1`.
- The S memory has 1 + `M_ALT` read ports (default `M_ALT = 2`) and one
  write port. In the read phase the write port is free and takes the merged
  value. In the write phase it takes the processors' results.

Alternate word `k` of group `g` is at word `k*NG + g` of its lane memory.
Every group therefore has `M_ALT` alternate words reserved. That is simple,
but it triples the S storage. A table that lists only the groups that
actually conflict would need far fewer words.

## Compressed check messages

The check messages of a checknode take only two magnitudes: the excluded
minimum is the second minimum for the edge that holds the first minimum, and
the first minimum for every other edge. So a processor stores, per layer:

| field | width (default) | content |
|---|---|---|
| `sgn` | DCMAX (16) | sign of each outgoing `u_j` |
| `min1` | W-1 (5) | first minimum, offset already applied |
| `min2` | W-1 (5) | second minimum, offset already applied |
| `idx` | log2 DCMAX (4) | edge holding the first minimum |

For degree 8 this is 21 bits instead of 8 x 6 = 48, a 56 % saving. The unit
testbench of the u_j memory uses that width. The default `DCMAX = 16` gives
30-bit records.

## Stopping rule

Decoding stops after `max_iter` iterations, or earlier once an iteration
proves that the hard decisions form a codeword. The proof needs all three of
these during the whole iteration:

- every checknode saw an even number of ones among the hard decisions it
  read;
- no write-back changed the sign of the `S_i` it replaced;
- no merge changed a sign.

Together they mean the hard decisions were constant through the iteration,
and every parity check held on them. `converged` is cleared again if the
read-out merge changes a sign.

## Matrix table

Entries are 20 bits, packed `{last, slot[1:0], shift[8:0], group[7:0]}`. The
entries of one layer are consecutive, and `last` is set on the final entry of
each layer. `n_entries` is the number of entries in one iteration.

To fill it from a quasi-cyclic matrix of PxP circulants:

1. Emit one entry per nonzero block, layer by layer.
2. Set `shift` to the block's rotation `s`. Processor `p` reads bit
   `group*P + (p+s) mod P`.
3. Set `slot = 0` when the group occurs once in its layer. Otherwise number
   its occurrences 1, 2, ... in table order.

Two blocks of one layer must not share both the group and the rotation: that
would be a double edge. A layer may hold at most `DCMAX` entries, and a group
may occur at most `M_ALT` times in one layer.

The DVB-S2 standard defines its matrices by address tables. After the usual
row and column permutation these become such circulant blocks. The tables
themselves are not part of this RTL, and must be converted and loaded.

One caveat: the DVB-S2 parity part (the staircase), after permutation, is
quasi-cyclic except for one missing edge. That edge cannot be expressed in
this table format. A full DVB-S2 decoder needs one extra bit per entry to
suppress it.

## Interface and timing (`ldpc_decoder_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; reset is synchronous and active low |
| `cfg_we`, `cfg_addr`, `cfg_entry` | in | 1, 10, 20 | write one matrix-table entry |
| `n_entries` | in | 11 | entries per iteration |
| `max_iter` | in | 8 | iteration limit |
| `start` | in | 1 | one-cycle pulse, accepted when idle |
| `llr_valid` / `llr_ready` | in / out | 1 | load handshake: one beat per bit group |
| `llr` | in | P x 6 | lane `l` of beat `g` is the LLR of bit `g*P+l`; positive means 0 |
| `hd_valid`, `hd_group`, `hd` | out | 1, 8, P | read-out: P hard decisions per beat, for groups 0..NG-1 |
| `busy`, `done` | out | 1 | `done` pulses once per frame |
| `iterations`, `converged` | out | 8, 1 | valid from `done` until the next `start` |

A frame takes `1 + NG` cycles to load, `iterations x 2 x n_entries` cycles to
decode, and `NG` cycles to read out. The load needs `llr_valid` held every
cycle.

Throughput at 25 iterations, from the cycle counts measured in simulation:

| rate | layers x degree | blocks | cycles / frame | Mbit/s @ 200 MHz | @ 300 MHz |
|---|---|---|---|---|---|
| 1/4 | 135 x 4 | 540 | 27361 | 473 | 710 |
| 1/3 | 120 x 5 | 600 | 30361 | 426 | 640 |
| 1/2 | 90 x 7 | 630 | 31861 | 406 | 610 |
| 3/5 | 72 x 11 | 792 | 39961 | 324 | 486 |
| 3/4 | 45 x 14 | 630 | 31861 | 406 | 610 |

Throughput here counts all 64800 code bits per frame. The shapes in the
"layers x degree" column are the DVB-S2 normal-frame ones. The published
figures for this architecture (394 / 591 Mbit/s at rate 1/2) are close to the
rate-1/2 row. The other rates in that source do not follow one formula, so
they are not reproduced.

## Modules

| file | role |
|---|---|
| `ldpc_pkg.sv` | default sizes; record-width function |
| `barrel_shifter.sv` | P-lane rotator in log2(P) stages (stage k rotates by 2^k mod P, so P need not be a power of two) |
| `si_network.sv` | the read and write-back rotators, sharing one shift command |
| `si_merge.sv` | `sum S^k - (m-1) S`, saturating |
| `si_memory.sv` | one lane: regular and alternate words, merge on read with write-back |
| `uj_memory.sv` | per-processor compressed message store |
| `check_processor.sv` | one processor: min-sum read phase, write phase, record, parity and sign-change flags |
| `matrix_table.sv` | writable table of circulant blocks |
| `ldpc_controller.sv` | state machine: load, read and write phases per layer, pending counts, iterations, stopping, read-out |
| `ldpc_decoder_top.sv` | wires P lanes of memory, processor and u_j memory to the network, table and controller |

Memories are written as arrays with combinational read and clocked write, in
register-file style. A single cycle therefore covers all of these:

- the memory read;
- the merge;
- the 9-stage rotation;
- the processor's subtraction and compare.

This is fine for simulation. A fast implementation would insert a register
after the shifter and overlap the phases of consecutive layers. That
overlap would bring back cross-layer conflicts, which the alternate copies
would then also have to handle.

At default size the decoder holds about 3.0 Mbit of storage:

- S: 360 x 540 x 8 bits;
- u_j: 360 x 135 x 30 bits;
- table: 792 x 20 bits.

## Departures and open points

- The merge of alternate copies happens at the memory, before the network.
  A scheme where the processor reads all copies and merges them itself gives
  the same result with a wider network.
- Alternate words are reserved for every group, as described above. A
  smaller pool would need an allocation table.
- The offset (1 LSB), the S width (8 bits) and the saturation points are
  choices of this design.
- The u_j memories are not cleared between frames. The first iteration
  simply ignores them.
- The DVB-S2 address tables and the staircase exception (see the matrix
  table section) are not included.
- Layers are processed one after the other, without pipelining. There are no
  stall cycles for conflicts.

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`.

| testbench | what it runs |
|---|---|
| `tb_barrel_shifter`, `tb_si_network`, `tb_si_merge`, `tb_si_memory`, `tb_uj_memory`, `tb_matrix_table`, `tb_check_processor`, `tb_ldpc_controller` | the unit against independently computed results |
| `tb_ldpc_decoder_top` | 16 lanes, 10 frames of rising noise, bit-exact against a reference model |
| `tb_ldpc_decoder_full` | default size, three 64800-bit frames of a random rate-1/2 code |
| `tb_ldpc_rates` | default size, one frame for each of the five rate shapes, with throughput printed |

`ldpc_tb_driver.sv` holds the stimulus and the reference model that the
three system-level benches share. It builds a random quasi-cyclic code in
which about one block in four to six reuses a group already present in its
layer, so that alternate copies and merges happen. It sends the all-zero
codeword through quantised noise, and decodes each frame with plain loops
over bits. The design's decisions, iteration counts, `converged` flag and
cycle counts must match. The benches also count merges, alternate-word
writes, early stops and iteration-limit stops, and fail if one of these never
occurs.

Running one bench:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ldpc_pkg.sv tb/tb_ldpc_decoder_full.sv --top-module tb_ldpc_decoder_full
./obj_dir/Vtb_ldpc_decoder_full
```

The full-size bench builds in about a minute and runs in a few seconds.
