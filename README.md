# Partly parallel (3,6)-regular LDPC decoder with 1-bit messages

This is RTL for an iterative decoder of a 9216-bit, rate-1/2, (3,6)-regular
low-density parity-check (LDPC) code. Two choices keep it small:

* **The code and the decoder are designed together.** The parity-check
  matrix is built from blocks. Because of that structure, 36 variable-node
  units and 18 check-node units can serve all 9216 columns and 4608 rows of
  the matrix. Each unit handles one column or one row per clock cycle. The
  wiring between them is fixed, except for a small 2-D permutation network
  driven by two ROMs.
* **Every message between the nodes is one bit.** This is a
  reduced-complexity message-passing algorithm. A check node is nothing
  but XOR gates. A variable node keeps a soft 8-bit log-likelihood ratio
  (LLR) per bit and adds a fixed weight ±W for each incoming check bit. Only
  the sign of each sum goes back to the check nodes.

One decoding iteration takes 2·(L+2) = 516 clock cycles. A frame is decoded
with 18 iterations. Frames are loaded and unloaded serially, one symbol per
clock, and both transfers overlap the decoding of the frame in between. In
steady state the decoder therefore delivers one 9216-bit frame every
258 + 18·516 = 9546 cycles, about 0.965 decoded bits per clock.

## The code

The code has n = L·k² = 256·36 = 9216 bits. They are split into k² = 36
*groups* of L = 256 bits. Group (x,y), with x,y = 1..6, belongs to
processing element PE(x,y), and bit v of the group lives at address v of
that PE's memories. The parity-check matrix H stacks three sub-matrices,
each with L·k = 1536 rows, every row of weight 6 and every column of
weight 1:

| sub-matrix | rows of one check group | which bits a check joins |
|---|---|---|
| H1 | group x (6 groups × 256 checks) | check j joins bit j of PE(x,1) … PE(x,6) |
| H2 | group y | check j joins bit (u(x,y) + j) mod L of PE(1,y) … PE(6,y), with u(x,y) = ((x−1)·y) mod L |
| H3 | row x' of the 2-D network | check j joins bit (t(x,y) + j) mod L of the six PEs that the network sends to row x' in cycle j |

H1 is made of identity blocks. H2 is made of identity blocks that are
cyclically shifted right by u(x,y). Together they form a (2,6) code.

H3 is the "random-like" part. Two things define it:

* **Start offsets** t(x,y) = x² + x·y + 7·y (mod L). They obey the two rules
  that keep the Tanner graph free of 4-cycles:
  * t differs along each row x;
  * along each column y, no difference t(x1,y) − t(x2,y) equals
    ((x1−x2)·y) mod L.

  `tb_ldpc_pkg` checks both rules for k = 6 and L = 256. It also builds
  the whole 9216 × 4608 graph, including the shuffle below. It checks that
  every check has degree 6 and that no two bits share two checks.
* **A 2-D shuffle network** (`shuffle_2d`). In cycle j of the check phase,
  the 36 bits read from the PEs form a 6×6 array r[x][y]. They pass two
  stages:
  * In the intra-row stage, row x is rotated by one place when control bit
    Sr[x] is 1.
  * In the intra-column stage, column y is rotated by one place when Sc[y]
    is 1.

  Row x of the result feeds check-node unit x of the third check block. The
  12 control bits change every cycle. They come from ROM1 and ROM2 (256 × 6
  each). Their content is a fixed pseudo-random pattern,
  `ldpc_pkg::shuffle_word(rom, cycle)`, an integer hash (multiply, shift,
  XOR). The pattern is computed at elaboration, so no table is stored.

Because each stage is a permutation, every check of H3 has exactly six bits,
and every bit has exactly one H3 check. H3 repeats the same way in every
iteration and every frame.

## Decoding algorithm

Each bit n has an LLR L_n that the decoder keeps and updates. A positive
L_n means bit 0. Each edge carries one bit.

* **Start:** L_n is the 5-bit channel LLR, sign-extended to 8 bits. Each of
  the three outgoing messages of bit n is the sign of L_n.
* **Check node:** the bit sent back on each edge is the XOR of the bits on
  the five other edges.
* **Variable node:** each incoming check bit becomes Y = +W if it is 0 and
  −W if it is 1. Then:
  * the outgoing message on edge i is sign(L_n + Σ_{j≠i} Y_j);
  * the updated LLR is L_n ← L_n + Y_1 + Y_2 + Y_3;
  * the decision is the sign of the updated LLR (1 when negative).

The updated LLR is written back. So in this algorithm the channel value is
used only at the start, and the LLR keeps accumulating over the iterations.
The VNU computes its sums 2 bits wider than 8 bits, so the signs it sends are
exact. It saturates the stored LLR to −128…127. W = 4 (parameter `WEIGHT`).

## Architecture

```
            din (5b) ──► input LLR RAMs ─┐                  ┌─► output decision RAMs ─► dout
                                         ▼                  │
   ┌───────────── 36 × PE(x,y) ───────────────────────────────────────────┐
   │  Int (256×8)  VNU  Dec (256×1)     E1  E2  E3 (256×1 each)  AG1-AG3 │
   └───────────────────────────────────────┬───┬───┬─────────────────────┘
                                  bit 1 of │   │   │ bit 3 of every PE
                                 every PE  ▼   ▼   ▼
                           CNPE1 (Π1, fixed)  CNPE2 (Π2, fixed)  CNPE3 (Π3: ROM1/ROM2 + 2-D net)
                           6 × CNU            6 × CNU            6 × CNU
```

* **PE(x,y)** (`pe`) holds one VNU and seven RAMs:
  * the extrinsic RAMs E1, E2 and E3, one per sub-matrix, holding the
    1-bit message of each edge;
  * the working LLR RAM (256×8);
  * the working decision RAM (256×1);
  * an input LLR RAM (256×5);
  * an output decision RAM (256×1).

  It also holds three address generators (`addr_gen`), one for each E RAM.
  Each is an 8-bit modulo-L counter that starts at an offset and counts up:
  * AG1 starts at 0;
  * AG2 starts at u(x,y) in the check phase;
  * AG3 starts at t(x,y) in the check phase.

  In every other phase, all three start at 0.
* **CNPE g** (`cnpe`) has six check-node units (`cnu`) and the network of
  sub-matrix g:
  * Π1 sends PE(x,·) to CNU x;
  * Π2 sends PE(·,y) to CNU y;
  * Π3 is the ROM-driven 2-D network.

  Each network has a forward path (PE → CNU) and an exact inverse
  backward path (CNU → PE).
* **CNU**: a forward XOR chain, a backward XOR chain and one XOR per middle
  output, giving 12 gates for six inputs.
* **VNU** (`vnu`): six adders (Ln+Y1, Y2+Y3, then the three leave-one-out
  sums and the total), sign taps and a saturating output. An `init` input
  zeroes the weights, so the same unit also starts a frame.
* **`dec_ctrl`** sequences the phases and counts the serial input and
  output.
* **`ldpc_ram`** is the one RAM model used everywhere. It has a synchronous
  write port and a synchronous read port with registered output.

## Schedule

Each iteration has two phases. Every phase is a three-stage pipeline over
L items and lasts L+2 cycles:

| cycle of item j | check phase (CNP) | variable phase (VNP) |
|---|---|---|
| j | read E1..E3 at AG addresses, and ROM1/ROM2 at j | read E1..E3 and Int at j |
| j+1 | shuffle → CNU → unshuffle, all combinational, then register | VNU, register |
| j+2 | write the check bits back to the read addresses | write the variable bits, the new LLR and the decision |

The write address is the read address delayed by two cycles. Within a phase
no address is read while its write is still pending, so no bypass is needed.

A frame passes three stages, and three frames are in flight at once:

1. **Load.** For 9216 cycles, `din` goes into the input LLR RAMs.
2. **INIT (258 cycles).** The input LLRs pass through the VNUs with their
   weights forced to zero. They become the working LLRs, and their signs
   the first messages in E1..E3. In the same pass, the decisions of the
   previous frame are copied from the working to the output decision RAMs.
   The next frame can then be loaded.
3. **18 × (CNP + VNP)**, 9288 cycles. During this time the next frame is
   loaded and the previous frame's decisions are shifted out.

INIT starts as soon as a frame is fully loaded and the output RAMs are free.
It can begin in the cycle right after the last input symbol, the last VNP
cycle or the last output read, with no idle cycle in between. A frame takes 9216 + 258 = 9474 cycles from its first symbol to
the start of decoding.

## Interface (`dec_36`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `din` | in | 5 | channel LLR, two's complement, positive = bit 0 |
| `load` | out | 1 | while high, the decoder takes `din` at the next rising edge |
| `dout` | out | 1 | decided bit |
| `dataout_ready` | out | 1 | `dout` holds a valid decision |

`load` is an *output*. There is no input-valid signal, so the source must
present a symbol on every cycle that `load` is high. Symbol s of a frame
goes to PE number s mod 36, at address s div 36, where PE(x,y) has number
(y−1)·6 + (x−1). The input is therefore address-major. The decisions leave
in the same order, one per cycle while `dataout_ready` is high.

A frame's decisions reach the output RAMs during the INIT of the *next*
frame. So the last real frame must be followed by one more frame (dummy
symbols are fine) to push it out.

Parameters: `K` (6), `L` (256), `MAX_ITER` (18), `LLR_W` (5), `INT_W` (8) and
`WEIGHT` (4). The code length is L·K². Other K and L work too; the unit
tests use K = 3 and L = 8 or 16. The H3 offset formula meets the 4-cycle
rules only for the sizes it was checked at.

## What is fixed here and what is chosen

These parts follow the published architecture:
* the code construction (H1, H2, the offset rule for H2, the 4-cycle rules
  for H3);
* the 1-bit algorithm;
* 36 PEs and 3 CNPEs of 6 CNUs each;
* the memory set and sizes;
* the 12-XOR CNU and the six-adder VNU;
* the three-stage pipelines and the 2(L+2)-cycle iteration;
* the two-stage ROM-controlled shuffle network;
* the three-frame overlap;
* the pin names and the serial symbol order.

The following are this implementation's own choices, because the source
gives no value for them:

* **W = 4** for the check-message weight.
* **A saturating 8-bit LLR and exact-sign internal sums.** Plain 8-bit
  wrap-around would flip signs as the LLR accumulates.
* **t(x,y) = x² + xy + 7y mod L.** The source only asks for random offsets
  that obey the 4-cycle rules.
* **The shuffled state of each network stage** is a rotation by one place.
* **The ROM contents** are an integer hash, and row x of the network feeds
  CNU x.
* **Only the 4-cycle rules are enforced.** The construction this code
  follows aims at a girth of 12. The offsets and ROM pattern chosen here
  are checked only for the absence of 4-cycles over the whole graph.
* **Always 18 iterations.** There is no early stop on a zero syndrome.
* **Loading comes before the 258-cycle INIT.**
* **The reset** is added.
* **`load` is an output.** That is how the pin-out draws it. The cost is
  that the last frame needs a trailing frame to push it out.

The decoder corrects errors, but nothing here claims a particular
bit-error rate. With W = 4, noisy all-zero codewords with 1–2 % sign errors
decode to all zeros. At 4–7 % errors on the same test, residual errors
remain.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_dec_36` | Runs the whole decoder at full size (9216 bits, 18 iterations, about 47k cycles). It streams four frames: noisy zero codewords, a random-LLR frame and a trailing frame. All 3×9216 decisions are compared with a flooding-schedule reference model written directly from the code definition. It also checks that the phase lengths are L+2, that the decoding time is 2·(L+2)·18 cycles, that the first frame starts decoding 9474 cycles after its first symbol, that the steady frame period is 9546 cycles, and that every mechanism occurs: load stall, load and unload overlapping decoding, LLR saturation, and both values of every Sr/Sc control bit. |
| `tb_pe` | One PE through load, INIT, CNP/VNP and the decision transfer, against a memory model, including the AG offsets |
| `tb_cnpe` | The three check blocks against the connection rules, 256 cycles of ROM controls |
| `tb_dec_ctrl` | Phase order and lengths, start/rd_en timing, iteration count, load/unload order, INIT starting without an idle cycle |
| `tb_vnu`, `tb_cnu` | Exhaustive over their inputs |
| `tb_shuffle_2d` | Permutation property and forward/backward inverse |
| `tb_shuffle_rom`, `tb_addr_gen`, `tb_ldpc_ram` | Contents, sequences and latencies |
| `tb_ldpc_pkg` | The H2 offsets, the H3 offset rules, check degrees and no 4-cycles in the full graph |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/ldpc_pkg.sv tb/tb_dec_36.sv --top-module tb_dec_36 -o sim
./obj_dir/sim
```

Replace the testbench name to run another. The full-size run builds in
about 40 s and simulates in under a second.

## Files

All files are in `rtl/`, one module per file:
* `ldpc_pkg.sv`: sizes, phase and control types, offset and ROM functions;
* `dec_36.sv`: the top level;
* `dec_ctrl.sv`, `pe.sv`, `vnu.sv`, `addr_gen.sv`, `ldpc_ram.sv`, `cnpe.sv`,
  `cnu.sv`, `shuffle_2d.sv`, `shuffle_rom.sv`.
