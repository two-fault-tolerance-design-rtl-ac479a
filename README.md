# Error-correction-only fault tolerance for a hybrid CMOS/nanodevice memory

A crossbar memory built from nanowires and molecular-scale switches is
expected to have a few percent of defective cells and a few percent of
transient read/write errors. Spare rows and columns cannot repair that many
faults. This design does without spares. Every logical block of `L_U` user
bits is stored as one codeword of a binary BCH code. The code is picked per
block from a group of codes and is just strong enough for two things: the
defective cells under that codeword, and the transient errors allowed by a
target block error rate. A small CMOS memory, which is assumed reliable,
tells each access where its block lives and which code protects it.

Two ways of placing blocks in the array are implemented. A `mode` input
selects one of them:

* **Two-level scheme** (`mode = 0`). A block fills a run of consecutive
  cells. CMOS memory holds the run's start address and the code of each block.
* **Three-level scheme** (`mode = 1`). The array is cut into 64-cell *units*.
  A unit with too many defects is skipped, so a block fills the usable units
  from its start unit onward. The list of usable and skipped units is kept in
  a small coded *record*, stored in the nanodevice array itself. CMOS memory
  only locates that record. This copes with much higher defect rates, at the
  cost of a second decode on every access.

The default parameters describe a 512 x 512 cell array, blocks of
`L_U = 1024` bits, and a code group over GF(2^11) with up to `T_MAX = 106`
correctable errors.

## The BCH code group and the shared codec

All codes are shortened, primitive, narrow-sense binary BCH codes over one
field GF(2^M). The code that corrects `t` errors has this generator:

    g_t(x) = lcm( m_1(x), m_3(x), ..., m_(2t-1)(x) )

Here `m_j` is the minimal polynomial of alpha^j. Its redundancy `r(t)` is the
degree of `g_t`, which is the sum of the cyclotomic coset sizes of
1, 3, ..., 2t-1 (skipping cosets that were already counted). Most steps of
`t` add `M` parity bits. Some steps add fewer, and a few consecutive values
of `t` can give the same code. The function `bch_capability(t)` returns the
largest `t'` that has the same generator, and the allocators always record
that stronger value.

For each field the group runs from t = 1 up to `T_MAX`:

| M  | codeword ≤ | T_MAX | r(T_MAX) |
|----|-----------:|------:|---------:|
| 10 | 1023 | 57  | 510  |
| 11 | 2047 | 106 | 1023 |
| 12 | 4095 | 198 | 2038 |
| 13 | 8191 | 366 | 4095 |

`bch_pkg` computes every table the codec needs with constant functions at
elaboration time: field arithmetic, cosets, minimal polynomials and r(t).
It uses fixed primitive polynomials, for example x^11 + x^2 + 1 for M = 11.
A codeword is the `L_U` data bits (most significant bit first) followed by
the r(t) parity bits. Shortening means dropping leading information bits,
so no padding is ever stored. `t = 0` means the block is stored uncoded.

* **`bch_encoder`**
  * Builds `g_t` at run time by multiplying the minimal polynomials from a
    ROM, one factor per cycle (`t` cycles).
  * Then streams the codeword one bit per cycle through an LFSR divider.
  * `out_last` comes `t + L_U + r` cycles after `start`.
* **`bch_decoder`** takes the received bits one per cycle. Decoding has three
  stages:
  1. Updates all `2*T_MAX` syndromes by Horner's rule as the bits arrive.
  2. Runs the simplified, inversion-free Berlekamp-Massey for binary codes,
     with 2 cycles per iteration and `t` iterations.
  3. Runs a serial Chien search over the `L` codeword positions and flips the
     data bits it finds.

  It reports `fail` when the error locator has degree > t, or when the
  number of roots found differs from its degree. `done` comes
  `2t + L + 1` cycles after the last bit.

One encoder and one decoder, sized for `T_MAX`, serve every code and both
schemes.

## How much correction a block needs

For a segment of `l` cells with `t_def` defective cells, the code must
satisfy `t >= t_def + t_trans(l)`. `t_trans(l)` is the smallest `t` that
keeps the binomial tail below the target block error rate `E`:

    sum_{i = t+1}^{l} C(l, i) p^i (1-p)^(l-i) <= E      (p = transient fault rate)

This depends only on `l`, `p` and `E`, so the hardware does not evaluate it.
Instead it reads a table input, `ttrans_tab`, with entries of 10 bits.
Entry `b` holds `t_trans((b+1) * 64 - 1)`, the worst case in a 64-cell
length bin. The table has `(L_U + R_MAX)/64 + 1 = 32` entries.
`tb/ft_tb_pkg.sv` shows how to compute the table (`ttrans_entry`). The
testbenches use `E = 1e-15`.

## Two-level allocation (`seg_alloc_2l`)

The allocator walks the defect map from cell 0 with two pointers, a head
and a tail. It reads one cell per cycle through `dq_addr` / `dq_defect`.

1. Put the tail `L_U` cells after the head. Set `t_c = 0` and `l = L_U`.
2. Count `t_def`, the defects between head and tail, and look up
   `t_trans(l)`.
3. If `t_c >= t_def + t_trans`, the segment is found. Write
   `{valid, head/64, t_c}` to CMOS word `n_seg` and increment `n_seg`. Start
   the next segment at the first multiple of 64 after the tail.
4. Otherwise, if `t_def + t_trans <= T_MAX`, choose the weakest code that
   covers it. Raise `t_c` to that code's full capability, extend the tail to
   `l = L_U + r`, and go back to step 2. Only the newly covered cells are
   scanned.
5. Otherwise, move the head past the first defective cell, rounded up to the
   next multiple of 64, and start again.

Allocation ends when a pointer reaches `n_cells`. Heads are aligned to
`K_ALIGN = 64` cells, so a head needs 12 bits instead of 18. The CMOS word
is 1 + 12 + 7 = 20 bits.

## Three-level allocation (`seg_alloc_3l`)

1. **Classify.** The allocator makes one pass over the defect map. A 64-cell
   unit is *usable* if it has at most floor(64 / M) = 5 defective cells.
   Correcting one more error costs about `M` parity bits, so a unit with more
   defects is cheaper to skip. The result is a 4096-bit usability bitmap.
2. **User segment.** Steps 1-5 work as above, with three differences:
   * Lengths count only *usable* cells.
   * `t_def` counts the defects in those cells.
   * Step 5 moves the head to the next usable unit.

   A segment may not span more than `S_MAX = 128` units.
3. **Record.** The segment is described by the word
   `{head unit (12 b), t (7 b), usability vector (s b)}`:
   * `s` is the number of units spanned, skipped ones included.
   * The head unit is the vector's most significant bit.

   The word is right-aligned in an `L_U`-bit message. It is stored with the
   two-level procedure, starting at the first multiple of 64 after the user
   segment. The same code group is used, but each code is *shortened on the
   fly*: the leading `L_U - (19 + s)` zero bits are neither stored nor
   counted. The record therefore occupies only `19 + s + r(t_rec)` cells.
   The allocator drives the shared encoder and the nanodevice write port
   itself to store the record.
4. **CMOS word.** The allocator writes `{valid, record head/64, t_rec, s}`
   (1 + 12 + 7 + 8 = 28 bits) and continues at the next usable unit after
   the record.

## Accesses

Both controllers use the same host handshake:

* Pulse `req` with `we`, `laddr` and `wdata` while `busy` is low.
* `ack` pulses once when the access ends. After a read, `rdata`, `rfail`
  and `rcorr` are valid from that cycle.
* The nanodevice array is accessed one cell per cycle through
  `nm_addr` / `nm_we` / `nm_wbit` / `nm_rbit`. Read data is combinational.

**Two-level (`ctrl_2l`).**
1. Read the CMOS word.
2. For a write, encode the block and write the L = L_U + r(t) bits from the
   head.
3. For a read, stream the bits from the head into the decoder.

| Access | Cycles from `req` to `ack` |
|---|---|
| Write | `t + L + 4` |
| Read | `2t + 2L + 6` |
| Unallocated address | 3, with `rfail` |

**Three-level (`ctrl_3l`).**
1. Read the CMOS word.
2. Decode the record. The decoder is first fed the dropped zeros, then the
   stored record bits.
3. Use the record's head unit, code and usability vector to serve the user
   block. An address walker steps through the cells of usable units and jumps
   over a skipped unit in the same cycle.

A record that cannot be decoded ends the access with `rfail`. In the
latencies below, `L_rec = L_U + r(t_rec)` and `L = L_U + r(t)`:

| Access | Cycles from `req` to `ack` |
|---|---|
| Read | `2(L_rec + t_rec) + 2(L + t) + 9` |
| Write | `2(L_rec + t_rec) + L + t + 8` |

The record decode is the latency price of this scheme.

## The top level (`hybrid_ft_mem`)

The top instantiates:
* both allocators and both controllers;
* one encoder and one decoder;
* one CMOS configuration memory (`cmos_config_mem`, 256 words of 28 bits,
  registered read, cleared on reset).

Its ports are `mode`, the allocation controls (`alloc_start`, `n_cells`,
`ttrans_tab`, `alloc_busy`, `alloc_done`, `n_seg`), the host port, the
nanodevice cell port and the defect-map port. The codec, the nanodevice port
and the CMOS memory are multiplexed by `mode`. During a three-level
allocation, the allocator owns the encoder and the write port. An assertion
checks that no request arrives during an allocation.

Use:
1. Set `mode` and hold it.
2. Give the number of usable cells and the `t_trans` table.
3. Pulse `alloc_start` and wait for `alloc_done`.
4. Logical addresses `0 .. n_seg-1` can then be read and written.

Two parts are outside the top:
* **The nanodevice array.** It is a device, not logic.
* **The interface that removes defective nanowires from the address space.**
  That step is assumed to have happened already, so the design sees a linear
  space of `n_cells` cells.

The defect map is also outside the top. It is assumed to come from a test of
the array.

## Verification

Each module in `rtl/` has a self-checking testbench in `tb/`. Each testbench
prints `TB_RESULT checks=… failures=…` and has a cycle watchdog.
`tb/nano_array_model.sv` is a behavioural array with these properties:
* Random open-cell defects that read a stuck value.
* Random transient flips on reads, at a rate given in parts per million.
* A defect-map port.

| Testbench | What it checks |
|---|---|
| `tb_bch_encoder` | stream length and systematic data bits; the codeword vanishes at alpha^1..alpha^2t (checked with plain field arithmetic); `t + L_U + r` cycles; r(T_MAX) of the four fields |
| `tb_bch_decoder` | correction of up to t random errors for several t, with the right count; far more than t errors never return the original data unflagged; `done` latency |
| `tb_cmos_config_mem` | random writes and reads against a reference array; never-written words read zero; read latency |
| `tb_seg_alloc_2l` | full-size allocation against a behavioural model of steps 1-5 (same segments, heads, codes, count); each step occurs |
| `tb_seg_alloc_3l` | full-size allocation at 3 % and 5 % defects; every CMOS word checked against the defect map: record placement and defects, usability bits read from the array, unit count, codeword syndromes of the stored record |
| `tb_ctrl_2l` | hand-placed segments (one uncoded) written and read through the codec with 1 % stuck cells and 0.5 % transients; cell contents; latency; unallocated address |
| `tb_ctrl_3l` | hand-placed records, one uncoded; data lands only in usable cells; reads under 0.2 % transient faults; latency; damaged record fails |
| `tb_hybrid_ft_mem` | the whole top at its default parameters (see below) |
| `tb_hybrid_g1_512` | the same end-to-end run with 512-bit blocks, GF(2^10), t ≤ 57, 32-cell units |
| `tb_hybrid_g3_2048` | the same end-to-end run with 2048-bit blocks, GF(2^12), t ≤ 198 |

`tb_hybrid_ft_mem` runs both schemes on a 358 x 358-cell array. That is
roughly what remains of 512 x 512 when 30 % of the nanowires are defective.
* **Two-level:**
  * 1 % defective cells and 1 % transient faults.
  * 2.5 % defective cells.
* **Three-level:** 3 % defective cells and 0.1 % transient faults.

For each scheme it allocates, writes every block, and reads every block back
with transient faults. It counts these mechanisms and fails if any of them
never occurred:
* Steps 3, 4 and 5.
* Uncoded and coded blocks.
* Corrected reads.
* An unallocated address.
* An uncorrectable block.
* Skipped units and coded records.

It takes about 20 s with Verilator.

To run a testbench with Verilator (5.x), for example the top-level one:

    verilator --binary --timing -Wno-fatal -Irtl -Itb --top tb_hybrid_ft_mem \
        rtl/bch_pkg.sv tb/ft_tb_pkg.sv rtl/*.sv tb/nano_array_model.sv tb/tb_hybrid_ft_mem.sv
    ./obj_dir/Vtb_hybrid_ft_mem

Other testbenches are built the same way, with their own file and `--top`.

## Capacity obtained

Results at the default parameters (E = 1e-15, 128 164 usable cells):

| Scheme | Defective cells | Transient rate | Blocks | User bits |
|---|---|---|---|---|
| Two-level | 1 % | 1 % | 69 | 70.6 kbit |
| Two-level | 2.5 % | 1 % | 21 | |
| Two-level | 4.5 % | 1 % | 0 | |
| Three-level | 3 % | 0.1 % | 62 | |
| Three-level | 5 % | 0 | 59 | |

The original capacity curves give about 8 x 10^4 user bits at 1 %/1 %, which
agrees with the first row. At higher defect rates those curves stay higher
than these results. With a 1 % transient rate, the error-rate target alone
asks for t_trans ≈ 44 in a 1024-bit block, and for more in longer
segments. That leaves little of t = 106 for defects, so the curves' transient
rates were probably smaller in absolute terms than their labels suggest.
Because `t_trans` is a table input, any transient rate can be used without
changing the RTL.

The other block sizes, run by their own testbenches with a 0.2 % transient
rate (0.05 % for the three-level pass):

| Configuration | Scheme | Defective cells | Blocks | User bits |
|---|---|---|---|---|
| 512-bit blocks, GF(2^10) | Two-level | 1 % | 159 | 81.4 kbit |
| 512-bit blocks, GF(2^10) | Two-level | 2.5 % | 137 | 70.1 kbit |
| 512-bit blocks, GF(2^10) | Three-level | 3 % | 114 | 58.4 kbit |
| 2048-bit blocks, GF(2^12) | Two-level | 1 % | 46 | 94.2 kbit |
| 2048-bit blocks, GF(2^12) | Two-level | 4 % | 19 | 38.9 kbit |
| 2048-bit blocks, GF(2^12) | Three-level | 3 % | 33 | 67.6 kbit |

## Size

Yosys' coarse synthesis of the default top gives these figures:
* About 30 000 cells.
* 29 400 flip-flop bits.
* 19 800 bits of memory.

The largest parts are the decoder's registers: 212 syndromes of 11 bits,
plus the error locator. Next comes the three-level allocator's 4096-bit
usability map.

## Choices made by this design

The source description gives the allocation procedures and the storage
hierarchy. The following are choices of this design:

* **Codec.**
  * The primitive polynomials.
  * The codec algorithms: LFSR encoder, inversion-free Berlekamp-Massey,
    serial Chien search.
  * The bit order: data MSB first, then parity.
* **Configuration words.**
  * The code is stored as its `t` rather than as an index into the group.
  * The valid bit.
  * The field widths and the record layout.
  * Storing `s` in CMOS as the record's shortening information.
  * Not storing the segment length, which follows from `t`.
* **Allocation.**
  * How far step 5 moves the head in the two-level scheme: past the first
    defect, then aligned.
  * Placing the record right after its user segment.
  * The `S_MAX` bound on a segment's span.
* **Interfaces and timing.**
  * The table form of `t_trans`.
  * The host handshake.
  * All timing, with one cell per cycle.

Not modelled:
* **Defective-nanowire exclusion.** The design starts from an already
  compacted address space.
* **Re-allocation policy.** Allocation runs when the host asks for it.
* **Other configurations.** The other block sizes and code groups are
  reachable through the parameters `L_U`, `M`, `T_MAX` and `L_C`. Three of
  them were simulated end to end:
  * 1024-bit blocks over GF(2^11).
  * 512-bit blocks over GF(2^10).
  * 2048-bit blocks over GF(2^12).

  The GF(2^13) group was not simulated.

Verilator's lint (`-Wall`) gives one kind of warning, `SYNCASYNCNET`, in
`ctrl_2l`, `ctrl_3l` and `hybrid_ft_mem`. It appears because their
assertions use the asynchronous reset in `disable iff`. No logic is involved.
Lint reports no other warnings for any module in `rtl/`.
