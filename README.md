# RO-PUF key generation with skip-mode CSC and a (15,7,5) cellular-automata ECC

A ring-oscillator PUF turns the speed order of on-chip oscillators into a secret. Oscillators
whose frequencies are close swap ranks when temperature or supply voltage moves, so the bits
read back later are noisy and an error-correcting code is needed before they can serve as a
cryptographic key. This RTL builds that path for a 256-bit key:

1. **Compact syndrome coding (CSC).** Each group of up to 18 oscillators is reduced to the
   index of its rank permutation, a number in `[0, g!-1]` stored in `ceil(log2 g!)` bits.
2. **Skip-mode placement.** A swap of two neighbouring ranks tends to flip several bits of
   one group's CSC value. Instead of putting a group's bits side by side in one ECC block,
   skip mode deals them out over the 37 ECC blocks, so one rank swap costs a block at most a
   couple of bits.
3. **Code-offset construction with a (15,7,5) code.** The 555 response bits form 37 blocks
   of 15 bits `[m (7) | c (8)]`. At enrollment the check bits `cb = T·m` are computed and the
   helper word `h = c xor cb` is stored in nonvolatile memory. At reconstruction `h` undoes
   the offset and a decoder that corrects any two errors per block recovers `m`. The key is
   the first 256 of the 37 × 7 = 259 corrected information bits.

The error-correcting code is a cellular-automata (CA) code: the check bits come from a
7-cell linear cellular automaton run for three clock cycles followed by a small XOR network,
and decoding is a syndrome table plus a fixed linear map.

## The (15,7,5) CA code

All ECC vectors are written left to right as bit 0, 1, …, and the RTL uses ascending ranges
(`logic [0:6]`, `[0:7]`, `[0:14]`) so that a printed `%b` string reads in the same order.

**Cellular automaton (`kcell_ca`).** Seven flip-flops; each cell's next state is the XOR of
a per-cell subset of {left neighbour, itself, right neighbour}, with a periodic boundary
(cell 0 and cell 6 are neighbours):

| cell | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|------|---|---|---|---|---|---|---|
| rule | 150 (L^S^R) | 90 (L^R) | 150 | 150 | 90 | 240 (L) | 150 |

Running it three cycles from `m` gives `Q = Tk³·m`.

**g(Q) (`gq_logic`).** An 8×7 GF(2) matrix `G` maps `Q` to the check bits, chosen so that
`G·Tk³ = T`. The check matrix `T` (rows = check bits, columns = m0…m6) is

```
1101011  0101110  1110110  1001101  1000110  1110101  1011100  1111001
```

Every nonzero codeword `[m | T·m]` has weight ≥ 5, so any two errors in a block are
corrected. The constants are in `rtl/caecc_pkg.sv`.

**These matrices are this design's own choice.** The method behind the code is known, but the
specific rule vector, `T` and `G` were not available, so they were picked to satisfy two
constraints: minimum distance 5, and a worked decoding example (below) that had to come out
exactly. That example fixes `T·0101001 = 10100011`, `T·0101101 = 11011101`, and the CA state
`0101001 → 0001101 → 1010111 → 0010111` over three cycles. The only pure rule-90/150
automaton that reproduces that trajectory has a singular `Tk³`, which cannot give a
distance-5 code. So one cell uses rule 240. Any other distance-5 `T` can be dropped into
`caecc_pkg`: `G` must then be recomputed as `T·(Tk³)⁻¹`, and every table follows
automatically.

### Encoder (`caecc_encoder`)

A two-state FSM drives the CA's clock enable. The cycle in which `start` is high is the
*init* cycle, when the CA latches `m`. Three *work* cycles follow, each one CA step. `done`
then pulses with `cb = G·Q = T·m`, four cycles after the start edge.

### Decoder (`caecc_decoder`)

For a block read back as `[m' | c']` with helper word `h`:

```
w'   = [m' | h xor c']
S    = T·m' xor (h xor c')                 8-bit syndrome; T·m' from an embedded encoder
Saug = SaugMap(S)                          7 bits
E    = Taug⁻¹ (S | Saug) = [Saug | S xor T·Saug]
m    = m' xor Saug
```

`Taug⁻¹ = [[0, I7], [I8, T]]`, so `Saug` is simply the information part of the error
vector. **SaugMap (`saug_map`)** is a 256-entry constant table. It is computed at elaboration
from `T` by enumerating all 121 error vectors of weight 0, 1 and 2 (`entry[T·Ep[0:6] xor
Ep[7:14]] = Ep[0:6]`). Minimum distance 5 guarantees that the entries do not collide. A
syndrome that no such vector produces means three or more errors: the table then returns
`Saug = 0`, and the decoder raises `uncorrectable`. This flag is an addition of this design.

Pipeline: four encoder cycles, then registers after the syndrome XOR, after SaugMap and
after `Taug⁻¹`, so `done` comes seven cycles after `start`. The `taug_inv` block is the
combinational `Taug⁻¹` product.

Worked example (checked in `caecc_decoder_tb`): `w' = 0101001 11010101`, with `h = 0`:

| signal | value |
|---|---|
| CA state after 3 cycles | `0010111` |
| T·m' | `10100011` |
| S | `01110110` |
| Saug | `0000100` |
| E | `000010000001000` |
| corrected m | `0101101` (the enrolled block was `0101101 11011101`) |

## Compact syndrome coding (`csc_encoder`)

For a group of `g` oscillators with counts `f(RO_1) … f(RO_g)`:

```
c = 0
for i = g downto 2:
    inv = |{ j < i : f(RO_i) <= f(RO_j) }|
    c   = (c + inv) · (i − 1)
```

The result equals `Σ inv_i·(i−1)!`, a mixed-radix permutation index in `[0, g!−1]`. The
hardware does one loop iteration per clock (`g−1` cycles): the `i−1` comparisons run in
parallel, and a 53-bit by 5-bit multiply does the step. The bit count `ceil(log2 g!)` comes
from a 19-entry constant table: 53 bits for 18 oscillators, 37 for 14, 33 for 13.
Eighteen oscillators is the largest group. Ties count as inversions. Counts are `FW = 16`
bits, which is an assumption of this design.

## Skip-mode placement (`skip_mode_mapper`)

The groups' CSC values are stored first. Placement then runs in two conceptual steps:

* **Build tmpVector.** Visit the groups round-robin. On each visit a group gives its next
  `min(37, bits left)` bits, most significant first. Exhausted groups are skipped.
* **Map to blocks.** Cut tmpVector into 37-bit slices. Slice `j` becomes bit `j` of blocks
  0…36, so tmpVector bit `p` lands in block `p mod 37` at bit position `⌊p / 37⌋`.

A 37-bit chunk of one group therefore touches 37 different blocks. A second chunk of the
same group can add at most one more bit to some of them. This is why a single adjacent-rank
flip leaves at most two bad bits in any block.

The hardware emits one bit per clock. A block counter and a column counter replace the
division. Visiting a group costs one extra cycle.

In the 193-oscillator configuration (ten 18-oscillator groups and one 13-oscillator group):
* The groups yield 10·53 + 33 = 563 bits.
* Round 1 takes 37 bits from each 18-oscillator group and all 33 from the last group.
* Round 2 takes the remaining 16 bits of each 18-oscillator group.
* Placement stops when all 555 response bits are filled, so the last 8 bits are dropped.

If the groups give fewer than 555 bits, the rest of the response is zero and `short_resp` is
set.

With 14-oscillator groups (37 bits each), every group fills exactly one bit column. This is
the "conservative" variant: one bit of a group per block. It needs no different hardware,
only smaller groups upstream.

## Top level (`puf_keygen`)

```
grp_* stream ──► csc_encoder ──► skip_mode_mapper ──► 37 × [m|c]
                                                         │
                 enroll:  caecc_encoder  ──► h = c ^ T·m ──► nvm_we / nvm_wdata
                 recon :  nvm_rdata ──► caecc_decoder ──► corrected m ──► key[0:255]
```

* **Group stream.** `grp_valid`/`grp_ready` handshake, carrying `grp_size` (2…18),
  `grp_freq[18]` (RO_1 first) and `grp_last` on the final group of a session. `mode` (1 =
  enroll, 0 = reconstruct) is sampled with the first group of a session. Grouping itself
  happens upstream: frequency thresholding and removal of systematic variation are not part
  of this RTL.
* **Helper memory.** `nvm_we` writes `nvm_wdata` to word `nvm_addr` (the block number).
  `nvm_re` requests word `nvm_addr`, and the memory must present it on `nvm_rdata` in the
  next cycle. The memory itself is external.
* **Result.** When the 37 blocks are done, `key_valid` rises. It holds, with `key` and the
  statistics, until the next group is accepted. The statistics are `corrected_bits`,
  `corrected_blocks`, `double_blocks`, `fail_blocks`, `short_resp` and `skip_visits`.
* **Throughput.** One shared encoder and one shared decoder serve the 37 blocks in turn.
  Enrollment takes 5 cycles per block and reconstruction 9. A full 193-oscillator session
  takes about 1,000 cycles to enroll and 1,100 to reconstruct.

## Where this RTL departs from, or adds to, the source design

* `T`, the CA rule vector and `G` are chosen here (see above). Any code with the same
  structure can replace them.
* The `uncorrectable`/`hit` flags, the statistics outputs, the group-stream and helper-memory
  interfaces, the 16-bit count width and the limit of 64 groups are this design's own.
* The placement of the three decoder pipeline registers is a choice. Only the split of 4 CA
  cycles plus 3 cycles is given.
* Reset is synchronous and active-low, and clears every register.
* The ring oscillators, their counters, the regression/threshold grouping and the
  nonvolatile memory are not included.
* A faster encoder variant that applies `T` as one XOR network (no CA cycles) is possible
  and would save the three work cycles; the CA form is the one built here.

## Simulating

Every block has a self-checking testbench in `tb/` that ends with a `TB_RESULT checks=…
failures=…` line. `tb/caecc_ref_pkg.sv` holds independent reference models: explicit cell
equations, `T` applied directly, CSC as a factorial sum, and placement through a queue.
Example with plain Verilator:

```
verilator --binary -Wno-fatal -Irtl -Itb --top-module puf_keygen_tb \
    rtl/caecc_pkg.sv tb/caecc_ref_pkg.sv rtl/*.sv tb/puf_keygen_tb.sv
./obj_dir/Vpuf_keygen_tb
```

Replace the top module and the last file to run another testbench: `kcell_ca_tb`,
`gq_logic_tb`, `caecc_encoder_tb`, `saug_map_tb`, `taug_inv_tb`, `caecc_decoder_tb`,
`csc_encoder_tb`, `skip_mode_mapper_tb`, `skip_flip_stats_tb` or `caecc_ber_tb`.

`puf_keygen_tb` runs the top at its default sizes. It enrolls a 193-oscillator array and
checks the key and all 37 helper words against the reference chain. It then reconstructs:

* with clean counts;
* 30 times with one adjacent-rank swap in a random group, where the key must come back
  intact;
* with three swaps, which reports statistics only;
* with unrelated counts, where blocks must be flagged;
* with a short five-group response.

Two further testbenches measure behaviour rather than check single results:

* `skip_flip_stats_tb` draws 1000 oscillator arrays, builds each response with `csc_encoder`
  and `skip_mode_mapper`, applies 1–4 random adjacent-rank swaps and records the largest
  number of bit errors in any 15-bit block. With 18-oscillator groups one swap never put
  more than two errors into a block (so it is always correctable), two swaps reached four
  and four swaps reached six. With 14-oscillator groups one swap never put more than one
  error into a block and four swaps reached four.
* `caecc_ber_tb` decodes 1000 random messages at each bit-error rate from 1 % to 10 %. All
  messages with at most two errors are recovered; the success rate is 100 % at 1 % and about
  85 % at 10 %.

`puf_keygen_tb` also confirms that each mechanism happened at least once: group splitting by skip mode,
single and double corrections, uncorrectable blocks and the short response. In a typical
run, a single adjacent swap was corrected every time. With three swaps, about half the keys
were wrong: skip mode does not protect against several flips landing in the same block.
