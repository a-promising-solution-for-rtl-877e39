# Tag matching on ECC-protected tags without decoding them

Cache tag directories are often protected by an error-correcting code. The obvious way to look
up a tag is to read the stored codeword, decode and correct it, and then compare the recovered
tag with the incoming one. Decoding and correction sit on the critical path. It is cheaper to go
the other way round: **encode the incoming tag and measure how far the retrieved codeword is from
it.** The code has minimum distance 4 (SEC-DED: single error correcting, double error detecting),
so the Hamming distance `d` between the two words says everything needed:

| `d`      | meaning                                                       | result     |
|----------|---------------------------------------------------------------|------------|
| 0 or 1   | same tag; at most one stored bit has flipped                  | `MATCH`    |
| 2        | two bits wrong: the entry cannot be trusted (machine check)   | `FAULT`    |
| 3 or more| a different tag                                               | `MISMATCH` |

This RTL adds two refinements to plain encode-and-compare:

* **Systematic split.** The code is systematic: a codeword is the tag itself followed by its
  parity bits. The data half of the comparison needs no encoder at all, so it runs while the
  encoder is still computing the parity of the incoming tag. Only the short parity half waits
  for the encoder.
* **Butterfly weight accumulator (BWA).** Instead of a population counter followed by a
  saturating adder, the differing bits are counted by a butterfly of half adders whose outputs
  carry binary weights. The branches that could only report "4 or more" are cut down to OR
  gates, and a small truth table classifies the result.

The default configuration is the (24,18) code: 18-bit tags, 6 parity bits, 24-bit codewords.
The same RTL builds the (8,4) code with `K = 4`.

## The comparison datapath (`bwa_comparator`)

```
 stored[17:0] ──┐                                       
                ├─ xor_bank(18) ─ bwa(18→32) ── tag_w ──┐
 in_tag[17:0] ──┘                                       ├─ bwa_second_level ─ Q R S T U V ─ decision_unit ─ match/fault/mismatch
 stored[23:18] ─┐                                       │
                ├─ xor_bank(6) ── bwa(6→8) ──── par_w ──┘
 in_parity ─────┘   (in_parity = secded_encoder(in_tag), computed beside the data half)
```

Every stage is combinational. The codeword layout is `{parity[R-1:0], data[K-1:0]}`.

### The butterfly (`bwa`)

The input is zero-padded to `P = 2^L` bits. In stage `s` (0 to L-1), bit `i` (with bit `s` of
`i` clear) and bit `i + 2^s` go into a half adder. The sum returns to position `i` and the carry
to position `i + 2^s`. The two bits of a pair always have the same weight. After the last stage,
output bit `j` therefore has weight `2^popcount(j)`, and

    number of ones = Σ_j  w[j] · 2^popcount(j)

For eight inputs the outputs are one bit of weight 1 (`w[0]`), three of weight 2
(`w[1], w[2], w[4]`), three of weight 4 (`w[3], w[5], w[6]`) and one of weight 8 (`w[7]`):
`d = 8I + 4(J+K+M) + 2(L+N+O) + P`. An L-stage BWA has L half-adder delays and
`L · 2^(L-1)` cells.

**Pruning.** For a single-error-correcting code nothing above `d = 3` needs an exact count. A
pair whose weight is `SAT_WEIGHT` (default 4) or more is merged by an OR gate instead of a half
adder, and its carry position is tied to 0. A set bit of weight 4 or more then only means "the
distance is at least 4". Bits of weight 1 and 2 stay exact.

### Second level and decision (`bwa_second_level`, `decision_unit`)

The tag and parity BWAs each produce one weight-1 bit, a few weight-2 bits and some
"at least 4" bits. The second level reduces them to six signals:

* `V`, `U`: sum and carry of a half adder on the two weight-1 bits. `U = 1` forces `V = 0`.
* `T`: some weight-2 bit is set.
* `S`: two or more weight-2 bits are set. That alone means `d ≥ 4`.
* `Q`, `R`: a tag or a parity bit of weight 4 or more is set.

When `Q = R = S = 0`, the distance is exactly `d = V + 2(U + T)`, and the decision table is:

| Q\|R\|S | T | U | V | result   | distance |
|---------|---|---|---|----------|----------|
| 1       | x | x | x | MISMATCH | ≥ 4      |
| 0       | 0 | 0 | x | MATCH    | 0, 1     |
| 0       | 0 | 1 | x | FAULT    | 2        |
| 0       | 1 | 0 | 0 | FAULT    | 2        |
| 0       | 1 | 0 | 1 | MISMATCH | 3        |
| 0       | 1 | 1 | x | MISMATCH | 4        |

With `K = 4` (the (8,4) code) each BWA has four outputs: weight 1, two of weight 2 and one of
weight 4. The six signals then come straight from those eight bits.

### Reduced-gate cells (`mod_xor`, `mod_ha`)

The XOR banks and the BWAs are built from two small cells with fewer gates than the textbook
forms:

* `mod_xor`: four NAND gates. The AND-OR-NOT form needs five.
* `mod_ha`: four gates. `n = ~(a&b)` is shared: `sum = (a|b) & n` and `carry = ~n`. An AND plus
  a five-gate XOR needs six.

Synthesis tools re-map these cells anyway. They are kept as explicit gate equations so that the
netlist structure matches the intended cell count.

### The code (`secded_encoder`)

The code is an extended Hamming code. Data bit `i` has parity-check column `3, 5, 6, 7, 9, …`
(the i-th integer ≥ 3 that is not a power of two). Check bit `c` is the XOR of the data bits
whose column has bit `c` set. The last parity bit is the overall parity, which raises the
minimum distance to 4. For `K` data bits there are `r + 1` parity bits, where `r` is the smallest
value with `2^r ≥ K + r + 1`. That gives 6 parity bits for `K = 18` and 4 for `K = 4`. Any other
systematic code with minimum distance 4 (a Hsiao code, for example) can replace it. The
comparator only relies on the distance, and the BWA widths follow from `K` and `R`.

## Cache lookup wrapper (`ecc_tag_match_top`)

The top is a tag lookup for a set-associative cache. It has `SETS` × `WAYS` entries (default
64 × 4), one BWA comparator per way, and one shared encoder for the incoming tag.

```
cycle 0  lookup_valid, lookup_index, lookup_tag   -> directory reads all ways of the set;
                                                     tag is registered
cycle 1  encoder(tag) ∥ data-half XOR/BWA per way -> result_* valid (combinational from the
                                                     cycle-0 registers), result_valid = 1
```

* A lookup can start every cycle. Results appear exactly one cycle after the request.
* `result_way_match/fault/mismatch[w]` classify each **valid** way. Ways that were never filled
  report nothing.
* `result_hit` is set when some way matched. `result_hit_way` is the lowest matching way.
* `result_mca` flags a machine-check condition: some valid way was at distance 2.
* **Fill.** `fill_valid` with `fill_index`, `fill_way` and `fill_tag` passes the tag through a
  second encoder (the write-side "ECC Gen") and stores `{parity, tag}`. The entry is visible to
  lookups issued from the next cycle on.
* If a lookup and a fill hit the same set in the same cycle, the lookup sees the old contents.
* The requester chooses the way to fill. No replacement policy is included.
* A match at distance 1 is reported as a hit. The stored copy is not scrubbed: the entry keeps
  its flipped bit until it is refilled.

A concurrent assertion in the top checks, every cycle, that each valid way is put in exactly
one class and that an invalid way is put in none. An immediate assertion in the second level
checks that `U` and `V` are never both 1.

`tag_directory` is a plain synchronous-read array with per-entry valid bits cleared by
`rst_n`. The codewords themselves are not reset. In an ASIC it would be an SRAM macro plus a
small valid-bit register.

## Parameters

| module              | parameter    | default | meaning                                              |
|---------------------|--------------|---------|------------------------------------------------------|
| `ecc_tag_match_top` | `K`          | 18      | tag bits; codeword is `K + R` bits                   |
|                     | `SETS`       | 64      | directory sets (chosen here, not from a reference)   |
|                     | `WAYS`       | 4       | directory ways (chosen here)                         |
| `bwa_comparator`    | `K`          | 18      | tag bits                                             |
| `secded_encoder`    | `K`          | 18      | data bits                                            |
| `bwa`               | `W`          | 18      | input bits                                           |
|                     | `SAT_WEIGHT` | 4       | pairs of this weight or more are OR-merged           |
| `bwa_second_level`  | `PT`, `PP`   | 32, 8   | output widths of the tag and parity BWAs             |
| `tag_directory`     | `N`, `SETS`, `WAYS` | 24, 64, 4 | codeword bits and array shape                  |

The second level and the decision table are written for single-error-correcting codes: the
match / fault / mismatch thresholds are fixed at 1 and 2. Supporting a code that corrects more
errors would need a wider exact range in the BWAs (`SAT_WEIGHT`) and a new second level and
decision table.

## What is reconstructed, and what is not here

The comparison architecture (systematic split, XOR banks, BWA with OR pruning, six-signal
decision table) and the (24,18) and (8,4) configurations follow the method this design
implements. The following are this design's own choices:

* **Exact gates of the reduced cells.** Only the gate counts were fixed (one fewer than a
  five-gate XOR; two fewer than a six-gate half adder). The NAND-based forms above satisfy them.
* **Butterfly wiring and pruning threshold.** The wiring was reconstructed from the output
  weights `8I + 4(J+K+M) + 2(L+N+O) + P`, which it reproduces exactly. The threshold follows from
  the SEC-DED thresholds.
* **Meaning of Q, R, S, T, U, V.** These were reconstructed from the decision table. `U` and `V`
  are taken as the carry and sum of one half adder, which is why `V` is a don't-care whenever
  `U = 1`.
* **The parity-check matrix.** Extended Hamming, with data in the low bits of the codeword.
* **Everything in the cache wrapper.** Set and way counts, the one-cycle pipeline, valid bits,
  read-before-write, hit-way priority and the separate fill encoder.

Not included: the decode-and-compare and saturating-adder encode-and-compare architectures
that this one is meant to replace. The FPGA area, delay and power figures quoted for this
method (486 slices, 36 ns, 815 mW for the (24,18) code) belong to an unnamed device and tool
flow, and have not been reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. The reference models in
`tb/tb_ecc_ref_pkg.sv` are independent of the RTL. The encoder reference uses the position
form of the Hamming code (zero syndrome, even parity). Expected results come from plain
population counts.

| testbench                        | what it covers                                                     |
|----------------------------------|--------------------------------------------------------------------|
| `tb_mod_xor`, `tb_mod_ha`        | exhaustive truth tables                                            |
| `tb_xor_bank`                    | walking ones and random words                                      |
| `tb_bwa`                         | all 256 inputs of an unpruned 8-input BWA against the weight formula; random 18-input unpruned; pruned 18- and 6-input exact below 4 |
| `tb_bwa_second_level`            | driven by real BWAs: `d = V + 2(U+T)` below 4, Q\|R\|S or a low sum of 4+ above; each signal against its definition |
| `tb_decision_unit`               | all 64 input combinations against the table                        |
| `tb_secded_encoder`              | both codes against the reference; minimum distance 4 over all (8,4) pairs and random (24,18) pairs |
| `tb_bwa_comparator`              | (24,18): codewords with 0–4 flipped bits against equal, near and random tags; (8,4): all 16 × 256 combinations |
| `tb_tag_directory`               | reset, read latency, read-before-write, hold                       |
| `tb_ecc_tag_match_top`           | end to end at the default size: fills, back-to-back lookups, 1–3-bit errors flipped directly in the array; per-way results, hit, hit way, mca and one-cycle latency checked every cycle; each mechanism (exact hit, hit with one error, fault, mismatch, invalid way, fill, back-to-back lookup, same-set lookup and fill) must occur |
| `tb_ecc_tag_match_top_8_4`       | the same test with the (8,4) code (`K = 4`); short tags make several ways match at once, exercising the hit-way priority |

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ecc_cmp_pkg.sv tb/tb_ecc_ref_pkg.sv tb/tb_ecc_tag_match_top.sv \
    --top-module tb_ecc_tag_match_top -o sim
./obj_dir/sim
```

Replace the testbench name for the others. All of them run in well under a second.
