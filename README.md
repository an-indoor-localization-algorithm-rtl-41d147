# LANDMARC indoor localization engine, with an S-DES authentication cipher

Satellite positioning does not work indoors, but RFID readers report a received signal
strength (RSSI) for every tag they hear. LANDMARC uses that: a grid of *reference tags* is
fixed at known places, and a *target tag* is located by finding the reference tags whose RSSI
pattern, as seen by all readers, looks most like the target's. The closer a reference tag's
pattern, the more weight its known position gets, and the weighted mean of the best few
positions is the estimate. Comparing against reference tags in the same room cancels much of
what walls and furniture do to the raw signal strength.

This repository holds synthesizable SystemVerilog for that computation, sized for the floor
plan below, plus a Simplified DES (S-DES) block: the keyed function that reader and tag use to
authenticate each other (Molnar-Wagner protocol) before their readings are trusted.

```
      <----------------- 4d ----------------->
      +--------------------------------------+
      |   1 *         2 *          3 *       |      *  reference tag (id 1..9)
      |          r1          r2              |      rN reader
      |   4 *         5 *          6 *       |
      |          r3          r4              |      tag j at x = 1 + (j-1) mod 3,
      |   7 *         8 *          9 *       |               y = 1 + (j-1) div 3   (units of d)
      +--------------------------------------+
```

Four readers, nine reference tags spaced `d` apart with tag 1 one spacing in from both walls,
8-bit RSSI (0..255, larger means closer), and k = 3 nearest neighbours.

## The computation

For reference tag *j* with readings Q(j,1..4) and the target with readings S(1..4):

1. distance in signal space: `E_j = sqrt( sum_n (Q(j,n) - S(n))^2 )`
2. keep the three reference tags with the smallest `E`
3. weights: `W_j = (1/E_j^2) / sum_{i in 3 nearest} (1/E_i^2)`
4. position: `(x, y) = sum_{i in 3 nearest} W_i * (x_i, y_i)`

The 1/E² weighting reflects that received power falls roughly with the square of distance.

## Structure

```
 ref_tag[0..8] --+--> e_8bit x9 --{id,E}x9--> sort_18bit --{id,E}x3--> w_16bit --{id,W}x3--> landmarc_position --> (x, y)
 target ---------+    (2 clocks)              (64 clocks)               (comb.)               (comb.)
                                                                                                 |
                                             landmarc: control FSM, output registers, done <------+

 indoor_localization = landmarc  +  sdes (independent, ports brought out)
```

| module | role |
|---|---|
| `indoor_localization` | top: the localization engine and the cipher side by side |
| `landmarc` | localization engine: 9 distance units, sort, weights, position, control |
| `e_8bit` | distance `E` of one reference tag from the target |
| `sqrt_18bit` | registered integer square root used by `e_8bit` |
| `sort_18bit` | sequential bubble sort, outputs the 3 nearest |
| `w_16bit` | normalised 1/E² weights |
| `landmarc_position` | weighted mean of the grid positions |
| `sdes`, `sdes_keygen`, `sdes_f` | S-DES encryption, its key schedule and round function |
| `landmarc_pkg`, `sdes_pkg` | widths, record layouts, cipher tables |

### Records

Every value travels with the id of the tag it belongs to, so the sort can reorder freely and
the position stage knows which grid point each weight refers to.

| record | bits | layout |
|---|---|---|
| reading (`tag_rec_t`) | 40 | `{id[39:32], r1[31:24], r2[23:16], r3[15:8], r4[7:0]}` |
| distance (`dist_rec_t`) | 18 | `{id[17:10], E[9:0]}` |
| weight (`w_rec_t`) | 30 | `{id[29:22], W[21:0]}` |

The id byte of the target's own reading is ignored.

## Distance units (`e_8bit`)

Each unit has one subtractor per reader giving `|Q - S|` (8 bits, because squaring removes the
sign), a squarer per reader (16 bits), an adder of the four squares (18 bits: `4 * 255^2 =
260100`) and a square root (`floor`, 10-bit output, at most 510). The subtractors and the root
are registered, so a distance appears two clocks after its inputs; `in_valid` travels alongside
as `out_valid`. The root is the digit-by-digit (restoring) method, unrolled into one
combinational stage ahead of its output register. That stage is the longest path in the design.
Pipelining it is the first thing to change for a higher clock rate.

## Nearest-neighbour selection (`sort_18bit`)

All nine records are loaded on `start`. The unit then does one compare-and-swap of an adjacent
pair per clock. The pair index walks 0..7, and the walk is repeated 8 times. This is a plain
bubble sort laid out in time: it is small (one comparator, one swap path), but it takes
`(N-1)^2 = 64` clocks. A pair swaps only when the left E is strictly larger, so equal distances
keep their input order: on a tie the lower-numbered reference tag comes first. The first three
entries of the sorted array are the outputs, and they hold until the next `start`. A `start`
while `busy` is ignored.

## Weights, in fixed point (`w_16bit`)

This is the part most worth understanding before changing anything. The stage has no clock.

* `E^2` is 20 bits.
* The reciprocal is an integer `inv = floor((2^20 - 1) / E^2)`, 20 bits. So "1" is scaled to
  2^20 − 1. `E = 0` means the target reads exactly like a reference tag. That case saturates
  to 2^20 − 1, and in practice gives that tag all the weight.
* `w_tot = inv_1 + inv_2 + inv_3` is 22 bits.
* `W_j = floor(inv_j * 2^21 / w_tot)` is a 22-bit fraction with 21 fractional bits (1.0 =
  2^21). The three weights add up to 1.0 minus at most 3 LSBs. If every reciprocal is 0, all
  weights are 0; with 8-bit RSSI this cannot happen, since `E <= 510` gives `inv >= 4`.

The reciprocals are coarse for far neighbours: E = 10 gives 10485, E = 100 gives 104 and
E = 510 gives 4. When all three nearest tags are far away in signal space, the weights are
therefore quantised to a few percent. When the nearest tags are close, which is the case that
matters for accuracy, the resolution is fine. A wider reciprocal numerator is a one-constant
change (`INV_W` and the constant in `w_16bit`). The sums that follow would then need wider
widths too.

## Position (`landmarc_position`)

This stage maps each id 1..9 to its grid point (x = 1 + (id−1) mod 3, y = 1 + (id−1) div 3, in
units of d, origin at the top-left corner of the room). It returns `sum W * coordinate` as two
24-bit numbers with 21 fractional bits (so `2^21` means one spacing d). Ids outside 1..9 add
nothing. The stage has no clock.

## Control and timing (`landmarc`)

A four-state FSM (`IDLE → DIST → SORT → OUT`) does the following:

* It samples the readings on the clock where `start` is high and `busy` is low. The inputs
  only need to be valid on that clock.
* It starts the sort when the distance units report valid.
* It registers the nearest records, the weights and the position when the sort finishes, and
  pulses `done`.

`done` is high **68 clocks** after the edge that sampled `start`. That edge also loads the
first register stage of the distance units. The 68 clocks are: 1 to finish the distances, 1 to
load the sort, 64 in the sort, 1 for the controller to see the sort finish and 1 to register
the outputs. Results hold until the next `done`. A new
`start` is accepted on the clock after `done`, so back-to-back operation gives one position
every 69 clocks. Reset is synchronous and active high. Two assertions guard the control: the
nine distance units stay in lock step, and the sort is never started while busy.

## S-DES cipher (`sdes`)

The cipher encrypts an 8-bit block under a 10-bit key, and is purely combinational. It works
as follows:

* The key schedule permutes the key (P10) and splits it into 5-bit halves C0 and D0.
* Each half is rotated left by 1 to give C1 and D1. P8 of C1D1 is the subkey K1.
* C1 and D1 are rotated left by 2 more places. P8 of the result is K2.
* The block goes through the initial permutation IP and is split into L0 and R0.
* Round 1: `L1 = R0` and `R1 = L0 ^ f(R0, K1)`.
* Round 2: `L2 = R1` and `R2 = L1 ^ f(R1, K2)`.
* The output is `IP^-1({L2, R2})`.

The round function `f` expands 4 bits to 8, XORs them with the subkey and passes each half
through a 4x4 S-box. Within each half, bits 1 and 4 select the row and bits 2 and 3 the column.
The 2+2 result is then permuted by P4.

Where this block departs from what one might expect:

* **S-boxes are not the textbook ones.** S0 rows are `1 0 2 3 / 3 1 0 2 / 2 0 3 1 / 1 3 2 0`.
  S1 rows are `0 3 1 2 / 3 2 0 1 / 1 0 3 2 / 2 1 3 0`. These are the design's own tables.
* **Permutation tables are the classic S-DES ones** (P10, P8, IP, IP⁻¹, E/P, P4 as in the
  usual textbook definition). The design's original tables are not available. A worked run of
  the original agrees with these tables for the expansion and the S-boxes, but not for IP, P4
  or the key permutations. Ciphertexts therefore differ from that original; see the table in
  the last section.
* **No swap before the final permutation**, unlike textbook S-DES. This follows the design.
  Because of it, running the rounds with the subkeys reversed does *not* decrypt. Only
  encryption is provided: the authentication protocol needs `f` in one direction only.

How the protocol would use it: the tag computes `M1 = ID ^ f_k(0‖r1‖r2)`. The reader finds the
tag whose `ID ^ f_k(0‖r1‖r2)` matches `M1` and answers `M2 = ID ^ f_k(1‖r1‖r2)`, which the
tag checks. Generating the random challenges, packing `b‖r1‖r2` into one 8-bit block and
searching the ID database are software and are not in this RTL. The end-to-end testbench plays
the exchange with the packing `{b, r1[2:0], r2[3:0]}`, which is a choice of that testbench only.

## Not in this RTL

The radio modules (active RFID readers and tags), the microcontroller boards that drive them,
the soft processor that runs the authentication protocol, and the protocol's random number
generators are outside the design. The localization engine expects the twelve 40-bit readings
to be delivered to its ports by such a system.

## Simulating

Each testbench is self-checking and ends with a line `TB_RESULT checks=N failures=M`. The
`landmarc_pkg.sv` and `sdes_pkg.sv` packages must be listed first. For example, the whole
design:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/landmarc_pkg.sv rtl/sdes_pkg.sv tb/tb_indoor_localization.sv \
    --top-module tb_indoor_localization -Mdir obj && obj/Vtb_indoor_localization
```

| testbench | what it checks |
|---|---|
| `tb_indoor_localization` | The whole design at its default size. Localizations on a simulated floor are checked against a real-arithmetic and integer model, with latency 68. It also plays cipher traffic and a reader/tag authentication exchange. |
| `tb_landmarc` | About 400 localizations, noise-free and noisy, plus these cases: zero distance, ties, start while busy, back-to-back. Requires each to occur. Also requires the noise-free estimate to stay within one spacing of the truth; the observed error is about 0.25 d. |
| `tb_e_8bit` | Random and extreme readings against a real-valued distance, with the 2-clock latency. |
| `tb_sqrt_18bit` | All 2^18 inputs. |
| `tb_sort_18bit` | 500 random sets, including many ties. Compared with a stable sort, with the 64-clock latency and start-while-busy. |
| `tb_w_16bit` | Corner cases and random triples against a 64-bit model. Checks the sum of the weights and accuracy against the real formula. |
| `tb_landmarc_position` | Random weights and ids, including ids without a position. |
| `tb_sdes` | All 2^18 key/block pairs against an independent bit-list model, plus two round-function values taken from a worked run. |

Every design parameter has its default value in all testbenches. The simulations take seconds.

## How far to trust it, and where it departs

Sizes that follow the design:

* 8-bit RSSI, 4 readers, 9 reference tags, k = 3.
* Widths of 10-bit E, 18-bit square sum, 20-bit squares and reciprocals, 22-bit sum.
* 18- and 30-bit record widths.
* Bubble sort as a sequential circuit, and a combinational weight stage.
* The S-DES structure and S-boxes.

Choices made here, where the design gives no answer:

| item | choice here |
|---|---|
| meaning of the 8 extra bits in the 40/18/30-bit records | tag id |
| subtractor | absolute difference |
| square-root method | restoring, floor |
| sort speed | one compare-swap per clock; 8 passes, not 9 |
| tie order in the sort | input order kept |
| reciprocal scale | 2^20 − 1 |
| zero-distance handling | saturates |
| weight format | 21 fractional bits |
| position stage | in hardware; grid coordinates read off the floor plan |
| handshakes and FSM | start / busy / done |
| reset | synchronous, active high |
| cipher permutation tables | classic S-DES tables |

Known differences from the original:

| item | the original | this RTL |
|---|---|---|
| adder width | one drawing labels the adder output 16 bits | 18 bits, as the detailed schematic shows; 16 bits would overflow |
| second key rotation | the worked run rotates C0/D0 by 2 | C1/D1 rotated by 2 more places, as the key-scheme diagram shows |
| S-DES ciphertext | original permutation tables | classic tables, so outputs are not bit-exact to the original |
