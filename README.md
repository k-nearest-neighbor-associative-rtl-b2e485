# K-nearest-neighbour associative memory with a reconfigurable word-parallel array

This is a K-nearest-neighbour (KNN) classifier built as an associative memory. The
reference vectors sit in an array of 8-bit word elements. Every element compares its
reference word with an input word in parallel. The search for the nearest vectors then
uses no adders or magnitude comparators across elements. Instead, each element's squared
distance is turned into a number of clock cycles: the vector whose counters catch up
with its distance first is the nearest. The k nearest vectors then vote on the class
with a small distributed circuit.

Three ideas carry the design:

* **Reconfigurable word parallelism.** A one-bit programmable switch between every two
  elements decides where one vector ends and the next begins. The same 256 elements can
  hold 256 one-component vectors, 32 vectors of 8 components, one vector of 256
  components, or any mix.
* **Weighted clock counting.** A plain clock count would need up to 2^(2N) x d clocks
  for d components of N bits. Here the counting starts with the most significant
  distance bit and moves down one bit whenever some vector matches. The worst case is
  then `2N x (d+1) - 1` clocks, which grows linearly with the word width.
* **Distributed majority vote.** Every vector tail has a small KNN unit holding that
  vector's class label. A scan token picks the matching vectors one per cycle and sends
  their labels to a set of global vote counters.

The default size is that of a 180 nm test chip: 32 rows x 8 elements of 8-bit words, 24-bit
distance accumulators, 3-bit class labels (8 classes) and 4-bit k (k <= 15).

## The element array and its switches

The array `knn_rasm` holds ROWS x COLS elements. They are chained in row-major order
(element index `r*COLS + c`), so a vector longer than a row continues in the next row.
Each element (`knn_element`) contains:

* one reference word and one input word (registers written by the host);
* a distance computing unit, `knn_dcu`, for (ref - in)^2;
* a dimension-extension accumulator, `knn_dec`, for the partial distance (24 bits);
* a distance evaluation unit, `knn_deu`, for the search.

After element *i* sits switch `knn_ps` number *i*. Its bit CS decides the grouping:

| CS | meaning | match / counting clock to element i+1 | KNN match output |
|----|---------|----------------------------------------|------------------|
| 1  | element i and i+1 belong to one vector | passed on from element i | 0 (unit idle) |
| 0  | element i is a tail, i+1 is a head | match = 1, global counting clock | match of the vector ending at i |

The switch after the last element is always a tail. After reset every CS is 0, so each
element is a one-component vector. With vectors of d components the array holds
floor(ROWS*COLS/d) vectors. Elements left over at the end form one extra, shorter vector.
The host must give that vector words that keep it out of the result.

## Distance computation and long vectors

`OP_COMPUTE` starts every DCU at once. A DCU forms |ref - in| with one subtractor. It then
adds one shifted partial product per clock, so the square is ready after N = 8 clocks.
At the edge where the DCU reports done, the DEC adds the square to its sum. The command
takes N + 1 = 9 cycles.

Sometimes a vector has more components than its elements can hold. The host then loads
the vector in parts and runs `OP_COMPUTE` once per part. Each DEC then holds the
squared distance over all the components it has seen. The search compares the elements'
partial distances directly, so the full vector sum is never formed. A 24-bit DEC holds 256
worst-case squares (256 x 255^2 < 2^24). For example, 32 vectors of 8 elements with 256
parts each gives 2048-dimensional vectors.

## The clock-mapping search

This is the heart of the design, and the part that takes the most care to follow.

**Counters.** Every element has an E-bit counter made of one-bit dividers (`knn_deu`).
A one-hot bit-activator signal `bas` selects the entry bit *b*. Each counting clock that
reaches the element adds 2^b. In the chip the counting clock is a gated clock. Here it is
a synchronous enable, and the divider chain is a toggle chain. Bit *b* toggles on the
counting clock, and every bit above it toggles when all the bits between are 1.

**Match detection.** An element matches when its counter equals its DEC value on bits E-1
down to *b*. The comparison is a per-bit XNOR, ANDed from the MSB down, and `bas` selects
the tap at bit *b*. Along a vector, the match ANDs through the elements. The counting
clock is passed to the next element only where an element matches. Each clock therefore
lands on the first element of each vector that does not match yet. A vector matches at its
tail once all of its elements match.

**Bit activator.** `knn_ba` starts at bit `top_bit`, which is 15 = 2N-1 by default. While
no vector matches, every cycle is a counting cycle. In a cycle where the OR tree sees a
match, nothing counts. Above the LSB, the bit activator moves one bit down at the end of
that cycle. At the LSB, that cycle ends the search: the vectors matching then are the
nearest.

**Why it is exact.** All vectors that have not finished advance by exactly 2^b per counting
clock, and they all start each bit from the same total count C. A vector finishes bit *b*
when its total reaches T(b), the sum over its elements of the DEC values truncated to bits
>= b. The first vector to finish is therefore the one with the smallest T(b). At the LSB,
T(0) is the true squared distance. Counters never overshoot. An element's counter is at
most its truncated distance, because the clock moves on as soon as the element matches.

**Cost.** Bit *b* costs (min T(b) - C) / 2^b counting clocks plus one bit-activator
clock. This is at most d + 1 for vectors of d components. The worst case is therefore
`(top_bit+1) x (d+1) - 1` clocks. Every bit of every DEC at or above `top_bit` must be
covered: the host sets `top_bit` to 23 after multi-part loads and may leave it at 15 after a
single load.

Worked example: two vectors of two components, 4-bit distances, starting at bit 3. Vector
A has element distances (5, 2), total 7. Vector B has (3, 3), total 6.

| bit | T_A | T_B | counting clocks | bit-activator clock |
|-----|-----|-----|-----------------|---------------------|
| 3   | 0   | 0   | 0               | 1 |
| 2   | 4   | 0   | 0 (B matches)   | 1 |
| 1   | 6   | 4   | (4-0)/2 = 2     | 1 |
| 0   | 7   | 6   | (6-4)/1 = 2     | - (B is nearest) |

The search takes 7 clocks, and `search_clocks` reports 7.

## k neighbours and the majority vote

When a match shows at the LSB, the controller (`knn_ctrl`) switches to voting. A scan token
enters KNN unit 0 (`knn_unit`) and passes every unit that has no new match. The first unit
whose vector matches and has not voted yet stops the token. That unit raises `act` and
puts its class label on the class bus. It also sets its "voted" flip-flop, so the token
passes it from the next cycle on. The global part (`knn_mvc`) counts each vote in C1 and in
the counter of its class. END is raised when C1 equals k. The output class is the one with
the most votes; on equal counts the lower class number wins.

Sometimes the scan ends before k votes are in. The DEU counters are then cleared, and the
bit activator restarts at `top_bit`. The OR tree that stops the counting looks only at
vectors that have not voted. The fresh search therefore finds the nearest of the vectors
still in the race, at the same linear cost as the first one: at most
`(top_bit+1) x (d+1) - 1` clocks per round. The search ends after k votes, or when every
vector has voted (k larger than the number of vectors). Equal distances are voted in array
order. The voted vectors are marked in `knn_sel`.

## Host interface and timing

`knn_top` takes one command per cycle while `busy` is low (`cmd_valid`, `cmd_op`,
`cmd_addr`, `cmd_data`). The commands are listed in `knn_pkg::cmd_op_t`:

| command | effect | cycles |
|---------|--------|--------|
| `OP_WR_REF`, `OP_WR_IN` | reference / input word of element `cmd_addr` | 1 |
| `OP_WR_CS` | switch after element `cmd_addr`, CS = `cmd_data[0]` | 1 |
| `OP_WR_CLS` | class label of the KNN unit after element `cmd_addr` | 1 |
| `OP_CLR_DEC` | clear all distance accumulators | 1 |
| `OP_COMPUTE` | all elements add (ref - in)^2 to their DEC | N + 1 |
| `OP_SET_TOP` | first bit evaluated by the search (default 15) | 1 |
| `OP_SEARCH` | search and vote with k = `cmd_data[3:0]` | search + votes |

A classification runs in this order: write the switches and labels (once per
configuration); write the reference and input words; clear the DEC; compute once per
part; then search. At the end of a search, `done` pulses for one cycle. Until the next
search, the following outputs hold the result:

* `class_out` is the majority class.
* `nn_match` marks the tail element of every nearest vector.
* `knn_sel` marks the tails of the vectors that voted.
* `search_clocks` is the number of clocks until the nearest vector was found, not
  counting the final match cycle.

The input vector is written per element. A query therefore writes an input word into
every element of every vector.

## Files

| file | content |
|------|---------|
| `rtl/knn_pkg.sv` | widths (N, E, L, PW) and the command type |
| `rtl/knn_top.sv` | controller + array + bit activator + vote counters |
| `rtl/knn_ctrl.sv` | command execution, search/vote sequencing |
| `rtl/knn_rasm.sv` | element chain, switches, KNN units, OR tree, class bus |
| `rtl/knn_element.sv` | word storage + DCU + DEC + DEU |
| `rtl/knn_dcu.sv`, `knn_dec.sv`, `knn_deu.sv` | squared difference, accumulator, weighted counter with match detection |
| `rtl/knn_ps.sv`, `knn_unit.sv`, `knn_addr_dec.sv` | switch, local KNN unit, row/column decoder |
| `rtl/knn_ba.sv`, `knn_mvc.sv` | bit activator, global majority vote |
| `tb/tb_*.sv` | one self-checking bench per module, `tb_knn_top_full` at full size |
| `tb/knn_tb_pkg.sv` | independent reference model (vectors, k nearest, class, search clocks) |

Parameters: `knn_top` has `ROWS` (32) and `COLS` (8). Word, accumulator, label and k widths
come from `knn_pkg`, and the lower-level modules take them as parameters. The design has
about 25,700 flip-flops at full size, most of them in the 256 DEC/DEU/DCU sets.

## Simulation

Every bench prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.
For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_knn_top \
        rtl/knn_pkg.sv tb/knn_tb_pkg.sv $(ls rtl/*.sv | grep -v knn_pkg) tb/tb_knn_top.sv
    ./obj_dir/Vtb_knn_top

* `tb_knn_top` works on a 4 x 4 array. It runs 16 searches with vector lengths from 1 to
  16, mixed lengths, two-part loads, equal distances, and k above the number of vectors.
  It compares every result and the clock count with the reference model. It also counts
  the mechanisms it saw: bit-activator steps, restarted searches, ends by k and by all voted,
  ties, accumulation and reconfiguration.
* `tb_knn_workload_2048` works on a 4 x 8 array. It loads four 2048-component vectors in
  256 parts, one of them at the accumulator's worst case (256 x 255^2). It then searches
  from bit 23 with k = 3.
* `tb_knn_top_full` works on the full 32 x 8 array with 8-component vectors and k = 3. It
  uses the match-path worst-case pattern: nearest distance 128^2 in one component;
  second 127^2 + 15^2 + 5^2 + 2^2 + 1 + 1 = 16385. Its search takes 31 clocks, against a
  bound of 143. Building this bench takes several minutes of C++ compilation. The
  simulation itself takes seconds.

## Departures from the original chip and limits

* The original is full-custom. Here, gated clocks are synchronous enables, transmission-gate
  buses are AND-OR buses, and the ripple frequency dividers are a synchronous toggle
  chain. Cycle behaviour is kept; delay, power and area are not modelled. The chip's
  critical path (about 7.8 ns, roughly 120 MHz) has no counterpart here.
* The chip's on-chip FIFOs, ring oscillator and clock tree are not included. There is one
  clock and one active-low asynchronous reset.
* The following are choices of this design, not taken from the original: the host
  command set; the per-element input registers; the row-major order of the chain; the
  programmable start bit; restarting the search for each further neighbour; the early end
  when all vectors have voted; and the lowest-class tie rule.
* The host must write elements left over at the end of the array so that they cannot win.
  It must also set `top_bit` at least as high as the highest set bit of any DEC.
* The end-to-end search times reported for the chip (4.38 us average, 8.76 us, 3.99 us at
  100 MHz) include steps whose timing is not known, so they are not reproduced. Only the
  search clock bound is checked.
