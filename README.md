# LSBWT — a Burrows-Wheeler Transform engine built on a linear sorter

The Burrows-Wheeler Transform (BWT) of a string of n characters is the
column of last characters of its n rotations, taken in sorted order. This
design never builds the rotation matrix. Each character is tagged with its
index, and the tags are sorted by their first character as the string comes
in. Ties are then broken one character at a time. Only the tags that are
still tied are re-sorted, and only among themselves. When no ties remain, the
tags are in rotation order. For tag i, the BWT character is the one at
(i-1) mod n.

The hardware is a chain of n identical **Comparison Units (CUs)**, one per
character, plus a small amount of control. This follows the LSBWT
architecture (Linear Sorter for BWT). It needs no advance knowledge of the
longest common prefix of the rotations, because it simply keeps iterating
until every tie is resolved.

## The linear sorter

Each CU holds one `(data, id)` pair. The CUs hold their values in ascending
order from CU 0 (left) to CU n-1 (right), and empty CUs hold `MAX_VALUE`. A
new pair is broadcast to every CU. In the same cycle:

* every enabled CU raises `less_out` if the broadcast data is smaller than its
  own;
* a CU whose left neighbour raised `less_out` takes the left neighbour's pair
  (it shifts right);
* a CU that raised `less_out` while its left neighbour did not takes the
  broadcast pair (it is the insertion point);
* every other CU holds.

The comparison is a strict "less than". A new item therefore lands behind
items of equal value that are already stored. Data is held one bit wider than
a character, so `MAX_VALUE = 2**DATA_W` is above every character, including
0xFF.

Loading a string takes n cycles and leaves it sorted by its first character.

## Resolving ties: substitution rounds

This is the part that takes the most thought.

After a sort, each CU computes three flags:

* `EQL`: its data equals its left neighbour's.
* `EQR`: its data equals its right neighbour's.
* `SUST = EQL | EQR`: the CU is tied and must be substituted.

A CU with `SUST=1` and `EQL=0` is the first CU of a tied group.

A round with sort counter x (x = 1, 2, ...) works like this:

1. **Capture.** A round-end pulse stores `EQL` and `SUST` of all CUs in the
   flag register.
2. **Decide.** If no `SUST` bit is set, the transform is done. Otherwise every
   tied CU is loaded with `MAX_VALUE`. Its id is kept.
3. **Substitute**, one cycle per tied CU. The priority encoder picks the
   leftmost remaining `SUST` bit. The one-hot decoder turns it into a select
   word. The selected CU's id `i` is read out. The character at
   `(i + x) mod n` is fetched from the string memory and broadcast with id
   `i`. The selected `SUST` bit is cleared.
4. When the last `SUST` bit clears, x is incremented and the next round
   begins at step 1.

The enable multiplexer keeps each insertion inside its own group:

* If the selected CU starts a group (`EQL=0`), only that CU is enabled.
* If the selected CU continues a group (`EQL=1`), the enables are the OR of
  every select word since the group started.

So while the j-th member of a group p..q is being handled, exactly CUs
p..p+j are enabled. CUs p..p+j-1 hold the members already re-inserted, in
order. CU p+j holds `MAX_VALUE` and the id being read in this very cycle.
The insertion takes that slot (directly or by the shift), so no id is lost.
CUs beyond p+j are disabled and keep their ids for later cycles. CUs outside
tied groups are never touched again.

**Group boundaries.** After a round, a CU at the edge of a group may hold the
same value as its neighbour in the next group, although their earlier
characters differ. To stop such false ties, each CU keeps a boundary bit. At
every capture the bit is set if the CU's data differs from its left
neighbour's, and it is never cleared until the next string. `EQL` and `EQR`
are masked by the boundary bit between the two CUs compared. In effect, a tie
needs equality in every round so far.

**Termination.** A string with identical rotations (for example `ABAB...`)
would never stop splitting. After the round with x = n-1 every key covers a
whole rotation, so the controller stops there. The rotations still tied are
then equal, and any order among them gives the same BWT.

Worked example, `TASGASC` (n = 7):

| step | sorted ids | data in the CUs | tied groups |
|---|---|---|---|
| after load | 1 4 6 3 2 5 0 | A A C G S S T | {1,4} and {2,5} |
| round x=1, 4 substitutions | 1 4 6 3 5 2 0 | S S C G C G T | {1,4} is still tied (S S); {5,2} is split (C < G) |
| round x=2, 2 substitutions | 4 1 6 3 5 2 0 | C G C G C G T | none |

In this example no two neighbours in different groups happen to be equal, so
the boundary bits never matter. The rows read out give ids 4 1 6 3 5 2 0 and the BWT `GTSSAAC`. The original
string is in row 6. The run takes 7 + 2 + (4+2) + (2+2) + 7 = 26 cycles.
`tb_lsbwt_example` checks all of this.

## Cycle budget

For a string of n characters that needs k sorting iterations, with m_i
characters tied in substitution round i:

    cycles = n (load) + 2 + sum_{i=1..k-1} (m_i + 2) + n (output)

The two extra cycles per round are the capture cycle and the decide cycle.
In the worst case every character is tied in every round, which gives
n(k+1) + 2k. For n = 128 and k = 8 that is 1168 cycles.

Cycles are counted from the first accepted character to the last output row,
with characters fed back to back. Gaps on the input add their own length.

Some measured figures:

* 127 equal characters out of 128: 127 iterations, 8637 cycles. This is what
  the formula gives for any position of the odd character. The published
  table for this case lists 8768.
* Random 16-character text: 43–78 cycles for 2–6 iterations.
* Two 128-character English sentences whose rotations share at most 7
  leading characters: 8 iterations, 558 and 572 cycles.

## Interface (`lsbwt_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (empties all CUs) |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1/1/`DATA_W` | character stream, taken when `in_valid && in_ready`; exactly N characters per string |
| `out_valid` | out | 1 | high for N consecutive cycles, one sorted row per cycle; no back-pressure |
| `out_id` | out | `ID_W` | index of the rotation in this row |
| `out_prefix` | out | `ID_W` | `(out_id - 1) mod N` |
| `out_char` | out | `DATA_W` | BWT character, `s[out_prefix]` |
| `out_primary` | out | 1 | this row is the original string (`out_id == 0`) |
| `primary_idx` | out | `ID_W` | row of the original string, valid from the cycle after that row until reset |
| `first_done` | out | 1 | the first sort is complete |
| `round_done` | out | 1 | pulses at the end of each iteration, then stays high once the BWT is complete |
| `busy` | out | 1 | not accepting characters |
| `phase` | out | 3 | controller phase (`lsbwt_pkg::phase_e`) |

`ID_W = clog2(N)`.

* The first character of a string may be sent in the cycle after the last
  output row of the previous string.
* The indexes are generated inside, so character k of the stream has id k.
* The output combinational paths run from the CU registers to the ports.

## Modules

| file | role |
|---|---|
| `lsbwt_pkg.sv` | default sizes, controller phase enum |
| `lsbwt_cu.sv` | Comparison Unit: insert / shift / hold, `LESS`, `EQL`, `EQR`, `SUST`, `MAX_VALUE` load, boundary bit |
| `lsbwt_cu_array.sv` | chain of N CUs; AND-OR mux for the selected CU's id; read mux for the output |
| `lsbwt_prio_enc.sv` | first set bit of the stored `SUST` word |
| `lsbwt_onehot_dec.sv` | position to one-hot select |
| `lsbwt_enable_mux.sv` | all / one-hot / running-OR enables |
| `lsbwt_flag_reg.sv` | stored `EQL`/`SUST`, bit clearing, empty detection |
| `lsbwt_round_end.sv` | `first_done`, capture pulse, held `round_done` |
| `lsbwt_str_mem.sv` | copy of the string, one write and two asynchronous read ports |
| `lsbwt_ctrl.sv` | phases LOAD, CAPTURE, DECIDE, SUBST, OUTPUT; sort counter; load and read counters |
| `lsbwt_prefix_out.sv` | prefix `(i-1) mod N`, primary row flag and latch |
| `lsbwt_top.sv` | wiring; the `(id + x) mod N` address; input/substitution broadcast mux |

## Parameters and size

| parameter | default | notes |
|---|---|---|
| `N` | 128 | string length, equal to the number of CUs; any N ≥ 2 |
| `DATA_W` | 8 | character width; the CUs store `DATA_W+1` bits |

At the defaults, coarse synthesis gives about 2600 flip-flops and a
1024-bit string memory. Each CU holds 9 data bits, 7 id bits and 1
boundary bit, and the flag and enable registers add 3 × 128 bits.

The critical path is long and unpipelined. In one substitution cycle it runs
priority encoder → id mux → adder → string memory read → 128 comparators →
enables. Pipelining it would cost cycles against the budget above.

## Where this design makes its own choices

These points are not fixed by the architecture it follows:

* **Where the substitute character comes from.** The on-chip string copy
  (`lsbwt_str_mem`) supplies it.
* **Group boundary bits.** The rule that comparisons stay inside a group is
  implemented with per-CU boundary bits.
* **Running-OR enable register.** It is kept inside the enable multiplexer
  and restarts at each group start.
* **Stop after the round with x = n-1.** This handles strings with identical
  rotations.
* **Fixed string length.** The string length is fixed at N. Shorter strings
  need a smaller build, because empty CUs are all `MAX_VALUE` and would look
  tied.
* **Interfaces and timing.** The stream interfaces, internal index
  generation, phase encoding, synchronous reset and the extra data bit for
  `MAX_VALUE` are this design's.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog. From the repository root:

    verilator --binary --timing --assert -Irtl -Itb -y rtl \
      rtl/lsbwt_pkg.sv tb/lsbwt_ref_pkg.sv tb/tb_lsbwt_top.sv \
      --top-module tb_lsbwt_top -o sim && ./obj_dir/sim

Replace `tb_lsbwt_top` with any other testbench in `tb/`. The testbenches
are:

* **`tb_lsbwt_top`** (N = 16). It runs ten text strings, one string with 15
  equal characters, one with all characters distinct, a periodic string, a
  stream with input gaps and a string using the extreme character codes, fed
  back to back. It also counts each mechanism: insertion with shift, group
  start, group continuation, in-group shift, `MAX_VALUE` load, several groups
  in one round, a clean stop, a stop at the counter limit, and `round_done`
  held.
* **`tb_lsbwt_full`** (defaults, N = 128). It runs the 127-of-128 worst
  case, two 128-character word-list strings, two English sentences and a
  random four-letter string. It takes a few seconds.
* **`tb_lsbwt_example`** (N = 7). It runs the `TASGASC` example.
* **One unit testbench per module.**

The end-to-end testbenches check every string against a reference model in
`tb/lsbwt_ref_pkg.sv`, which works on the string alone:

* the ids form a permutation;
* successive rows are in non-decreasing rotation order;
* the prefix and the BWT character are right;
* the primary row is right;
* with continuous input, the cycle count equals the budget above. The model
  computes m_i as the number of rotations whose first i characters are shared
  with another rotation.

## Trust and limits

* All testbenches pass under Verilator 5 with `--assert`. The RTL also
  elaborates in Yosys with the slang front end, and shows no latches or
  combinational loops.
* No timing or FPGA resource figures are claimed for this RTL.
* The 128-character word-list strings have long repeats, so they need more
  iterations (12–13) than ordinary English text.
