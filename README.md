# Multi-character brute-force string matcher with alignment elements

This is a hardware string matcher for deep packet inspection. It compares a
byte stream against a fixed set of patterns at **n characters per clock** (n is
the *process width*). Every pattern is built directly into comparator logic
(brute force), and all patterns are checked in parallel.

A straightforward multi-character matcher has to find a pattern at any of the n
offsets inside each window. That costs n×n comparators per n-character piece of
a pattern. This design uses only **n comparators per piece**. It looks only for
occurrences that start exactly at a window boundary. A small
**alignment element** in front of each pattern spots occurrences that start
inside the window. It then moves that pattern's input pointer forward by less
than n, so that the candidate starts the next window. Realignment costs one
extra clock, and only when a window ends with the beginning of a pattern. In
real traffic that is rare, so the throughput stays close to n characters per
clock.

## How one pattern is matched

A pattern of `L` characters is cut into `ceil(L/n)` substrings of n characters.
The last substring may be shorter. Each substring becomes one
**process element (PE)**:

```
           window (n chars, shared by all PEs of the pattern)
             |            |            |
        +---------+  +---------+  +---------+
  1 --->|  PE 0   |->|  PE 1   |->|  PE 2   |---> match
        | "/et"   |  | "c/p"   |  | "ass"...|
        +---------+  +---------+  +---------+
            hit registered from step t feeds the next PE at step t+1
```

* Each step, PE j compares the whole window with its substring, one comparator
  per character. It ANDs the result with the `enable`/`match` it received from
  PE j-1 in the previous step. PE 0 always gets `1`.
* The result (`hit`) is registered. It becomes PE j+1's `enable` and `match` for
  the next step. So an occurrence is followed down the chain, n characters per
  step.
* A hit in the last PE is a match of the whole pattern. In a short last PE, the
  unused positions are simply not compared.

Example with n = 3 and pattern `abc`. The window can relate to the pattern in
three ways:

| window | what happens                                        | pointer moves |
|--------|-----------------------------------------------------|---------------|
| `abc`  | PE 0 hits; the occurrence is aligned                 | 3             |
| `*ab`  | the suffix `ab` equals the prefix `ab`: realign      | 1             |
| `**a`  | the suffix `a` equals the prefix `a`: realign        | 2             |

In the last two cases the next window starts with `abc`, and PE 0 finds it.

## Alignment element and shift encoder

These two blocks are the least obvious part of the design.

**Alignment element** (`alignment_element`): for every suffix length `l` in
`1..n-1`, it checks whether the last `l` window characters equal the first `l`
characters of the pattern. That takes `1+2+…+(n-1) = n(n-1)/2` comparators, and
there is one alignment element per pattern, not per PE.

**Shift encoder** (`shift_encoder`): its output `code` is the length of the
longest matching suffix, or 0. The input pointer then moves `n - code`
characters:

| code (n = 3) | meaning                         | move |
|--------------|---------------------------------|------|
| `00`         | nothing partial, or a PE hit    | 3    |
| `01`         | 1-character suffix matched      | 2    |
| `10`         | 2-character suffix matched      | 1    |
| `11`         | never produced                  | (2)  |

Three rules matter:

1. **A PE hit blocks realignment.** If any PE of the chain hit in this step, the
   pointer must move exactly n. The registered enables expect the next window
   to continue the current one.
2. **The longest suffix wins.** A pattern that starts with a repeated character
   (`aaab`) can match several suffix lengths at once (`*aa` and `**a`). The
   longer suffix is the earlier candidate. Moving further would skip it.
3. **Patterns shorter than n** are handled by treating prefix positions
   beyond the pattern's end as don't-care. An occurrence in the middle of a
   window is then realigned to the front.

**Known limitation: overlapping occurrences.** Realignment is blocked while a
chain is in progress, and the PEs compare at offset 0 only. So an occurrence
that overlaps a partial occurrence started earlier can be missed. Take pattern
`aaab` and input `aaaab` that starts at a window boundary:

* window `aaa` hits PE 0, which blocks realignment;
* the next window `ab…` fails PE 1;
* the occurrence that starts one character later is lost.

Occurrences that do not overlap another partial match are always found. The
end-to-end testbench checks this on copies of each pattern separated by filler.
A reference model written in the testbench reproduces the lossy cases exactly.

## Throughput

Without partial matches, every engine consumes n characters per clock and the
input is never stalled. Each realignment adds one step in which only `n - code`
characters are consumed. Suppose a fraction m of windows hold a pattern start,
and its offset is uniform. Then the rate is about
`(1-m)·n + m·(n+1)/2` characters per step. `tb_throughput` measured these rates
at n = 3 with pattern `abc`:

| share of windows with a pattern start | chars/step | estimate |
|---------------------------------------|-----------:|---------:|
| 0.02 %                                | 3.000      | 3.000    |
| 0.9 %                                 | 2.992      | 2.991    |
| 4.6 %                                 | 2.954      | 2.954    |
| 9.7 %                                 | 2.908      | 2.903    |
| 33.6 %                                | 2.698      | 2.664    |

## Stream interface and timing (`string_matcher`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | transfer of n characters when both are high |
| `in_data` | in | n×8 | `in_data[0]` is the earliest character |
| `match[p]` | out | 1 each | one-clock pulse: pattern p ended at `match_end[p]` |
| `match_end[p]` | out | 32 each | absolute stream position (byte index from reset, modulo 2^32) of pattern p's last character |
| `aligned[p]`, `stepped[p]` | out | 1 each | engine p realigned / processed a window this clock (performance counters) |

* Each pattern has its own engine (`pattern_engine`), with its own input buffer
  and pointer (`input_window`, 16 characters by default). Realignment makes
  engines consume the stream at different rates.
* A transfer is accepted only when every engine has room for n more
  characters. An engine that realigns often can therefore briefly stall the
  input (`in_ready` low).
* A transfer is visible to the engines one clock after acceptance. Each engine
  does one step per clock while it holds at least n characters. `match` follows
  one clock after the step that completed the pattern.
* Matching is continuous across transfers. There is no packet boundary. At the
  end of a stream, characters that never fill a complete window are not
  examined; append n filler characters to flush.

## Parameters (`string_matcher`)

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 3 | process width: characters per clock and comparators per PE |
| `NUM_PATTERNS` | 4 | number of patterns (engines) |
| `MAX_LEN` | 16 | longest pattern, in bytes |
| `PATTERNS` | `'{"abc", "cmd.exe", "/etc/passwd", "aaab"}` | string literals, right-aligned in `8*MAX_LEN` bits |
| `PAT_LENS` | `'{3, 7, 11, 4}` | length of each pattern |
| `DEPTH` | 16 | per-engine buffer, power of two, at least 2n |

`abc` is the worked example of the scheme. The other patterns are
illustrative. `aaab` is there because it exercises tied suffixes and blocked
realignment. A real rule set is compiled offline into `PATTERNS`/`PAT_LENS`.
Lengths must be given explicitly, which also allows NUL bytes in a pattern.

**Comparator cost.** For a pattern of length L, the engine uses n comparators
per PE plus n(n-1)/2 in its alignment element. An n² design uses n² per PE.
The default build has 10 PEs: 1 for `abc`, 3 for `cmd.exe`, 4 for
`/etc/passwd` and 2 for `aaab`. Published counts for the Snort 2.6 rule sets
run from 405 PEs (`sql`) to 50 692 PEs (all rules) at n = 3. Those sets need
`NUM_PATTERNS` in the hundreds to thousands, which means a generated parameter
list.

## Files

| file | role |
|------|------|
| `rtl/match_pkg.sv` | character and position types, PE-count helpers |
| `rtl/process_element.sv` | one PE: n comparators, AND with enable/match, output register |
| `rtl/alignment_element.sv` | suffix/prefix comparators, n(n-1)/2 of them |
| `rtl/shift_encoder.sv` | longest-suffix priority encoder, blocked by PE hits |
| `rtl/input_window.sv` | circular input buffer, input pointer, shift mux and adder |
| `rtl/pattern_engine.sv` | one pattern: window + alignment element + PE chain + encoder |
| `rtl/string_matcher.sv` | top: one engine per pattern on a shared stream |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_throughput` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and exits:

```
verilator --binary --timing --assert -Irtl rtl/match_pkg.sv tb/tb_string_matcher.sv \
          --top-module tb_string_matcher -Mdir obj -o sim
./obj/sim
```

The same command works for `tb_process_element`, `tb_alignment_element`,
`tb_shift_encoder`, `tb_input_window`, `tb_pattern_engine` and `tb_throughput`.
Verilator finds the other modules in `rtl/` by name through `-Irtl`; add
`-y rtl` if your version needs it.

* `tb_string_matcher` runs the top at its default parameters on 4200
  characters. A reference model in the testbench predicts every match, every
  step and every realignment. The testbench also checks:
  * every match is a real occurrence;
  * every planted copy is found;
  * a filler prefix runs at n characters per clock;
  * each mechanism occurs at least once: realignment by 1 and by 2, a tie,
    blocked realignment, a multi-PE match, a short last PE, and
    back-pressure.
* `tb_pattern_engine` runs n = 4 with the two-PE pattern `abababc` on
  random text.
* `tb_throughput` produces the table above.

## Design choices beyond the published scheme

These parts come from the published architecture:

* the PE with n comparators and the enable/match chain;
* the alignment element's suffix/prefix comparators and their count;
* a shift encoder that moves the pointer by 2 for `**a`, by 1 for `*ab` and
  by 3 otherwise;
* PE count `ceil(L/n)`.

These are this implementation's own choices:

* 8-bit characters;
* per-engine buffers with ready/valid back-pressure;
* longest-suffix priority;
* "any PE hit in the chain blocks realignment" applied to the whole chain;
* don't-care handling for a short last PE and for patterns shorter than n;
* 32-bit match positions and the one-clock match latency;
* asynchronous reset;
* the default pattern set.

The shift encoder's mux table for n = 3 (`10→1`, `01→2`, `00→3`, `11→2`) is
kept. Its codes are read as the binary length of the matched suffix, which is
consistent with the published shift amounts.

Two further departures concern how blocks are built, not what they compute:

* The shift encoder is a priority encoder that works for any n. It does not
  reproduce the fixed AND/OR network drawn for n = 3.
* The `enable` signal between PEs is ANDed into the hit like `match`. It does
  not gate the comparators to save power, so power is not modelled.
