# Hybrid-prefix run-length test data decompressor

Scan test sets for large chips are mostly bits that the test generator left
unspecified. Once those bits are filled with 0, a test set consists of long
runs of equal bits. This design stores the test set on the tester as
run-length codewords. A small on-chip decoder expands them back into scan
data. Far fewer bits cross the tester-to-chip link, and the core under test
is left unchanged.

The code is a *hybrid prefix code*. Like the FDR (frequency-directed
run-length) code, it sorts run lengths into groups of growing size. Each
codeword is a group prefix followed by a tail that selects the member of the
group. Unlike FDR, every group from the third on has two prefixes, one made
of 1s and one made of 0s. Each prefix covers half of the group's range, so
long runs get shorter codewords. The price is a longer codeword for a run of
length 1. The intended use is with a test set regenerated to avoid such
runs; that step happens offline and is not part of this RTL.

## The codes

A *run* of length L of bit b is L copies of b followed by one copy of ~b,
which ends the run. Three variants ("solutions") are supported.

**Solutions 1 and 2: codeword table**

| group | prefix | tail bits | run lengths | example |
|---|---|---|---|---|
| A1 | `0` | 1 (always `1`) | 0 | `01` → 0 |
| A2 | `10` | 2 | 1 – 4 | `1011` → 4 |
| Ak, prefix1 (k ≥ 3) | `1`^(k-1) `0` | k | 2^(k+1)−11 … 3·2^k−12 | `110000` → 5 |
| Ak, prefix2 (k ≥ 3) | `0`^(k-1) `1` | k | 3·2^k−11 … 2^(k+2)−12 | `001111` → 20 |

The run length is the group's first value plus the tail, read as an
unsigned number with the MSB first. Group A1 exists only as `01`, because
`00…` starts a prefix2. This is why run length 1 costs four bits here,
against two in FDR.

First values of the groups:

| group | prefix1 | prefix2 |
|---|---|---|
| A3 | 5 | 13 |
| A4 | 21 | 37 |
| A5 | 53 | 85 |
| A6 | 117 | 181 |
| A7 | 245 | 373 |

* **Solution 2** codes runs of 0s only, so every run ends with a 1.
* **Solution 1** codes alternating runs. After reset the first run is a run
  of 0s ended by a 1. The next is a run of 1s ended by a 0, and so on.

**Solution 3.** Here the first bit of each codeword gives its run type. The
prefix `1`^(k-1) `0` codes a run of 1s, and `0`^(k-1) `1` codes a run of 0s.
Group k ≥ 2 has a k-bit tail and covers run lengths 2^k−3 … 2^(k+1)−4. For
example, `1000` is one 1 followed by a 0, and `0111` is four 0s followed by
a 1. Run length 0 is never needed in this code: every run starts with its
own bit, so L ≥ 1.

## How the decoder works

`hpc_decoder` is built from five parts.

| part | module | role |
|---|---|---|
| controller | `hpc_fsm` | parses codewords and sequences everything |
| group counter | `hpc_group_counter` | log2(k)-bit up/down counter |
| mapping logic | `hpc_prefix_map` | group index and prefix type → first run length of the group |
| base counter | `hpc_run_counter` | width K_MAX+2; counts out the mapped value |
| tail counter | `hpc_run_counter` | width K_MAX; the tail is shifted in and counted out |
| polarity unit | `hpc_alt_unit` | run-type flip-flop, XORed onto the controller output |

The controller always produces runs as 0s followed by a 1. The polarity
unit turns that into real data:

* in solution 1 its flip-flop toggles after each end bit;
* in solution 3 it loads the first bit of each codeword;
* in solution 2 it is bypassed.

Each codeword goes through the controller states in this order:

```
S_FIRST --1--> S_PREFIX (count bits equal to the first one, in the group counter)
   |                 | first differing bit: k = prefix length
   0                 v
   v              S_MAP       load base counter from mapping logic, clear tail
S_ZERO1 --0--> S_PREFIX       (solutions 1/2; solution 3 always goes to S_PREFIX)
   |1                v
   v              S_BASE_OUT  emit one run bit per cycle, base counter counts down
S_TERM (run 0)       v
   |              S_TAIL_IN   shift k tail bits in, group counter counts down to 0
   |                 v
   |              S_TAIL_OUT  emit one run bit per cycle, tail counter counts down;
   v                          when it is zero emit the end bit
S_FIRST <------------+
```

Part of the run is emitted before the tail has even been read. The mapped
first value of the group is counted out first. Then the tail is read and
counted out, and the end bit follows. The decoder therefore never adds the
two values. This is also why the two counters can be simple down counters.

### Timing

The decoder either reads one compressed bit or writes one decoded bit per
cycle, never both. With the tester never stalling:

* a group-k codeword for run length L takes **2k + L + 2 cycles**, namely k
  prefix bits, 1 map cycle, L output bits, k tail bits and 1 end bit;
* `01` takes **3 cycles**.

The decoded stream leaves at one bit per cycle while output is being
produced. The testbenches check these counts exactly.

### Interface (`hpc_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `solution` | in | 2 (`hpc_pkg::solution_e`) | 1, 2 or 3 selects the code; 0 acts as 2 |
| `en` | in | 1 | the tester presents a compressed bit on `bit_in` |
| `bit_in` | in | 1 | compressed bit |
| `bit_ready` | out | 1 | the bit is consumed on a clock edge when `en && bit_ready` |
| `scan_out` | out | 1 | decoded scan bit |
| `v` | out | 1 | `scan_out` is valid; the scan chain must take it (no back-pressure) |

Rules for using it:

* Change `solution` only while the decoder is idle.
* Reset before a solution 1 stream, so that its first run is a run of 0s.
* After the last codeword, the decoder has emitted the end bit of the last
  run. That bit may lie one bit beyond the test set and can be ignored.

### Parameters

* `K_MAX` (default 17) is the largest group. Runs reach 2^(K_MAX+2)−12 =
  524276 in solutions 1/2 and 2^(K_MAX+1)−4 = 262140 in solution 3. 17 is
  the smallest value for which both cover any run inside a 199104-bit test
  set, the largest of the six benchmark test sets below. The counter widths
  follow from it: group counter ⌈log2(K_MAX+1)⌉, base counter K_MAX+2, tail
  counter K_MAX.
* `HAS_ALT` (default 1) keeps the polarity unit. With 0 it is removed, and
  the decoder handles solution 2 only, which makes it the smallest variant.

At the defaults the decoder synthesises to about a hundred word-level cells
and 51 flip-flops.

## What this design chose where the description is silent or ambiguous

* **Tester handshake.** The handshake is `en`/`bit_ready`. The original
  decoder has only an enable input.
* **Loading the mapped value.** It is loaded in parallel in a separate
  one-cycle map state; it is not shifted in.
* **Base counter width.** It is K_MAX+2 bits. A "(k+1)-bit" counter is not
  wide enough for the prefix2 values, for example 13 = `1101` for group A3.
* **Solution 3 in the same datapath.** Solution 3 is decoded by the same
  datapath with two changes:
  * a different mapping, 2^k−3;
  * a polarity flip-flop that is loaded instead of toggled.

  A separate solution-3 decoder is not described.
* **Run convention for solution 1.** A run of 1s ends with a 0, and the runs
  start with 0s after reset.
* **Mapping logic.** It is arithmetic (2^(k+1)−11, 3·2^k−11, 2^k−3), not a
  table, so it covers every group up to K_MAX. Group A2 maps to 1.
* **Malformed streams.** Nothing detects a prefix longer than K_MAX.
  Assertions in `hpc_decoder` flag it in simulation.

## Not included

* Test-set regeneration, which decomposes vectors so as to avoid runs of
  length 1, and the run-length encoder. Both are offline software. The
  testbenches contain a reference encoder written from the code tables
  above.
* The tester and the core's scan chains. These are external, and the
  testbenches play their parts.

## Files

`rtl/`:

* `hpc_pkg.sv`: the `solution_e` and state types and `K_MAX_DEFAULT`.
* `hpc_decoder.sv`: the top level.
* `hpc_fsm.sv`, `hpc_group_counter.sv`, `hpc_run_counter.sv`,
  `hpc_prefix_map.sv`, `hpc_alt_unit.sv`: its parts.

`tb/`: every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_hpc_decoder` | End to end at default parameters, all three solutions. Random runs with tester stalls, plus the longest run of group K_MAX for each code. Exact cycle counts without stalls. It also counts each mechanism (A1, A2, prefix1, prefix2, zero tail, largest group, runs of 1s, stalls, solution switches) and fails if one never occurs. |
| `tb_hpc_decoder_sol2` | The reduced variant (`HAS_ALT=0`, `K_MAX=6`). |
| `tb_hpc_workload` | Synthetic test sets of the six benchmark sizes, 23754 to 199104 bits, decoded bit-exact in all three solutions. Prints T_E, the compression ratio and the cycle count. The data is synthetic, so these ratios say nothing about the published ones. |
| `tb_hpc_fsm` | The controller alone with modelled counters. Directed and random codewords, output bits, cycle counts and polarity strobes. |
| `tb_hpc_prefix_map`, `tb_hpc_group_counter`, `tb_hpc_run_counter`, `tb_hpc_alt_unit` | Unit tests against software models. The group start values are derived by counting group sizes, independently of the formulas. |

To simulate, for example the end-to-end test:

```
verilator --binary --timing --assert --top-module tb_hpc_decoder \
  rtl/hpc_pkg.sv rtl/hpc_group_counter.sv rtl/hpc_run_counter.sv \
  rtl/hpc_prefix_map.sv rtl/hpc_alt_unit.sv rtl/hpc_fsm.sv rtl/hpc_decoder.sv \
  tb/tb_hpc_decoder.sv
./obj_dir/Vtb_hpc_decoder
```

Each of these runs in a few seconds.
