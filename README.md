# Streaming bitonic sorters with in-place permutation memories

This RTL sorts a stream of keys in fixed-size sequences of N keys. The keys arrive p per
clock cycle. It is a folded bitonic sorting network. Each comparison stage works on p keys
per cycle. Between two stages, the key order is changed by a *streaming permutation network*
(SPN). An SPN reorders the keys in two ways: across the p lanes (space) and across cycles
(time). Reordering in time needs memory. The main point of the design is that this memory
is **single-port** and **one sequence deep**. Each cycle it reads a word and writes the new
key into the same word. An address generator changes the address pattern from one sequence
to the next, so the memory works in place. The usual method needs twice the memory and
separate read and write ports.

The RTL follows the architecture published as *"Energy and Memory Efficient Mapping of
Bitonic Sorting on FPGA"*. That publication gives the block structure, the memory rules and
the complexity figures. The stream layout, the way keys are assigned to memory banks, the
control and the interfaces are this implementation's own. Each is marked below.

There are two architectures. The top, `bitonic_sorters`, holds both side by side, each with
its own ports:

| | high-throughput (`bitonic_sorter_ht`) | resource-efficient (`bitonic_sorter_re`) |
|---|---|---|
| comparison stages | log N (log N + 1)/2, each with p/2 CAS units | one stage of p/2 CAS units, reused |
| permutation networks | one fixed SPN after each stage (none after the last) | one programmable SPN, fed back |
| memory | single-port, in place, 98 184 key words at N = 16384, p = 4 (about 6N) | dual-port, two buffers of N keys |
| throughput | p keys every cycle, sequences back to back | one sequence per N/p + S (N/p + 2) cycles |
| latency, first key in to first key out (defaults) | 24 845 cycles (6N/p = 24 576) | 430 290 cycles |

Defaults: N = 16384 (`N_BITS = 14`), p = 4 (`LANE_BITS = 2`), 32-bit unsigned keys (`W`).
Results come out in ascending order.

## Stage order and stream layout

A key's *index* x is its place in the sequence (n = log2 N bits). Its *stream position* is
y = {cycle, lane}: the low log2 p bits are the lane, the rest is the cycle within the
sequence. At the input and the output, y = x (natural order). Key c·p + l travels on lane
l in the c-th cycle of the sequence.

The comparison stages follow the standard bitonic sort. There are merge phases i = 1 … n.
In phase i the stage compares index bit j, with j = i−1 down to 0. Two keys are partners
when their indices differ only in bit j. A pair is put in descending order when index bit i
is 1, and in ascending order otherwise. Bit n is always 0, so the last phase is all
ascending. That gives S = n(n+1)/2 stages: 105 at N = 16384.

The CAS units only compare lanes 2k and 2k+1 of one cycle. So the stage that compares bit
j receives the keys in **layout L_j**: y equals x with bits 0 and j exchanged. The partner
bit is then the lowest lane bit. Bit i (i > j) is the same in x and y, so a pair's
direction comes straight from the stream position. It is a lane bit when i < log2 p, and a
bit of the cycle counter otherwise (`cas_stage`). L_0 is the natural order, so the last
stage's output needs no further reordering.

The permutation from stage s to stage s+1 is therefore a **bit permutation** of the stream
position: exchange bits 0 and j(s), then bits 0 and j(s+1). It moves at most three bits.
Bits above the highest moved bit M stay where they are. So the SPN works on independent
blocks of 2^(M+1) keys, which take T = 2^(M+1)/p cycles. Adding up these block sizes over
all stages gives about 6N key words and about 6N/p cycles of latency, which matches the
published 6N + o(N) memory and 6N/p + o(N/p) latency. The published design uses stride
permutations instead of these exchanges. Its block sizes are the same.

## The streaming permutation network (`spn`)

The SPN has three stages, folded from a Clos network:

1. **stage 0**: a p-to-p lane connection (`spn_xbar`). The key on lane l goes to memory
   bank l xor G(cycle).
2. **stage 1**: p single-port banks (`sp_ram`) of T words. They do the permutation in
   time.
3. **stage 2**: a p-to-p connection. Output lane l' takes the bank that holds the key for
   position {cycle, l'}.

If the permutation moves only lane bits (M < log2 p), the SPN is just fixed wiring plus a
register, with no memory.

**Bank rule.** Sometimes the permutation moves a lane bit a into the cycle index and a cycle
bit c into the lane index. At most one such pair exists here. In that case G(cycle) has only
bit a set, and its value is cycle bit c. So bank = lane xor (y[c] on bit a). The p keys of
one input cycle share y[c], so they reach p different banks. The p keys wanted in one output
cycle differ in y[c] exactly where their bank bit a would otherwise collide. So they also
sit in p different banks. No bank ever sees two accesses in one cycle. This rule is specific
to the bit permutations this sorter needs. The published network routes any permutation
through the same three stages, using a general routing algorithm.

**In-place addressing (`spn_agu`).** Let R_β(k') be the input cycle of the key that bank β
must return in output cycle k'. With one address port, the bank reads A_i[k] in cycle k of
sequence i and writes the new key to the same word. Correctness then needs

    A_{i+1}[k] = A_i[R(k)],   A_0[k] = k.

This is the published recurrence A_i = P·A_{i−1}. For these permutations R_β(k) = Q(k) xor
(β[a] ? e_c : 0), where Q only moves the bits of k. So every address sequence has the form

    A_i[k] = Q^i(k) xor (β[a] ? w_i : 0)

The AGU keeps Q^i as a table of D entries: bit x of the address is bit tab[x] of k. It
also keeps one D-bit offset w_i. Both are updated once per sequence, after the cycle with
k = T−1:

- tab ← QSRC[tab]
- w ← w xor (bit x set where tab[x] = c)

The state is O(D log D) bits and is shared by all banks. After a bounded number of sequences
the state comes back to the identity. The test benches count these returns. The reset value
of the table is the identity. The published unit takes each sequence's first address A_i[0]
from a ROM and steps through the rest with sequential logic; here every address comes from
the table and the offset.

**Timing.** A block that enters in cycles t … t+T−1 leaves in cycles t+T+2 … t+2T+1, with
no gap between blocks. The two extra cycles are the RAM read register and the output
register. A valid bit is stored with each key. The output valid is held low until the banks
hold one complete block written after reset. Each lane carries W+1 bits inside the SPN.

## High-throughput sorter (`bitonic_sorter_ht`)

The sorter is a chain of S `cas_stage`s with an `spn` after every stage but the last. The
whole pipeline advances every cycle. There is no back-pressure.

The control unit (`bitonic_ctrl`) has one free-running counter, modulo N/p. It gives each
stage the position of the keys at that stage's input: the counter minus the fixed latency
to that stage. Every direction, lane connection and address is derived from that. The
published design shows a central control unit; what it sends is this design's choice.

The interface is also this design's choice:

- `in_sob` is high in the first cycle of every N/p-cycle input slot.
- A sequence starts in such a cycle and keeps `in_valid` high for N/p cycles. An assertion
  checks this.
- Slots may follow each other directly, or be left idle.
- Each sorted sequence leaves exactly `sorter_latency(N_BITS, LANE_BITS)` cycles after it
  entered, with `out_sob` on its first cycle. The function is in `bitonic_pkg`.

Stage latencies: a CAS stage takes 1 cycle. A wiring-only SPN takes 1 cycle. A memory SPN
takes T+2 cycles.

## Resource-efficient sorter (`bitonic_sorter_re`)

This sorter has one comparison stage (p/2 `cas_unit`s) and one programmable network
(`prog_spn`). The network's output feeds the comparison stage again. The `re_ctrl` state
machine runs one sequence at a time:

- **LOAD**: N/p accepted input cycles (`in_ready` and `in_valid`) go into buffer 0 in
  natural order.
- **PASS s** (s = 0 … S−1): one buffer is read through the network's read side. The read
  side is programmed with (j(s−1), j(s)), which turns the data into layout L_j(s). The data
  goes through the comparison stage with phase i(s). Two cycles after each read, the result
  is written into the other buffer. The write side is already routed for (j(s), j(s+1)). In
  the last pass the result goes to the output instead.
- **DRAIN**: 2 cycles, so that a pass has finished writing before the next one reads.

The network applies the same bank rule as the fixed SPN, but evaluated at run time from
(jf, jt). Each bank is a simple dual-port RAM (`dp_ram`) of 2N/p words, one half per
buffer. Across all passes, 2 log N − 1 distinct programs are used, counting the load's
identity. A new sequence is accepted only after the previous one has left.

## Files

`rtl/` (one module or package per file):

- `bitonic_pkg`: stage list, bit permutations, latency and memory functions (elaboration
  time only)
- `bitonic_sorters`: top with both sorters
- `bitonic_sorter_ht`, `cas_stage`, `cas_unit`, `spn`, `spn_xbar`, `sp_ram`, `spn_agu`,
  `bitonic_ctrl`: the high-throughput sorter
- `bitonic_sorter_re`, `prog_spn`, `dp_ram`, `re_ctrl`: the resource-efficient sorter

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, plus
`tb_bitonic_sorters_full.sv`. The full test runs both sorters at the default parameters:
three sequences each, checked key by key against a reference sort, plus latency and rate.
Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

Simulate with Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/bitonic_pkg.sv \
        tb/tb_bitonic_sorters.sv --top-module tb_bitonic_sorters -o sim
    ./obj_dir/sim

Replace the testbench name to run any other. The full-size test takes about one minute to
build and under one minute to run. `tb_workloads.sv` (with its helper `sort_run.sv`) builds
the top four more times, all with p = 4: N = 16 with 8-bit keys, N = 1024 with 16-bit keys,
N = 4096 with 32-bit keys and N = 16384 with 64-bit keys. It checks every key from both
sorters and the high-throughput latency. It takes about four minutes to build and half a
minute to run. The end-to-end testbenches use N = 64, p = 4. To change
their size, edit `NB` (log2 N), `LB` (log2 p) and `W` at their top. The sorter has also been
simulated at N = 16, 32, 128, 256 and 1024 with p = 2, 4 and 8.

## Sizes and limits

- N and p are powers of two, with 2 ≤ p < N, and they are fixed when the design is built. A
  shorter sequence must be padded with all-ones keys.
- At the defaults, the high-throughput sorter's networks hold 98 184 words of 33 bits (key
  plus valid), about 3.2 Mbit. At 250 MHz, which is the clock reported for the published
  implementation, p = 4 and 32-bit keys give 32 Gbit/s. This RTL has not been through FPGA
  implementation, so the clock rate is not verified.
- Keys are unsigned. Equal keys are not swapped. The sorter is not stable in the sense of
  keeping attached payloads in order, since it moves keys only.
- Memory contents are not reset. Outputs stay invalid until real data has passed through.
- The resource-efficient sorter does not overlap loading, sorting and unloading of
  different sequences.

## Where this design departs from the published one

- **Permutations.** The published sorter connects its stages with stride permutations. This
  design exchanges index bits instead (see the stream layout). Both give the same block sizes,
  the same 6N memory and the same 6N/p latency.
- **Bank size.** The published network uses p banks of N/p words for every permutation. Here
  each bank holds one block, T = 2^(M+1)/p words, which is smaller for the early stages. The
  total is still about 6N keys.
- **Routing.** The published network can realise any permutation, with control bits and
  addresses found by a general routing algorithm. Here the lane connections and addresses
  are worked out in closed form, and only for the bit permutations the sorter needs. No
  routing algorithm for arbitrary permutations is included.
- **Address generator.** The published unit reads the first address of each sequence from
  a ROM and applies the permutation matrix once per sequence. Here the same recurrence is
  kept as a small bit table and an offset, reset to the identity, and no ROM is needed.
- **Program count.** The published resource-efficient design is described with 2 log N
  distinct permutation patterns. This design needs 2 log N − 1, counting the identity used
  while loading.
- **Not included.** The sorting platform around the sorter (the data memory that holds the
  input sequences and feeds them in) and the dual-port baseline used for comparison.

