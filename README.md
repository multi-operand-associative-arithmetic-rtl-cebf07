# Partitioned associative processor for multi-operand arithmetic

This is RTL for a processor built from fully parallel associative
(content-addressable) memories. It does arithmetic bit-serially but
word-parallel: one memory cycle compares or writes a chosen set of bit
columns in every selected word at once. The addition of a number into a
thousand words therefore costs the same as adding it into one.

The key idea is the *partition flag field*. Every word of the main memory
carries F flag bits, and flag f marks the word as a member of data set f. A
second, small associative memory, the *operand memory*, holds F operands. Its
compare result, one tag per operand, is routed into the flag part of the
main-memory mask. So in one main-memory cycle each of the F operands acts on
its own set of words. This is "multi-operand" processing. It speeds up plain
arithmetic too. A multiplier is handled b bits at a time: the main memory is
partitioned into 2^b sets by the value of the current b-bit group, and the
matching multiple of the multiplicand is added into each set in one pass.

The largest application built here is convolution. Two 1024-element vectors
of 16-bit values are convolved in 1.21 million memory cycles, about 60 ms at
a 50 ns cycle. That is the figure the method's authors give for this
configuration.

The design follows the method *Multi-Operand Associative Arithmetic*. The
memory model, the step sequences of every algorithm and the convolution
procedure come from that method. The following are this design's own:
the control unit's command format and handshakes, word input and output by
address, the streaming interfaces, the subtraction truth table, and the
two-field partition. The section "Departures and limits" lists what differs.

## Files

| file | contents |
|---|---|
| `rtl/assoc_pkg.sv` | operation encodings, macro-command struct |
| `rtl/assoc_mem.sv` | associative memory: J words x K bits, c, m, t registers |
| `rtl/pap_ctrl.sv` | control unit: runs the bit-serial algorithms on both memories |
| `rtl/conv_seq.sv` | convolution sequencer: drives the control unit through a convolution |
| `rtl/pap_top.sv` | the processor: main memory, operand memory, control, sequencer, host port |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_pap_top_full` |

## The associative memory (`assoc_mem`)

The memory has a storage array `A` (J words of K bits), a comparand register
`c`, a mask register `m` and a tag register `t` with one bit per word. One
clock is one memory cycle. A cycle carries up to four operations, given as a
`prim_cmd_t`:

| field | choices | effect |
|---|---|---|
| `tag` | `TAG_SET` | t := all ONE (every word eligible) |
| | `TAG_SHIFT` | t_j := t_(j-1), t_0 := `tag_sin` (tags move one word "down") |
| | `TAG_SELECT` | t := one-hot(`sel`), for word I/O (added by this design) |
| `ldc`, `ldm` | `LD_ZERO`, `LD_ONE`, `LD_IN` | load c or m with all ZERO, all ONE, or the input bus `i` |
| `maj` | `MAJ_COMPARE` | t_j := t_j AND (word j equals c in every bit where m is ONE) |
| | `MAJ_WRITE` | in every tagged word, bits where m is ONE := c |
| | `MAJ_READ` | `o` := OR of all tagged words (valid the next cycle) |

The minor operations (tag, `ldc`, `ldm`) act first, and the major operation
sees their results. So "load c, SETAG, COMPARE" in one cycle compares all
words against the new comparand. There is only one input bus. When c and m
are both loaded from it in one cycle, they receive the same value, as the
memory model requires.

Each word is its own generated row with its own write enable, match detector
and read gate. The array has no reset, because every algorithm first clears
the columns it uses. The `c`, `m`, `t` and `o` registers are reset.

## Partitioning and the control unit (`pap_ctrl`)

The main memory's top F bits (K-F..K-1) are the flag field. The control unit
builds the main-memory input bus itself, and in some steps it ORs the operand
memory's tag vector t' into bits K-F..K-1. That is the operation
`s(t', K-F, 0)`. Loading that value into `m` restricts a COMPARE to the flag
bits of the operands that t' selected.

The unit takes one macro command (`ctrl_cmd_t`) at a time on
`cmd_valid/cmd_ready` and runs it to completion. All bit positions are
operands of the command, so the same hardware serves every word format.

| command | what it does | memory cycles |
|---|---|---|
| `OP_PRIM` | one primitive cycle on A and on A' (`a_cmd`, `ap_cmd`, data, select addresses) | 1 |
| `OP_M2M` | many-to-many comparison: every word gets flag f set exactly when its `nbits`-bit field equals comparand f | 1 + 4 per bit |
| `OP_MADD` | multi-operand addition: the addend of set f is added into the field of every word of set f | 1 + 9 per bit |
| `OP_MSUB` | multi-operand subtraction (two's complement, borrow left in the carry column) | 1 + 9 per bit |
| `OP_CPROP` | carry propagation: the carry column is added into bits `a_pos..end_pos-1` | 4.5 per bit |
| `OP_SHIFT` | moves a field of every word one word down (word j-1 to word j) | 5 per bit |

`mem_halfcyc` counts the time actually executed. A step with a major
operation adds 2 and a step with only minor operations adds 1, because a
minor-only cycle needs only half the memory cycle time. The hardware still
spends one clock on every step, so the counter, not the clock count, gives
the memory time. One idle clock separates two macro commands, and it is not
counted.

### How the many-to-many comparison works

All flags are first set to ONE. Then, for each bit position k, the
comparands split into those with ONE and those with ZERO at k. The unit
compares the operand memory for ZERO at k, so t' marks the comparands with
ZERO. It then tags the main-memory words with ONE at k. Last, it writes ZERO
into the flags selected by t' in those words: a word with ONE cannot equal a
comparand with ZERO. The same is done with the roles swapped. The step
sequence is:

| step | main memory A | operand memory A' |
|---|---|---|
| 0 | c, m := flag field; SETAG; WRITE (flags := 1) | c' := 0; m' := bit 0; SETAG; COMPARE |
| 1 | c, m := bit k; SETAG; COMPARE (words with ONE) | |
| 2 | m := s(t'); WRITE (clear flags of ZERO-comparands) | c' := bit k; SETAG; COMPARE |
| 3 | c := 0; m := bit k; SETAG; COMPARE (words with ZERO) | |
| 4 | m := s(t'); WRITE (clear flags of ONE-comparands) | c' := 0; m' := bit k+1; SETAG; COMPARE |

With `nsplit` set, the first `nsplit` code bits come from field `a_pos` and
the rest from field `a_pos2`. That lets one code combine bit groups of two
different numbers, as the sum of products x·C + y·S needs.

### How the multi-operand addition works

A bit-serial add into an accumulator has four input cases that change
something. Each case is one COMPARE (on carry, current bit, mark and the
masked flags) followed by one WRITE of the new carry and bit. The order is
chosen so that no word a case rewrites is matched again by a later case:

| addend bit | carry, a in | carry, a out | order |
|---|---|---|---|
| 0 | 1, 0 | 0, 1 | 1 |
| 0 | 1, 1 | 1, 0 | 2 |
| 1 | 0, 1 | 1, 0 | 3 |
| 1 | 0, 0 | 0, 1 | 4 |

Cases 1 and 2 must reach only the sets whose addend has ZERO at this bit. So
the operand memory first compares its addends' current bit against ONE, and
the resulting t' is placed in the flag part of the mask. The COMPARE then
asks for ZERO in those flags, which excludes every set whose addend has ONE.
For cases 3 and 4, A' compares against ZERO instead. A word whose mark
column differs from `mark_val` never matches, so it is left alone. Every
marked word must carry exactly one flag.

Per bit there are 8 major steps and 2 steps holding only a comparand load
and SETAG. Those two count as half cycles, which gives 9 memory cycles per
bit. Subtraction uses the same ten steps with the cases of a − s − borrow:
for addend bit 0, (1,1)→(0,0) then (1,0)→(1,1); for addend bit 1,
(0,0)→(1,1) then (0,1)→(0,0).

Carry propagation (`OP_CPROP`) handles the two cases carry=1, a=0 and
carry=1, a=1 in the same way. The field shift (`OP_SHIFT`) works one bit
column at a time. It tags the words with ONE in the column, shifts the tags
one word down, and writes ONE together with a scratch mark. Then it writes
ZERO into every word without the mark. Word 0 receives ZERO.

## Convolution (`conv_seq`)

Main-memory word, K = 2^B + N + 2 + HPW = 76 bits at the defaults:

    | flags (2^B) | p (N) | MRK | TMP | hp (HPW = M + N + ceil(log2 P)) |
     75        60  59  44   43    42   41                              0

Operand-memory word (AW = M + 2B = 24 bits): `| f·h (M+B) | code f (B) |`.

The data vector p sits in words 0..P-1 with MRK = 1, and the words below
stay empty. The filter is applied one element at a time. Each element's
products are added into hp, and then p and MRK move one word down. After
element e, word k has accumulated h_e·p_(k−e). When every element is done,
word k holds sum_e h_e·p_(k−e), the convolution, in order.

| phase | action |
|---|---|
| 1 | clear A; write p_i into word i with MRK := 1; write code f into word f of A' |
| 2 | take h_e; write f·h_e into word f of A' (formed by repeated addition) |
| 3 | `OP_M2M` on p bits B·g..B·g+B−1 against the codes: each word joins the set of its current digit |
| 4 | `OP_MADD` of the multiple (M+B bits) into hp at bit B·g, marked words only, carry in TMP |
| 5 | `OP_CPROP` of TMP through hp bits B·(g+1)+M .. HPW−1 |
| 6 | next digit g while B·g < N |
| 7 | next element e; after the last, read words 0..2P−2 out on `y_*` |
| 8 | `OP_SHIFT` of p and MRK (N+1 bits) one word down; back to 2 |

Memory time per element at the defaults (N = M = 16, B = 4, P = 1024):
partition 4·(1+16) = 68, multi-add 4·(1+9·20) = 724, carry
4.5·(22+18+14+10) = 288, shift 5·17 = 85, and A' multiples 16.5. The total
is 1,212,859 cycles including I/O, or 60.6 ms at 50 ns.

## Top level (`pap_top`)

`pap_top` contains the main memory `u_a` (J x K), the operand memory `u_ap`
(F x AW), the control unit and the convolution sequencer. Its ports:

- `host_valid/host_ready/host_cmd/host_a_data/host_ap_data` take macro
  commands from outside, but only while no convolution runs (`host_ready`
  is low then). Through this port a host can run multi-operand addition,
  subtraction and multiplication, b-bit-at-a-time multiplication and limited
  sums of products, and can read and write words.
- `conv_start`, `conv_busy`, `conv_done` control a convolution.
- `p_*` carries V·P values in, vector by vector. `h_*` carries P values in,
  one per element. `y_*` carries V·(2P−1) values out, vector by vector. All
  three are valid/ready streams.
- `a_o`, `ap_o` are the read registers, `ap_t` the operand tags, and
  `mem_halfcyc` the memory-time counter.

Parameters, with their defaults: `P` = 1024, `V` = 1, `N` = 16, `M` = 16,
`B` = 4. `J` defaults to 2PV = 2048, and `HPW`, `F`, `K` and `AW` are derived
from these.

### Several data vectors at once

With `V` > 1, the sequencer places data vector v in words 2Pv .. 2Pv+2P−1.
The vector's p values take the first P words of that region, and the rest is
the gap its results grow into. Every compare, write and shift acts on all
words at once, so V vectors are convolved by the same filter in the time of
one. Each vector's p values move down by at most P−1 words, so they never
leave their region. Only loading and read-out take longer, by one cycle per
extra word.

Examples of host programs, all in `tb/tb_pap_top.sv`:

- Multi-operand multiplication (a different multiplicand per set): for each
  multiplier bit n, run `OP_MADD` with `mark_col` set to that bit and
  `mark_val` = 1. Then run a one-bit `OP_CPROP` at n+M.
- Vector-by-scalar multiplication B bits at a time: for each bit group, run
  `OP_M2M`, then `OP_MADD` of the multiples, then `OP_CPROP`.
- x·C + y·S: A' holds the four values 0, S, C and C+S. For each bit, run a
  two-field `OP_M2M` on {x bit, y bit}, then `OP_MADD`, then `OP_CPROP`.

## Departures and limits

- **hp field width.** This design keeps the full M+N+log2 P = 42-bit hp
  field, which makes the word 76 bits. The method also has a faster variant
  that shortens hp to 28 bits to fit 64-bit words, quoted at under 45 ms.
  How its computation is truncated is not specified, so that variant is not
  built.
- **One array, no chips.** The main memory is one array of J words.
  Splitting it into 16K-bit chips with tag chaining between them is not
  modelled. `tag_sin` is the hook for a chip chain and is tied to ZERO.
- **The 64K-word memory.** Several vectors are supported through `V`, but
  the default is one. A 64K-word main memory holds 32 vectors; that is
  `V = 32`, which was not simulated.
- **Cycle counts.** The partition phase costs 1+4B cycles per bit group
  here, 68 cycles per element at the defaults. The method's own estimate for that
  phase is N/b + 9N/2 = 76. The multi-add costs one cycle more per bit group
  than the estimate 9N(M+b)/b, because of its initial carry-clearing step.
  The other phases match the estimates exactly. Each step takes a full clock
  even when it is a half-cycle step.
- **Added by this design.** The subtraction truth table, the two-field
  partition, `TAG_SELECT`, the host port and the streams are this design's
  additions. The method names these operations or needs them, but does not
  specify them.
- **Partition on unmarked words.** The partition also flags words outside
  the marked vector. This is harmless, because the addition only touches
  marked words.
- **Host-level algorithms.** Multiplication, division and sums of products
  are programs of macro commands, not hardware sequencers. The
  multiplication example uses the general `OP_CPROP` for its one place of
  carry (4.5 cycles), where a dedicated step could take 2.5. Division and the
  "first iteration as a copy" speed-up are not provided.
- **Multiplication time.** A 60 x 60-bit vector-by-scalar multiply, run
  as a host program on a build with N = M = 60, takes 20955, 14185, 10800,
  8769 and 7415 memory cycles for b = 2, 3, 4, 5 and 6. The published estimate
  N(9M+1)/b + 27N/2 gives 17040, 11630, 8925, 7302 and 6220. The gap is the
  carry propagation after each bit group, which runs here as a separate pass
  at 4.5 cycles per bit. The b = 1 case (a plain conditional add) is not
  built.
- **Not modelled.** The transistor-level memory cell (a 12-transistor static
  NMOS design) is not modelled.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
after a fixed number of cycles if something hangs. Example:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/assoc_pkg.sv rtl/assoc_mem.sv rtl/pap_ctrl.sv rtl/conv_seq.sv rtl/pap_top.sv \
      tb/tb_pap_top.sv --top-module tb_pap_top -o sim && ./obj_dir/sim

| testbench | covers |
|---|---|
| `tb_assoc_mem` | 3000 random primitive cycles against a reference model; SELECT, SHIFTAG |
| `tb_pap_ctrl` | every macro command on random data; exact memory time of each |
| `tb_conv_seq` | convolution of 3 vectors at P=8, N=8, M=6, B=2 with stalls on all streams; exact memory time |
| `tb_pap_top` | small top: the host programs above, then a 2-vector convolution with back-pressure; checks that each mechanism ran |
| `tb_fig3_multiply` | 60 x 60-bit vector-by-scalar multiply at b = 2..6 bits per step, each on its own wide build; checks products and cycle counts and prints the times |
| `tb_pap_top_full` | default parameters: one 1024 x 1024 convolution, all 2047 results and the 60 ms time (about 15 s in Verilator) |

The results are checked against plain integer arithmetic computed in the
testbenches. The memory time is checked against the cycle formulas above.
