# Built-in self test for a multistage interconnection network

An N x N cube-type multistage interconnection network (MIN) is built from
log2 N stages of 2x2 switching elements (SEs). Every SE keeps state (which
input holds which output, which input is blocked). A test that exercises every
state transition of every SE needs a long, carefully ordered stream of packets
on all N inputs at once. Storing that stream costs N separate test memories.

This design generates the stream on chip instead. The packets for the N inputs
differ from one another in a regular way: the word for input v is an XOR
combination, fixed per clock, of a few base words selected by the bits of v.
A binary tree of N-1 small XOR nodes therefore expands one stored word per
tree level into all N input words. The memory shrinks from N streams to
log2 N + 1 streams. A second tree of the same shape produces the words the
fault-free network must deliver, and a comparator checks the real outputs
against them. The whole test runs in 142 clocks for the default 8 x 8 network
with 8-bit words.

The RTL follows the architecture and test procedure of the paper *Built-In
Self Test Architectures for Multistage Interconnection Networks*. Where the
paper gives only the function of a part, this design fills in the details.
Those choices are listed in [Where this design fills gaps](#where-this-design-fills-gaps).

## The network under test (`min_net`, `se`)

Links are numbered 0..N-1 at every stage, with n = log2 N. SE p of stage s
joins the two links whose indices differ only in bit k = n-1-s. The link with
bit k = 0 is the SE's upper input and output; the other is the lower one. Each
SE passes its links straight (same index) or crossed (index with bit k
flipped). Routing uses destination tags: stage s reads bit n-1-s of the
packet's header, 0 meaning the upper output. A packet with header d therefore
leaves on output d.

A packet is a run of clocks with `valid` high. Its first word is the header.
Two packets on one input need at least one idle clock between them. Each SE
adds one register stage, so the network latency is n clocks.

When both inputs want the same output, one of them is blocked. The rules are:

- A connection already in progress keeps its output.
- A blocked packet that is still waiting goes before a new request.
- On simultaneous new requests, the upper input wins.

A blocked packet's words are dropped while it waits. When its output frees up,
the SE sends one idle clock, then the stored header, then the rest of the
packet. The next stage therefore sees a clean packet start.

These rules give eleven SE states. `se` reports the state on its `state`
output as a `bist_pkg::se_state_t`:

| state | upper input | lower input |
|---|---|---|
| A0 | idle | idle |
| A1 | idle | to lower output |
| A2 | idle | to upper output |
| A3 | to upper output | idle |
| A4 | to lower output | idle |
| A5 | to lower output | to upper output (crossed) |
| A6 | to upper output | to lower output (straight) |
| A7 | blocked, wants lower | to lower output |
| A8 | blocked, wants upper | to upper output |
| A9 | to upper output | blocked, wants upper |
| A10 | to lower output | blocked, wants lower |

All next-state and output-select logic is a single function,
`bist_pkg::se_step()`. `se` uses it for its control path.

## The test procedure

**Phase 1: bit lines, A6 and A5.** Every input first sends a packet whose
header equals its own index. The headers send every SE in every stage straight
(A6). After an idle clock, every input sends a packet with the complemented
index as header, which crosses every SE (A5). Each packet has
q = clog2(b) + 3 words (6 for b = 8):

1. the header;
2. the complemented header (stuck-at faults on every bit line);
3. a word of all 0s, or all 1s if the input index has odd parity;
4. clog2(b) bridging words: bit j of bridging word m is bit m of j, so every
   pair of bit lines differs in at least one word. Odd-parity inputs send the
   complement.

**Phase 2: every transition, one stage at a time.** One SE input changes at a
time: a packet starts or ends. So all SEs of one stage can be driven through
the same transition together, but different stages cannot. For stage s, the
inputs with bit k = n-1-s equal to 0 act together as the "upper" inputs of
that stage's SEs, and the rest as the "lower" inputs. Every header routes
straight except at stage s, where its bit k picks the output. Every other
stage then sees either no packets or two packets that pass straight, so it
stays in A0 or A6.

Each stage runs through the same 38-step state sequence. It is
`bist_pkg::P2_SEQ`, four closed cycles that together cover every arc of the SE
state diagram:

```
A0 A4 A2 A3 A1 A4 A5 A2 A0 A1 A6 A3 A0
   A3 A6 A1 A0 A2 A5 A4 A1 A3 A2 A4 A0
   A9 A2 A8 A3 A9 A2 A0                 (both inputs want the upper output)
   A10 A1 A7 A4 A10 A1 A0               (both inputs want the lower output)
```

Each step is one clock. The request pattern for a step is whatever reaches the
target state (`bist_pkg::state_req()`). Some steps need two events in the same
clock, for example A4 to A2: the upper packet ends and a lower-to-upper request
starts. In phase 2 every word of a packet repeats its header, so every word
that leaves output d equals d.

The full programme has 2(q+1) + 39n rows, one clock per row: 131 rows for
N = 8, b = 8. Each phase-2 segment ends with one idle row.

## Generating the words: the label tree (`tree_arch`, `tgm`, `tgu`)

This is the central idea of the design. Think of the N inputs as the corners
of a binary n-cube. If, in a given clock, the word on input v can be written as

    w(v) = w(0) XOR (XOR over all set bits k of v of c[k])

then the N words follow from n+1 stored words: the initial label w(0) and one
control word c[k] = w(2^k) XOR w(0) per cube dimension. Every word of the
procedure above has this form:

- A header equal to the index is w(0) = 0 with c[k] = 2^k.
- Its complement is w(0) = all ones with the same c[k].
- The parity word has c[k] = all ones.
- A bridging word is the bit-index pattern, with c[k] = all ones.
- The phase-2 valid bit and header bit k differ only between the two halves
  of the cube along dimension k.

The XOR functions all commute, so it does not matter which path through the
cube a label takes.

`tree_arch` builds this as a tree. Level L handles dimension k = n-1-L (the
root handles the most significant bit) and holds 2^L test generation modules
(`tgm`). Each `tgm` has one registered output that copies its input and one
that XORs its input with the level's control word. All TGMs of a level share
that control word. A `tgm` is W one-bit test generation units (`tgu`): one
XOR gate and two output flip-flops each. Leaf v receives exactly w(v), n clocks
after w(0) enters. The control word of level L is delayed by L clocks inside
the tree, so one memory row describes one clock's words. The tree has N-1 TGMs.
With W = 1 it is the bit-serial form of the same tree.

Words here are W = b+1 bits: b data bits plus a packet-valid bit line, which
the tree generates like any other bit.

## The reduced tree (`reduced_ta`)

The general tree puts an XOR unit on every bit line of every node. The
procedure above needs far fewer, and `reduced_ta`, the default in the top,
uses only those:

- **Header-type words** (headers, complemented headers, all of phase 2): at
  the level of dimension k, only bit line k and the valid line can differ
  between the two children. Each node has one header TGU on line k, controlled
  by one bit `hc[k]`, and one valid TGU controlled by `vc[k]`. All other lines
  are plain registers.
- **Payload words** (parity word and bridging words): above the last clog2(b)
  levels, only bit line 0 matters. It carries the parity of the path and is
  inverted on every modified branch (type-1 TGU). Level r of the last clog2(b)
  levels copies every populated line j to line j + 2^(clog2(b)-1-r), through a
  switch that overrides the line's own value (type-2 TGU). The copy is
  inverted when the current word is bridging word clog2(b)-1-r. After the last
  level, line j holds bit m of j (bridging word m) or 0 (parity word), XOR the
  parity of the leaf index.

Three flags from the memory row select the word kind: `payload`, `bridge` and
`brsel`. Because of the bit-line copying, `reduced_ta` requires
log2 N >= clog2(b); for N = 8, b = 8 all three levels do this copying. For
every row of the programme, `reduced_ta` produces the same valid words as
`tree_arch`.

## Bit-serial generation (`serial_tpg`)

Some networks carry each word on a single wire, one bit per clock, to save
wiring. For that format the tree needs only one TGU per node (`tree_arch`
with W = 1). The memories are then read bit by bit. `serial_tpg` does this
with a one-hot column-select chain of b+1 stages:

- Each clock the chain picks one bit of the current row's initial label and
  of each control word.
- Its last stage advances the row chain of the memory.

Input v then receives, one bit per clock, the same words the block-sequential
tree delivers in parallel. The bit order is data bits 0 to b-1, then the valid
bit. `first` marks bit 0 of each word.

In `min_bist_top` this generator stands beside the network with its own ports
(`ser_start`, `ser_busy`, `ser_first`, `ser_out[N]`). This design has no
bit-serial network for it to drive.

## Test memories (`test_mem`)

`test_mem` is a constant table of rows `{brsel, bridge, payload, c[n-1] ..
c[0], w(0)}`. A one-hot shift register selects the current row: `start`
loads row 0, each clock with `step` high advances one row, and after the last row every output
is 0. The table is computed at elaboration by functions in the module:

- `RESP = 0` gives the stimulus rows.
- `RESP = 1` gives the fault-free response rows:
  - phase 1: output d receives the packet of input d (straight) or of input
    d XOR (N-1) (crossed);
  - phase 2: the per-link word is built exactly like a stimulus word. The
    valid bit of output d comes from `se_step()` run over the stage-s request
    sequence, and the data is d.

No data files are read.

## Checking the response (`resp_cmp`, `bist_ctrl`, `min_bist_top`)

`min_bist_top` wires everything together:

```
 test_mem(RESP=0) -> tree -> [mux] -> min_net -> out_valid/out_data
                              ^ in_valid/in_data       |
 test_mem(RESP=1) -> tree --------------------------> resp_cmp -> bist_pass/bist_errors
 bist_ctrl: starts both memories, opens the comparison window
```

Sequence of a run, counted from the first clock of the run:

1. The stimulus memory starts in clock 0.
2. The response memory starts n clocks later, so expected words leave the
   response tree in the same clock as the network delivers the real ones
   (memory 1 clock, tree n, network n).
3. `resp_cmp` compares every output link from clock 2n+1 for ROWS+n clocks.
   Valid bits must match, and data must match wherever a word is expected.
   Each mismatching link-word adds one to the count; the fail flag is sticky.

Top-level interface:

| port | meaning |
|---|---|
| `in_valid[N]`, `in_data[N]` | normal traffic; ignored while `bist_busy` |
| `out_valid[N]`, `out_data[N]` | network outputs, always live |
| `stage_state[n][N/2]` | state of every SE |
| `bist_start` | one-clock pulse starts a run |
| `bist_busy` | a run is in progress; the network is fed by the stimulus tree |
| `bist_done` | the run has ended; stays high until the next start |
| `bist_pass` | valid with `bist_done`: no mismatch |
| `bist_errors` | number of mismatching link-words |
| `ser_start`, `ser_busy`, `ser_first`, `ser_out[N]` | bit-serial generator |

`bist_done` rises ROWS + 3n + 2 clocks after the `bist_start` edge (142 for
the defaults). Parameters: `N` (8), `B` (8), and `REDUCED` (1 = `reduced_ta`
trees, 0 = `tree_arch` trees).

## Files

| file | content |
|---|---|
| `rtl/bist_pkg.sv` | SE state type, `se_step()`, `se_state()`, `state_req()`, phase-2 sequence |
| `rtl/tgu.sv`, `rtl/tgm.sv`, `rtl/tree_arch.sv` | general label tree |
| `rtl/reduced_ta.sv` | reduced label tree |
| `rtl/test_mem.sv` | stimulus and response memories with the built-in programme |
| `rtl/serial_tpg.sv` | bit-serial generator |
| `rtl/se.sv`, `rtl/min_net.sv` | switching element and network |
| `rtl/resp_cmp.sv`, `rtl/bist_ctrl.sv` | comparator and sequencer |
| `rtl/min_bist_top.sv` | top level |
| `tb/<module>_tb.sv` | self-checking testbench for each module |
| `tb/min_bist_top_general_tb.sv` | end-to-end test with `REDUCED = 0` |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops on its
own. For example, the end-to-end test at the default size:

```
verilator --binary --timing --assert -Irtl rtl/bist_pkg.sv tb/min_bist_top_tb.sv \
          --top-module min_bist_top_tb
./obj_dir/Vmin_bist_top_tb
```

For any other testbench, replace the `tb/` file and the top module name.
`-Irtl` lets verilator find the modules by file name.

What the testbenches check:

- **`min_bist_top_tb`**
  - Normal traffic under XOR permutations.
  - A fault-free self test passes with zero mismatches in 142 clocks.
  - Every stage visits all eleven states.
  - All SEs are straight together and crossed together at least once.
  - Blocking occurs.
  - A forced stuck-at-1 data bit and a forced stuck-at-0 valid line on inner
    links are both detected.
  - The test passes again after the forces are released.
- **`se_tb`**: drives the phase-1 and phase-2 request patterns and compares
  the state after every clock with a hand-written table. It also checks the
  blocked-packet data path.
- **`test_mem_tb`**: expands every row and compares it with the programme
  worked out independently.
- **`serial_tpg_tb`**: reassembles the serial streams into words and checks
  all 131 rows and the 9-clock word rate.
- **`reduced_ta_tb`**: checks random vectors against closed-form expectations
  for 8 and 16 leaves, and compares the whole programme against `tree_arch`.

## Where this design fills gaps

The paper describes the procedure, the tree, the TGU and the placement of the
reduced TGUs. The following are this design's own choices:

- **Packet framing**: a valid line with at least one idle clock between
  packets. The valid line is generated by the tree as an extra bit line.
- **Header bit**: stage s reads header bit n-1-s, so header d reaches
  output d.
- **Blocking**: the arbitration order above, dropping the blocked packet's
  words, and the idle-clock/stored-header restart.
- **Phase-1 word order**: header, complement, parity word, bridging words.
- **Phase-2 data**: every word repeats the header. One idle row separates
  packets and stage segments.
- **Control skew**: each level's control word is delayed by its level depth
  inside the tree.
- **Memories**: a one-hot row-select chain; column selection exists only in
  the bit-serial generator. The contents are computed, not stored as data.
  With `REDUCED = 1` only part of each control word is read, and synthesis
  trims the rest of the constant table.
- **Word-kind flags**: in the reduced tree, the parity and bridging words are
  selected by flags in the memory row. The paper suggests producing these
  periodically.
- **Sequencer and comparator**: the sequencing, the comparison window, and a
  comparator that counts mismatches. The paper says only that outputs are
  compared.
- **One SE register stage**, and an asynchronous active-low reset everywhere.

Not modelled:

- Transistor or area counts. The paper's comparison of tree and stored test
  sets is an area argument, not a circuit.
- A network with bit-serial links. `serial_tpg` generates the bit-serial test
  streams, but the network here is block-sequential, so nothing consumes
  them.
- Fault location after a failure. The design reports a mismatch count only.
