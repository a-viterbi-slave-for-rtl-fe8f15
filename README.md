# Backtrace slave for a real-time HMM word recognizer

A continuous-speech recognizer built on hidden Markov models must do two
things every 10 ms frame. It must update the probability of every state of
every word in the vocabulary, about 50,000 states for 3000 words. And for
every state it must remember *how* it got there, so that once the sentence is
over the best word sequence can be read back. The probability arithmetic lives
in a Viterbi processor. This repository implements the piece beside it that
handles the second job: a **backtrace processor**, which for each state picks
the *backtrace tag* (a pointer to the word the best path came from) of the
predecessor the Viterbi processor judged best. Around that chip sits the digital
logic of the word-level subsystem: the frame/word sequencer, the state
address counter, the FIFOs to the grammar side, the beam filter that decides
which finished words go into the backtrace memory, and the output memory
addressing.

Everything is synchronous on one clock, at one HMM state per clock. The
original system ran at 5 MHz, so 50,000 states take 10 ms, exactly one frame.

## How a frame is processed

The vocabulary is stored word after word in external DRAMs indexed by one
18-bit state address (`addcounter`). Each address holds:

| memory | word | used here for |
|---|---|---|
| topology | 48 bits: three 4-bit predecessor positions, three transition costs, grammarnode transition cost, `morepred`, `gnsource`, `eow`, `eof` | predecessor positions, end-of-word and end-of-frame flags |
| state probability (t-1 / t) | 32 bits: 18-bit tag, 14-bit cost | the tag of the state in the previous frame; the new tag written back |
| output lookup / output | 16 / 8 bits | probability of the observed speech feature for this state |

The layouts are `bt_pkg::topo_word_t` and `bt_pkg::stprob_word_t`.

A word is a left-to-right chain of states. A state's predecessors are either
earlier states of the same word, given as a *relative* position (1 to 15
entries back), or the word's **source grammarnode**: the best "word entry"
value for this word, which the grammar subsystem computes and sends through
the source FIFO, one value per word. When a word finishes, the value of its
**destination grammarnode** (the best way of leaving the word) goes back to
the grammar side through the destination FIFO. It may also go into the
backtrace FIFO if it is good enough (see below).

### Sequencer (`viterbi_fsm`)

The state numbers match the original state diagram:

```
0 idle --startframe--> 1 startcounter --> 14 wait for eow --> 15 newframe
15 --> 2 (stall while source FIFO empty) --> 3 pop --> 4 process states
4 --eow--> 5 --> [6 stall while empty] --> 7 pop --> 8 --> [9 stall while dest full] --> 10 push --> 4
4 --eof--> 11 --> [12 wait while dest full] --> 13 push --> 0
```

`stall` is raised only in states 2, 6 and 9 and during a DRAM refresh
(`memorystall`). It freezes the address counter and the backtrace processor, so
a late source value or a full destination FIFO costs cycles but no data. A
refresh also freezes the FSM itself and masks the pop and push strobes, so a
state that is held during a refresh pops or pushes only once.

## The backtrace processor (`backtrace_processor`)

The chip has two halves.

**Upper datapath** (`upperdp` = `predsel` + `predadd`). Every cycle the tag
of the current state (`stbtrace_data`, from the t-1 memory) is written into
three identical 16×18 RAMs (`dpram`) at the address of a 4-bit write counter.
The counter is cleared at the start of a frame (`newframe`) and then counts
loaded cycles. The same cycle, the three predecessor positions of the state
(`predecessor_data`, 3×4 bits) are added to the counter modulo 16 to form three
read addresses. A position p reads the entry written 16−p cycles ago, so
p = 15 is the previous state and p = 1 is 15 states back. The RAMs write
through, so a read of the address being written returns the new tag. Because
the addressing is relative, the chip never needs the absolute state address.
Most words have at most 15 states, so they fit.

**Backtrace datapath** (`btracedp`). An 18-bit, eleven-stage pipeline
selects among the three candidate tags:

| loaded cycle (state presented in cycle n) | what happens | control |
|---|---|---|
| n | tag written, three predecessors read | — |
| n+1 | source tag loaded into `srcndbtrace_reg2` | `popsourceinv` low at or before here |
| n+2 | first candidate replaced by the source tag | `gnselect2` |
| n+5 | one of three candidates chosen | `sela`, `selb` ({selb,sela}: 00 first, 01 second, 1x third) |
| n+7 | keep the best of an earlier group of three instead | `morepredmux7` |
| n+9 | tag becomes the destination grammarnode's best so far | `gndmux9` |
| n+10 | at the last state of a word, copy it to `gnbtrace11_out` | `newword9` |
| after edge n+10 | selected tag on `btrace11_out` | — |

A state with more than three predecessors takes extra cycles. The topology
memory repeats it with `morepred` set, and `morepredmux7` tells the pipeline to
keep the better of the two groups. `gnbtrace11_out` holds one word's
destination tag stable through the whole next word, which is when it is
needed.

**Scan.** Every register is a scan flip-flop (`scan_reg`). `scan_clkdrv`
turns the chip's `stall` and `scantest` pins into `load` (= !stall &
!scantest) and `shift` (= scantest), and shifting takes priority over loading.
There are three chains:

| chain | order from scan-in | length |
|---|---|---|
| UDP | stprobin1, write counter, topology_reg1_1..3, first/second/third predadd_reg2 | 18+4+3×4+3×4 = 46 |
| BDPUP | srcndbtrace_reg2, first/second/third btrace_reg3..5 | 10×18 = 180 |
| BDPLO | btrace_reg6..9, gnbtrace_reg10, gnbtrace_reg11, btrace_reg10, btrace_reg11 | 8×18 = 144 |

The registers shift alternately LSB-first and MSB-first along a chain, as on
the chip, where neighbouring registers were mirrored in the layout. The
direction of each register is the `LSB_FIRST` parameter of its `scan_reg`
instance. The chip has no reset: after power-up it is initialised by
scanning or simply by running a frame.

## Backtrace memory and pruning (`bt_mem_proc`, `btag_mux`, FIFOs)

Costs are negative log probabilities: smaller is better, and all ones means
"practically impossible". The 8-input AND `dgn` detects that value on a
grammarnode transition cost (`dgnenable`).

During a frame, `bt_mem_proc` tracks the best word cost (`wordmin11`). At the
next frame start, threshold = that best + `offset` (a host-set beam width),
saturating. At each word end the word's destination grammarnode cost is
compared with the threshold. If it is not above it and the backtrace FIFO is
not full, the word is stored in the 64×18 and 64×26 FIFO pair. The entry
holds the tag of the word before it (`gnbtrace11` from the backtrace
processor), a 12-bit word ID and the 14-bit cost. The entry's own number,
counted since `newsentence`, becomes the word's new tag. `btag_mux` sends that
number with the destination value instead of the inherited tag, so paths
leaving this word now point at its entry. Following the tags from the last
entry back through the stored entries gives the sentence. A word that passes but finds the FIFO full sets `btmemoflow`. The host
drains the FIFO, prompted by `almost_full` (8 free entries).

## Output memory addressing (`outmem_addr`)

Mode 0, one speech feature: the address is {lookup[14:0], feature[7:0]}
(23 bits), and its top two bits pick one of four 2M×8 banks. Mode 1, four
features: each bank k is addressed with {lookup[12:0], feature k}, and the
four bytes are added, saturating at 8 bits.

## Where this RTL departs from or adds to the original

- **Single clock.** The chip used two-phase master/slave latches. They are
  one edge-triggered flip-flop here, and the four clock pins are one `clk`
  with the `stall`/`scantest` enables.
- **No carry-in on the predecessor adders.** A worked scan example for the
  chip (counter = A, positions = A, all three sums = 4) only holds without a
  carry. The testbench replays that example bit for bit.
- **Word ID width 12.** The original entry layout gives the word ID 10
  bits, which could not number a 3000-word vocabulary. The 26-bit backtrace
  data FIFO minus the 14-bit cost leaves 12 bits, and that is used here. It covers 4096 words: enough for the 3000-word
  real-time vocabulary but not for the 8000-word offline one, which needs 13
  bits.
- **Push alignment.** The sequencer pushes a word's destination value four
  cycles after the word's last state is addressed, but `gnbtrace11_out`
  updates ten cycles after. The destination tag pushed is therefore the one
  of the word addressed about ten cycles earlier: the previous word, for
  words of seven or more states. Both timings were kept as specified, and the
  testbench checks this behaviour. `gnbtrace11_out` is held for a whole word
  precisely so that the word-end handling can happen later. The per-word
  inputs `gnprob11` and `wordmin11` are sampled in the same push cycle as the
  tag. Someone integrating the design may want to delay the push side by the
  missing cycles.
- **FIFOs** are simple synchronous first-word-fall-through FIFOs, standing in
  for the bought asynchronous parts.
- **Beam, word numbering and saturation** in `bt_mem_proc` and `outmem_addr`
  are the simplest logic that does the described job. The bit placement of
  the output memory address is also this design's choice.
- **State 4 priority**: `eof` wins over `eow` on the last state of a frame.
- **Not built**: the DRAMs, the Viterbi processor's probability arithmetic
  (its decisions and per-word results are ports of `wordproc_top`), the
  grammar subsystem with its destination FIFO, and the transistor-level RAM
  circuit (pull-ups, cell sizing).

## Files

`rtl/` holds one module or package per file. `bt_pkg` has the widths and word
layouts. The top is `wordproc_top`, and the chip on its own is
`backtrace_processor`. `tb/tb_<module>.sv` tests each module. Every testbench
prints `TB_RESULT checks=N failures=M` and stops itself.

- `tb_backtrace_processor` replays the scan example and then checks a long
  random state stream against a cycle-level model of the tag RAMs and
  pipeline.
- `tb_wordproc_top` runs twelve frames of a small vocabulary through the
  whole subsystem, with memories and the Viterbi datapath modelled in the
  testbench. It adds random late source values, a full destination FIFO and
  refresh stalls. It checks every state's tag, every push and every backtrace
  entry, and fails if any of those mechanisms never occurred.
- `tb_realtime_frame` runs the real-time workload: 3000 words, about 50,000
  states. It checks that a frame takes one cycle per state plus at most 20
  cycles of overhead. It measures 6, so the frame takes 9.9 ms at 5 MHz.

Both system tests share `tb_wordproc_env`.

## Simulating

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/bt_pkg.sv \
    tb/tb_wordproc_top.sv --top-module tb_wordproc_top -o sim
./obj_dir/sim
```

Replace the testbench name for any other test. The system tests take well
under a second. The widths are the constants in `bt_pkg` (`SADDR_W` for the
state address, `TAG_W`, `PROB_W`, `WORDID_W`, ...) and the parameters `AW` of
`addcounter`, `DEPTH`/`WIDTH`/`ALMOST_FULL` of `fifo` and `WORDS`/`WIDTH` of
`dpram`.

Lint leaves a few unused-signal warnings on `wordproc_top`: the topology
and probability bits that belong to the external probability datapath, the
FIFO fill counts, and the counter's `running` flag. They are left as they
are. Some outputs are plain wires from inputs, such as the bank address bits
of `outmem_addr` and the cost field of the backtrace entry; that is their
function.
