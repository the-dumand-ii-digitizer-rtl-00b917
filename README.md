# DUMAND II digitizer: a 26-channel, 1 ns, dead-time-free multi-hit TDC

The DUMAND II deep-ocean neutrino telescope hangs strings of 24 photomultiplier
tubes (PMTs) in the sea. Each optical module sends its PMT pulse to the string
controller as a digital level on a fibre, with the pulse width carrying the
charge. Shore reconstructs muon tracks from the arrival times, and that needs
1 ns timing on every edge of every pulse, continuously, with no dead time, in
time order, over a single 500 Mbit/s fibre.

This RTL is a digitizer that does that. It time-stamps every rising and falling
transition on 26 inputs (24 PMTs and 2 calibration channels) with a 1 ns least
count. It queues the transitions, turns each one into a 16-bit word and ships
the words two at a time in a 40-bit link word every 80 ns. Beside it is the
test-board logic used to check the chip on the bench: an 8K-word pattern
generator and a capture buffer.

## The one idea: 1 ns bins from a 500 MHz clock

A 1 GHz clock is not practical on a large gate array. The design instead runs
at 500 MHz and samples the inputs on **both** clock edges. Each edge is one
1 ns time bin:

```
ns time of a bin = { 2 ns cycle count , clock phase }   (phase 0 = rising edge, 1 = falling)
```

There are two edge detectors. Edge detector 1 samples all inputs on the
falling edge and edge detector 2 on the rising edge. Each compares its new
sample with the **other** detector's sample, which is 1 ns older. A channel
whose level differs has a transition in this bin. So every input transition is
reported once, by whichever detector owns the first bin in which the new level
is seen. A bin with no transition produces nothing (zero suppression).

The two phases then run in parallel, each with its own small queue. They are
merged again, in time order, before the data leave the chip. That merge is the
price of the two-phase scheme.

## Data path

```
pmt_in[25:0] ─┬─ edge_detector (falling) ─ first_fifo 1 (10 bins) ─┐
              └─ edge_detector (rising)  ─ first_fifo 2 (10 bins) ─┤
time_stamp ──────── ns time, roll-over bin ─────────────────────────┤
hyd_data ── hydrophone_port ───────────────────────────── priority_encoder
                                                                     │ 1 word / 2 ns
                                                         second_fifo (100 words)
                                                                     │
cc_data ─────────────────────────────────────────── output_interface
                                                                     │ 40 bits / 80 ns
                                                        link_word, link_strobe
```

Everything after the edge detectors runs on the rising edge. The falling-edge
detector's result is taken half a cycle after it was sampled.

| Block | File | What it does |
|---|---|---|
| time stamp | `rtl/time_stamp.sv` | 2 ns cycle counter. It gives the ns time of each phase's bin and marks the bin at ns 0 of every 1024 ns epoch. |
| edge detector ×2 | `rtl/edge_detector.sv` | Samples on one edge (`FALLING` parameter). Gives the changed-channel mask, the levels and the time, only for occupied bins. |
| first FIFO ×2 | `rtl/first_fifo.sv` | 10 bins per phase. A bin that arrives while the FIFO is full is dropped and flagged. |
| hydrophone port | `rtl/hydrophone_port.sv` | Holds the latest hydrophone sample, with a "fresh" bit, until a roll-over word carries it. |
| priority encoder | `rtl/priority_encoder.sv` | Time-ordered merge of the two FIFOs. Sends one word per transition, lowest channel first, one per 2 ns cycle. Adds roll-over words. |
| second FIFO | `rtl/second_fifo.sv` | 100 words. Smooths the encoder's bursts down to the link rate. When full, it stalls the encoder. |
| output interface | `rtl/output_interface.sv` | Builds one 40-bit word every 40 cycles: flags plus two words, using fill words when the queue is short. |
| top | `rtl/dumand_digitizer.sv` | The chip path above, plus the test board below. |
| pattern generator | `rtl/test_pattern_gen.sv` | 8K × 26 memory, loaded by a host and played out one word per `tp_clk` cycle on command. |
| data buffer | `rtl/data_buffer.sv` | 8K × 40 capture of the link words, read back by a host. |
| shared types | `rtl/dumand_pkg.sv` | Widths, word structs, special channel codes, flag bit positions. |

## Word formats

Transition word, 16 bits (`tdc_word_t`):

| bits | 15:11 | 10:1 | 0 |
|---|---|---|---|
| field | channel 0–25 | time, ns mod 1024 | direction: 1 = went high, 0 = went low |

Two channel codes are not inputs. They mark special words:

* **31, roll-over word.** The 10-bit time wraps every 1024 ns. At ns 0 of
  each epoch a roll-over word goes into the stream ahead of that bin's
  transitions, so shore can count epochs and rebuild the full time. Its low 11
  bits carry auxiliary data: `{fresh, hydrophone sample[9:0]}`. `fresh` = 0
  means the sample was already sent in an earlier roll-over word.
* **30, fill word.** It fills a link slot for which no transition was waiting.
  Its low 11 bits carry the command-and-control status word `cc_data`.

The 27 channels of the requirement are the 26 inputs plus this timing
(roll-over) channel.

40-bit link word: `{flags[7:0], older word[15:0], newer word[15:0]}`.

| flag bit | set when, during this 80 ns frame |
|---|---|
| 0 | first FIFO 1 (falling-edge bins) dropped a bin |
| 1 | first FIFO 2 (rising-edge bins) dropped a bin |
| 2 | a hydrophone sample was replaced before it was sent |
| 3 | the second FIFO was full and the encoder had to wait |
| 7:4 | always 0 |

## Keeping time order across the two phases

This is the part that needs the most care.

* Each first-FIFO entry is a whole bin: `{rollover, time[11:0], mask[25:0], level[25:0]}`.
  Inside the chip the time has two epoch bits above the 10 bits that are
  sent. Two FIFO heads are therefore compared modulo 4096 ns. The older one
  wins if the heads are less than 2048 ns apart. Only a backlog longer than
  that, far beyond the link's capacity, could put the two phases out of
  order.
* Once the encoder starts on a bin, it stays with that bin until the bin's last
  word has gone. Within a bin, a find-first-set over the channels not yet sent
  picks the next channel. Empty channels cost nothing, so each transition takes
  one 2 ns cycle. A bin leaves its FIFO in the cycle its last word is taken.
* The roll-over word belongs to the rising-edge bin at ns 0. The time stamp
  forces that bin into the rising-edge FIFO even when nothing changed. Because
  the roll-over travels with the bin, it lands in the right place in the
  stream without extra logic.
* A transition in the falling-edge bin just before ns 0 has time 1023 and is
  sent **before** the roll-over word.

## Rates and latency

* Sampling: every ns on all 26 inputs, with no dead time while the first
  FIFOs have room.
* Encoder: 1 word per 2 ns cycle, so 500 M words/s in a burst.
* Link: 2 words per 80 ns, so 25 M words/s. Example load: 24 PMTs at
  100 kHz, with two transitions per pulse, plus roll-over words, is about
  5.8 M words/s.
* A word waits up to one 80 ns frame in the output interface, plus its time
  in the second FIFO.

## Where this design is its own

The source fixes these points: the block structure, the two-edge 500 MHz
scheme, 26 inputs, 10-bit time with a 1024 ns wrap and a roll-over word,
hydrophone data in roll-over words, first FIFO depth 10 per phase, 1 word per
2 ns, low-to-high channel order, second FIFO depth 100, a 16-bit word with
5/10/1 fields, and a 40-bit word every 80 ns with 8 flag bits. It also fixes
the test board's 26 × 8K pattern memory.

Everything below was chosen here:

* The bit order inside the 16- and 40-bit words, and the meaning of each flag
  bit.
* Roll-over word code 31 and fill word code 30, and using fill words to carry
  C&C data.
* Comparing against the other phase's sample, with one sampling flip-flop and
  no metastability filter on the asynchronous inputs.
* The 12-bit internal time used for ordering.
* Drop-and-flag when a first FIFO is full. Stall, never drop, at the second
  FIFO.
* The 10-bit hydrophone sample with its fresh bit.
* Synchronous active-low reset. The time counts from 0 after reset.
* The host interfaces of the pattern generator and data buffer, the
  buffer's 8K depth, and one pattern word per `tp_clk` cycle.

Not built:

* The optical receivers (analog).
* The Hot-Rod serializer and deserializer (a bought-in chipset). `link_word` and
  `link_strobe` are the parallel interface it would take.
* The string-controller computer interface. Its commands are unknown; `cc_data`
  is where its status enters.
* The chip's self-test features, which are not specified.

The falling-edge detector uses `always_ff @(negedge clk)`. That is the intended
two-phase circuit, not an error.

## Simulating

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each prints `TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dumand_pkg.sv tb/tb_dumand_digitizer.sv --top-module tb_dumand_digitizer
./obj_dir/Vtb_dumand_digitizer
```

* `tb_dumand_digitizer` is the full-size end-to-end test, with every parameter
  at its default. It is wired like the bench: pattern generator → `pmt_in`,
  `link_word` → data buffer. It plays all 8192 pattern words at 1 ns each and
  has three parts:
  * a sparse part;
  * six 26-channel bursts, which fill the second FIFO and stall the encoder;
  * a 30 ns all-channel burst, which overflows both first FIFOs.

  A reference model samples the inputs every ns and lists the words in order.
  The received stream must match that list, and it may skip words only after
  an overflow flag. The test also checks roll-over and hydrophone words, fill
  words with C&C data, the 80 ns link period, and that the data buffer holds
  exactly the words sent. It runs in about 2 s.
* `tb_workloads` runs the top under the rate requirement (24 PMTs at 100 kHz)
  and the buffering requirement (48 simultaneous pulses). It expects no loss at
  all.
* The block testbenches compare against queue models or small reference
  models. `tb_priority_encoder` also checks the rate of one word per cycle with
  no gaps.

To change a size, use the module parameters (`DEPTH` of each FIFO and memory,
`FRAME` of the output interface). Widths and codes are in `dumand_pkg`.
