# Probability-optimised fast timing trigger for a TOP counter stave

The Time-of-Propagation (TOP) counter identifies particles from the arrival
times of Cherenkov photons that bounce along a quartz bar to a row of
photomultipliers. Full timing resolution (below 100 ps) is only reached
offline; a trigger that finds the event time to within a couple of
nanoseconds, within a couple of microseconds, helps other detectors throw
away out-of-time hits.

The idea of this trigger: for each of 200 candidate track hypotheses there is
a table, derived from that candidate's probability density function (PDF),
that gives a weight for every 1 ns bin of photon arrival time. The trigger
adds up, for every candidate, the weights of the bins in which photons
actually arrived, and the candidate with the largest sum wins. Its number is
the position estimate; the time of the earliest photon is the time estimate.

This repository holds synthesizable SystemVerilog for the trigger of one
logical stave (eight fibre links in, one link out) and for a link loop-back
tester, with a self-checking testbench for each block.

## Data path

```
 8 x  Aurora RX user stream
        |  aurora_rx_if   register, gate with channel_up, report link loss
        |  hit_decoder    link words -> time words + end-of-event markers
        |  async_fifo     512 x 32, RX clock -> sorter clock
        v
      merge_sorter        8 time-ordered streams -> 1 time-ordered stream
        |  async_fifo     512 x 32, sorter clock -> trigger clock (2x)
        v
      pdf_trigger         100 correlators x 2 PDFs, then argmax_tree (MAX)
        |  async_fifo     32 results, trigger clock -> TX clock
        v
      aurora_tx_if        result -> three 32-bit words on the TX stream
```

`toptrig_top` wires this together. The Aurora serial cores are not part of
the RTL: the top's `rx_*` and `tx_*` ports are their user-side streaming
signals (`RX_D`, `RX_SRC_RDY_N`, `TX_D`, `TX_SRC_RDY_N`, `TX_DST_RDY_N`,
`CHANNEL_UP`), so a vendor core connects directly.

Clocks, each with its own synchronous active-high reset (assert all
together):

| clock      | role                         | intended rate |
|------------|------------------------------|---------------|
| `clk_rx`   | Aurora RX user clock, 8 links | 75 MHz (32 bit x 75 MHz = 2.4 Gbit/s) |
| `clk_sort` | decoders' FIFOs read side, sorter | 75 MHz |
| `clk_trig` | trigger                      | 150 MHz, exactly twice `clk_sort` in rate |
| `clk_tx`   | Aurora TX user clock         | 75 MHz |

All crossings go through the dual-clock FIFOs, so the clocks need no phase
relation. Only the 2:1 rate matters: the trigger needs two of its cycles per
hit and must keep up with one hit per sorter cycle.

## Words on the links and inside

The link protocol is this design's own (see `toptrig_pkg`). Each 32-bit link
word starts with a 2-bit type:

| type | name    | body |
|------|---------|------|
| 00   | idle    | ignored |
| 01   | hit     | `[29:21]` channel (0..511), `[15:0]` time in 1 ns units |
| 10   | header  | `[15:0]` event number, opens an event |
| 11   | trailer | `[15:0]` event number, closes it |

Within an event a link must send its hits in time order; the sorter merges
ordered streams, it does not sort a single one.

Inside the chip the FIFOs, the sorter and the trigger carry a 32-bit
`time_word_t`: `{eoe, tval[15:0], chan[8:0], 6'b0}`. A hit has `eoe = 0`; an
end-of-event marker has `eoe = 1` and carries the event number in `tval`.

### Link faults

The Aurora RX stream cannot be stalled, and a sorter input that never gets
its end-of-event marker would stop the whole stave. `hit_decoder` therefore
guarantees one marker per opened event:

* a hit or trailer outside an event is dropped and counted (`rx_err_cnt`);
* a header inside an event, or loss of `channel_up`, closes the open event;
* a trailer with the wrong number still closes the event and is counted;
* a hit that finds the FIFO full is dropped (`rx_ovf_cnt`); a marker is held
  in a 4-entry queue and written as soon as the FIFO has room, and hits are
  dropped while a marker waits, so order is kept.

Events from the eight links are paired by position in the stream, not by
number: a link that skips a whole event desynchronises the stave. The result
carries the event number of link 0's marker.

## Merging eight links

`merge_sorter` is a binary tree of seven `merge_node` cells: four on the
inputs, then two, then one. Each cell looks at the head word of both inputs:

* both hits: pass the one with the smaller time (the left input on a tie);
* one side at its marker: pass hits from the other side until it reaches
  its marker too;
* both at markers: pass one marker, consume both.

A cell must see both heads to decide, so it waits while either input is
empty. Every cell's output is a register with valid/ready flow control.
The tree therefore adds 3 cycles of latency and passes one word per cycle
once its inputs are filled. At 75 MHz that gives the required 75 M time words
per second. The output of an event is all of its hits in time order,
followed by one marker.

## PDF correlation

This is the core of the design, in `pdf_trigger`, `correlator` and
`argmax_tree`.

**Bins.** The first hit of an event from the sorter is the earliest. Its
time becomes `t_ref`, and each hit falls in bin `tval - t_ref`. Bins 0..63
cover 64 ns after the earliest photon, which spans the spread of photon
arrival times in a stave. A hit 64 ns or more after `t_ref` is outside every
table and is skipped.

**Tables.** There are 200 tables of 64 entries of 20 bits, one per candidate.
A weight is any unsigned number that grows with the probability of a photon
in that bin for that candidate, for example an offset and scaled log
probability. Then the sum over hits is a log-likelihood, and the largest sum
is the most probable candidate. Tables are loaded at run time through the
`lut_we/lut_cand/lut_bin/lut_wdata` port (trigger clock, one weight per
cycle, 12 800 writes for a full set). At power-up they hold a placeholder
pattern defined in `toptrig_pkg::pdf_default`: candidate `c` has a
triangular peak at bin `(5c) mod 64` with half-width `8 + 4*(c/64)` bins.
Real tables come from a detector simulation.

**Sharing.** There are 100 correlators, not 200. Correlator `k` keeps the
tables of candidates `2k` and `2k+1` in one 128 x 20 memory, the size of one
FPGA block RAM. For each hit the trigger spends two cycles. In the first
(`phase = 0`) every correlator reads its first table at the hit's bin; in the
second it reads the other. Each weight is added to a 28-bit sum that
saturates rather than wraps. This is why the trigger clock is twice the
sorter clock: the hit rate stays one per sorter cycle.

**Decision.** When the end-of-event marker reaches the trigger, a `snap`
travels down the correlator pipeline behind the last hit's reads. Each
correlator then hands on the larger of its two sums and which table gave it,
and clears both sums for the next event. `argmax_tree` compares the 100 pairs
in 7 registered levels; on equal scores the lower candidate number wins.
The next event's hits can be accumulated while the tree works.

**Result.** `trig_result_t` holds the event number, the hits inside the
window (saturating at 255), `t_ref`, the candidate and its score. An event
without hits gives `t_ref = 0`, candidate 0 and score 0. The reported time is
the earliest photon. A candidate-dependent offset from that photon to the
true event time must be applied by whoever receives the result.

**Timing.** One hit every two trigger cycles. After the edge that takes the
marker, the result appears 8 trigger-clock edges later (1 + log2 of 100,
rounded up). A marker is only taken when no earlier result is still in the
tree and the output FIFO is not full. A full output FIFO, for example with
the TX link down, therefore holds back the whole chain, down to the input
FIFOs.

## Result on the TX link

`aurora_tx_if` sends each result as three words, and pops it from the FIFO
with the last word:

| word | content |
|------|---------|
| 0 | `{2'b10, 6'b0, nhits[7:0], evt[15:0]}` |
| 1 | `{2'b01, 6'b0, cand[7:0], t_ref[15:0]}` |
| 2 | `{2'b11, 2'b0, score[27:0]}` |

A word moves when `tx_src_rdy_n` and `tx_dst_rdy_n` are both low. Nothing is
offered while `tx_channel_up` is low.

## Link loop-back tester

`link_test` is the in-chip test of an Aurora link, placed beside the trigger
in the top on its own `lt_*` ports. A 32-bit LFSR (x^32 + x^22 + x^2 + x + 1,
Galois form) sends one word per cycle on a TX stream and writes the same
word into a FIFO. The words come back over an external fibre loop into an RX
stream (through `aurora_rx_if`). The comparator checks each word against the
FIFO head and counts the words it checked and the mismatches. `lt_err_seen`
is sticky and is also set by loss of the RX channel.

## Sizes and what they rest on

| quantity | value | basis |
|---|---|---|
| links per stave | 8 | original design |
| candidates, bins, weight width | 200, 64, 20 bit | original design |
| correlators | 100, two tables each | original design |
| trigger clock | 2 x sorter clock | original design |
| sorter word | 32 bit | original design |
| time unit | 1 ns, 16 bit | 1 ns from the original evaluation; width own |
| FIFO depth | 512 words per link and after the sorter; 32 results at the output | own; one block RAM per time-word FIFO |
| score width | 28 bit, saturating | own |
| link word and result formats, fault handling | see above | own |

Measured in the end-to-end testbench at these sizes and the clock rates in
the table:

* the sorted stream into the trigger runs at 73.5 M words/s over a 500-hit
  event (75 M/s minus pipeline fill);
* a single event of about 25 hits takes 489 ns from its last trailer to its
  first TX word.

`tb/tb_workload_trigger.sv` runs `pdf_trigger` on generated events with
background, time only, 1 ns bins. The tables come from a toy model (each
candidate: a direct-light peak at 0 ns and its own pair of later peaks, 20
photons), not from a detector simulation, so only the trends mean something:

| background per stave | right candidate | same, earliest hit a photon | t_ref within 2 ns |
|---|---|---|---|
| 10 MHz | 0.47 | 0.90 | 0.53 |
| 40 MHz | 0.07 | 0.80 | 0.08 |

The correlation itself holds up under background; the loss comes from using
the earliest hit as the time origin, because a background hit before the first
photon shifts every bin.

## Departures and limits

* Only time is used. The trigger cannot use PDFs that depend on both time
  and channel. The channel number is carried through the sorter and not
  used.
* The event time is defined here as the earliest hit, which also serves
  as the origin of the table bins. How the original derives the event time
  is not known. With background this is the weak point (see the table
  above).
* The Aurora cores, the on-chip logic analyser used for observation, and the
  boards that combine the 16 staves' results are not included.
* The link protocol, result format, FIFO depths and link fault handling are
  this design's own, since no protocol was specified.

## Simulating

Every module except `merge_node` (tested inside `merge_sorter`) has a
testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. With verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    --top-module tb_pdf_trigger rtl/toptrig_pkg.sv tb/tb_pdf_trigger.sv
./obj_dir/Vtb_pdf_trigger
```

Modules are found through `-Irtl` by file name (`-y rtl` works too).
`tb/tb_toptrig_top.sv` runs the whole stave at the default sizes. Eight link
drivers play generated events, and a reference model in the testbench
merges the hits, scores all 200 candidates and checks every TX word. On the
way it makes each mechanism happen at least once: multi-link merging, hits
outside the window, empty events, link loss, stray words, input FIFO
overflow, TX back-pressure, a full output FIFO, table rewriting and the link
tester over a modelled 0.6 us loop. It runs in well under a second.
`tb/tb_workload_trigger.sv` is the background study above; it checks every
result against a reference and takes about 20 s to build and run.

To change the table contents for real use, drive the `lut_*` port after
reset, or change `pdf_default` for a different power-up pattern. `NCORR` on
the top and on `pdf_trigger` sets the number of correlators (candidates =
2 x `NCORR`, at most 256 with the 8-bit candidate field). The FIFO depths are
parameters of the top.
