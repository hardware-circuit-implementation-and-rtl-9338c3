# Three-slot NP-CSMA channel in SystemVerilog

Under non-persistent CSMA (NP-CSMA), a station senses the shared channel before it
sends. If the channel is idle, the station sends. If it is busy, the station waits a
random time and senses again. The *three-slot* variant gives each channel state its own
slot length:

| state | meaning | slot length (time units) | at a = 0.1, l = 0.5, 10 ns clock |
|---|---|---|---|
| I, idle | no station sends | a | 8 cycles (80 ns) |
| U, success | exactly one packet | 1, then the propagation delay a | 80 + 8 cycles |
| B, collision | two or more packets | l, then the propagation delay a | 40 + 8 cycles |

In plain NP-CSMA a collision occupies the channel as long as a successful packet does.
Here it occupies only l < 1, so less time is lost when traffic is heavy. The expected
throughput is

    S = aλe^(-aλ) / ( aλe^(-aλ)(1 - l) + l + a - l·e^(-aλ) )

Here λ is the total arrival rate in packets per packet time. At a = 0.1 and l = 0.5,
S peaks at 0.6764 when λ = 5.

This RTL is a hardware model of such a channel. It is fed a pre-generated Poisson
arrival stream and plays it out slot by slot with the correct slot lengths. Counters
measure the throughput, which can then be compared with the formula. The design targets
a 10 ns clock, as an FPGA implementation would.

## From arrivals to slots: one word per decision

This is the central idea, and the least obvious one.

The channel is sensed at the end of every idle slot and of every busy slot's delay tail.
Each sensing point is one **decision**. The packets that arrived during the previous
window of length a are sent at that decision. Their number sets the next slot: none
gives I, one gives U, more gives B. Packets that arrive while a slot is in progress find
the channel busy and retreat (non-persistent). In the analytical model their retries
blend into the Poisson arrival process.

So the input is not a time-stamped trace but a sequence of decisions. Word *k* of the
source RAM holds the arrivals counted for decision *k*:

    word[3:0]  packets arriving at the transmitting site (0..15)
    word[7:4]  packets arriving at the monitoring site   (0..15)

The write side turns words into state codes as fast as it can, one per clock. The
channel side turns each code into a slot of the right length. Only then does it read
the next code. An asynchronous FIFO between the two sides absorbs the difference in
rate: it is full almost all the time, and the source simply waits. Therefore
"time" exists only on the channel side. The write side only fixes the order of the
decisions.

    source_ram ─► channel_monitor ×2 ─► state_classifier ─► async_fifo ─► slot_length_ctrl ─► rx_stats
       (wr_clk)        (wr_clk)              (comb.)          (wr→rd)          (rd_clk)          (rd_clk)
                           ▲                    │
                           └──── collision ─────┘

## Slot lengths and the delay tail

The nominal lengths are 80 ns for an idle slot, 800 ns for a success and 400 ns for a
collision. However, the throughput formula above, and the 1/(1+a) factor used to turn
counted success time into throughput, only hold if every busy slot also carries the
propagation delay a. `slot_length_ctrl` therefore appends `DELAY_CYC` = 8 cycles after
every success and every collision. During that tail, `chan_state` keeps showing U or B
and `in_delay` is high. With the tail, the simulated throughput follows the formula
(table below). Without it, the throughput would be about 10 % higher than the formula
predicts. Set `DELAY_CYC = 0` to get the tail-less variant.

The lengths are parameters of the channel clock: `IDLE_CYC` (a), `SUCC_CYC` (1),
`COLL_CYC` (l) and `DELAY_CYC`. A different collision slot length is a different
`COLL_CYC`; for example l = 0.3 is 24 cycles. With `COLL_CYC = SUCC_CYC` (l = 1) the
channel becomes plain NP-CSMA, whose throughput is aλe^(-aλ) / (1 + a - e^(-aλ)).
`tb_npcsma_coll_sweep` runs three copies of the channel, with l = 0.2, 0.5 and 1.0, on
the same stream:

| λ | S at l = 0.2 (formula) | S at l = 0.5 (formula) | S at l = 1.0 (formula) |
|---|---|---|---|
| 2 | .6164 (.6127) | .6056 (.6009) | .5904 (.5822) |
| 5 | .7207 (.7198) | .6756 (.6764) | .6129 (.6146) |
| 10 | .6981 (.7065) | .5995 (.6131) | .4914 (.5025) |
| 15 | .6392 (.6398) | .5088 (.5104) | .3832 (.3817) |

Above λ ≈ 3, shortening the collision slot is what gives the three-slot scheme its
advantage over plain NP-CSMA.

## State codes

Every state crosses the FIFO and appears on `chan_state` as an 8-bit code
(`csma_pkg::chan_state_e`):

| code | state |
|---|---|
| `8'b0000_0001` | I, idle |
| `8'b0000_0110` | U, success |
| `8'b0000_0111` | B, collision |
| `8'h00` | no slot: the FIFO was empty (only right after start-up) |

## Stations and random back-off

There are two stations (`N_ST = 2`). One is a transmitting site carrying most of the
traffic. The other is a monitoring site that sends little and mostly watches the
channel. Each station has a `channel_monitor`. At every decision, a station offers:

- its new arrivals, and
- any packets it holds in back-off whose timer has run out.

`state_classifier` adds up the offers of all stations and answers in the same clock
cycle. If the answer is a collision and `backoff_en` is high, every station that sent
moves its collided packets into its backlog. It then retreats 1 to 16 decisions. The
count comes from the station's own 16-bit LFSR (`lfsr`: maximal length, polynomial
x^16+x^14+x^13+x^11+1). After the wait, the station senses and sends again. The backlog
saturates at 15 packets, and all of a station's waiting packets share one timer.

With `backoff_en` low, collided packets are dropped. The traffic on the channel is then
exactly the Poisson stream, which is the assumption behind the throughput formula. This
is the mode used for comparing with the formula. With `backoff_en` high, the retries add
load: at λ = 10 the measured throughput falls from 0.61 to 0.53.

Two points about the back-off are choices of this implementation:

- The delay is counted in decisions, not in nanoseconds.
- Within the decision stream every decision is taken on an idle channel, so "finding
  the channel busy" is represented by the collision answer.

## Measuring throughput

`rx_stats` counts while `stat_en` is high. It counts the slots of each kind, the cycles
of each kind, the window length `total_cycles`, and `n_u`. The last one is the success
time in units of one idle slot (80 ns), tail included, so one success adds 11 units.
The throughput over a window of t is

    S = n_u × 80 ns / t / (1 + a)

The hardware only counts; whoever reads the counters does the division.

Results from `tb_npcsma_top` at the default sizes, with a 1000 µs window per rate and
back-off off:

| λ | 0.5 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 10 | 15 | 20 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| n_u | 4301 | 6384 | 8370 | 8767 | 9134 | 9329 | 9252 | 8768 | 8340 | 6845 | 5555 |
| S measured | .3128 | .4643 | .6087 | .6376 | .6643 | .6785 | .6729 | .6377 | .6065 | .4978 | .4040 |
| S formula | .3210 | .4693 | .6009 | .6523 | .6722 | .6764 | .6717 | .6615 | .6131 | .5104 | .4054 |

Over all 21 rates the mean absolute difference is 0.0098. The largest is 0.025, which
is the expected spread of about 800 successes per window. The spread comes from the
finite Poisson sample, not from the hardware. The testbench predicts every counter
exactly from the stream it loaded, and the hardware matches those predictions exactly.

## Clock domains and the FIFO

`wr_clk` drives the source RAM, the channel monitors and the classifier. `rd_clk` is
the channel clock (10 ns). They may be unrelated. `async_fifo` is a standard
Gray-pointer FIFO. It has 16 entries, two-flop synchronisers and registered full and
empty flags. Its read side is first-word fall-through, so `slot_length_ctrl` sees the
next code before it reads it. It raises the read enable in the last cycle of a slot,
so back-to-back slots have no gap. Both resets are synchronous and active high, one per
domain. Apply them together.

## Top-level interface (`npcsma_top`)

| port | dir | domain | meaning |
|---|---|---|---|
| `ld_en`, `ld_addr[13:0]`, `ld_data[7:0]` | in | wr | write the arrival stream into the source RAM |
| `stream_len[14:0]` | in | wr | number of valid words; reading wraps after them |
| `run` | in | wr | start playing the stream |
| `backoff_en` | in | wr | 1: collided packets retry after a random back-off; 0: they are dropped |
| `seed[15:0]` | in | wr | LFSR seed (each station XORs in its own constant) |
| `decisions`, `backoff_cnt`, `full_cycles`, `wraps` | out | wr | activity counters |
| `backlog[N_ST][3:0]` | out | wr | packets waiting in back-off, per station |
| `stat_en`, `stat_clr` | in | rd | counting window |
| `chan_state`, `in_delay`, `slot_start` | out | rd | the channel, cycle by cycle |
| `stats` (`csma_pkg::stats_t`) | out | rd | the counters described above |

The parameters and their defaults are `N_ST=2`, `SRC_DEPTH=16384`, `FIFO_DEPTH=16`,
`IDLE_CYC=8`, `SUCC_CYC=80`, `COLL_CYC=40`, `DELAY_CYC=8` and `BO_BITS=4`. The back-off
is 1 to 2^BO_BITS decisions. A 1000 µs run at λ = 0.5 consumes about 8 500 words, so
16 384 words cover the longest run without wrapping.

## Files

| file | content |
|---|---|
| `rtl/csma_pkg.sv` | state codes, word format constants, counter struct |
| `rtl/source_ram.sv` | arrival-stream RAM with load port and valid/ready read-out |
| `rtl/lfsr.sv` | pseudo-random series |
| `rtl/channel_monitor.sv` | per-station access control and back-off |
| `rtl/state_classifier.sv` | packets → I / U / B |
| `rtl/async_fifo.sv` | clock-domain crossing |
| `rtl/slot_length_ctrl.sv` | holds each state for its slot length |
| `rtl/rx_stats.sv` | counters |
| `rtl/npcsma_top.sv` | the whole channel |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_npcsma_coll_sweep.sv` | throughput against collision slot length |

The Poisson stream itself is made outside the hardware. The testbench draws it (Knuth's
method on an xorshift generator) and writes it through the load port. A real system
would do the same from a host.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
        rtl/csma_pkg.sv tb/tb_npcsma_top.sv --top-module tb_npcsma_top
    obj_dir/Vtb_npcsma_top

`tb_npcsma_top` runs the top at its default parameters. It sweeps 21 arrival rates
(about 2.5 million channel cycles, a few seconds) and then does one run with back-off
on. It checks that every mechanism occurs at least once: all three slot kinds, delay
tails, FIFO back-pressure, a starved channel at start-up, back-off, retries and stream
wrap-around. The block testbenches check cycle-exact slot lengths, FIFO ordering
across unrelated clocks, the LFSR period, and the back-off against a reference model.

## How far to trust it, and where it departs

- **Follows the original design:** the block chain (RAM source, state
  classification, asynchronous FIFO with read control, channel monitor with
  pseudo-random back-off, statistics counters); the three 8-bit state codes; the
  80 / 800 / 400 ns slots at a 10 ns clock; and counting success time for
  throughput.
- **Added so the formula holds:** the 80 ns delay tail after every busy slot.
- **Choices of this implementation:**
  - the two-nibble word format
  - RAM and FIFO depths
  - back-off counted in decisions, with one shared timer per station
  - the `backoff_en` switch
  - synchronous resets
  - the `CH_NONE` state
  - all counters except `n_u`
- **Not modelled:** delay and node-energy figures. They are closed-form analyses,
  and the hardware has no counters for them. Comparisons with other CSMA protocols are
  also not modelled.
- The lint warnings left are unused bits: the upper LFSR bits, and package constants
  that some blocks do not use.
