# FPGA channel sounder for large antenna arrays

A channel sounder measures how a radio channel spreads a transmitted signal
in time. This design does it with direct-sequence spread spectrum: the
transmitter sends a maximal-length pseudo-noise (PN) sequence over and over,
and each receiver correlates what it hears with the same sequence. An
m-sequence correlates with itself almost only at zero shift, so every path
of the channel shows up as a separate peak. The peak's position is the path
delay and its height is the path power. One period of correlation power is a
*power delay profile* (PDP). Several PDPs are averaged to suppress noise
peaks, and only the averages go to the host.

The point of the design is where this work happens. Correlation and averaging
run in the FPGA of each software radio (USRP X310 class) at the full sample
rate. The host link then carries one profile per K, not every raw sample, so
many antennas at wide bandwidth can be sounded at once.

The RTL here covers the three signal-processing engines (spreader,
correlator, averager), their settings registers, and a top level that wires
them the way the sounder uses them. It follows the RFNoC channel sounder of
Gokalgandhi, Maddala and Seskar (WINLAB, Rutgers). There, the engines were
produced with high-level synthesis and plugged into the Ettus RFNoC
framework. This is an independent SystemVerilog implementation: the
structures shown in that description are kept, and the many details it does
not give are filled in as described below.

## Signal flow and rates

```
 host --Rs/L--> [spreader CE] --Rs--> (DUC -> radio, 200 MS/s)            transmitter

 (radio -> DDC) --Rs--> [correlator CE] --Rs--> [averaging CE] --Rs/K--> host   receiver, per chain
```

* R_s is the sounding rate, which is the bandwidth being sounded.
* L is the sequence length.
* K is the averaging factor.

The up-converter (DUC), the down-converter (DDC), the radios, the packet
router, the host interfaces and the soft CPU all come from the FPGA framework
and are not part of this RTL. In `channel_sounder`, their streams are plain
ports.

Two receiver builds are meant:

| build | `NUM_RX` | `CORR_TAPS` | longest correlated sequence |
|-------|----------|-------------|-----------------------------|
| single receiver (default) | 1 | 512 | 511 (an order-9 m-sequence) |
| dual receiver | 2 | 256 | 255 (order 8) |

The source chose 256 taps for the dual build because two 512-tap correlators
do not fit the Kintex-7 410T next to the framework.

## Sample format and streams

Every stream is AXI-stream (`tdata`/`tvalid`/`tready`, and `tlast` where
packets matter). A sample is SC16 (`cs_pkg::sc16_t`): signed 16-bit I in bits
[31:16] and signed 16-bit Q in bits [15:0]. The correlator's output and the
averager's input and output are 32-bit unsigned powers. All engines run on
one clock and accept one sample per cycle.

## PN sequence generator (`pn_gen`)

A Fibonacci LFSR with 10 stages, numbered 1 to 10.

* Stage 1 takes the feedback bit. Every other stage takes the value of the stage before it.
* The feedback is the XOR of all stages, each ANDed with its bit of the generator-polynomial register.
* For a polynomial of order N, the chip is read from stage N.

So any polynomial up to order 10 can be programmed at run time. That means
sequences up to 1023 chips.

In a word, bit k-1 stands for stage k. An example is x^6 + x^5 + 1: stages 5
and 6 are taps, so the polynomial word is `0x030`. A seed with only stage 6
set is `0x020`. This is also the reset contents of the engines.

`chip` shows stage N of the current state. `adv` steps one chip. `load`
reloads the seed, and wins over `adv`.

Order and polynomial are independent settings. Only a primitive polynomial
gives a maximal sequence (period 2^N - 1). The hardware does not check this.

## Spreader (`spreader`, `spreader_ce`)

Each input symbol leaves as L output samples. Each one is the symbol
multiplied by the next chip: chip 1 means +1 and chip 0 means -1. A -1 is a
two's-complement negation, with -32768 saturated to +32767.

* After chip L-1 the generator is reloaded, so every symbol is spread by chips 0 to L-1.
* `m_tlast` marks the last chip of each symbol.
* The next symbol is accepted in the cycle the last chip leaves, so the output has no gaps.
* For sounding, the host sends a constant symbol such as (A, 0). The transmitted signal is then the PN sequence repeated.

## Correlator (`correlator`, `corr_lane`, `adder_tree`, `correlator_ce`)

This is the part with the most structure.

**Matched filter.** For each received sample the correlator computes

    y[n] = sum over l = 0 .. L-1 of p[l] * x[n-l]

separately for I and Q. Each part has its own `corr_lane`:

* a shift register of `TAPS` samples, where tap 0 is the newest;
* per tap, a choice between the sample and its negation;
* a pipelined binary `adder_tree` over all taps.

Because p[l] is +/-1, no multipliers are needed. The output is the power
I^2 + Q^2, one value per input sample. Every L consecutive outputs form one
PDP.

**Coefficients.** A rising edge of the start register starts the correlator.
It then reloads its PN generator and clocks L chips into a coefficient shift
register. The first chip ends at tap L-1 and the last at tap 0, so
p[l] = chip[L-1-l]. With this order the correlation peaks when a whole
received period sits in the taps: the sample arriving with chip L-1 of the
transmitted period gives the peak.

* A path delayed by d samples peaks at position (L-1+d) mod L of a profile.
* Taps at L and above are masked to zero, so shorter sequences need no other change.
* L is clamped to `TAPS`.
* While the coefficients load (L cycles) the input is stalled.
* Before the first start, input is accepted and dropped. Upstream never backs up.
* Each start also empties the sample shift registers.

**Pipeline.** There is one register for the sample shift, one per adder-tree
level (log2 TAPS levels) and one for the power. So an output follows its
input by 2 + log2(TAPS) cycles: 11 cycles at 512 taps. Throughput is one
sample per cycle. Back-pressure from downstream freezes the whole pipeline
through one enable, and a valid bit travels beside the data.

**Width.** At 512 taps the sums have 26 bits and the power has up to 51 bits.
The output is `power >> PWR_SHIFT` (default 18), saturated to 32 bits. At
shift 18, a full-scale 512-chip peak still fits. Lower `PWR_SHIFT` for more
resolution on weak channels, at the risk of saturating strong peaks.

## Averager (`averager`, `averaging_ce`)

The input power stream is cut into packets of SeqLen values. Each group of
K = 2^LogAvgSize packets is averaged position by position. K can be 1 to
128.

An accumulator memory holds a 39-bit running sum per position:

* The first packet of a group is written into it.
* The middle packets are added to it.
* During the K-th packet, each finished sum is shifted right by LogAvgSize and sent out instead of being written back.

So an average leaves one cycle after the last value it includes. `m_tlast`
marks the end of each averaged packet. The output rate is the input rate
divided by K.

The memory is read one cycle ahead of its write, like a block RAM with a
registered read port. A 1-long packet would read a word in the same cycle it
is written, so that one case is forwarded. SeqLen must equal the correlator's
L for the packets to be profiles. Set it to match.

## Settings registers

Each engine has its own register space, written over a settings bus
(`cs_pkg::set_bus_t`: strobe, 8-bit address, 32-bit data). The register
numbers are those of the RFNoC engines. The bit packing is this design's
own: the first-named field is in [31:16] and the second in [15:0].

| engine | SR | contents | readback |
|--------|----|----------|----------|
| spreader | 131 | bit 0: block reset (level) | RB 0 |
| | 132 | polynomial [25:16], seed [9:0] | RB 1 |
| | 133 | sequence length L [31:16], polynomial order N [3:0] | RB 2 |
| correlator | 131 | bit 0: block reset | RB 0 |
| | 132 | bit 0: start (rising edge starts) | RB 1 |
| | 133 | polynomial [25:16], seed [9:0] | RB 2 |
| | 134 | L [31:16], N [3:0] | RB 3 |
| averager | 131 | bit 0: block reset | RB 0 |
| | 132 | LogAvgSize [31:16], SeqLen [15:0] | RB 1 |
| all | 255 | readback address | |

* `rb_data` is 64 bits. It shows the selected register in its low half and 0 for unused addresses.
* A block reset holds the engine's datapath in reset while bit 0 is 1. The registers keep their values.
* Leaving block reset does not count as a start edge.
* Writing the spreader's SR 132 or SR 133 reloads its generator.

At reset, the spreader and correlator hold x^6 + x^5 + 1, seed `0x020`,
N = 6 and L = 63. The averager holds K = 1 and SeqLen 63.

In `channel_sounder`, `set_ce` chooses which engine a write goes to, and
`rb_ce` chooses whose readback is shown:

* 0 is the spreader.
* 1 + 2r is the correlator of chain r.
* 2 + 2r is the averager of chain r.

In the framework this addressing is done by per-engine shells.

A typical receiver setup writes these registers in order:

1. Correlator SR 133 and SR 134.
2. Averager SR 132, with SeqLen = L.
3. Correlator SR 132 = 1, the start.

## Where this departs from the source, and how far to trust it

These are taken from the source:

* the engine split and register numbers;
* the LFSR structure with output from stage N;
* the order limit of 10;
* the parallel correlator with its +/- select and adder tree;
* the 512 and 256 tap sizes;
* the start edge detector;
* averaging by right shift with K up to 128;
* the rates.

These are this design's own choices:

* SC16 packing, register bit packing and reset values;
* chip polarity (1 = +1) and the coefficient order;
* how coefficients are loaded (after start, stalling the input);
* dropping input before start;
* power scaling (`PWR_SHIFT`, saturation);
* spreader saturation and per-symbol reload;
* averager memory depth (1024) and its read-modify-write scheme;
* block reset as a level;
* the shared settings bus of the top level.

Where the source leaves two readings, one is chosen:

* It says both "sequences up to length 512" and "511". The correlator accepts L up to 512.
* One register list gives the averager an "RB 1: Polynomial, Seed" that it has no use for. Here RB 1 reads back SR 132.

Not included:

* the RFNoC shells and packet framing. The engines expose raw streams and a settings bus.
* the converters, radios and host link.

No FPGA implementation was run, so nothing is known about timing at the
framework's 166.67 MHz or about resource use. A 512-input adder tree
registered at every level should be easy to close timing on. The 2 x 512
sample and coefficient registers are flip-flops, not RAM.

## Files

* `rtl/cs_pkg.sv`: SC16 type, settings-bus type, register numbers, reset values.
* `rtl/pn_gen.sv`, `rtl/spreader.sv`, `rtl/spreader_ce.sv`: the transmitter.
* `rtl/adder_tree.sv`, `rtl/corr_lane.sv`, `rtl/correlator.sv`, `rtl/correlator_ce.sv`: the correlator.
* `rtl/averager.sv`, `rtl/averaging_ce.sv`: the averager.
* `rtl/channel_sounder.sv`: the top level.
* `tb/tb_<module>.sv`: a self-checking testbench per module.
* `tb/tb_channel_sounder.sv`: end-to-end test of the dual-receiver build (2 x 256 taps, L = 255, K = 4).
* `tb/tb_channel_sounder_full.sv`: end-to-end test at the default parameters (512 taps, L = 511, K = 4).
* `tb/cs_e2e_body.svh`: the body the two end-to-end tests share.
* `tb/axis_check.sv`: an AXI-stream handshake assertion that the end-to-end tests attach to the design's output streams.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog that counts a failure if the run hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/cs_pkg.sv tb/tb_correlator.sv \
        --top tb_correlator -Mdir obj_corr
    ./obj_corr/Vtb_correlator

Verilator finds the other modules through `-Irtl -Itb` by file name. Every
testbench finishes in seconds.

The testbenches compare against reference models written in the testbench:

* a tap-list LFSR, with the m-sequence period and balance checked on their own;
* Equation y[n] above, evaluated directly;
* 64-bit averages.

They also check latencies and rates: one chip or sample per cycle, and 2 +
log2(TAPS) cycles through the correlator.

The end-to-end tests run the whole chain. The path is spreader, then a
three-path complex channel model with noise, then correlator, then averager,
with random host back-pressure. They check every averaged value, check that
the strongest path's peak sits at its delay, and count the stalls,
back-pressure events, readbacks and block-reset idling that occurred. An assertion on each output stream
checks that valid data is held until it is taken.

## Changing it

* `CORR_TAPS` (a power of two) sets correlator size and latency.
* `NUM_RX` sets the number of receive chains. Up to 7 fit the 4-bit engine select.
* `AVG_DEPTH` sets the longest averaged packet.
* `PWR_SHIFT` sets the power scaling.
* The polynomial order limit is `MAX_ORDER` of `pn_gen`, `spreader_ce` and `correlator_ce`.
