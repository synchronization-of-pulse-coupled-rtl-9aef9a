# Pulse-coupled phase oscillators across two FPGAs

A pulse-coupled phase oscillator is a phase counter that ramps from 0 to
2π, fires a short spike when it wraps, and nudges its phase forward or
backward whenever a spike from another oscillator arrives. How far it moves
depends on where it is in its own cycle, given by a phase sensitivity
function Z(φ). With Z(φ) = −sin φ, oscillators that receive each other's
spikes end up firing together (in-phase synchronisation). Oscillators
exchange only one-bit spikes, so the network is cheap to build in logic.
When one chip cannot hold a large network, the spikes have to cross
between chips.

This RTL implements such oscillators in digital logic. It also carries their
spikes from one FPGA to another through a dual-clock FIFO and a serial
gigabit link. The main configuration is a ring of four oscillators
φ1 → φ2 → φ3 → φ4 → φ1. φ4 and φ1 sit on FPGA-1, and φ2 and φ3 sit on
FPGA-2. Spk_1 crosses from FPGA-1 to FPGA-2, and Spk_3 crosses back. Two
smaller experiments sit next to the ring in the same top level:

- a ring of three oscillators inside one FPGA;
- a throughput and latency meter for the link.

The serial transceiver and its link-layer protocol core (a Xilinx GTX
running Aurora) are vendor IP. They are not in this RTL. Their FIFO-side
signals are top-level ports. The testbenches stand in for them with a
20-clock link model.

## The oscillator

The model is the discretised Winfree equation. One clock is one time step:

    φ(t+1) = φ(t) + ω + K · Z(φ(t)) · Spk_j(t)

`pco` is one oscillator. It contains three parts.

**Oscillator circuit (`osc_circuit`).** A `CNT_W`-bit counter holds φ. Full
scale, 2^CNT_W, stands for 2π. Each clock the counter adds `OMEGA`. If the
update code asks for it, the counter adds `K_STEP` more or `K_STEP` less.
When the sum reaches 2^CNT_W (the threshold), the phase is reset to 0.
From the next clock, the spike generator holds `spk_i` high for `SPK_W`
clocks.

With the defaults (`CNT_W`=8, `OMEGA`=`K_STEP`=1):

- the free-running period is 256 clocks (1.28 µs at 200 MHz);
- a positive update makes the counter step by 2;
- a negative update makes it hold.

An input spike lasts 8 clocks. While it is high, the receiver moves by up
to ±8 counts per spike, which is 1/32 of a period.

**Function generator (`func_gen`).** The generator approximates Z = −sin φ
with three levels. It works from three signals decoded from the counter:

| signal | meaning (defaults: `MID_W` = 3 bits below the MSB) |
|---|---|
| `c_msb`  | phase in the second half of the period |
| `c_mid0` | OR of the next `MID_W` bits: past the first 1/16 of the half period |
| `c_mid1` | AND of those bits: in the last 1/16 of the half period |

From these signals:

    active = c_mid0 & ~c_mid1
    zp = active &  (c_msb ^ sign)       Z > 0: spike makes the oscillator fire earlier
    zn = active & ~(c_msb ^ sign)       Z < 0: spike makes it fire later

Over one period (256 counts), Z takes these values:

| phase (counts) | 0–15 | 16–111 | 112–143 | 144–239 | 240–255 |
|---|---|---|---|---|---|
| Z (sign = 0) | 0 | −1 | 0 | +1 | 0 |

The zero bands around 0 and π are the part of this design that matters
most for its behaviour. They form a **dead band**. Two oscillators whose
spikes land within 16 clocks of the other's firing leave each other alone.
This is what lets a network settle. Without the band, a receiver that fired
together with its sender would see the spike at phase 0 and be pushed late.
The next period it would be pushed early, and so on. With the band, the
in-phase state is a rest point. Its price is a residual spread of up to
about ±16 clocks between "synchronised" oscillators. A link delay larger
than the band shows up as a steady lag. The `sign` input flips Z to +sin,
which pushes oscillators apart instead of together.

**Update circuit (`update_circuit`).** While the received spike `spk_j` is
high, the update circuit turns `zp`/`zn` into the 2-bit update code
(`UPD_POS`, `UPD_NEG` or `UPD_NONE`, defined in `pco_pkg`). The counter
uses it at the same clock edge, so an 8-clock spike applies 8 updates.

`pco` also has the two handshake signals toward a transmit FIFO:

- `o_to_fifo = spk_i & i_enable` is the FIFO write enable;
- `i_enable` is the inverse of the FIFO's Full flag.

## Moving spikes between FPGAs (`fpga_node`, `async_fifo`)

A spike is sent as a stream of samples, one bit per oscillator clock. Every
clock that the transmitting oscillator's spike is high, it writes one word
(a 1) into the transmit FIFO. An 8-clock spike therefore becomes 8 words.
On the far side, each word read back as 1 becomes one clock of `spk_j`. The
spike keeps its width only if its words are read back to back.

Each word passes two clock-domain crossings, into the link clock and out of
it. Words can therefore arrive slightly bunched or spread. Reading the
receive FIFO as soon as it holds a word can then find it empty in the
middle of a spike, which splits the spike in two. The receive side is
therefore a small **jitter buffer**:

- after the FIFO turns non-empty, the reader waits `RX_HOLD` (4) oscillator
  clocks;
- it then reads one word per clock until the FIFO is empty again.

The rebuilt spike is output as `spk_rx`. It drives the next oscillator
exactly as a local spike would.

Each `fpga_node` is one FPGA's logic:

    GTX -> rx FIFO -> oscillator A -> oscillator B -> tx FIFO -> GTX

Two nodes make the ring. On node 1, A = φ4 and B = φ1. On node 2, A = φ2
and B = φ3.

`async_fifo` is a standard dual-clock FIFO:

- 16 entries (`ADDR_W` = 4) of 1 bit;
- binary and Gray pointers, with two-flop synchronisers for the crossing;
- Full and empty are conservative: they can clear a few clocks late;
- reads are not first-word-fall-through: data comes one read clock after
  `rd_en`, marked by `o_valid`.

The write port is iDS/WrEn/Full. The read port is RdEn/oDS/oEmp, and the
protocol core drives it.

Delay from a spike leaving oscillator B to the rebuilt spike reaching the
next oscillator, with a 20-clock link:

- 20 link clocks;
- about 3–4 clocks for each clock-domain crossing;
- 4 clocks of jitter buffer;
- 2 clocks of registered read;
- about 29 oscillator clocks in total in simulation (0.145 µs at 200 MHz).

While the link is down, the transmit FIFO fills up. Full then drops
`i_enable`, and further spike clocks are not written. They are lost rather
than stalling the oscillator.

## Link measurement (`data_gen`, `link_monitor`)

`data_gen` sends a 16-bit incrementing counter, one word per clock the link
accepts. The far FPGA loops the words back. `link_monitor` then provides
four results:

- `counter`: clocks since reset;
- `throughput`: words received since reset;
- `window_throughput`: words received in the first `WINDOW` clocks, with
  `done` set when the window ends;
- `latency`: sent value minus received value, which is the round-trip
  delay in words.

With `WINDOW` = 200,000,000, the window is one second at 200 MHz. The data
rate is then 16 × `window_throughput` bit/s, at most 3.2 Gbit/s.

## Top level (`pco_multi_fpga_top`)

The top has separate clocks and resets for the two FPGAs: `osc_clk1/2` and
`gtx_clk1/2`, each with its reset.

| port group | purpose |
|---|---|
| `n1_tx_rd_en`, `n1_tx_ds`, `n1_tx_valid`, `n1_tx_emp` | FPGA-1 transmit FIFO read side, toward its link core (`gtx_clk1`) |
| `n1_rx_wr_en`, `n1_rx_ds`, `n1_rx_full` | FPGA-1 receive FIFO write side, from its link core |
| `n2_*` | the same for FPGA-2 (`gtx_clk2`) |
| `spk[0..3]`, `phase[0..3]`, `update[0..3]`, `tx_full` | Spk_1..Spk_4, φ1..φ4, their update codes, the transmit FIFOs' Full flags |
| `spk_rx[0]`, `spk_rx[1]` | Spk_3 as rebuilt on FPGA-1, Spk_1 as rebuilt on FPGA-2 |
| `ring_spk`, `ring_phase`, `ring_update` | ring of three, clocked by `osc_clk1` |
| `lt_*` | link test, clocked by `gtx_clk1`: generator output, looped-back input, results |
| `sign` | coupling polarity for every oscillator |

To connect a real link, wire its transmit user interface to
`n*_tx_ds`/`n*_tx_valid`. Assert `n*_tx_rd_en` when the core is ready and
`n*_tx_emp` is low. Write its received words into `n*_rx_wr_en`/`n*_rx_ds`.

## Parameters

The source design gives no values for any oscillator parameter. It fixes
only the 2-bit update code, the 16-bit test data, the 200 MHz clock and
the one-second measurement window.

| parameter | default | meaning |
|---|---|---|
| `CNT_W` | 8 | phase counter width; period = 2^CNT_W / OMEGA clocks |
| `OMEGA` | 1 | natural frequency, counts per clock |
| `K_STEP` | 1 | coupling step per spike clock; must not exceed `OMEGA` |
| `SPK_W` | 8 | spike width in clocks |
| `MID_W` | 3 | bits decoded for cMid0/cMid1; the dead band is 2^(CNT_W−1−MID_W) counts |
| `FIFO_AW` | 4 | log2 of the FIFO depth |
| `RX_HOLD` | 4 | receive jitter-buffer wait, in oscillator clocks (`fpga_node`) |
| `INIT1..INIT4` | 0, 90, 150, 40 | reset phases of φ1..φ4 |
| `RING_INIT` | 0, 60, 120 | reset phases of the ring of three |
| `WINDOW` | 200,000,000 | throughput window in clocks |
| `LT_W` | 16 | link-test word width |

The start phases matter for the unidirectional rings. With the three
oscillators started a third of a period apart (0, 100, 170), every
oscillator receives its neighbour's spike at the same point of its own
cycle. The ring then settles into a travelling wave, not in-phase firing.
Start phases within about half a period lead to synchrony.

## Behaviour in simulation

All clocks run at 200 MHz and the link delay is 20 clocks:

- **Ring of three (`tb_pco_ring`).** The first spike comes at clock 137.
  All three fire within 16 clocks of each other from about clock 2,560
  (12.8 µs).
- **Four oscillators over two nodes (`tb_pco_multi_fpga_top`).** The links
  are held down for the first four periods (5.1 µs), and the transmit FIFOs
  fill. All four oscillators then fire within 24 clocks of Spk_1 from
  clock 3,298 (16.5 µs after reset). They stay there, with onsets at about
  +15, −1 and +16 clocks from Spk_1 (Spk_2, Spk_3 and Spk_4). The locked period stretches from 256
  to about 264 clocks, because the delay makes negative updates dominate.
- **Link test.** Every clock carries a word except the first 20, so the
  window gives 16 × (WINDOW − 21) bits. That is 3.199 Gbit/s at 200 MHz,
  and the latency reads 20.

## How far to trust it, and where it departs

These parts follow the source design:

- the discretised oscillator model;
- the split into oscillator circuit, function generator and update circuit;
- the cMSB/cMid0/cMid1 and Zp/Zn signals and the 2-bit update input;
- the FIFO channel names (oSpike/iDS, oToFIFO/WrEn, Full/iEnable,
  RdEn/oDS/oEmp);
- the ring topologies of three and of four oscillators;
- the 16-bit incrementing test data and the clock/word counters.

These are this design's own choices, made where the source design is
silent:

- which counter bits make cMid0/cMid1, and the three-level Z with its dead
  band;
- the meaning of `sign`;
- the update step sizes, spike width and counter width;
- spike transport as one FIFO word per spike clock, and the receive jitter
  buffer;
- FIFO depth, clock-domain-crossing method and read timing;
- the valid/ready handshake of the generator;
- start phases and synchronous active-high resets.

Not included:

- the GTX transceiver and the Aurora core (vendor IP), and the physical
  link;
- the on-chip logic analyser used to watch the spikes.

The three experiments share one top only for convenience. On hardware they
would be separate builds.

Resource use is not comparable with a vendor report that includes the
protocol core. By its own count, one `fpga_node` is about 110 flip-flops
plus 32 bits of FIFO memory.

## Simulating

Each block `X` has a self-checking testbench `tb/tb_X.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/pco_pkg.sv \
        tb/tb_pco_multi_fpga_top.sv --top-module tb_pco_multi_fpga_top -Mdir obj -o sim
    ./obj/sim

There are two system-level testbenches:

- `tb_pco_multi_fpga_top` uses a 50,000-clock window and runs in well under
  a second.
- `tb_pco_full_size` runs the top with every default, including the full
  200,000,000-clock window, and takes about 8 minutes.

Both share `tb/tb_pco_system.sv`, which uses `tb/aurora_link_model.sv` for
the links. They count each mechanism and fail if one never occurs:

- positive and negative updates;
- spikes inside the dead band;
- spike words carried each way, and spikes rebuilt on both FPGAs;
- Full on each transmit FIFO;
- updates with `sign` = 1;
- a completed window.

To try another coupling shape, change `func_gen`. The rest of the design
sees only `zp`/`zn`.
