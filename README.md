# Adaptive clock recovery for constant-bit-rate traffic over a cell network

A constant-bit-rate service (here a 34.368 Mbit/s E3 stream, 4.296 Mbyte/s)
carried over a packet or cell network reaches the receiver in bursts: 47 bytes
at line speed, then a gap whose length varies from cell to cell (delay jitter).
The receiver has to hand the bytes on at a steady rate equal to the *source's*
rate, which it does not know exactly and which no common network clock tells it.

The adaptive (FIFO-level) method solves this with a buffer and a loop. Bytes
arriving from the network go into an elastic buffer; a local oscillator reads
them out. If the buffer slowly fills, the local clock is too slow; if it
drains, too fast. A controller watches the fill level and steers the
oscillator so that the buffer stays about half full, and the read clock then
tracks the source frequency on average while the buffer absorbs the jitter.

This repository holds RTL for a complete test bench of that idea in hardware:
a transmitter that turns a byte stream into jittered cells, with a
programmable jitter distribution, and a receiver with a 32 Kbyte buffer and
the *hybrid* level controller, which is the variant that gave the smoothest
recovered clock among those considered (direct level-to-voltage table, charge
pump with two thresholds, and the hybrid).

```
 source bytes ─► tx FIFO ─► [PTC: read 47 bytes, wait td, repeat] ─► byte bus ─►
   rx FIFO (32 KB) ─► recovered bytes
      ▲ read ticks          │ WR / RD pulses
      │                     ▼
     VCO ◄─ LPF ◄─ D/A ◄─ counter ◄─ UP/DOWN/reset ◄─ state machine ◄─ FIFO level
```

## Clocking and units

All logic runs on one clock, the network byte clock: 155.52 Mbit/s / 8 =
19.44 MHz. One period is a *Tbyte* (51.4 ns), and every time in the design is
counted in Tbytes. A 47-byte cell therefore takes 47 cycles on the bus
(Tp = 47 Tbyte). The service produces a byte every 19.44/4.296 = 4.525 Tbyte,
so a cell's worth of data arrives about every 212.7 Tbyte.

Instead of a second clock domain, the recovered service clock appears as a
one-cycle `tick` per service byte period, generated by the VCO model from a
phase accumulator on the byte clock (`rd_clk` is the same clock as a square
wave sampled by the byte clock). The source side likewise writes the transmit
FIFO with strobes (`src_wr`). A silicon version would put the receive FIFO's
read port in the VCO's clock domain and move the level across with Gray-coded
pointers. That work is not done here.

## Transmitter: the Programmable Transfer Control (PTC)

The PTC (`ptc.sv`) emulates a network. It reads the transmit FIFO in cells and
puts gaps with a chosen statistical distribution between them:

* **Scrambler** (`scrambler.sv`). An 8-bit maximal-length LFSR whose feedback
  is inverted when the low 7 bits are zero, so the all-zero state is included
  too. The sequence has period exactly 256 and visits every address once per
  period, i.e. uniformly.
* **EPROM** (`jitter_eprom.sv`, `jitter_tables.hex`). Holds the *inverse*
  distribution function of the wanted jitter. A uniform address in gives a
  sample of that distribution out. The table has two 256-word halves, selected
  by `dist_sel`: Gaussian and Uniform, both with mean 164.5 Tbyte and standard
  deviation 15 Tbyte. Entry *i* of a half is
  `round(164.5 + 15·Q((i+0.5)/256))`, where `Q` is the inverse distribution
  function of the zero-mean, unit-variance law. The Gaussian entries therefore
  span 121…208 and the Uniform entries 139…190. Load other contents to get
  other jitter.
* **Delay generator** (`delay_generator.sv`). Loads the gap `td` and raises
  `cell_enable` `td+1` cycles later.
* **Control** (`ptc_control.sv`). On `cell_enable`, issues 47 read pulses, one
  per cycle. The cycle of the last pulse loads the next gap and steps the
  scrambler. The EPROM output is thus prefetched, ready long before it is used.
  Exactly `td` idle cycles separate two cells, so the cell period is
  T = 47 + td (211.5 Tbyte on average).
* **FIFO_TRACK** (`fifo_track.sv`). Counts write minus read pulses to get the
  transmit FIFO level. Its empty flag is **Hold**: while it is set, read
  pulses are withheld and the cell is stretched.

The average gap makes the PTC slightly faster than the service (211.5 against
212.7 Tbyte per cell), so the transmit FIFO hovers near empty and Hold absorbs
the difference. The long-run output rate therefore equals the source rate,
and the programmed gaps add the jitter.

The bus (`cell_bus_t` in `e2e_pkg.sv`) carries a byte, a write strobe and a
start-of-cell flag. The strobes are delayed one cycle to line up with the
FIFO's registered output. Cells have no header.

## Receiver: hybrid level control

`hybrid_dpll.sv` contains the digital part of the loop. `fifo_track` counts
the receive FIFO level, `hybrid_fsm` decides, and `updown_counter` holds the
word sent to the D/A converter. The analog chain (D/A → low-pass filter →
VCO) exists only as behavioural models (below).

The state machine (`hybrid_fsm.sv`) sends the counter UP and DOWN pulses and
the reset word with its load strobe. It reads the level every
`SAMPLE_INTERVAL` cycles (2^20 Tbyte ≈ 54 ms by default). It has three
states:

| state | when | action per reading |
|---|---|---|
| `ST_FILL` | after reset and after a fault | `load` holds the counter at the reset word (mid-scale, the nominal frequency); no reads; leaves once the buffer is half full |
| `ST_TRACK` | `TH_LOW ≤ level ≤ TH_HIGH` | **trend correction only**: accumulates the difference between consecutive readings; after `N_AVG` readings, one UP if the average rise exceeds `SLOPE_TH` bytes per reading, one DOWN if the average fall does, else nothing; then starts a new set |
| `ST_LIMIT` | level above `TH_HIGH` or below `TH_LOW` | **absolute correction only**: one UP (too full) or one DOWN (too empty) per reading; the partial trend set is discarded |

The two mechanisms work together. Inside the band the controller ignores
where the level is and reacts only to its drift, so jitter that moves the
level back and forth does not modulate the clock. The dead band
(`SLOPE_TH`) and the averaging over `N_AVG` readings reject the burstiness of
cell arrivals, which moves a single reading by up to a cell. Near the ends of
the buffer, position matters more than trend, and the controller pushes the
level back `N_AVG` times faster.

A **fault** is a read tick while the buffer is empty (underflow) or a byte
arriving while it is full (overflow). It sends the machine to `ST_FILL`, and
the registered `resync` pulse flushes the FIFO and clears the level count in
the same cycle. The counter returns to the reset word, and reading restarts
once the buffer is half full again. The recovered stream loses the bytes
that were in flight, but it never shows reordered data. While `resync` is
pending, the fill state ignores the stale level, so an overflow cannot skip
the refill.

The counter (`updown_counter.sv`) steps by one per UP or DOWN and saturates
at both ends, which keeps the frequency inside the VCO's range. With the
default 12-bit word and ±20 ppm range, one step is 40/4096 ≈ 0.01 ppm.

### Choosing the loop constants

The drift seen per reading is `error × SAMPLE_INTERVAL / 4.525` bytes.
With the defaults (2^20 Tbyte, `SLOPE_TH` = 2), a trend correction needs an
error of about 8.6 ppm. Smaller errors are corrected only once the level
reaches a threshold. The thresholds sit at 1/8 and 7/8 of the buffer (4096
and 28672 bytes), which leaves 12 Kbytes either side of half-full. These
defaults are a starting point, not tuned values. The right set size,
interval and dead band depend on the jitter and on the oscillator. Every
constant is a parameter of `e2e_sync_top`.

## Behavioural models of the analog parts

These three files use `real` arithmetic and are not synthesizable. Their
first comment says so.

* `dac_model.sv`: ideal unipolar converter, `vout = VREF·word/2^W`.
* `lpf_model.sv`: first-order RC low-pass, evaluated once per byte clock.
  The default cutoff is 100 Hz.
* `vco_model.sv`: linear tuning,
  `f = F_CENTER·(1 + PPM_RANGE·1e-6·(2·v/VREF − 1))` with `v` clamped to
  0…VREF. Its phase accumulator produces the read `tick`, and `freq_hz` is
  exposed for monitoring.

The top level `e2e_sync_top.sv` therefore does not synthesize as a whole. To
build hardware, replace the three models with a real D/A and VCXO, or with a
digitally controlled oscillator, and keep everything else.

## Parameters of `e2e_sync_top`

| parameter | default | meaning / origin |
|---|---|---|
| `RX_DEPTH` | 32768 | receive buffer, bytes (reference size) |
| `TX_DEPTH` | 1024 | transmit FIFO, bytes (own choice) |
| `CELL_BYTES` | 47 | payload bytes per cell (AAL type 1 SAR payload) |
| `SCR_BITS` | 8 | scrambler length n; the EPROM has 2·2^n words (own choice) |
| `DELAY_W` | 12 | gap width in Tbyte (own choice) |
| `EPROM_FILE` | `rtl/jitter_tables.hex` | jitter tables, read relative to the working directory |
| `TH_LOW`, `TH_HIGH` | RX_DEPTH/8, 7·RX_DEPTH/8 | absolute-correction thresholds (own choice) |
| `SAMPLE_INTERVAL` | 2^20 | cycles between level readings (own choice) |
| `N_AVG` | 8 | differences per trend average (own choice) |
| `SLOPE_TH` | 2 | trend dead band, bytes per reading (own choice) |
| `CTRL_W` | 12 | counter / D/A width (own choice) |
| `FC_HZ` | 100 | LPF cutoff (own choice) |
| `F_SYS_HZ` | 19.44e6 | byte clock |
| `F_SERVICE_HZ` | 4.296e6 | nominal service byte rate |
| `PPM_RANGE` | 20 | VCO range, ± ppm |

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Run one with Verilator 5 from the
repository root (the EPROM table path is relative to it):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/e2e_pkg.sv \
          tb/tb_e2e_sync_top.sv --top-module tb_e2e_sync_top
./obj_dir/Vtb_e2e_sync_top
```

| testbench | what it shows |
|---|---|
| `tb_sync_fifo`, `tb_fifo_track`, `tb_updown_counter` | against reference models, with random traffic, both limits and flush/clear |
| `tb_scrambler` | period exactly 2^n, every value once (n = 8 and 10) |
| `tb_jitter_eprom` | table statistics (mean 164.5, sd 15), monotonic inverse distribution function, Gaussian tails against the Uniform bounds |
| `tb_delay_generator`, `tb_ptc_control` | gap of exactly `td` cycles; 47-byte cells; Hold stalls reads |
| `tb_ptc` | over a full scrambler period the 256 measured gaps are exactly the 256 table entries, for both tables; Hold under a slow source |
| `tb_hybrid_fsm` | fill exit, dead band, trend UP/DOWN, absolute UP/DOWN once per reading, fault response |
| `tb_hybrid_dpll` | level bookkeeping, read gating, counter direction, underflow and overflow recovery |
| `tb_dac_model`, `tb_lpf_model`, `tb_vco_model` | transfer function, time constant, tick rate against the tuning law |
| `tb_e2e_sync_top` | whole system at reduced size (1 Kbyte buffer, ±2% VCO, 8-bit D/A): a +1% source, then an outage, then −1% with Uniform jitter. It counts cells, Hold, fills, trend and absolute corrections in both directions, resyncs and table switches, and checks byte order and the recovered rate (within 0.5%). A second instance with a 64-byte buffer is overflowed by single cell bursts and must resync and keep its stream in order |
| `tb_e2e_full` | all defaults: fill to 16384 bytes in 74.4k cycles (≈3.8 ms), then nine readings with no fault and the stream in order |
| `tb_workload_jitter` | all defaults, Gaussian then Uniform jitter with sd 15 Tbyte: level histogram in 34 zones of 1024 bytes (ends = underflow/overflow) and frequency histogram over ±20 ppm. The level stays in zones 17–18 |

Each run takes a few seconds at most.

The RTL also carries assertions that fire in any simulation run with
`--assert`:
* the PTC never reads an empty transmit FIFO, and Hold equals its empty flag;
* the source never writes into a full transmit FIFO;
* the bus strobe matches the FIFO's read-valid;
* the receive FIFO's own full and empty flags agree with the tracked level,
  and each refused read or write was flagged as a fault;
* UP and DOWN are never asserted together.

## Limits and departures

* **Not built.**
  * The user interfaces. The byte stream enters on `src_wr`/`src_data` and
    leaves on `rx_valid`/`rx_data`.
  * The stage that inserts and removes special words or patterns on the
    transmit and receive sides. The adaptive method does not need it, and
    its format is not defined here.
  * The direct method and the charge-pump method, which were alternatives to
    the hybrid controller.
* **Single clock.** The source and recovered clocks are strobes in the byte
  clock domain (see *Clocking and units*).
* **Service rate.** The gap tables assume 4.5 Tbyte per byte (T = 211.5),
  while 4.296 Mbyte/s over a 155.52 Mbit/s line gives 4.525. The VCO is
  centred on 4.296 MHz, and Hold absorbs the 0.6% difference at the
  transmitter.
* **Own choices.** The fault procedure (flush and refill to half), the
  constants of the state machine and every size marked "own choice" above.
* **Full-size loop dynamics.** With ±20 ppm and 54 ms readings, the loop takes
  seconds of real time to settle, which is tens of millions of cycles. The
  full-size tests show correct filling, tracking and data integrity. The
  settling behaviour is shown at reduced size.
* **Warnings.**
  * Verilator warns that `rst_n` is used both as an asynchronous reset and in
    the assertions' `disable iff`.
