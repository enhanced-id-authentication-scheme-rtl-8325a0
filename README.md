# Ring-oscillator PUF with neighbour-difference IDs

Rings of inverters that are laid out identically still run at slightly
different speeds on each die. The differences come from random variation in
manufacturing, and they can serve as a fingerprint of the die. The catch is
that the absolute frequency of every ring also moves with temperature, supply
voltage and die-to-die process spread. Between 25 °C and 70 °C a 54 MHz ring
can drift by several MHz. The differences that identify the die are only tens
of kHz, so a raw frequency is useless as an identifier.

This design gets around that by never using a frequency on its own. It
measures all 32 rings one after another with a single counter. For each pair
of neighbouring rings it keeps the signed difference

    delta_i = f(i+1) - f(i),      i = 0 .. 30

A shift that moves every ring of a die by the same amount cancels out. Only
the local, within-die pattern is left. The 31 differences, 21 bits each in
two's complement, form the ID vector R.

A plain PUF keeps one bit per ring pair ("which ring is faster"). This ID
keeps the size of each difference as well. Two IDs are compared by their
Euclidean distance, not by a Hamming distance. An on-chip authenticator
accepts a die when its normalised distance to an enrolled ID is at or below
a threshold.

## Data path

```
            start/mode                                   ref_we/addr/data, thr
                |                                                 |
          +-------------+  sel,run  +-------------+  ro_en  +-----------+
          | measure_ctrl|---------->| ro_clock_mux|-------->| ro_array  |
          |  (sequencer)|           |             |<--------| 32 rings  |
          +-------------+           +-------------+  osc    +-----------+
            |clear,gate ^ count           | clk_out
            v           |                 v
          +---------------------------------+
          |  freq_counter (ring-clocked)    |
          +---------------------------------+
            | s_valid/ready, idx, freq
            v
          +-----------------+  d_valid/ready, freq, delta
          | delta_extractor |-------------------+---------------------+
          +-----------------+                   |                     |
                                        +---------------+   +------------------+
                                        | serial_packer |   | id_authenticator |
                                        +---------------+   +------------------+
                                                |                      |
                                         +-----------+        auth_done/match/dist_sq
                                         |  uart_tx  |--> uart_txd
                                         +-----------+
```

`puf_top` connects the blocks. Each block has its own file in `rtl/`, and
shared constants are in `rtl/puf_pkg.sv`.

| module | role |
|---|---|
| `puf_pkg` | N_RO = 32, M_BITS = 32, K_BITS = 21, 16 inverters per ring, output-mode enum |
| `ring_oscillator` | behavioural model of one ring (NAND enable + 16 inverters) |
| `ro_array` | behavioural model of the 32 rings with local and global variation |
| `ro_clock_mux` | 32:1 clock mux to the counter; one-hot ring enables |
| `freq_counter` | single 32-bit counter clocked by the selected ring |
| `measure_ctrl` | ring index counter and gate timing; latches each count |
| `delta_extractor` | neighbour difference, saturated to 21-bit two's complement |
| `serial_packer` | byte records: raw counts or ID elements |
| `uart_tx` | 8N1 serial transmitter |
| `id_authenticator` | enrolled-ID store, squared Euclidean distance, threshold decision |
| `puf_top` | the whole design |

## Measuring a ring with one counter

All rings share one counter, so no bias between counters can creep into the
comparison. Measuring one ring goes through four steps of `measure_ctrl`:

1. **SETTLE** (16 cycles). The ring index drives the mux and the ring's NAND
   enable, so only that ring oscillates. The counter is held in clear.
2. **GATE** (`GATE_CYCLES` system cycles, default 2^20). The counter counts
   rising edges of the ring.
3. **HOLD** (16 cycles). The gate is closed and the count settles.
4. **OUT**. The count is latched and offered downstream with valid/ready.
   The sequencer stalls here until the sample is taken. The ring is already
   off in this step, so the mux select only changes while no ring runs.

The counter runs in the ring's own clock domain. It is the only logic that
sees the fast ring signal, so the ring never has to be sampled by the system
clock. Gate and clear reach that domain through two-flop synchronisers.
Opening and closing the gate both go through the same synchroniser, so the
counting window equals `GATE_CYCLES` system periods to within one ring
period. The count goes back to the system domain without a synchroniser: it
is only read after it has stopped changing. For that to hold, SETTLE and
HOLD must last at least three periods of the slowest ring. The defaults
allow rings down to about 10 MHz at a 50 MHz system clock.

The count is `f_ring * GATE_CYCLES / f_clk`. At the defaults (2^20 cycles,
50 MHz) a 54.3 MHz ring gives about 1.14 million. The window sets the scale
of every ID element, and with it the meaning of any distance threshold (see
below).

One ring takes `SETTLE + GATE + HOLD + 1` cycles when nothing stalls. A run
of 32 rings takes 32 × 1,048,609 cycles, about 0.67 s at 50 MHz. `done`
pulses `32 * (SETTLE + GATE + HOLD + 1)` cycles after the edge that sampled
`start`.

## The ID and the serial records

`delta_extractor` keeps the previous ring's count and emits, for rings 1 to
31, `f(i) - f(i-1)`. The difference is reduced to 21 bits. A value that does
not fit saturates to ±(2^20) instead of wrapping, so a grossly out-of-range
pair cannot look like a small difference. Ring 0 passes through without a
difference. `s_last` restarts the chain for the next run.

The output mode is sampled at `start`:

* `MODE_RAW` sends every ring's count, for characterising rings off-chip.
  Each record is 5 bytes: the ring index, then the 32-bit count MSB first.
* `MODE_ID` sends only the ID. Each record is 4 bytes: the element index
  (0 to 30), then the element sign-extended to 24 bits, MSB first.

Bytes go out on `uart_txd` as 8N1 frames at `CLKS_PER_BIT` = 434 cycles per
bit (115200 baud at 50 MHz). `uart_tx` takes the next byte in the last cycle
of a stop bit, so a record goes out without gaps. The link pushes back
through the pipeline. With the default window it never stalls the
sequencer: a raw record takes 21,700 cycles, a measurement about a million.
With short windows it does stall, and nothing is lost.

The ID elements also leave the chip in parallel on `id_valid`, `id_idx` and
`id_delta`, one pulse per element.

## Authentication

For an ID R (31 elements of k = 21 bits) and an enrolled ID R0, the
normalised distance is

    d = sqrt( sum_i (R_i - R0_i)^2 ) / ( 2^k * sqrt(31) )

The denominator is the largest distance two such vectors can have, so d lies
between 0 and about 1. A die is accepted when d ≤ threshold.

`id_authenticator` avoids the square root and the division by squaring both
sides:

    S * 2^(2*24)  <=  thr^2 * 31 * 2^(2*21)

Here S is the sum of squares, accumulated at one element per cycle with one
multiplier. `thr` is the threshold as an unsigned number with 24 fraction
bits (thr = d_th · 2^24). Both sides are exact integers, so the decision is
exact, and equality counts as a match. Index 0 restarts the sum. `done`
pulses two cycles after the last element, together with `match` and the raw
sum `dist_sq`.

The enrolled ID is written through `ref_we`, `ref_addr` and `ref_data`. A
good reference is the mean of many measured IDs, which the host computes
from `MODE_ID` output. The threshold should come from the spread of repeated
measurements, for example six standard deviations of the intra-die distance,
measured at the same gate length. A normalised threshold only means something
for a given count scale. At the default window, neighbouring rings differ by
hundreds to a few thousand counts, and a whole-ID distance of 10^-3 is
already large.

## The ring model

The rings cannot be written as synthesizable logic. On an FPGA each one is a
hand-placed macro: a NAND gate (enable and loop closure) followed by 16
inverters, one LUT each. Every macro must be placed the same distance from
the counter, so that routing does not bias the comparison. That placement
belongs in the implementation constraints, not in this RTL.

`ring_oscillator` and `ro_array` are simulation models with the real ports
(`en`, `osc`). The 17 gate delays of a ring are lumped into one half-period
delay:

    half period = 17 * NOMINAL_STAGE_PS + local(i, DIE_SEED) + GLOBAL_SHIFT_PS  [ps]

* `NOMINAL_STAGE_PS` = 542 gives about 54.3 MHz.
* `local(i, DIE_SEED)` is a fixed hash of the ring index and the die seed,
  in [0, `LOCAL_SPREAD_PS`). The default spread of 12 ps gives neighbour
  differences up to about 65 kHz.
* `GLOBAL_SHIFT_PS` moves all rings together. It stands for die-to-die
  spread or for temperature: +400 ps is roughly a 2.3 MHz drop.
* Each half period gets up to ±`JITTER_PS` (2 ps) of random jitter.

One `DIE_SEED` is one physical die. The same die at another temperature
keeps its seed and changes `GLOBAL_SHIFT_PS`. These parameters pass through
`puf_top` so that a testbench can put several "dies" side by side. They have
no effect on synthesizable logic.

## Simulating

The testbenches need Verilator 5 with timing support. From the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/puf_pkg.sv tb/tb_puf_top.sv --top-module tb_puf_top
./obj_dir/Vtb_puf_top
```

Each testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`, and it has a watchdog.

* `tb_<block>` for each block: rings, mux, counter, sequencer (exact gate
  length and run length, stalls), difference and saturation, byte framing,
  UART timing, and the distance decision including the exact boundary.
* `tb_puf_top` uses a reduced window (2^14 cycles) and a slow link. It runs
  three copies side by side: a die, the same die 400 ps "hotter", and
  another die. The test checks:
  * raw counts against the ring periods, with the link stalling the sequencer;
  * ID elements against the raw differences and against the serial records;
  * the run length;
  * after enrolling the first die's ID: the die and its hot copy are
    accepted and the other die is rejected.

  It runs in about 35 s.
* `tb_puf_dies` sets up five dies, each at the reference condition and
  400 ps hotter, ten copies in all, with a 2^13-cycle window. Acting as the
  host, it prints the table of normalised inter-die distances and each die's
  distance to its own hot copy. It checks that the smallest inter-die
  distance is at least three times the largest intra-die distance (the
  ratio comes out near 8). It then enrols die 1 and checks that both of its
  copies are accepted and the other eight copies rejected. It runs in about
  1.5 minutes.
* `tb_puf_full` leaves every parameter at its default. It makes one complete
  `MODE_ID` run, checks all 31 elements against the ring model's
  prediction, checks the on-chip distance exactly and the serial records,
  and checks the run length. It runs in about 2.5 minutes.

## How far to trust it, and where it goes its own way

Everything here has been simulated only. No FPGA build, placement or timing
run was made.

These points follow the published scheme: 32 rings of 16 inverters and a
NAND, one counter fed through a ring multiplexer whose select is an index
counter, a 32-bit count, neighbour differences of 21 bits in two's
complement, an ID of 31 elements, and Euclidean distance normalised by
2^k·√(n−1) with a "not above threshold" acceptance rule.

These are this design's own choices:

* The counting window (2^20 cycles) and the 50 MHz clock it assumes; settle
  and hold times.
* Synchronising gate and clear into the ring domain.
* Enabling only the ring under measurement.
* Saturating differences that do not fit in 21 bits.
* The valid/ready pipeline and its back-pressure.
* The two output modes and the byte record layout.
* 8N1 at 115200 baud.
* Deciding authentication on-chip. The original scheme expects the host to
  do this; here the serial output still allows it.
* The squared-comparison arithmetic and the 24-bit threshold format.

Left out:

* The host's statistics: averaging repeated IDs into a nominal ID, and
  estimating thresholds from intra-die spread.
* The FPGA macro placement of the rings.

The threshold values quoted for the original experiments (around 2–3 ×
10^-2) belong to a count scale that is not given. They cannot be carried
over to this design's default window unchanged.
