# Peak-tracking energy meter for a 20 MHz train of narrow laser pulses

A quantum key distribution transmitter sends laser pulses shorter than 1 ns at
20 MHz. To check that its lasers are stable, a tap of the light goes to a
photodiode. An analog conditioning board amplifies and broadens the pulse to a
few nanoseconds. The pulse energy then shows as the height of the broadened
electrical pulse.

This RTL is the FPGA part of that meter. A 10-bit ADC samples the conditioned
signal at 300 MSPS. The ADC clock is free-running: it is not locked to the
laser. The FPGA finds the peak of every pulse and reports its ADC code as the
pulse amplitude, 20 million amplitudes per second. It then streams the
amplitudes to a PC over Gigabit Ethernet.

The key idea is cheap peak tracking. One laser period is 15 ADC samples, so
once one peak is known, the next is expected 15 samples later. Only the
predicted sample and its two neighbours are compared. The biggest becomes the
amplitude and the reference for the next prediction. This follows the slow
drift between the laser and the ADC clock without searching whole periods.

## Signal chain

```
 fibre ─► photodiode + conditioning board ─► ADC (10 bit, 300 MSPS) ─► 10 LVDS lanes
                                                  ▲                       │
                              clock generator ────┘ (300 MHz LVDS clock)  │
                                  ▲ SPI                                   ▼
 ┌────────────────────────────── FPGA (laser_energy_top) ─────────────────────────────┐
 │ spi_clk_config      lvds_deserializer ──► amplitude_acquisition ──► eth_tx_framer  │
 │ (board clock)       (300 MHz → 30 MHz)   (30 MHz)                   (30 MHz)       │
 └────────────────────────────────────────────────────────────────────────┬───────────┘
                                                                           ▼
                                         Ethernet MAC core ─► Gigabit PHY ─► PC
```

The conditioning board, the ADC, the clock generator chip, the PLL, the
Ethernet MAC core and the PHY are outside this RTL. They connect through the
ports of `laser_energy_top`. The board also has a USB 2.0 link to the PC. It is
not used here.

## From lanes to samples

The ADC drives each of its 10 output bits on a lane of its own, one sample per
300 MHz clock. `lvds_deserializer` shifts each lane into a 10-bit register.
Every tenth fast cycle it copies the ten registers to a holding register, and
the 30 MHz parallel clock samples that register. A parallel cycle therefore
carries ten consecutive samples. They come as ten *channel words*, one per ADC
bit:

```
channel 9:  b9(s0) b9(s1) ... b9(s9)      word bit 9 ... word bit 0
...
channel 0:  b0(s0) b0(s1) ... b0(s9)
```

Bit 9 of every channel word belongs to the earliest sample `s0`. The function
`lem_pkg::to_samples` transposes the channel words into `samples_t`, an array
of ten 10-bit samples in time order. Below, an *address* is a
position in that array: address 0 is the earliest sample, which is bit 9 of
the channel words.

No word alignment or bit-slip is needed. Any grouping of ten consecutive
samples is fine, because the peak tracker works at any phase. `rx_locked` is
the PLL lock, moved into the 30 MHz domain by a two-flop synchroniser. It only
rises after a first complete word has been captured.

## Peak tracking (`amplitude_acquisition`)

### Prediction arithmetic

A period of 15 samples spans one and a half words. Every word therefore holds
either no peak or exactly one. Two words out of three hold one.

The module keeps `exp_pos`, the predicted peak address inside the word it is
examining:

* `exp_pos` ≤ 9: the word holds a peak. The module compares the samples at
  addresses `exp_pos-1`, `exp_pos` and `exp_pos+1`. The biggest one wins, and
  on a tie the predicted sample wins. Its value is output with `amp_valid`.
  Its address `a` becomes the reference, and the next prediction is
  `a + 15 - 10 = a + 5` in the following word.
* `exp_pos` ≥ 10: the word holds no peak, and the prediction moves on by one
  word: `exp_pos - 10`.

Example: a peak at address 0 (channel-word bit 9) predicts the next peak at
address 5 of the next word, which is channel-word bit 4. If that peak really
is one sample later (address 6), the tracker takes the right neighbour and
predicts address 11 for the word after. That word has no peak, so the
prediction becomes address 1 in the next word. A drift of up to one sample per
pulse is followed this way.

### Window across word edges

A neighbour can lie in the adjacent word: address −1 is the last sample of the
previous word, and address 10 is the first sample of the next. The module
therefore examines each word one cycle late (`prev`). It keeps the last sample
of the word before (`pp_last`) and already has the next word (`cur`). This
gives a 12-entry window over addresses −1 to 10. `exp_pos` always stays in
0..15.

### Finding the first peak

After lock, the module waits three cycles so that the whole window holds fresh
data. It then takes the maximum over two complete words. Twenty samples always
contain at least one peak. The position of that maximum seeds the prediction,
and tracking starts.

If lock is lost, the search starts again. The first search assumes the
neighbours of a peak are lower than any true peak. This holds for the sharp,
broadened pulses the analog board produces. If it were wrong, the tracker would
still climb to the true peak by one sample per pulse.

### Latency and rate

An amplitude appears three 30 MHz cycles after the word that holds it
reaches `ch_words`. In steady state the output is two amplitudes per three
cycles. `peak_addr` (−1..10) and `peak_sel` (left, predicted, right) are also
output. A histogram of `peak_sel` shows how fast the laser drifts against the
ADC clock.

The amplitude is the raw ADC code at the peak. There is no baseline
subtraction and no conversion to energy. The board was characterised for
linearity between optical peak power and amplitude, so that conversion belongs
in the PC software.

## Upload frames (`eth_tx_framer`)

The framer packs three amplitudes into each 32-bit word, which gives 213 Mbit/s
of payload at 20 MHz. It writes whole frames to the 32-bit transmit FIFO
interface of the MAC core: `data`, `sop`, `eop`, `mod`, `wren` and `rdy`, with
byte 0 in bits 31:24. The MAC adds padding and the FCS.

| word | contents |
|------|----------|
| 0 | destination MAC [47:16] |
| 1 | destination MAC [15:0], source MAC [47:32] |
| 2 | source MAC [31:0] |
| 3 | EtherType (default `0x88B5`), 16-bit frame sequence number |
| 4 … 3+N/3 | `{2'b00, a[k], a[k+1], a[k+2]}`, the earliest amplitude in bits 29:20 |

N is `SAMPLES_PER_FRAME` (default 384). That makes 128 payload words, a
528-byte frame. The default destination is broadcast and the default source is
a locally administered address.

Groups of three go into a FIFO of `FIFO_DEPTH` words (default 512, so 1536
amplitudes). A frame starts only when its whole payload is in the FIFO, so a
frame never waits for data. The FIFO only fills while the MAC holds `rdy` low.
A group that finds the FIFO full is dropped whole and counted in
`overflow_cnt`. The frame sequence numbers only reveal frames lost on the
link. Amplitudes dropped at the FIFO leave no mark in the frames; only
`overflow_cnt` counts them.

At one word per 30 MHz cycle the interface can carry 960 Mbit/s, more than four
times what the pulse train produces. `ff_tx_mod` is always 0 because frames
are whole words.

## Clock generator set-up (`spi_clk_config`)

After reset, the FPGA writes the clock generator's registers over SPI so that
the chip drives the ADC's 300 MHz clock. The SPI master runs on the board clock
because the ADC clock does not exist yet.

Each word is framed by `spi_le` low. Data change while `spi_sclk` is low, and
the chip samples them on the rising edge. The rising edge of `spi_le` latches
the word. The defaults are 9 words of 32 bits, LSB first, with the register
address in bits 3:0. This is the usual write format of CDCE62005-class
synthesizers.

**The register contents are not given.** By default `REG_WORDS` carries only
the register addresses with zero data. Fill it in from the data sheet of the
chip you use. The sequence takes `1 + NUM_WORDS*(2*WORD_BITS+3)*CLK_DIV` board
clocks, and `start` repeats it.

## Clocks and reset

| clock | frequency | used by |
|-------|-----------|---------|
| `clk_sys` | board oscillator | `spi_clk_config` |
| `clk_fast` | 300 MHz, from the PLL | lane shift registers |
| `clk_par` | 30 MHz = `clk_fast`/10, same PLL, fixed phase | holding-register capture, acquisition, framer; also the MAC's transmit FIFO clock |

`clk_par` must not rise on the `clk_fast` edge that updates the holding
register. The PLL's phase setting guarantees this, and the testbenches place
the two clocks accordingly.

After the PLL loses lock, `rx_locked` falls two to three parallel cycles
later, and the words of those cycles are not valid. `rst_n` is synchronous and
active low in every domain. Hold it for at least two `clk_par` cycles.

## Files

| file | contents |
|------|----------|
| `rtl/lem_pkg.sv` | constants (10-bit ADC, factor 10, period 15), sample types, lane/sample transposition |
| `rtl/lvds_deserializer.sv` | 10 lanes × 1:10 deserializer, lock synchroniser |
| `rtl/amplitude_acquisition.sv` | peak search and tracking |
| `rtl/sync_fifo.sv` | first-word-fall-through FIFO |
| `rtl/eth_tx_framer.sv` | grouping, FIFO, frame transmitter |
| `rtl/spi_clk_config.sv` | clock generator SPI master |
| `rtl/laser_energy_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_laser_energy_top` |
| `tb/spi_slave_model.sv` | behavioural SPI receiver used by the testbenches |

Parameters with defaults: `PERIOD` = 15 samples (valid range 11..20),
`SAMPLES_PER_FRAME` = 384 (a multiple of 3), `FIFO_DEPTH` = 512 (a power of
two), `SPI_CLK_DIV` = 4. The MAC addresses, the EtherType and the SPI word table
are parameters of the blocks.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It also
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/lem_pkg.sv tb/tb_laser_energy_top.sv --top-module tb_laser_energy_top -o sim
./obj_dir/sim
```

Swap in another `tb_*` name to run a single block. All testbenches run in well
under a second.

`tb_laser_energy_top` runs the whole design at its default parameters:

* SPI set-up, then PLL lock.
* A generated pulse train with a short rise and a longer fall. The peak code of
  pulse k is 640 + (37k mod 301), so every reported amplitude names its pulse.
* Nominal 15-sample spacing first, then random 14/16 spacings that mimic
  drift.
* A long MAC stall that overflows the FIFO.
* A loss and return of PLL lock.

It checks the following:

* Every acquired amplitude is the peak of the next pulse, with exactly one gap
  at the loss of lock.
* The rate is 200 amplitudes in 300 cycles.
* Every frame header and sequence number is correct.
* The payload equals the acquisition stream with whole groups removed, exactly
  `overflow_cnt` of them.

It also counts that each mechanism occurred: left, predicted and right sample
chosen, peak-less words, back-pressure, overflow and re-acquisition.

The block testbenches check these points:

* The deserializer words are gap-free.
* The tracker follows drift and recovers after lock loss.
* The framer matches a reference FIFO model under random `rdy`.
* The SPI master sends correct LSB- and MSB-first words and the exact sequence
  length.

## Where this design is its own

What comes from the source design:

* The signal chain.
* The 10-bit, 300 MSPS ADC and the deserialization factor of 10 with a 30 MHz
  parallel clock.
* The channel-word bit order.
* The 15-sample period.
* The three-point compare with `last_max_addr` tracking and a valid strobe.
* The wait for deserializer lock.
* Upload through an Ethernet MAC at about 200 Mbit/s.
* SPI configuration of the clock chip.

Choices made here, which a user may want to revisit:

* **First-peak search.** The maximum over 20 samples. Tie-breaking in favour
  of the predicted sample.
* **Latency.** One extra word of latency, so that neighbours across word
  boundaries can be used.
* **Lock handling.** No word alignment. Lock is the synchronised PLL lock.
* **Frame format.** The format, three amplitudes per word, the frame size, the
  FIFO depth, the drop-on-overflow policy and the addresses.
* **SPI word format and register table.** The table is incomplete, as noted
  above.
* **Amplitude.** No baseline subtraction, and a single raw 10-bit code per
  pulse.
