# Four-channel Welch power-spectrum core

This core computes averaged power spectra (Welch's method) for four
channels of 18-bit samples. It was built for passive acoustic emission
spectroscopy, where the noise and vibration of a machine are recorded
with microphones or accelerometers, and the state of the process is judged
from the spectrum of that noise.

For every channel the core cuts the sample stream into 1024-sample frames
that overlap by half. Each frame is multiplied by a window (Welch by
default) and transformed by a 1024-point FFT. The core then forms
|X[k]|² for the 512 bins from DC up to just below the Nyquist frequency.
It sums `n` such spectra per channel and stores the sum where a host
processor can read it. At 250 kS/s per channel, each channel delivers a
new frame every 512 samples, about 488 frames per second. One FFT is shared
by all channels and is busy for about 14% of the time at 100 MHz.

```
            +------------------- input_handler -------------------+
sample[0] ->| input_buffer 0 --req/ack--+                         |
sample[1] ->| input_buffer 1 --req/ack--+-- token_arbiter         |
sample[2] ->| input_buffer 2 --req/ack--+                         |
sample[3] ->| input_buffer 3 --req/ack--+   frame mux (channel tag)|--+
            +-----------------------------------------------------+  |
   +-----------------------------------------------------------------+
   |   +------------------------ psd_engine ------------------------+
   +-->| window_handler -> fft_r2 -> power_norm (|X|^2, bins 0..511) |--+
       |                     housekeeper x4 (one per channel)       |  |
       +------------------------------------------------------------+  |
   +-------------------------------------------------------------------+
   +--> accumulator (4 x 512 sums) --> register_interface --> host bus, done
```

## Framing and overlap (`input_buffer`)

Each channel writes its samples into a ring of 2048 words, twice the frame
length. The first frame is complete after 1024 samples. After that, a new
frame is complete every 512 samples, and it holds the newest 1024 samples.
So every sample lies in two frames, which is the 50% overlap of Welch's
method.

When a frame is complete, the buffer raises `req` and keeps the frame's
start address. After `ack`, it streams the frame out, one sample per clock,
two clocks after the acknowledge. Writing continues during the read-out.
The ring has room for 1024 more samples, so new samples cannot overwrite
the frame being read. This holds as long as a channel gives at most one
sample every two clocks.

**Overload.** Suppose a frame is still waiting for the engine when the next
one completes. The older frame is then dropped and counted, and the newer
one takes its place. Whole frames are lost, never parts of one. Each
average is still a sum of `n` complete spectra, so an overloaded core loses
update rate, not correctness.

## Sharing the engine (`token_arbiter`)

A token moves round the four channels. When the engine reports `ready`,
the arbiter grants the first requesting channel at or after the token
holder. The token then moves to the next channel. A channel that has just
been served therefore waits until every channel that was waiting at that
moment has had its turn. No channel can starve another, under any load.
After a grant, the arbiter waits until it has seen `ready` go low before it
grants again. This makes it independent of how long the engine takes to
start.

## The engine (`psd_engine`)

* **`window_handler`** multiplies sample *n* of a frame by coefficient
  *n*. The table holds 1024 unsigned 1.17 coefficients and can be written
  from the host, so any window can be loaded. At start-up it holds the Welch
  window `w[n] = 1 - ((n-512)/512)²`, computed with integers during
  elaboration. The product is rounded back to 18 bits.
* **`fft_r2`** is a radix-2 burst FFT with 18-bit data and 18-bit twiddle
  factors. It works in three phases on one in-place memory:
  * **Load.** 1024 clocks. The real samples are written at bit-reversed
    addresses.
  * **Compute.** 10 stages of 512 butterflies, one per clock, 5120 clocks
    in all. Each butterfly computes `t = b·W^k`, `a' = (a+t)/2` and
    `b' = (a−t)/2`.
  * **Unload.** 1024 clocks. The bins leave in natural order.

  Halving at every stage scales the whole transform by 1/N. For a real
  input, no intermediate value can then exceed full scale. Twiddle factors
  are cosine and sine tables built during elaboration, with +1.0 clipped to
  the largest code. One transform keeps the core busy for 7168 clocks. The
  first bin leaves 5121 clocks after the last sample.
* **`power_norm`** is the normalization stage. It forms `re² + im²` as a
  36-bit value. Only bins 0–511 are passed on, because the spectrum of a
  real signal is conjugate-symmetric. Bin *k* is centred on
  *k* × 244.14 Hz at 250 kS/s.
* **`housekeeper`** exists once per channel. It counts how many spectra its
  channel has already added to the accumulator. When a transform of that
  channel starts to unload, the housekeeper says whether this spectrum is
  the *n*-th one. That flag (`out_avg_last`) travels with all 512 bins.

## Averaging (`accumulator`)

One memory of 4 × 512 words of 48 bits holds the four accumulators,
addressed by {channel, bin}. Each bin is read, added and written back in one
clock. A spectrum flagged as the *n*-th is forwarded instead: the sums go
on to the register interface, and each word is set to zero in the same
clock. After reset, a 2048-clock sweep clears the memory. 48 bits leave room
for 4096 full-scale spectra.

The output is the plain sum of `n` power spectra. Dividing by `n` or by the
window's energy, to get a calibrated power spectral density, is left to the
host software.

## Host side (`register_interface`)

Finished averages go into a circular buffer of 4 spectra (SLOTS), each with
its channel number. `done` is high for one clock when a spectrum has been
stored completely. When all slots are full, an arriving spectrum is dropped
whole and counted.

The bus is a plain synchronous word bus. A write takes effect on the clock
edge where `bus_wr` is high. `bus_rdata` shows, one clock later, the word
at the address given in the previous clock.

| word address | access | meaning |
|---|---|---|
| `0x0000` CTRL | rw | bit 0: accept samples (0 after reset) |
| `0x0001` NAVG | rw | `n`, spectra per average (10 after reset) |
| `0x0002` STATUS | ro | [7:0] spectra stored, [31:16] spectra dropped because the buffer was full |
| `0x0003` HEAD | ro | [31] a spectrum is stored, [7:0] its channel |
| `0x0004` POP | wo | release the oldest spectrum |
| `0x0005` DROPS | ro | frames dropped by the input buffers |
| `0x1000 + 2·bin + h` | ro | oldest spectrum: bin `bin`, low (h=0) or high (h=1) 32 bits |
| `0x2000 + n` | rw | window coefficient *n* (1.17, 2^17 = 1.0) |

A host program works like this: set NAVG, write 1 to CTRL, wait for `done`
(or poll HEAD[31]), read the channel from HEAD and the 1024 data words,
then write POP.

## Top level (`welch_psd_core`)

The core has these ports:

* `clk` and `rst`. The reset is synchronous and active high.
* `sample_valid[4]` and `sample[4]`. These are the samples, two's
  complement, with one strobe per channel.
* `bus_addr`, `bus_wr`, `bus_wdata` and `bus_rdata`, the register bus.
* `done`.

The parameters are `N_CH` (4), `N_FFT` (1024), `SAMPLE_W` (18) and `SLOTS`
(4). Widths and the register map are in `rtl/psd_pkg.sv`.

The channel count and frame length are parameters. However, the register
map has room for at most 4096-point frames (2048 bins) and 256 channels. For each set of values,
check that the engine can keep up: `N_CH` × fs / (N/2) frames per second,
times 2N + (N/2)·log₂N clocks per frame, must stay below the clock rate.

## What the design takes from its source, and where it departs

Taken over:

* Four channels of 18-bit samples.
* 1024-sample frames with 50% overlap, and a 512-bin half spectrum.
* Welch window by default, with any window loadable.
* Radix-2 FFT with 18-bit input and twiddle factors, and scaling.
* |X|² normalization.
* Four accumulators that forward their sums after `n` spectra and are then
  emptied.
* A circular output buffer with a done flag.
* Per-channel housekeepers.
* A token arbiter with request/acknowledge from the input buffers.
* Dropping of frames under overload.

Own choices or departures:

* **The FFT.** The reference system used a vendor FFT core in radix-2 burst
  mode, reported at 6500 cycles per transform. `fft_r2` is a new
  implementation with the same configuration, but it takes 7168 clocks. As
  a result, the engine's channel capacity at 100 MHz is 28 channels at
  250 kS/s, not the 31 that follow from 6500 cycles.
* **Interfaces.** The reference system reads the converters over a serial
  link and attaches the core to a CoreConnect OPB bus. Neither protocol is
  specified, so the core has parallel sample inputs and a generic register
  bus. An OPB or AXI slave wrapper, and a deserializer for the converters,
  must be added for a real system.
* **Sizes and values that were not given.** These are the ring size, the
  accumulator width (48 bits), the circular-buffer depth (4), the reset
  value of `n` (10), the coefficient format, the rounding, and the
  full-buffer and overload policies.
* **Bin numbering.** Bins are numbered from 0. A 30 kHz tone at 250 kS/s
  shows up at bin 123 (30.03 kHz). The same peak is bin 124 when counted
  from 1, as MATLAB does.
* **`done` length.** `done` lasts one clock.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it establishes |
|---|---|
| `tb_fft_r2` | all 1024 bins of three frames (on-bin tone, random full scale, impulse) match a double-precision DFT to ±6 LSB; latency 5121 and busy time 6144 clocks after the last input |
| `tb_psd_engine` | full-size engine against a floating-point windowed DFT; 30 kHz tone peaks at bin 123; housekeeper flag for n = 2; 7167 clocks not ready per frame |
| `tb_window_handler` | Welch table within 1 LSB of the formula, windowed output within 1 LSB, rectangular window passes samples unchanged |
| `tb_input_buffer` | frame contents at every 512-sample step (64-point test), two-clock read-out, dropping of waiting frames |
| `tb_token_arbiter` | reference model of the token rule, one-hot grants, strict rotation under full load |
| `tb_input_handler` | four channels, contiguous tagged frames, fairness: every waiting channel is served before a channel is served twice |
| `tb_power_norm`, `tb_housekeeper`, `tb_accumulator`, `tb_register_interface` | arithmetic, counting, per-channel sums and emptying, FIFO order, one-clock `done`, buffer overflow, register map |
| `tb_welch_psd_core` | whole core at 64 points: each bin of every averaged spectrum matches a single-channel floating-point model (channel separation), averaging level, a switch to a rectangular window over the bus, output-buffer overflow, and a 1.3× overload that drops frames while spectra stay correct |
| `tb_welch_psd_full` | whole core at default size and real rate (100 MHz, a sample every 400 clocks): tones of 30/10/50/90 kHz peak at bins 123/41/205/369 in the first averaged spectrum of each channel |
| `tb_welch_psd_overload` | whole core at default size with samples every 43 clocks, so four channels need 1.3× the engine's capacity: frames are dropped and counted, every channel keeps being served, and all twelve averaged spectra read peak at the right bin with full level |
| `tb_welch_psd_8ch` | the core built with eight channels (64 points): every channel delivers averaged spectra with the right peak and level, no frames dropped at about half load |

To run a testbench with Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/psd_pkg.sv tb/tb_welch_psd_full.sv \
          --top-module tb_welch_psd_full -y rtl -y tb
./obj_dir/Vtb_welch_psd_full
```

Use the same command with any other testbench name. The full-size run
simulates about 650 000 clocks and takes a few seconds. The testbenches use
only `$urandom` and real-number math.

## Not covered

These parts of the surrounding system are not part of this RTL:

* The processor (a PowerPC running Linux, which ships the spectra over the
  network).
* The UART and Ethernet peripherals.
* The serial converter link.
* The OPB bus attachment.

A continuous-streaming FFT, which would raise the channel count on a larger
device, is not provided either. No resource figures for a specific FPGA
have been produced. The core alone synthesizes to about 418 000 memory bits
and 7 multipliers of 18 × 18.
