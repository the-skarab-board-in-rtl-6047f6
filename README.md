# SKARAB single-dish spectrometers in SystemVerilog

A radio telescope's receiver produces two polarisations of broadband noise. Buried in that noise
are weak spectral lines and continuum power, which an astronomer wants as integrated power
spectra. This RTL implements two FPGA spectrometers of that kind for a CASPER-style FPGA board
with a fast dual-channel ADC and a 40 GbE output:

* **Wideband, full Stokes.** It takes 2 × 2800 MS/s real 12-bit samples and makes 2048 channels
  over 1.4 GHz. For each channel it forms XX, YY, Re(XY*) and Im(XY*). Samples arrive 16 per
  175 MHz clock, and results leave 8 channels per clock.
* **Narrowband.** It takes 2 complex 16-bit streams from the ADC's digital down-converter at
  187.5 or 93.75 MHz bandwidth. It makes 65,536 channels, with XX and YY only. The samples come
  in bursts, so every stage of this chain works only on valid samples.

Both chains follow the same pattern:

1. A polyphase filter bank, which is an FIR in front of an FFT.
2. Power products.
3. A 64-bit vector accumulator over a programmable number of spectra.
4. A programmable shift down to 32 bits.
5. A packet buffer that crosses to the Ethernet clock and spaces the packets apart.
6. A SPEAD header, then UDP/IPv4/Ethernet framing on a 256-bit stream.

`skarab_top` holds one spectrometer of each kind and a noise-diode calibration driver. The
ADC chips and their interface, the 40 GbE MAC and PHY, the control processor and the external
memory are not part of the RTL. Their sides of each connection are ports of the top.

## Block map

```
wideband (175 MHz)                             narrowband (187.5 MHz)
 adc_x/adc_y 16x12b ─ adc_rms (level meter)     ddc bursts 4 x complex 16b
        │                                               │ serializer_4to1
     pfb_fir (14 taps, 2 pols)                      pfb_fir (4 taps, re/im of 2 pols, enable)
        │                                               │
  fft_wideband_real x2 (4096 pt real)            fft_r2sdf x2 (65536 pt complex)
        │ 8 ch / clock                                  │ 1 ch / valid clock, bit-reversed
     stokes (XX YY ReXY* ImXY*)                     autocorr (XX YY)
        │                                               │
     vacc 32 lanes x 256 x 64b                      vacc 2 lanes x 65536 x 64b
        │                                               │
     bit_select 64→32 ─ spec_snapshot               bit_select 64→32 ─ spec_snapshot
        │                                               │
 ─ ─ ─ ─ ─ ─ ─ ─ ─ ─ packet_trickler (dual clock) ─ ─ ─ ─ ─ ─ ─ ─ ─ ─ ─ ─
        │ 156.25 MHz, 256-bit words                     │
     spead_packetizer (4 pkts/heap)                 spead_packetizer (64 pkts/heap)
        │                                               │
     udp_framer → wb_tx_*                           udp_framer → nb_tx_*
```

`skarab_pkg` holds the shared constants and a bit-reverse function.

## The wideband FFT: 4096 points at 16 samples per clock

This block departs most from a textbook design. A 4096-point FFT must take 16 new real
samples in every clock. The split is NFFT = 16 lanes × M, with M = 256:

1. Lane *l* receives samples x[16n + l]. Each lane runs its own 256-point streaming FFT
   (`fft_r2sdf`), so in a given clock all 16 lanes emit the same sub-bin k1.
2. The lane outputs are multiplied by the twiddle W₄₀₉₆^(l·k1).
3. A 16-point DFT across the lanes gives X[k1 + 256·k2].
   - A real input needs only the lower half of the spectrum, so only k2 = 0…7 is computed.
   - That gives the **8 channels per clock** that the rest of the chain is built around.
4. The 16 input lanes are real, so each lane FFT runs on complex numbers whose imaginary part
   is zero. This costs resources, but it keeps the structure uniform.

A frame takes 256 clocks. Channel order follows from this:

* In each clock the eight channels are k1, k1+256, …, k1+1792.
* k1 itself runs through 0…255 in bit-reversed order, because the lane FFTs have no
  reordering buffer.
* Every later block keeps that order, and the packet buffer's write address undoes it (see
  below).
* The vector accumulator has 32 lanes: 8 channels × 4 products.
* In the buffer, channel c of a frame sits at address bitrev(k1) + 256·k2.

Scaling:

* `fft_shift` has 12 bits. The low 8 bits halve the eight butterfly stages of the lane FFTs.
* Each set bit among the top 4 halves the cross-lane DFT, so all ones gives an FFT divided
  by 4096.
* Results that still do not fit in 18 bits saturate and are counted in `fft_ovf_count`.

## The streaming FFT (`fft_r2sdf`)

This is a radix-2, single-path delay-feedback FFT using decimation in frequency. Stage s has
a delay line of N/2^(s+1) words, and each stage alternates between two halves of a block:

* First half: store the incoming sample, and send out the stored difference times the
  twiddle.
* Second half: send out the sum, and store the difference.

Other properties:

* A stage moves only when a valid sample arrives. The same code therefore serves a stream
  with a sample every clock (the wideband lanes) and the gappy narrowband stream.
* Output bins are bit-reversed, and `out_idx` gives each bin's number.
* Twiddles are computed at elaboration as 18-bit fixed point with 16 fraction bits.
* At 65,536 points the delay lines hold 65,535 complex words per FFT.

## Polyphase filter (`pfb_fir`)

Output sample k of frame m is the sum of NTAPS products c[t][k] · x_{m−t}[k]. The FIR's taps
run over the same sample position in earlier frames. Each lane keeps the NTAPS−1 earlier
samples of a position in one memory word, and shifts that word by one sample each time the
position comes round.

The filter's frequency response is entirely in the coefficients, which the host writes
through a coefficient port. Coefficients are signed 18-bit values with 17 fraction bits.

* The intended prototype is a Hamming-windowed low-pass: 14 taps per channel for the
  wideband design and 4 for the narrowband design.
* The RTL does not compute the prototype.
* A single non-zero tap of 0.5 turns the filter bank into a plain FFT. The testbenches use
  that setting.

After reset or sync, `out_valid` stays low until NTAPS−1 whole frames are stored. As a result,
the first spectrum out of the FFT is computed from complete data.

## Integration, requantisation and read-out

* **Accumulator (`vacc`).**
  - It sums full-precision products into 64-bit memory words.
  - The number of frames is set by `acc_len` (0 counts as 1). The value is sampled at the
    start of each integration.
  - The first frame of an integration overwrites the memory. The last frame is sent out
    instead of being written back, so the accumulator never needs a separate clear pass.
  - The read is issued one clock early (registered read of the next address).
* **Bit select (`bit_select`).**
  - It shifts each 64-bit sum right by `shift` and saturates it to 32 bits.
  - Power lanes saturate as unsigned values. The cross products Re and Im can be negative,
    so they saturate as signed values.
  - Every clipped value is counted.
* **Snapshot (`spec_snapshot`).**
  - It keeps the last requantised XX and YY spectra in memories the host can read, for
    measuring total power after removing RFI channels.
  - Wideband: 8 memories of 256 × {XX, YY}.
  - Narrowband: 2 memories of 65,536 × 32 bits.
* **Level meter (`adc_rms`).**
  - It sums the squares of 2^20 samples (65,536 clocks × 16 lanes) and publishes the total
    shifted right by 11 bits in a 32-bit register.
  - rms = sqrt(rms_sum · 2048 / 2^20).
  - The target level is an RMS of about 256, which is 1/8 of full scale.

## Crossing to Ethernet: the packet trickler

The integrator runs at the DSP clock and produces 1024 bits per clock (wideband). The
Ethernet side runs at 156.25 MHz with 256-bit words. `packet_trickler` decouples the two
sides with one dual-clock memory that holds a whole integration:

* **Write side.**
  - It starts only at address 0, writes one integration and then stops.
  - The write address is bit-reversed (`BITREV`). This turns the FFT's bit-reversed channel
    order into natural order, so neither FFT needs a reorder buffer.
  - The memory is split into WR_CH × RD_CH banks, so that a wide write and a wide read each
    touch every bank exactly once.
* **Read side.**
  - It reads packets of 256 words, which is 8192 bytes.
  - After each packet it stays idle for `pkt_delay` Ethernet clocks, so that a slow receiver
    is not overrun.
  - After the last packet it frees the buffer.
* **Drops.**
  - An integration that finishes while the buffer is still being read is dropped and counted
    in `drops`.
  - Choose `pkt_delay` so that all packets leave within one integration time.
* **Clock crossing.** The two clock domains exchange only toggle flags, each through a
  two-flop synchroniser.

Packet contents:

* Wideband: 4 packets per integration, each with 512 consecutive channels × {XX, YY, Re, Im}.
  In a bus word the lowest channel is in the most significant bits.
* Narrowband: 64 packets, each with 1024 channels × {XX, YY}.

## Packet format

A 256-bit bus carries each packet. Byte 0 of a word is in bits [255:248]. The header layers
are added in this order:

1. **SPEAD** (`spead_packetizer`).
   - The header is 96 bytes: the magic word `53 04 02 06 00 00 00 0B` followed by 11
     immediate items.
   - The items are:

     | ID | Content |
     |----|---------|
     | 0x0001 | heap counter (integration number) |
     | 0x0002 | heap size |
     | 0x0003 | heap offset |
     | 0x0004 | payload length |
     | 0x1600 | packet index |
     | 0x1601 | packets per heap |
     | 0x1602 | channels |
     | 0x1603 | first channel |
     | 0x1604 | frequency scale |
     | 0x1605 | accumulation length |
     | 0x1606 | timestamp |

   - The header takes three bus words, during which the payload input is stalled.
2. **UDP/IPv4/Ethernet** (`udp_framer`).
   - It adds a 42-byte header: MACs, EtherType, IPv4 with checksum and a counting
     identification field, and UDP with a zero checksum.
   - 42 bytes is not a whole number of words, so every payload byte moves 10 bytes down the
     bus.
   - A final word with `tx_bytes = 10` ends each packet, which makes the frame 8330 bytes long.
   - The destination IP address and UDP port are registers. The destination MAC is also a
     register input, because ARP is not implemented.

## Synchronisation and control

* Each spectrometer has an `arm` input. After arm, the next 1-PPS pulse restarts the filter
  bank, the FFT and the accumulator, so integrations start on a second boundary.
* Without arm, the chain runs freely from reset.
* Registers that the host writes:
  - `fft_shift`
  - `acc_len`
  - `shift` (bit select)
  - `pkt_delay`
  - the SPEAD frequency scale and timestamp
  - network addresses and ports
* Status that the host reads:
  - integration, FFT-overflow, clip and drop counters
  - RMS sums
  - snapshot memories
* `noise_cal` drives the calibration noise diode in one of two ways:
  - from an internal period and on-time counter, or
  - by passing an external signal through a two-flop synchroniser.
  
  It also counts edges.

## Narrowband input: the 4-to-1 serializer

The ADC's DDC interface delivers up to four complex samples per clock per signal, in bursts:

* With decimation by 16, 42 valid clocks out of every 84.
* With decimation by 32, 21 valid clocks out of every 84.

`serializer_4to1` writes the `in_count` valid slots of each clock into a FIFO. It then
releases one complex sample per clock.

* With decimation by 16, each valid burst clock carries two samples (`in_count` = 2). The
  average input is then one sample per clock, and the serializer's output is continuous
  after the first burst.
* With decimation by 32 the average input is half a sample per clock, so `out_valid` has
  gaps.
* The slot order, the FIFO depth (256) and `in_count` are this design's own reading of the
  interface.
* A FIFO overflow sets a sticky flag.

## Departures and limits

* **Not implemented:**
  - the 4/5 resampler that gives 2048 MS/s
  - FPGA decimation below the ADC's own DDC rates
  - the ARP client
  - accumulation in external HMC memory
  - the two-stage (corner-turn) filter bank and the pulsar mode, which are planned extensions
* **Own choices.** The following are this design's own choices, not taken from a reference
  design:
  - the FFT structures, both the lane split and the SDF pipeline
  - the SPEAD item identifiers and their contents
  - the product order in the 32-bit lanes
  - the saturation rules
  - the level-meter shift
  - the drop policy
* **Bit widths.** The data path is 18 bits after the filter bank. The filter output is scaled
  by a fixed shift, `OSHIFT`.
* **Both spectrometers in one top.** On the board each spectrometer would normally be loaded
  on its own. The full 65,536-channel narrowband design alone needs about 8 Mbit for the
  accumulator plus 4 Mbit each for the snapshot and packet buffer.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/skarab_pkg.sv tb/tb_vacc.sv \
          -y rtl -y tb --top-module tb_vacc -Wno-fatal
./obj_dir/Vtb_vacc
```

`tb_skarab_top` runs the whole design at its full size, with no parameter overrides. It takes
about half a minute with Verilator. It checks the following:

* **Wideband.**
  - A tone at channel 300 in both polarisations, 90° apart, gives XX = YY = Im(XY*) with
    Re(XY*) near zero.
  - The values are checked at their expected magnitudes, through parsed UDP/SPEAD packets.
* **Narrowband.** A complex tone is fed in decimation-16 bursts and then in decimation-32
  bursts.
* **Mechanisms.** Each of the following is also checked and counted:
  - PPS synchronisation and filter priming
  - output stalls and the inter-packet gap
  - dropped integrations
  - clipping and FFT overflow
  - the snapshot memory, the level meter and calibration edges
