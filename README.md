# FFT radio-telescope correlator (32 channels) in SystemVerilog

This is the digital signal path of a 32-antenna FFT correlator. One
**F-engine** board digitises and channelises the antennas. Four **X-engine**
boards each cross-correlate every antenna pair over one quarter of the band
and average the results. The top module, `rtl/omniscope_top.sv`, holds the
F-engine and the four X-engines. Everything off the FPGAs is reached through
ports. That covers the ADC, the analog swapper board, the QDR SRAMs and the
10GbE links.

```
ADC(8 buses x 4 ch) -> digital_swapper -> pfb_fir -> fft_reorder -> fft_real2x
   -> shift_truncate -> spectrum_divider -> transposer(QDR) -> tge_tx_packer -> tx[0..3]
rx[q] -> tge_rx_buffer -> xcorr -> vacc(2 x QDR) -> vacc_readout -> software
swap_controller -> GPIO (analog swapper) and swap word (digital swappers)
snap_monitor: one 1024-word capture memory on any of 24 taps
time_halver (64-channel variant, beside the chain): 2 filtered buses -> 1
```

Everything is shared through `rtl/omni_pkg.sv`: sizes, the QDR request and
response structs, the 10GbE word struct and the 8+8-bit complex sample type.

## The conventions everything relies on

**Sync.** Each stage passes a `sync` pulse along with its data. The pulse is
high for one cycle, in the cycle *before* sample 0 of a frame. Every block
delays sync by exactly its own latency. Downstream counters clear on sync,
so a wrong latency shows up as a rotated frame rather than as a crash. The
F-engine's sync generator pulses every 4096 cycles. That is one frame of
4 channels x 1024 samples on each ADC bus.

**Time multiplexing.** Each ADC bus carries 4 channels, sample by sample.
Channel `4*bus + slot` is on the bus in the `slot`-th cycle after sync. The
filter taps are therefore `4*N` samples apart. After `fft_reorder` each bus
carries 1024-sample blocks, one channel at a time.

## The hard parts

### Two real FFTs in one (`fft_real2x`, `fft_sdf_stage`)
Bus `2f` and bus `2f+1` become the real and imaginary parts of one complex
stream, `z = a + jb`. It goes through a 10-stage radix-2 decimation-in-
frequency pipeline (single-path delay feedback, one stage per
`fft_sdf_stage`). Bit `s` of `fft_shift` halves stage `s`. Anything that
still overflows saturates to 18 bits and sets `ovf`. The output goes into a
bit-reversal double buffer. It is read twice per block, once forward at
bin `k` and once at `N-k`, to separate the two spectra:
`A(k) = (Z(k) + conj Z(N-k))/2` and `B(k) = (Z(k) - conj Z(N-k))/2j`.
Each 1024-cycle block comes out as A bins 0..511 followed by B bins
0..511. The merged bus therefore carries 8 channels of 512 bins in every
4096-cycle frame. `sync_out` leads its frame by one cycle, as everywhere
else. The banks flip on the write counter, not on sync, because sync only
arrives once every four blocks.

### Per-bin gain (`shift_truncate`)
A 12-bit counter, cleared by sync, numbers the samples of a frame. Its low
9 bits are the bin. Software keeps a shift amount per bin in a RAM. The
18-bit value is shifted left by that amount and its top 8 bits are kept,
clamped to the largest value of the same sign. Strong narrow-band
interferers can be attenuated and weak bins amplified without overflowing
the 8+8-bit path downstream. `clip` reports saturation.

### Splitting the band (`spectrum_divider`)
Four input buses each carry 8 channels x 512 bins. Four output buses must
each carry one quarter of the band (128 bins) for all 32 channels. Input bus
`i` is delayed by `i*128` cycles. A multiplexer per output picks input
`(slot - j) mod 4` in time slot `slot`, and output `j` is then delayed by
`(3-j)*128`. After that, all four outputs share one frame and one sync.
Output `j` carries, in slot `4c+i`, channel `c` of input bus `i`, bins
`128j..128j+127`. The divider's own frame counter ignores everything until
the first sync arrives. Otherwise an early, misplaced sync would
permanently offset the transposer downstream.

### Corner turn (`transposer`)
The correlator needs, for one bin, 64 consecutive spectra of every channel
in a row. Each transposer owns one QDR SRAM and two frequency quarters. The
two 16-bit samples go into one 36-bit word. Writes go to address
`{bank, t, ch, bin}` in arrival order. When 64 spectra are stored, the bank
flips and the full bank is read back with `t` fastest, then `ch`, then `bin`.
Each cycle has one read and one write, which is exactly the QDR's bandwidth.
The first output block appears one block (64 frames, 262144 cycles) after
the first sync. From then on the output is continuous. `tge_tx_packer`
packs 4 samples per 64-bit word, first sample in the top bits, and marks
every 512th word as end of packet.

### Surviving two unrelated clocks (`tge_rx_buffer`)
The X-engine's clock is not locked to the F-engine's clock. A counter runs
the correlator in 2048-cycle windows. A window holds 32 channels x 64
spectra = 2048 samples = 512 words. At the start of each window the buffer
checks its FIFO. If at least 512 words are waiting, it sends a real window.
Otherwise it sends a **junk window**: all ones, with `out_valid` low. The
correlator processes junk windows like any other, and the accumulator
ignores their baselines. This absorbs an X clock that is faster than the F
clock, and it absorbs the start-up gap. A persistently *slower* X clock
eventually overflows the FIFO (`rx_overflow`, sticky). The design does not
try to recover from that.

### Cross-correlation (`xcorr`)
While channel `j`'s 64 samples arrive, each sample is stored in a 64 x 32
row memory. In the same cycle it is multiplied by the stored samples of
channels `0..j` at the same time index. Thirty-two complex multiply-
accumulators hold `sum_t x_i(t) * conj(x_j(t))` for `i <= j`. When channel
`j` is complete, its `j+1` sums stream out while channel `j+1` is already
accumulating. The order is (0,0); (0,1),(1,1); (0,2),(1,2),(2,2); and so on,
528 baselines per window. The sums are 23 bits: an 8-bit complex product
needs 17 bits, and the 64-sample sum adds 6.

### Vector accumulation in QDR (`vacc`)
Each valid baseline gets an index `0..67583`, which is 128 bins x 528
baselines. Element `k` is added to word `k` of two QDRs, one for the real
part and one for the imaginary part. This is a read-modify-write. The read
is issued when the element arrives, and the write happens when the data
returns `QDR_RD_LAT` = 4 cycles later. An address only recurs once per
vector, so no read ever sees a stale word. The first vector of an
accumulation overwrites instead of adding. After `acc_len` vectors, every
final sum is sent out as it is formed, so accumulations follow each other
without a gap. A 36-bit word holds 23 + 13 bits, which is why `acc_len` is
limited to 8192. `vacc_readout` queues the dumps in a 1024-word memory that
software drains with `sw_pop`. A sticky `lost` flag is set if software
falls behind.

### Cross-talk swapping (`swap_controller`, `digital_swapper`)
A pattern RAM holds one 64-bit word per step, where bit `c` means "invert
channel c". At each step the word is shifted MSB-first over `gpio_din` /
`gpio_clk` into the analog swapper's shift register, and one `gpio_en` pulse
latches it. When the pulse ends, the same word reaches the digital swappers.
They negate the selected channels back, so the signal is unchanged while
the cross-talk between channels is modulated. For `zero_len` cycles after a
switch, samples are flagged. Every filter output that a flagged sample
contributes to is forced to zero.

## Choices this design makes where the description is silent
- The sinc in the filter window spans `-P/2..+P/2` over the `P*N` points,
  times a Hamming window. Coefficients are 18-bit and the output is 18-bit,
  with saturation.
- The FFT architecture (SDF pipeline, packed real pair, shift schedule).
- The spectrum-divider alignment delays, and the pairing of two quarters
  per transposer QDR word.
- The 4096-cycle sync period, the snapshot tap map (ADC 0-7, filter 8-15,
  FFT 16-19, truncator 20-23) and the sticky status flags.
- FIFO depths (rx 2048 words, readout 1024 words) and the readout word
  layout `{acc_num[32], index[17], re[36], im[36]}`.
- `acc_len` values below 1024 are accepted. The 1024 minimum exists for the
  software's sake, and the tests use 1.
- Only real data is sent over the links. The packer is idle until the
  transposer's first block is out.

## Where this RTL departs from the original system
- The transpose is double-buffered in the QDR: one block is written while
  the previous block is read. A block is 64 spectra, 2 MiB of 16-bit
  samples across both SRAMs. Each 36 Mbit QDR (2^20 x 36 bits) therefore
  holds two banks of 2^18 words. The original text only sizes the
  transpose.
- The original 10GbE link sometimes inserted one extra word into the first
  packet after start-up. Software detected this and reset the system. The
  links here are ideal, and the X-engine has no hardware check for a
  shifted stream.
- Packet headers, checksums and the 156.25 MHz link clock belong to the
  10GbE core and are not modelled.

## Not built
- The 64-channel system as a whole. Its one new block, `time_halver`, is
  built. It delays one filtered bus by a frame and alternates between the
  two buses every frame, so the FFT sees 8 channels at the same data rate.
  It sits in the top beside the 32-channel system, with its own `h64_*`
  ports, and is not wired into the 32-channel chain. The rest of the
  64-channel change is resizing: 16 ADC buses, a larger transpose, and
  4096-sample windows with 2080 baselines.
- The multi-F-engine roadmap, which is planned future work.
- The ADC, the analog swapper board, the QDR chips, the 10GbE cores and
  links, the clock distribution and the control software. Their signals are
  ports of `omniscope_top`. The testbenches model the QDR, the links, the
  ADC and the analog swapper.

## Verification
Each block has a self-checking testbench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=.. failures=..`. Run it with, for example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/omni_pkg.sv \
  tb/tb_omniscope_top.sv --top tb_omniscope_top && ./obj_dir/Vtb_omniscope_top
```

`tb_omniscope_top` runs the top at full size with no parameter overrides.
It runs in about 10 s, for 2.6 ms of simulated time. It plays ADC tones at
bins 100 and 300 plus noise on all 32 channels, a real analog swapper, QDR
models and links between the two clock domains, with the X clock 2% fast.
It drains one complete accumulation from all four X-engines. It checks:
- the snapshot against the ADC history;
- the dump order;
- zero imaginary part of every auto-correlation;
- the spectral peak at the right bin of the right X-engine;
- that every mechanism happened at least once: swap switches, blanking,
  clipping, packet ends, junk windows, windows and dumps;
- the time halver, fed with two live filter outputs, against the samples
  it should have kept.

Each block was also checked against a deliberately broken copy of itself.
Each testbench failed on its broken copy.

The F-engine and X-engine are tested only through the top-level
testbench. The unit testbench for `fft_real2x` runs at N = 64. Other unit
testbenches use reduced sizes where the full size would only add run
time.
