# CBSR burst receiver core

This is the physical-layer receiver of a C-band ground station for CubeSat
links, written as synthesizable SystemVerilog for the programmable logic of
a Zynq-7000 next to an AD9361 RF transceiver. It takes complex baseband
samples from the transceiver and hands 32-bit words of decoded user data to
a DMA engine. Along the way it finds radio frames, works out which of seven
coding rates each frame uses, removes carrier frequency and phase offsets,
and demodulates the OQPSK symbols. Six external turbo decoders decode the
subframes, and the CRC decides which subframes are delivered.

The central idea is **store first, process later**. A received frame does
not say how long it is until its first midamble has been analysed: the
coding rate sets the number of midambles, and so the frame length. The
frequency offset is known only once the frequency preamble has gone
through a DFT. So the core writes the whole frame into two queues, one for
midamble samples and one for data samples. It replays them only when both
the coding rate and the coarse frequency offset are known. The replay runs
at one sample per clock, which is at least twice the rate at which samples
arrive, so it catches up.

## The radio frame as this core expects it

All lengths are in samples after the matched filter, at 2 samples per
symbol.

```
| T_AMB | F_AMB      | subframe 0                         | subframe 1 ... |
| 31    | 64/128/256 | (P_AMB 45 | data 240) x N_pm       |                |
```

- **T_AMB**: a 31-sample Zadoff-Chu sequence (root 1), used for detection
  and timing.
- **F_AMB**: an unmodulated section. A carrier offset turns it into a
  tone, whose DFT peak gives the coarse frequency offset. Its length is set
  by RADIO_CONFIG[5:4]: 0 = 64, 1 = 128, 2 = 256 samples.
- **P_AMB** (phase midamble), 45 samples: a 14-sample cyclic prefix, then
  a 31-sample Zadoff-Chu sequence (root 3) cyclically shifted by
  `CRI * CRI_STEP` samples, with `CRI_STEP = 2`.
  - CRI (coding-rate indicator) 0..6 selects the coding rate; 7 marks the
    end-of-transmission (EoT) frame.
  - Thanks to the cyclic prefix, the base sequence appears whole inside
    the midamble for every shift. A correlator then sees one clean peak
    whose position encodes the CRI and whose phase is the carrier phase.
- **Data**: 240 OQPSK samples (120 symbols, 240 coded bits) per midamble
  period.
  - Periods per subframe: N_pm = 4, 5, 6, 7, 8, 9, 10 for CRI 0..6.
  - The number of subframes per frame is a register (NUM_RF_SUBFRAMES).
  - The last 24 decoded bits of each subframe are a CRC24A (the LTE
    polynomial 0x864CFB, zero initial value).

The general structure is that of the original receiver: ZC timing
preamble, frequency preamble, cyclically shifted phase midambles carrying
the coding rate, 7 rates plus EoT, and subframes decoded by turbo codes.
The numbers above are this implementation's own choices and live in
`rtl/cbsr_pkg.sv`: sequence lengths, roots, prefix length, shift step,
block length and periods per rate. Change them there.

## Datapath

```
rx_i/rx_q --> matched_filter --> input_buffer (4096 samples, circular)
  (2x rate)   (drop every 2nd,       |
               17-tap RRC)           +--> time_sync: cfir_corr(T_AMB) -> cordic_vec
                                     |               -> sync_machine (detect, read control)
              buffer read-out -------+
                F_AMB part  --> coarse_cfo (serial DFT, +/-16 bins)
                1st midamble --> midamble_filter -> cri_eval -> cri_checker (EoT / override)
                whole frame  --> rx_write_control --> data queue / midamble queue
              replay (rx_frame_control, in frame order):
                queues --> nco_derotator (coarse offset)
                   midambles --> midamble_filter --> fine_offset_est
                   data      --> nco_derotator (fine phase + freq) --> oqpsk_demod
                --> decoder_bank --> 6 external turbo decoders --> crc_check
                --> data_packer --> data_out (32-bit words)
rx_regs: AXI4-Lite configuration and statistics
```

Everything runs in one clock domain: the receiver clock, which is the
transceiver's sample clock. At most one input sample arrives per clock.

### Detection and read-out (`sync_machine`, `time_sync`)

The T_AMB correlator output goes through a vectoring CORDIC to get its
magnitude. The magnitude travels with the buffer address of its sample.

1. Above the threshold (SYNC_THR register), the Sync Machine follows the
   peak. It accepts the peak once 8 further samples have not beaten it.
2. It then reads the buffer from the sample after the peak. The first
   F_AMB-length samples are flagged `sync` and go to the frequency
   estimator. The rest of the frame follows, unflagged.
3. The read never passes the newest sample written, so it may run at one
   sample per clock behind the writer.
4. The read ends when the coding rate is known and `num_subframes x N_pm x
   285` samples have been read. The machine then searches again.

In continuous-preamble mode (ENABLE[1]), the machine searches again right
after the F_AMB part. This gives a stream of frequency estimates from
repeated preambles.

### Coding-rate evaluation (`midamble_filter`, `cri_eval`, `cri_checker`)

The first non-F_AMB samples, which are the first midamble, pass a
correlator matched to the unshifted P_AMB sequence. `find_max` locates the
magnitude peak in a 53-sample window. A cyclic shift of `s` samples moves
the peak `s` samples earlier, so

    cri = (IDX_REF - peak_index + CRI_STEP/2) / CRI_STEP

`IDX_REF` is where the peak of the unshifted sequence lands. It depends on
the pipeline between the buffer and `cri_eval`. The top sets it to
`P_AMB_LEN - 2`, which the end-to-end simulation confirmed for all
indicators used.

- A peak outside the valid range gives 15, and so does an empty window.
- The checker then raises `override_flag`, and the frame is processed at
  rate 0 until its replay ends.
- CRI 7 raises `eot_flag`. This disables detection and queue writing. The
  queued part of the EoT frame is dropped once any earlier replay has
  ended. After that, `flush_end` clears the flag and detection resumes.

### Frequency and phase (`coarse_cfo`, `fine_offset_est`, `nco_derotator`)

**Coarse.** The F_AMB samples are stored (up to 256). A serial DFT then
evaluates the bins k = -16..16, one complex product per clock through a
rotation CORDIC, using the metric |re|+|im|.

- The best bin gives `freq = k * 65536 / N` in phase units per sample
  (65536 = 2π).
- The estimate is ready `(2*16+1)*N + 3` clocks after the F_AMB part ends:
  8451 clocks for N = 256.
- The replayed samples are derotated at this rate, starting from phase 0.
- The coarse estimate is integer-bin only.

**Fine.** Each replayed midamble passes a second midamble filter.

- The phase at the magnitude peak is that midamble's carrier phase.
- The phase step between consecutive midambles, wrapped and averaged over
  the frame, divided by the midamble spacing (285 samples), is the residual
  frequency.
- The replay waits after each midamble (state WAIT of `rx_frame_control`)
  until this estimate is ready. The data block that follows is then
  derotated starting from that phase, advancing by the residual frequency.
- Every data block is corrected with the nearest preceding midamble. This
  also follows slow phase drift.

### Demodulation, decoding, packing

**Demodulation** (`oqpsk_demod`). The I component is delayed by one sample,
half a symbol, which turns OQPSK into QPSK. Every second sample is kept.

- The soft value of each bit is its component scaled by 2^-6 and saturated
  to 8 bits, positive for bit 0.
- With Gray mapping and equal noise on both axes, this is proportional to
  the log-likelihood ratio.

**Decoding** (`decoder_bank`). One turbo decoder is too slow for the
subframe rate, so subframe *i* goes to decoder *i* mod 6.

- The decoders are used in turn and their outputs never overlap, so the
  outputs are OR-merged into one bit stream and one CRC checker serves all
  of them. An assertion checks that outputs never overlap.
- If the chosen decoder is still busy, `dec_overrun` pulses.
- The decoder cores themselves are outside this design. Their interface
  is brought out of the top:
  - `dec_llr = {llr_i, llr_q}` is shared by all decoders, and
    `dec_in_valid[i]` selects one;
  - `dec_in_last` marks the end of a subframe;
  - each decoder returns `dec_busy`, `dec_out_valid`, `dec_out_bit` and
    `dec_out_last`.

**Packing** (`crc_check`, `data_packer`). Bits pass a 24-bit delay line, so
the CRC is dropped. The payload is packed MSB-first into 32-bit words, and
the last word of a subframe is zero-padded. Words wait in a 256-word
staging FIFO until the CRC verdict of their subframe.

| mode (RADIO_CONFIG[1:0]) | CRC-correct subframes | CRC-failed subframes | bit-error statistics |
|---|---|---|---|
| 0, data | delivered | discarded (rolled back) | no |
| 1, test | not delivered | not delivered | yes, against PN9 |
| 2, test | delivered | not delivered | yes, against PN9 |

The test pattern is PN9 (x^9+x^5+1, all-ones seed, restarted every
subframe).

Counters, readable over AXI: subframes, subframes with a CRC error,
payload bits, bit errors.

## Register map (AXI4-Lite, byte offsets)

| offset | name | access | contents |
|---|---|---|---|
| 0x100 | RADIO_CONFIG | rw | [1:0] mode, [2] RRC roll-off (0: 0.35, 1: 0.5), [5:4] F_AMB length code |
| 0x104 | NUM_RF_SUBFRAMES | rw | [7:0] subframes per frame (reset 1) |
| 0x108 | MAGIC_NUMBER | ro | 0xCB5A0016 |
| 0x110 | RESET_CNTRS | wo | bit 0 = 1 clears the counters |
| 0x114 | ENABLE | rw | [0] receiver enable, [1] continuous preamble |
| 0x118 | SUBFRAME_ERR | ro | subframes with a CRC error |
| 0x11C | SUBFRAME_COUNT | ro | subframes decoded |
| 0x120 / 0x124 | BIT_COUNT L/H | ro | payload bits compared (test modes) |
| 0x128 / 0x12C | BIT_ERR L/H | ro | bit errors (test modes) |
| 0x130..0x140 | ZTEST registers | rw | bus test registers, read back only |
| 0x240 | SYNC_THR | wo | [15:0] detection threshold (CORDIC magnitude units) |
| 0x244 | SYNC_THR read-back | ro | threshold |

These registers and offsets come from the original core: MAGIC_NUMBER at
0x108, RESET_CNTRS at 0x110, the enable register at 0x114, SUBFRAME_ERR at
0x118, and the threshold at 0x240/0x244. The other offsets, all bit
fields, the roll-off values and the magic value are choices of this
implementation.

## What follows the original design and what does not

Taken from the original receiver:

- the block structure and the order of processing;
- the store-and-replay scheme with separate data and midamble queues;
- the Sync Machine's inputs and outputs, including continuous-preamble
  mode and reading the F_AMB part first;
- the F_AMB-based coarse estimate;
- coding-rate evaluation by correlating the first midamble with the base
  sequence and locating the peak;
- the EoT and invalid-rate handling (rate 0 by default);
- fine phase and frequency estimation from the phase at the midamble
  magnitude peak;
- OQPSK-to-QPSK conversion by delaying I half a symbol;
- six turbo decoders used in turn, sharing one CRC checker;
- packing into 32-bit words;
- the AXI4-Lite register interface.

Own choices, where the original gives only the function:

- Every length and sequence parameter of the frame.
- The RRC coefficients: 17 taps, roll-offs 0.35 and 0.5.
- The coarse estimator is a ±16-bin serial DFT without sub-bin refinement,
  not a full FFT with a refinement metric. Its search range is ±16/N
  cycles per sample, about ±0.06 cycles per sample at N = 256.
- The fine estimator is a plain average of phase steps.
- The LLR scaling.
- The CRC24A polynomial.
- The PN9 test pattern, and the commit/rollback staging in the packer.
- All handshakes between blocks.

Departures and omissions:

- **Fake subframes.** The original packer also detects "fake" (filler)
  subframes. That rule is not known, so it is not implemented.
- **Invalid coding rate.** The original treats a frame with an invalid
  coding rate as lost. Here it is still replayed at rate 0, and its CRCs
  decide what is kept.
- **Turbo decoders.** They are not part of this design; only their
  interface is.
- **RF and platform.** The AD9361 interface core, the DMA, the clock
  crossing into the processor's AXI domain and the processor software are
  outside this design.

## Limits worth knowing

**Throughput.** One input sample per clock is accepted. The DFT of the
coarse estimator needs 8451 clocks per frame at N = 256. The shortest
frame (1 subframe, rate 0) lasts about 2854 clocks at full input rate.
Consecutive frames therefore need a gap of roughly 5600 clocks, or a
shorter F_AMB. If a new frame is detected while the DFT runs, that DFT is
lost.

**Memory.**

- The input buffer holds 4096 samples and each queue 4096 (BUF_AW,
  QUEUE_AW = 12).
- The data queue must hold the data part of a whole frame until the replay
  starts. 2 subframes at rate 2 (2880 samples) fit. 2 subframes at rate 6
  (4800 samples) need QUEUE_AW = 13.
- The staging FIFO of the packer (256 words) holds more than one subframe
  at rate 6 (2376 payload bits, 75 words).

**Detection threshold.** The correlation peak of a clean T_AMB at amplitude
A (per axis, full scale 32767) is about 0.85·A after the filter, in
magnitude units. Random data of per-axis amplitude D was seen to
reach more than 0.6·D. Set SYNC_THR between the two. The threshold is the only guard
against false detection.

**Block boundaries.** The last Q half-symbol of every data block sits next
to a midamble. Without transmit pulse shaping, the receive filter can pull
it across zero. The end-to-end test avoids this by repeating the previous
Q bit in that position. A real transmitter with RRC shaping would not have
the problem.

## Files

| file | contents |
|---|---|
| `rtl/cbsr_pkg.sv` | sample type, frame constants, Zadoff-Chu tables (127·exp(-jπ·u·n(n+1)/31), rounded to 8 bits), helper functions |
| `rtl/cbsr_rx_top.sv` | the receiver core |
| `rtl/matched_filter.sv` | decimation by 2 and 17-tap RRC FIR |
| `rtl/cfir_corr.sv` | complex FIR matched to a sequence (both correlators) |
| `rtl/cordic_vec.sv`, `rtl/cordic_rot.sv` | magnitude/phase and rotation CORDICs |
| `rtl/input_buffer.sv` | circular sample buffer |
| `rtl/time_sync.sv`, `rtl/sync_machine.sv` | detection and buffer read control |
| `rtl/coarse_cfo.sv` | DFT-based coarse frequency estimate |
| `rtl/midamble_filter.sv`, `rtl/find_max.sv`, `rtl/cri_eval.sv`, `rtl/cri_checker.sv` | coding-rate evaluation, EoT and override |
| `rtl/rx_write_control.sv`, `rtl/sample_fifo.sv`, `rtl/rx_frame_control.sv` | frame disassembly, queues, replay |
| `rtl/nco_derotator.sv`, `rtl/fine_offset_est.sv` | offset correction and fine estimate |
| `rtl/oqpsk_demod.sv`, `rtl/decoder_bank.sv`, `rtl/crc_check.sv`, `rtl/data_packer.sv` | demodulation to data words |
| `rtl/rx_regs.sv` | AXI4-Lite registers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Phase is in 16-bit units throughout (65536 = 2π). Samples are `cplx_t`: a
packed struct of two signed 16-bit fields.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`, then finishes. Each
has a watchdog. Using Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/cbsr_pkg.sv tb/tb_cbsr_rx_top.sv --top-module tb_cbsr_rx_top -Mdir obj
./obj/Vtb_cbsr_rx_top
```

Replace the testbench name to run any other.

**End-to-end test.** `tb_cbsr_rx_top` runs the core with every parameter
at its default.

Its transmitter model builds frames in the format above and applies whole-
bin carrier offsets and a carrier phase. It sends:

1. a rate-0 frame;
2. a rate-2 frame with one corrupted subframe;
3. a frame with an invalid indicator;
4. a test-mode frame with PN9 data and three bit errors;
5. an EoT frame;
6. a frame after the EoT flush, replayed while the decoders report busy;
7. two preambles in continuous-preamble mode.

Its decoder models return hard decisions after a short busy time. The test
checks:

- every delivered word;
- the indicators;
- the AXI counters;
- that each mechanism occurred at least once: detection, F_AMB read-out,
  coarse estimate, rate evaluation, override, EoT, flush, subframe end,
  wait for the fine estimate, CRC pass and fail, words out, bit errors,
  use of all six decoders, decoder overrun, continuous-preamble detection.

It simulates about 16,000 input samples in about a second.

The block testbenches compare against reference values computed in the
testbench: real-valued math for the CORDICs, filters and correlators, and
bit-level models for the CRC, PN9 and packing.
