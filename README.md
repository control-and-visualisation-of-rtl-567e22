# QPSK transceiver with observation points for an RFSoC-class device

This is a complete baseband QPSK link in SystemVerilog. It covers the fabric side of a software-defined
radio whose RF data converters run at 128 Msps.

- **Transmitter.** Generates pseudo-random bits at 1 kb/s, maps them to Gray-coded QPSK symbols at 500 symbols/s, and interpolates them in stages up to 128 Msps for a DAC.
- **Receiver.** Takes 128 Msps from an ADC and decimates to 4 ksps. It then removes the carrier offset coarsely with an FFT and applies a root-raised-cosine (RRC) matched filter. Finally it recovers symbol timing and carrier phase, returning symbols and bits.
- **Observation points (OPs).** Seven points along the two chains (OP1 to OP7) can be captured on request. Each is captured in packets by a small inspector unit that feeds an AXI-Stream DMA. Software can then plot the signal at that point: time domain, spectrum or constellation.

The large interpolation and decimation factors are the hard part. A symbol lasts 51 200 clocks at 25.6 MHz, so the receiver's synchronisers see a stream many orders of magnitude slower than the clock that runs them.

## Rate plan

| Stage | Tx (interpolating) | Rate after |
|---|---|---|
| Bits / symbols | PRBS, 2 bits per symbol | 500 Sym/s |
| RRC (roll-off 0.5) | ×4 | 2 ksps |
| Half-band | ×2 | 4 ksps |
| CIC compensator (CFIR) | ×2 | 8 ksps |
| 5th-order CIC | ×3200 | 25.6 Msps |
| FIR + async FIFO (`ipi_interp_stage`) | ×5 | 128 Msps |

| Stage | Rx (decimating) | Rate after |
|---|---|---|
| FIR + async FIFO (`ipi_decim_stage`) | ÷5 | 25.6 Msps |
| 3rd-order CIC, CFIR, 3rd-order CIC, CFIR | ÷40, ÷2, ÷40, ÷2 | 4 ksps (8 samples/symbol) |
| Coarse frequency correction | 1 | 4 ksps |
| RRC matched filter, two half-bands | ×2, ×2 | 16 ksps (32 samples/symbol) |
| Timing and fine carrier recovery | ÷32 | 500 Sym/s |

Every stage carries one `iq_t` word (16-bit I and 16-bit Q, two's complement). Each stage's result is rounded and saturated back to 16 bits. CIC outputs are scaled by a fixed right shift: ceil(N·log2 R) bits for decimators, ceil((N−1)·log2 R) for interpolators. The transmitter has a gain register (0x00, 32768 = unity) applied before the 25.6 Msps output.

All FIR coefficients are computed at elaboration time from the stage type (`fir_kind_e`: RRC, half-band, CIC compensator, low-pass) and the tap count. No coefficient files are needed. `fir_interp` is polyphase: it computes one output phase per clock over the taps. `fir_decim` produces one output per M inputs.

## Receiver synchronisation

This is the part that most needs explaining.

### Coarse frequency (`rx_coarse_sync_core`, OP5)

Raising a QPSK signal to the fourth power removes the data. What remains is a tone at four times the carrier offset. The core works as follows:

1. Forms x⁴ at 4 ksps, with two complex squarings, each rescaled.
2. Transforms blocks of 2^LOG2N samples with `fft_frame`.
3. Averages the magnitude spectrum (|re|+|im|) bin by bin over frames. The newest frame has weight 2^-AVG_SHIFT.
4. Takes the strongest averaged bin k, with sign.
5. At each frame end, sets a 32-bit NCO to −k/(4N) cycles per sample.

The estimate is always taken on the uncorrected input, so each frame gives an absolute estimate. The correction is not cumulative. The range is ±fs/8, which is ±500 Hz. The resolution is fs/(4N), about 1 Hz at N = 1024. Without the averaging, short frames occasionally jump to a noise bin. That rotates the constellation by a quarter turn and corrupts symbols. Averaging over about eight frames removed this in the loopback test.

### Timing and fine carrier (`rx_tsync_core`, OP7)

This block works on the 32-samples-per-symbol stream.

- **Carrier loop.** An NCO rotates every sample. At each symbol, the decision-directed QPSK detector `sgn(I)·Q − sgn(Q)·I` drives a proportional-integral loop:
  - The proportional term steps the NCO phase once.
  - The integral term adjusts the NCO frequency.
  - The loop gains are powers of two: `KP_SHIFT` and `KI_SHIFT`.
- **Timing loop.** A modulo-32 counter picks the symbol sample (count 0) and the mid-point sample (count 16). A Gardner error `Re{(y_k − y_{k−1})·conj(mid)}` is accumulated.
  - When the sum passes +TED_TH, the counter skips a sample.
  - When it passes −TED_TH, the counter holds for a sample.
  - The accumulator then restarts.
  - This is a first-order loop with steps of 1/32 symbol. It tolerates clock offsets up to a few parts in 10³.
- **Loop reset.** Both loops are cleared every `sync_reset` input samples. This is register 0x14; it resets to 16000, one second, and 0 disables it. This keeps a loop that locked wrongly from staying there.
- **Outputs.** Symbols are decided by sign and Gray-decoded back to two bits.

The symbols leave on `sym`, `sym_valid` and `sym_bits`. Register 0x10 counts timing adjustments, and 0x0C reads back the carrier NCO increment.

## Observation points and the inspector

Each OP is an `inspector` instance with a FIFO (`fifo_sync`), a beat counter, a comparator and a small FSM.

- **Eject.** The FIFO always accepts the latest samples. When full, it drops the oldest one each time a new one arrives. A capture therefore returns recent data rather than data from when the capture was armed.
- **Wait.** A write to the OP's "begin" register arms a packet. The FSM waits until `pkt_size` samples are stored.
- **Last beat.** The FSM then streams the packet on `m_axis` with AXI-Stream back-pressure. `tlast` is asserted on the beat where the count reaches `pkt_size − 1`; the comparison is ≥, so a shrinking `pkt_size` cannot run past.
- **Frame mode (`USE_SOF = 1`, OP3).** The FSM discards samples older than the most recent FFT start-of-frame (`s_tuser`). The packet then begins on bin 0. The FIFO depth must exceed one frame.

OP sizes at reset: OP1 128, OP2 1024, OP3 1024, OP4 1024, OP5 1024, OP6 512, OP7 16. FIFO depths: 256, 2048, 2048, 2048, 2048, 8192, 256. Each depth holds the largest packet plotted by the control software: 128, 1024, 1024, 1024, 1024, 4096 and 128.

## Registers

Each IP has a bank of 32-bit AXI4-Lite registers (`axil_regs`) at 4-byte offsets.

- **Tx (one IP).**
  - 0x00 gain.
  - 0x04/0x08 OP1 size/begin.
  - 0x0C/0x10 OP2 size/begin.
  - 0x14/0x18 OP3 size/begin.
  - 0x1C status: bit k means OP k+1 is busy.
- **Rx.** One AXI-Lite port is split by `axil_decoder` on address bits [9:8]:
  - **0x000 decimation.** 0x00 OP4 size, 0x04 begin, 0x08 status.
  - **0x100 coarse.** 0x00 OP5 size, 0x04 begin, 0x08 correction enable (reset 1), 0x0C NCO increment, 0x10 status.
  - **0x200 RRC.** 0x00 OP6 size, 0x04 begin, 0x08 status.
  - **0x300 timing.** 0x00 OP7 size, 0x04 begin, 0x08 status, 0x0C NCO increment, 0x10 adjustment count, 0x14 `sync_reset` (so 0x314 from the Rx base).

A write to a "begin" register triggers a capture, whatever value is written.

## Clocks and crossings

The top, `qpsk_top`, has four clocks:

- `tx_clk_25` and `rx_clk_25`: 25.6 MHz, for the chains and AXI.
- `tx_clk_128` and `rx_clk_128`: 128 MHz, for the converter side.

Each rate change by 5 is a FIR plus a Gray-pointer asynchronous FIFO (`fifo_async`, two-flop synchronisers).

- **Tx.** The FIFO sits before the ×5 FIR. The FIR reads one word every fifth 128 MHz clock after a prefill of 4 words. If the clocks drift apart, the FIFO absorbs it; `tx_fifo_overflow` flags a word dropped on overflow.
- **Rx.** The ÷5 FIR runs at 128 MHz, and its outputs cross into the 25.6 MHz domain through a FIFO. `rx_fifo_overflow` flags a word dropped there.

The RF data converters, their mixers and ×8/÷8 rate changes, the DMAs, the AXI interconnect, the processor and the clock generators are not included. Their signals are ports of `qpsk_top`:

- `dac_tdata`/`dac_tvalid` out.
- `adc_i_tdata`, `adc_q_tdata` and `adc_tvalid` in.
- `op_axis[7]`/`op_tready[7]` to the DMAs.
- Two AXI-Lite request/response struct pairs.

## Files

Each file starts with a header comment describing its function, timing and interface.

- `rtl/sdr_pkg.sv`: shared types (`iq_t`, `axis32_t`, AXI-Lite structs) and saturation helpers.
- Building blocks:
  - `lfsr_prbs`: x^15+x^14+1.
  - `qpsk_gray_map`.
  - `fir_interp`, `fir_decim`, `cic_interp`, `cic_decim`.
  - `fft_frame`: radix-2, one butterfly per clock, 1/2 scaling per stage, natural-order output with start-of-frame.
  - `nco_mixer`.
  - `fifo_sync`, `fifo_async`.
  - `inspector`, `axil_regs`, `axil_decoder`.
- IPs:
  - `qpsk_tx_core`.
  - `rx_decimation_core`, `rx_coarse_sync_core`, `rx_rrc_core`, `rx_tsync_core`.
- Hierarchies: `tx_hierarchy`, `rx_hierarchy`, `ipi_interp_stage`, `ipi_decim_stage`.
- Top: `qpsk_top`.
- `tb/`: one self-checking testbench per module (`tb_<module>.sv`), a shared AXI-Lite driver (`axil_bfm.sv`), and two system tests.
  - `tb_qpsk_top`: loopback at reduced CIC factors (Tx ×8, Rx ÷2 ÷2) and 64-point FFTs. The two hierarchies run on clocks 0.1 % apart, with a carrier offset of about 3 coarse bins. It checks that the received bits equal the transmitted PRBS (zero errors after lock), that coarse correction, timing adjustments and the loop reset all occurred, and that every OP delivers a packet.
  - `tb_qpsk_top_full`: the top at its default parameters with the DAC looped back to the ADC. It checks register reset values, 128 OP1 symbols against the PRBS, a 1024-sample OP4 packet, a DAC sample on every 128 MHz clock and no FIFO overflow. It simulates about 6.6 million clocks; that takes roughly 80 s with Verilator.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
          rtl/sdr_pkg.sv tb/tb_qpsk_top.sv --top-module tb_qpsk_top
./obj_dir/Vtb_qpsk_top
```

Replace the testbench name for any other test. Parameters such as `TX_CIC_R`, `RX_CIC1_R`, `RX_CIC2_R` and `COARSE_LOG2N` can be lowered to shorten a simulation. The symbol rate then rises relative to the clock, and the receiver keeps 8 samples per symbol if the Rx decimation matches the Tx interpolation.

## Departures and limits

- **Left open, chosen here.** The source design leaves open the PRBS polynomial, the Gray map, filter roll-offs and tap counts, the FFT architecture, the synchroniser detectors and gains, the register layouts and the FIFO depths. All are choices of this implementation.
- **Synchronisers.** The coarse spectrum averaging and the one-sample-step timing loop are this design's. They are simple rather than optimal. Timing resolution is 1/32 symbol, and no fractional interpolator is used.
- **AXI-Lite clock.** The register interfaces run on the 25.6 MHz stream clock of their hierarchy. In a system with a separate control-bus clock, an AXI clock converter must sit in front of each AXI-Lite port.
- **OP6 and OP7 reset sizes.** The OP6 packet size resets to 512 and OP7 to 16. The control software plots 4096 and 128 points at these OPs; the FIFOs hold both.
- **Untested at full scale.** At full scale, lock of the receiver was not simulated: one second of signal is 25.6 million clocks per domain. Receiver lock and bit recovery are shown at the reduced factors of `tb_qpsk_top`. Individual Rx cores are tested at their own default factors where practical.
- **Lint warnings.** Verilator reports a few unused signals: the upper bits of wide CIC shift intermediates, register write strobes that are not used, and the two low address bits in `axil_regs`. It also reports the unused FIFO level port in `ipi_decim_stage`. These are harmless.
