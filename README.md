# Time-over-threshold logic for the AGATA Digitizer

A germanium detector's pre-amplifier raises an *inhibit* signal when it
cannot deliver valid samples. The ADC samples taken while inhibit is high carry
no physics. How long inhibit stays high does, though: its duration (the *time
over threshold*, TOT) is information about the pulse that caused it. This RTL measures that duration in the
Digitizer to a fraction of a clock period. It then sends the result to the
Pre-Processor over the optical links that normally carry ADC samples.

The links are already full of ADC data, so no bandwidth is spare. The design
takes its room from the dead time that follows every inhibit. The
Pre-Processor's moving-window deconvolution keeps a history of samples. It
gives no valid result until the bad samples have left that history, which
takes at least 1 µs. During that time three ADC words can be replaced by a
short TOT packet and nothing is lost. The receiver hides the packet from the
downstream logic by repeating the three words that came before it. Those words
are as meaningless as the rest of the dead time, but they are well-formed data.

```
 inhibit ──► TOT TDC ──► tot_data/tot_valid ─┬─► TOT TX (core 1) ──► txdata ─► link ─► TOT RX (Pre-Processor)
                                             │                         └─► loopback ─► TOT RX (diagnostic)
                                             └─► TOT TX (core 2) ──► txdata ─► link ─► TOT RX (Pre-Processor)
 slow control ──► Core Control reg (bit 15: TDC reset), TOT SC core 1 (0x50..0x56), TOT SC core 2 (0x60..0x66)
```

## The TOT word and the packet

The TDC produces one 32-bit word per inhibit pulse:

| bits  | field      | meaning |
|-------|------------|---------|
| 15:0  | `T_course` | whole TDC clock cycles for which inhibit was seen high (unsigned) |
| 23:16 | `T_fine`   | sub-cycle correction, in delay-line elements (two's complement) |
| 31:24 | `T_ref`    | one clock period, in delay-line elements (unsigned) |

The duration is `(T_course + T_fine / T_ref) × 5 ns`. Software does this
division, so the hardware never needs to know the element delay, which drifts
with temperature.

On the 16-bit transceiver interface a packet takes three consecutive cycles:

| cycle | `txdata`        | `txcharisk` |
|-------|-----------------|-------------|
| 1     | `0x1C1C` (K28.0 on both bytes) | `11` |
| 2     | TOT word bits 15:0  | `00` |
| 3     | TOT word bits 31:16 | `00` |

K28.0 is used only as the TOT header. K28.7 (alignment) and all other traffic
pass through untouched.

## TOT Transmitter (`tot_tx`)

The transmitter is a multiplexer in front of the transceiver. It is transparent,
with no register in the path, except during the three packet cycles. A request
(`tot_valid`, or `test_valid` in test mode) latches the 32-bit word into a
three-slot pipeline (header, low half, high half) and raises `busy`. Requests
are ignored while `busy` is high. The header goes out at the earliest in the
next cycle, and only in a cycle in which none of these hold-off conditions
holds:

1. a sync is due within four cycles (`sync_limit - sync_accum <= 4`, or the
   accumulator has reached the limit);
2. bit 15 of the ADC word (sync/inhibit) is high now or was in any of the last
   three cycles;
3. a `rkt_charisk` bit is high now or was in any of the last three cycles;
4. fewer than four cycles have passed since the last word of the previous
   packet.

These rules exist because of how the receiver works. The receiver covers a
packet by repeating the three words before the header. Those words must
therefore never be a sync, a K character or part of an earlier packet
(conditions 2 to 4). Condition 1 also keeps a sync from landing on one of the
three cycles the packet overwrites. Once the header is out, the packet runs to
the end without stopping. `busy` falls after the third word.

The sync test assumes the Core sends a sync in the cycle in which `sync_accum`
equals `sync_limit`. If the Core's sync generator works differently, change
`sync_due` in `tot_tx.sv`. The start decision is combinational on the current
ADC word. This is what gives the one-cycle minimum latency from request to
header, and it lets condition 2 look at the word the header would replace.

## TOT Receiver (`tot_rx`)

Outputs are registered, so `data_out`/`charisk_out` follow
`rxdata`/`rxcharisk` one cycle later. A three-stage delay line runs alongside
the data all the time. When the receiver is enabled and sees `0x1C1C` with both
K flags set, it sets the mask for three cycles. During those cycles `data_out`
takes the end of the delay line and `charisk_out` is `00`. The result looks
like this:

```
rxdata      n   n+1 n+2 K28.0 w1  w2  n+6
data_out        n   n+1 n+2   n   n+1 n+2 n+6
tot_flag                                  1      (tot_data = {w2, w1})
```

The two words after the header go through two clock-enabled registers in
series, so `tot_data = {w2, w1}`. `tot_flag` is high for the cycle after `w2`.
`tot_data` keeps its value until the next packet. `rx_busy` is high while the
two words are being collected. When the receiver is disabled, the packet passes
through as it is.

## TOT TDC (`tot_tdc`)

The TDC runs at 200 MHz and interpolates inside the clock period with two
delay lines:

* **Delay chain 126** carries inhibit through 126 carry-chain elements of about
  47.6 ps each (105 elements per 5 ns period on a cold device, about 104 on
  a hot one). A flip-flop on the TDC clock
  samples every tap. The **Inh Encoder** counts the high taps. That count is
  how long inhibit has been high before the sampling edge, in elements.
* `CLK_r` is the first edge that sees tap 0 high. The count taken there is
  `T_rising`, the time from the rising edge of inhibit to `CLK_r`. `CLK_f` is
  the first edge that sees tap 0 low. The count taken there is
  `126 − T_falling`, where `T_falling` is the time from the falling edge to
  `CLK_f`.
* Tap 0, already registered, goes through four more flip-flops (`s1`..`s4`).
  These reduce metastability and keep a short history. The **counter** counts
  the cycles `s2` is high, which gives `T_course = (CLK_f − CLK_r) / 5 ns`.
  **Control Proc** finds the edges in `s2`/`s3` and fires the loads. A cycle
  later (`s3`/`s4`) it raises `tot_valid`, but only if the pulse lasted at
  least 4 cycles (20 ns). Sync pulses are 10 ns long on the same line, so they
  produce no packet.
* **Capture Proc** stores `T_rising` at the rising edge. At the falling edge it
  stores `T_fine = T_rising − T_falling`, `T_ref` and `T_course`. Since
  `duration = (CLK_f − CLK_r) + T_rising − T_falling`, the formula above
  follows.
* **Delay chain 140** carries the TDC clock itself. The **Ref Encoder** looks at
  only two windows of its taps, W1 = taps 0..34 and W2 = taps 105..139. Each
  window holds one like transition of the clock, one period apart. `T1` and
  `T2` are the numbers of high taps in each window, counted from the transition
  to the window's end. Then `T_ref = T_woff + T1 − T2` with `T_woff = 105`, the
  distance between the window ends. Measuring a whole period matters because
  the clock comes from a DCM and is high only about 30 % of the time.
  Doubling the high time would give the wrong answer.

Both encoders have two pipeline stages. The load pulses are combinational from
the history bits, so each load picks up the encoder value of `CLK_r` or
`CLK_f` exactly. `tot_valid` is high for the one cycle that starts three edges
after `CLK_f`. The TOT packet then normally finishes about 35 ns after inhibit
falls, or about 100 ns with hold-offs. That is well inside the 1 µs dead time.

### The delay chains are models

A real delay chain is a relationally placed carry-chain macro. Its delay comes
from placement, so it cannot be written as portable RTL.
`tdc_delay_chain.sv` is a behavioural model and is not synthesizable (it uses
`$realtime`). It records the last transitions of its input. At every clock edge
it sets tap *i* to the level the input had `(i+1)·TAU_PS + CLK_SKEW_PS` earlier.
`CLK_SKEW_PS` (2666.7 ps by default, reference chain only) stands for the clock
distribution delay. It places the clock's transitions at taps 17 and 122, the
middles of the windows. For an FPGA build, replace this module with the placed
carry chain and its tap flip-flops. Keep the ports: `clk`, `sig_in`,
`taps[N-1:0]`. Then set the Ref Encoder windows from measurement. The model
assumes a 5 ns clock that is high for 30 % of the period. Jitter, element
mismatch and temperature drift are not modelled.

## Slow control

Bus (`tot_pkg::sc_req_t`): 32-bit address, one-cycle write strobe, 16-bit write
data. Read data is combinational, and each register block returns zero when it
is not addressed. The top level ORs the blocks together.

| address | register | bits |
|---------|----------|------|
| 0x00 | Core Control | 15: hold the TOT TDC in reset; 0–6, 8, 9, 11–13: existing Core controls (laser, LED, shdn_c, DCM reset, inhibit transmission, trigger reset, Srom reload, RAM test), stored and brought out on `core_ctrl`; 7, 10, 14 read 0 |
| base+0 | Status (RO) | 0: TOT Rx busy |
| base+1 | Control Mode | 0: enable Tx, 1: enable Rx, 2: Tx test mode |
| base+2 | Control Pulse (reads 0) | 0: send the test word, 4: reset Tx (and Rx) |
| base+3 / +4 | Test Data LSB / MSB | test word bits 15:0 / 31:16 |
| base+5 / +6 | Data Rx LSB / MSB (RO) | last word received by the loopback Rx |

The base is 0x50 for core 1 and 0x60 for core 2. Only core 1 has the loopback
receiver (`HAS_RX = 1`). On core 2 the Rx bits and registers read zero and
ignore writes.

## Top level (`agata_tot_top`)

The top holds everything in the figure above. The transceivers are not part of
this RTL, so each side of them is a port: `txdata`/`txcharisk` per core, the
core 1 loopback `lb_rx*`, and the Pre-Processor inputs `pp_rx*`. The Core's
ADC streams (`rkt_*`) and sync counters (`sync_accum`, `sync_limit`) are inputs
per core. The Pre-Processor receivers run on `pp_clk`/`pp_rst`, and their
enables are plain inputs.

## Where this RTL makes its own choices

* **One clock for the Digitizer side.** The TDC clock (200 MHz) also clocks the
  transmitters and the slow control. If the transceiver's clock differs from
  the TDC clock, `tot_valid`/`tot_data` need a clock-domain crossing, which is
  not provided.
* **Resets** are synchronous and active high. Core Control bit 15 is a level.
  The Control Pulse reset is a one-cycle pulse.
* **Reference windows** (0..34, 105..139) and the skew in the model are chosen
  values. Real windows have to be found on hardware.
* **Encoders** count all high taps (population count) in two pipeline stages.
* **Receiver header match** needs K28.0 on both bytes. `charisk_out` is forced
  to `00` while masking rather than replayed.
* **Widths**: 16-bit `T_course` counter (saturating), 16-bit sync counters.
* Dropping the transmitter's `enable` throws away a pending or partly sent
  packet.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_tot_tx`: pass-through, exact latencies for each hold-off condition,
  `busy`, test mode. Then 20,000 cycles of random traffic checked against a
  scoreboard: every request is sent once, no scheduled sync is overwritten, and
  no replayed word is a sync, a K character or a packet word.
* `tb_tot_rx`: 6,000-word random streams with packets and K28.7. The output is
  compared word by word with the expected replayed stream, and the receiver is
  also run disabled.
* `tb_tot_tdc`: 200 inhibit pulses of 20 ns to 2 µs at random phase, plus 10 ns
  sync pulses, fed to two TDCs at once: one with a cold-device element delay
  (105 elements per 5 ns) and one with a hot-device delay (104 per 5 ns).
  Expected `T_course`, `T_fine` and `T_ref` are worked out from the drive
  times for each, and the rebuilt duration must be within two elements of the
  truth.
* `tb_agata_tot_top`: the whole design at its default parameters, with link
  models, ADC streams with syncs and K28.7, and slow-control sequences. Every
  TDC result must reach both Pre-Processor receivers and the loopback. It
  counts, and fails if any never happened: each hold-off condition, masking,
  test mode, a request ignored while busy, a request delayed by the gap, a
  disabled receiver, 10 ns pulses filtered, TDC reset, channel reset, and
  transmission within 1 µs. In a typical run all packets finish within 150 ns
  of the end of inhibit.
* Unit testbenches also cover the counter, Control Proc, Capture Proc, both
  encoders, both delay-chain configurations (`tb_delay_chain_126`,
  `tb_delay_chain_140`), the channel register blocks (4,000 random bus
  operations against a reference model) and the Core Control register.

## Simulating

With Verilator 5 (the TDC model needs `--timing`):

```
verilator --binary --timing --assert -Irtl rtl/tot_pkg.sv \
  rtl/tdc_delay_chain.sv rtl/tdc_inh_encoder.sv rtl/tdc_ref_encoder.sv \
  rtl/tdc_counter.sv rtl/tdc_control.sv rtl/tdc_capture.sv rtl/tot_tdc.sv \
  rtl/tot_tx.sv rtl/tot_rx.sv rtl/tot_sc.sv rtl/core_ctrl_reg.sv \
  rtl/agata_tot_top.sv tb/tb_agata_tot_top.sv --top-module tb_agata_tot_top
./obj_dir/Vtb_agata_tot_top
```

For a unit testbench, pass `tot_pkg.sv`, the module and `tb/tb_<module>.sv`.
Every module except `tdc_delay_chain` (and therefore `tot_tdc` and the top,
which contain it) is synthesizable.

## Files

| file | contents |
|------|----------|
| `rtl/tot_pkg.sv` | K-character codes, `tot_word_t`, `sc_req_t`, register offsets |
| `rtl/agata_tot_top.sv` | Digitizer TOT logic plus Pre-Processor receivers |
| `rtl/tot_tx.sv`, `rtl/tot_rx.sv` | transmitter and receiver |
| `rtl/tot_tdc.sv` | TDC: chains, synchroniser, counter, control, capture |
| `rtl/tdc_*.sv` | TDC parts; `tdc_delay_chain.sv` is the behavioural chain model |
| `rtl/tot_sc.sv`, `rtl/core_ctrl_reg.sv` | slow-control registers |
| `tb/tb_*.sv` | testbenches |
