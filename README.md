# A GLink-compatible serial link in FPGA fabric logic

Many particle-physics trigger systems send detector data over links built on
the Agilent HDMP-1032A / HDMP-1034A serializer/deserializer pair ("GLink").
What made GLink popular is that its latency is *fixed*: after every power-up
or loss of lock, a word takes exactly the same number of clocks from the
transmitter's parallel input to the receiver's parallel output. Trigger
pipelines depend on that. The chips are no longer made.

This RTL rebuilds the chip-set's logic around the multi-gigabit transceiver
of an FPGA (a Virtex-5 GTP class device). The transceiver does the
serialization, clock recovery and bit slipping. The fabric logic here does
four jobs:

* it speaks GLink's line code, CIMT (Conditional Inversion with Master
  Transition);
* it keeps the line DC-balanced;
* it finds the word boundary in the received bit stream by asking the
  transceiver to slip one bit at a time;
* it sequences the transceiver's phase alignment, so that the elastic buffers
  can be bypassed and the latency stays fixed.

The link carries one 20-bit word per 40 MHz clock, i.e. 800 Mb/s. Each word
holds a 16-bit payload, plus IsData / IsCtrl / Flag, just like the original
parallel interface.

```
            Tx emulator (glink_tx)                       Rx emulator (glink_rx)
 payload 16 ┌──────────────┐ 20  ┌─────┐  serial  ┌──────────────┐ 20 ┌──────────────┐ payload 16
 IsData  ──►│ cimt_encoder ├────►│ GTP │ ───────► │ GTP + bit-   ├───►│ cimt_decoder ├──► IsData, IsCtrl,
 IsCtrl     └──────────────┘     │ TX  │          │ slip aligner │    └──────┬───────┘    Flag', Flag, Error
 Flag       ┌──────────────┐     └──▲──┘          └──▲───────▲───┘   Error   │
 Ready ◄────┤ tx_phase_ctrl├────────┘ phase          │RxSlide│       ┌───────▼────────┐
            └──────────────┘          align          └───────┼───────┤ word_align_ctrl├──► Aligned
                                                             │       │ + align_cfg_regs (M, N)
                                                     phase   │       └───────┬────────┘
                                                     align   └───────┬───────▼───────┐
                                                                     │ rx_phase_ctrl ├──► Phase legal
                                                                     └───────────────┘   (Configuration 1)
```

The GTP blocks in this drawing are not part of the RTL. `glink_emulator` is
the top. It brings the transceiver's 20-bit parallel ports, RxSlide and the
phase-alignment pins out as ports.

## The CIMT word

A CIMT word is 20 bits wide. In this RTL, `word[19:16]` is the C-field and
`word[15:0]` is the D-field. Every legal C-field changes value between its
two middle bits (C[2] → C[1]). This "master transition" is what the receiver
locks on, and a C-field without it is an error.

The C-field codes, the dummy bits of a control word and the idle patterns
come from `glink_pkg`. They follow the HDMP-1032A conventions as far as they
were known when this RTL was written. They have **not** been checked
bit-for-bit against a real chip. If you need to interoperate with real GLink
silicon, compare them against the chip's data sheet before you rely on them.

| word kind        | C-field (plain / inverted) | D-field (plain form)                        |
|------------------|----------------------------|---------------------------------------------|
| data, Flag' = 0  | `1101` / `0010`            | payload[15:0] (bit 0 XOR Flag' in enhanced) |
| data, Flag' = 1  | `1011` / `0100`            | same                                        |
| control          | `0011` / `1100`            | payload[13:7], `0`, `1`, payload[6:0]        |
| idle, Flag' = 0  | `0011` (never inverted)    | `FF00` = `1111111_10_0000000`               |
| idle, Flag' = 1  | `0011` (never inverted)    | `017F` = `0000000_10_1111111`               |

A control word carries only 14 payload bits. D[8:7] = `01` marks it, and
idle words have `10` there. This lets the decoder tell a control word from an
idle word under the same C-field. Any other combination raises `Error`.

## DC balance: the inversion rule

The encoder (`cimt_encoder`) works in three steps:

1. It builds the candidate word in plain form.
2. The next-word disparity calculator reports the sign of the candidate's
   disparity (ones minus zeros) on the 2-bit RDSign bus. The total disparity
   calculator reports the sign of everything sent so far on TDSign. Both
   buses use the same code: `10` means more ones, `01` more zeros, `00`
   balanced.
3. If RDSign equals TDSign, the whole word is complemented, C-field included.
   The receiver sees this from the C-field and undoes it.

Idle words are balanced and are never inverted.

One choice here differs from the usual description. RDSign is computed over
the whole 20-bit candidate, not over the 16-bit payload alone. A plain data
C-field (`1101`, `1011`) has three ones. With payload-only signs, a long run
of balanced payloads would then push the running disparity up by 2 on every
word, without bound. With the whole-word sign, the running disparity stays
within ±20 (the encoder testbench checks this). It fits the 8-bit accumulator
in `total_disparity`.

## Enhanced mode: a flag that always moves

In basic mode, Flag' (the flag as sent) equals the user's Flag. Enhanced mode
(`enhanced_i = 1`) makes false word locks much less likely:

* `flag_scrambler` XORs Flag with a free-running pseudo-random bit. The
  generator uses the polynomial x^7 + x^6 + 1: its period is 127 and its
  longest run of equal bits is 7. So Flag' keeps toggling even when Flag
  never changes.
* Bit 0 of every data D-field is also XORed with Flag'.
* The receiver's word-align logic declares the alignment wrong when Flag'
  stays the same for 32 words.

The receiver has to remove the scrambling without a side channel.
`flag_descrambler` runs its own copy of the generator. It keeps that copy in
step using idle words: an idle word's Flag is defined as 0, so its Flag' is
the bare generator bit. On idle words, the received bit is shifted into the
copy instead of the predicted bit. Seven idle words after start-up (or after
a slip), the copy matches the transmitter's generator. The link always starts
with idle words, so this costs nothing. The polynomial and this
synchronisation scheme are choices made in this RTL.

## Finding the word boundary

`word_align_ctrl` is a four-state machine that drives RxSlide:

| state     | outputs                   | leaves when                                                                           |
|-----------|---------------------------|---------------------------------------------------------------------------------------|
| UNALIGNED | Aligned = 0               | M consecutive errors, or (enhanced) Flag' static for 32 words → SLIDE; N consecutive good words → ALIGNED |
| SLIDE     | RxSlide = 1 for 2 clocks  | → WAIT                                                                                |
| WAIT      | RxSlide = 0 for 14 clocks | → UNALIGNED. The 14 clocks cover the slip in the transceiver plus the decoder.         |
| ALIGNED   | Aligned = 1               | M consecutive errors, or (enhanced) a static Flag' → UNALIGNED                         |

* M is an 8-bit register (reset value 2) and N a 10-bit register (reset value
  256), both in `align_cfg_regs` (address 0 = M, address 1 = N). A value of 0
  acts as 1.
* With `idle_lock_i = 1`, only idle words count towards N. A receiver can
  fake-lock on non-idle traffic at start-up; this mode prevents it.
* Flag' runs are judged only on words that carry a Flag' (data and idle
  words). Control words neither break a run nor extend it.
* If you lower N below 32 in enhanced mode, the FSM can lock on a wrong
  boundary before the 32-word static-Flag' test has time to fire. It then
  unlocks again once that test fires. Keep N ≥ 32 when you rely on that test.

## Phase control and the two receiver configurations

The transceiver's elastic buffers are bypassed because they would make the
latency variable. Without them, the fabric must align the transceiver's
internal clock phase to its own clock:

* `tx_phase_ctrl` waits for PLL lock and raises the phase-align enable. After
  `EN_CYCLES` clocks it also raises set-phase, for `SET_CYCLES` clocks. Then
  it asserts `Ready`. Losing lock restarts the sequence.
* `rx_phase_ctrl` with `RX_CONFIG = 1` (the default, lowest latency) runs the
  same sequence on the receive side. Then it checks the phase: if the word
  aligner reaches Aligned, with no decoder Error on that clock, within
  `CHECK_CYCLES`, the phase is legal.
  Otherwise `phase_illegal_o` rises and stays high. The user must then move
  the receive clock phase (in the FPGA or outside) and pulse `rx_recheck_i`.
* With `RX_CONFIG = 2`, the receive buffer is used. Every phase is legal and
  no check is run. The cost is a longer latency, which is set inside the
  transceiver, not in this RTL.

The enable/set-phase handshake is the one Virtex-5 GTP transceivers use for
buffer bypass. The defaults (32 and 8192 clocks, and a 16384-clock check
window) are choices made here. So is the way legality is decided: by
alignment within a time-out.

## Latency

| part                          | this RTL                                    | reference design |
|-------------------------------|---------------------------------------------|------------------|
| encoder (fabric)              | 4 clocks (input, candidate, invert, output registers) | 4.5 clocks |
| decoder (fabric)              | 1 clock                                     | 1 clock          |
| transceiver TX / RX           | not in the RTL                              | 2.25 / 4.75 clocks |

The half clock on the transmit side is a transfer into the transceiver on the
opposite clock edge. This RTL does not model it. With the testbench's
transceiver model (2 + 4 clocks), the measured latency from launching a word
to decoding it is 11 clocks. It is the same after every reset, whichever bit
offset the link starts at.

## Top-level interface (`glink_emulator`)

| group      | ports |
|------------|-------|
| modes      | `enhanced_i`, `idle_lock_i` (shared by both halves) |
| transmit   | `tx_clk`, `tx_rst`, `tx_pll_lock_i`, `tx_payload_i[15:0]`, `tx_is_data_i`, `tx_is_ctrl_i`, `tx_flag_i`, `tx_ready_o` |
| to TX GTP  | `gtp_tx_word_o[19:0]`, `gtp_tx_phase_align_en_o`, `gtp_tx_set_phase_o` |
| receive    | `rx_clk`, `rx_rst`, `rx_pll_lock_i`, `rx_payload_o[15:0]`, `rx_is_data_o`, `rx_is_ctrl_o`, `rx_is_idle_o`, `rx_flag_s_o` (Flag'), `rx_flag_o`, `rx_error_o`, `rx_aligned_o`, `rx_phase_legal_o`, `rx_phase_illegal_o`, `rx_recheck_i` |
| registers  | `rx_cfg_wr_i`, `rx_cfg_addr_i`, `rx_cfg_wdata_i[15:0]`, `rx_cfg_rdata_o[15:0]` |
| from RX GTP| `gtp_rx_word_i[19:0]`, `gtp_rx_slide_o`, `gtp_rx_phase_align_en_o`, `gtp_rx_set_phase_o` |

Interface rules:

* Resets are synchronous and active high.
* A word goes in on every `tx_clk` and comes out on every `rx_clk`. There is
  no valid or stall handshake: a word with neither IsData nor IsCtrl set is
  sent as an idle word.
* If IsData and IsCtrl are both set, the word is sent as data.
* `tx_clk` and `rx_clk` have the same frequency, with a fixed but unknown
  phase between them.

Parameters (all with defaults): `RX_CONFIG` (1), `EN_CYCLES` (32),
`SET_CYCLES` (8192), `CHECK_CYCLES` (16384). The word-align FSM has
`SLIDE_CYCLES` (2), `WAIT_CYCLES` (14) and `STATIC_LIMIT` (32).

## Files

* `rtl/glink_pkg.sv`: code constants, disparity helpers, types.
* `rtl/cimt_encoder.sv`: uses `next_word_disparity.sv`, `total_disparity.sv`
  and `flag_scrambler.sv`.
* `rtl/cimt_decoder.sv`: uses `flag_descrambler.sv`.
* `rtl/word_align_ctrl.sv`, `rtl/align_cfg_regs.sv`.
* `rtl/tx_phase_ctrl.sv`, `rtl/rx_phase_ctrl.sv`.
* `rtl/glink_tx.sv`, `rtl/glink_rx.sv`, `rtl/glink_emulator.sv`.
* `tb/glink_ref_pkg.sv`: a reference encoder/decoder written from the code
  table, used by the testbenches.
* `tb/gtp_link_model.sv`: a behavioural transceiver pair. It has fixed
  latency, a bit-offset word boundary moved by RxSlide, and test hooks that
  slip the boundary, garble the line or freeze it.
* `tb/tb_*.sv`: one self-checking testbench per module. Each ends by printing
  `TB_RESULT checks=N failures=M`.

## Simulating

Use Verilator 5. For example, for the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/glink_pkg.sv tb/glink_ref_pkg.sv tb/tb_glink_emulator.sv \
    --top-module tb_glink_emulator
./obj_dir/Vtb_glink_emulator
```

Replace `tb_glink_emulator` with any other `tb_*` name to run that test.
`tb_glink_emulator` runs the top at its default parameters in under a second.
It covers these scenarios:

* basic-mode lock from a 7-bit offset, then about 1500 mixed words compared
  in order at a constant latency;
* a reset into enhanced mode with idle-only locking, N rewritten to 100 and a
  15-bit offset. The latency must equal the first run's, and Flag' must
  toggle while Flag is held at 1;
* an unrequested bit slip, followed by loss of lock and relock;
* a frozen line, where a static Flag' drops the lock with no decode errors;
* a garbled line, which gives an illegal phase, then recovery after
  `rx_recheck_i`.

The testbench counts each mechanism and fails if one never happens.

`tb_link_prbs` works like a bit-error-ratio tester. It also runs the top at
its defaults, in basic and then in enhanced mode. In each mode it sends
250,000 back-to-back data words whose payloads follow the 16-bit
pseudo-random sequence x^16 + x^14 + x^13 + x^11 + 1, which is 4 Mbit of
payload. The receive side seeds its own copy of the sequence from the first
word it gets and counts every differing bit after that. The test expects no
bit errors and no decode errors.

## Limits and departures

* The transceiver, its PLL and the DLL that makes its reference clock are
  vendor hard blocks. They are outside the RTL. The testbench model stands in
  for them only at the parallel ports.
* The C-field codes, idle patterns, scrambling polynomial and descrambler
  synchronisation are this design's own (see above). The line code has
  therefore not been shown to interoperate with HDMP-1032A/1034A silicon.
* The 20/21-bit modes of the older HDMP-1022/1024 chips are not supported.
* RDSign covers the whole candidate word, not only the payload (see the
  inversion rule above).
* The encoder latency is 4 whole clocks where the reference design quotes
  4.5.
* With the buffers bypassed, whether a given receive clock phase works in
  Configuration 1 depends on silicon timing, which simulation cannot show.
  Here, phase legality is inferred from whether alignment succeeds.
