// glink_emulator: full-duplex GLink chip-set emulator built around an FPGA
// serial transceiver. The transmitter replaces an HDMP-1032A serializer and
// the receiver an HDMP-1034A deserializer, both speaking the CIMT line code
// (20-bit words: 16-bit D-field + 4-bit C-field) at one word per 40 MHz
// bunch-crossing clock, i.e. 800 Mb/s, with a latency that is the same after
// every reset.
//
// The two halves run on their own clocks (tx_clk, rx_clk: same frequency,
// fixed but unknown relative phase) and share only the mode pins. The hard
// transceiver (serializer, deserializer with its bit-slip word aligner,
// PLL) is not part of this RTL: its 20-bit parallel ports, RxSlide and the
// phase-alignment controls are this module's ports.
//
// Mode pins: enhanced_i selects the enhanced CIMT mode (scrambled Flag',
// static-Flag' detection) for both halves; idle_lock_i makes the receiver
// lock only on a run of idle words.
module glink_emulator #(
  parameter int unsigned RX_CONFIG    = 1,
  parameter int unsigned EN_CYCLES    = 32,
  parameter int unsigned SET_CYCLES   = 8192,
  parameter int unsigned CHECK_CYCLES = 16384
) (
  input  logic        enhanced_i,
  input  logic        idle_lock_i,
  // transmitter
  input  logic        tx_clk,
  input  logic        tx_rst,
  input  logic        tx_pll_lock_i,
  input  logic [15:0] tx_payload_i,
  input  logic        tx_is_data_i,
  input  logic        tx_is_ctrl_i,
  input  logic        tx_flag_i,
  output logic        tx_ready_o,
  output logic [19:0] gtp_tx_word_o,
  output logic        gtp_tx_phase_align_en_o,
  output logic        gtp_tx_set_phase_o,
  // receiver
  input  logic        rx_clk,
  input  logic        rx_rst,
  input  logic        rx_pll_lock_i,
  input  logic [19:0] gtp_rx_word_i,
  output logic        gtp_rx_slide_o,
  output logic        gtp_rx_phase_align_en_o,
  output logic        gtp_rx_set_phase_o,
  input  logic        rx_recheck_i,
  input  logic        rx_cfg_wr_i,
  input  logic        rx_cfg_addr_i,
  input  logic [15:0] rx_cfg_wdata_i,
  output logic [15:0] rx_cfg_rdata_o,
  output logic [15:0] rx_payload_o,
  output logic        rx_is_data_o,
  output logic        rx_is_ctrl_o,
  output logic        rx_is_idle_o,
  output logic        rx_flag_s_o,
  output logic        rx_flag_o,
  output logic        rx_error_o,
  output logic        rx_aligned_o,
  output logic        rx_phase_legal_o,
  output logic        rx_phase_illegal_o
);

  glink_tx #(
    .EN_CYCLES  (EN_CYCLES),
    .SET_CYCLES (SET_CYCLES)
  ) u_tx (
    .clk              (tx_clk),
    .rst              (tx_rst),
    .pll_lock_i       (tx_pll_lock_i),
    .enhanced_i       (enhanced_i),
    .payload_i        (tx_payload_i),
    .is_data_i        (tx_is_data_i),
    .is_ctrl_i        (tx_is_ctrl_i),
    .flag_i           (tx_flag_i),
    .cimt_o           (gtp_tx_word_o),
    .phase_align_en_o (gtp_tx_phase_align_en_o),
    .set_phase_o      (gtp_tx_set_phase_o),
    .ready_o          (tx_ready_o)
  );

  glink_rx #(
    .RX_CONFIG    (RX_CONFIG),
    .EN_CYCLES    (EN_CYCLES),
    .SET_CYCLES   (SET_CYCLES),
    .CHECK_CYCLES (CHECK_CYCLES)
  ) u_rx (
    .clk              (rx_clk),
    .rst              (rx_rst),
    .pll_lock_i       (rx_pll_lock_i),
    .enhanced_i       (enhanced_i),
    .idle_lock_i      (idle_lock_i),
    .recheck_i        (rx_recheck_i),
    .cfg_wr_i         (rx_cfg_wr_i),
    .cfg_addr_i       (rx_cfg_addr_i),
    .cfg_wdata_i      (rx_cfg_wdata_i),
    .cfg_rdata_o      (rx_cfg_rdata_o),
    .rx_word_i        (gtp_rx_word_i),
    .rx_slide_o       (gtp_rx_slide_o),
    .phase_align_en_o (gtp_rx_phase_align_en_o),
    .set_phase_o      (gtp_rx_set_phase_o),
    .payload_o        (rx_payload_o),
    .is_data_o        (rx_is_data_o),
    .is_ctrl_o        (rx_is_ctrl_o),
    .is_idle_o        (rx_is_idle_o),
    .flag_s_o         (rx_flag_s_o),
    .flag_o           (rx_flag_o),
    .error_o          (rx_error_o),
    .aligned_o        (rx_aligned_o),
    .phase_legal_o    (rx_phase_legal_o),
    .phase_illegal_o  (rx_phase_illegal_o)
  );

endmodule
