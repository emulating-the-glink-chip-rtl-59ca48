// glink_rx: receive half of the GLink emulator (the "Rx emulator"), the
// fabric part of an HDMP-1034A replacement. It takes 20-bit words from the
// transceiver's parallel receive port, decodes them, finds the word boundary
// by pulsing the transceiver's RxSlide, and presents the chip's parallel
// outputs: payload, IsData, IsCtrl, Flag' and Flag, plus Error and Aligned.
//
// Contents: cimt_decoder (1 clock), word_align_ctrl, align_cfg_regs (M, N)
// and rx_phase_ctrl (Phase legal; Configuration 1 or 2 via RX_CONFIG).
// The deserializer and its bit-slip word aligner belong to the hard
// transceiver, outside this module.
module glink_rx #(
  parameter int unsigned RX_CONFIG    = 1,
  parameter int unsigned EN_CYCLES    = 32,
  parameter int unsigned SET_CYCLES   = 8192,
  parameter int unsigned CHECK_CYCLES = 16384
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pll_lock_i,
  input  logic        enhanced_i,
  input  logic        idle_lock_i,
  input  logic        recheck_i,
  // register port for M and N
  input  logic        cfg_wr_i,
  input  logic        cfg_addr_i,
  input  logic [15:0] cfg_wdata_i,
  output logic [15:0] cfg_rdata_o,
  // transceiver side
  input  logic [19:0] rx_word_i,
  output logic        rx_slide_o,
  output logic        phase_align_en_o,
  output logic        set_phase_o,
  // user side
  output logic [15:0] payload_o,
  output logic        is_data_o,
  output logic        is_ctrl_o,
  output logic        is_idle_o,
  output logic        flag_s_o,
  output logic        flag_o,
  output logic        error_o,
  output logic        aligned_o,
  output logic        phase_legal_o,
  output logic        phase_illegal_o
);

  logic       fs_valid, static_unused;
  logic [7:0] m;
  logic [9:0] n;

  cimt_decoder u_dec (
    .clk        (clk),
    .rst        (rst),
    .enhanced_i (enhanced_i),
    .word_i     (rx_word_i),
    .payload_o  (payload_o),
    .is_data_o  (is_data_o),
    .is_ctrl_o  (is_ctrl_o),
    .is_idle_o  (is_idle_o),
    .flag_s_o   (flag_s_o),
    .flag_o     (flag_o),
    .fs_valid_o (fs_valid),
    .error_o    (error_o)
  );

  align_cfg_regs u_regs (
    .clk     (clk),
    .rst     (rst),
    .wr_en_i (cfg_wr_i),
    .addr_i  (cfg_addr_i),
    .wdata_i (cfg_wdata_i),
    .rdata_o (cfg_rdata_o),
    .m_o     (m),
    .n_o     (n)
  );

  word_align_ctrl u_wac (
    .clk         (clk),
    .rst         (rst),
    .enhanced_i  (enhanced_i),
    .idle_lock_i (idle_lock_i),
    .m_i         (m),
    .n_i         (n),
    .error_i     (error_o),
    .is_idle_i   (is_idle_o),
    .flag_s_i    (flag_s_o),
    .fs_valid_i  (fs_valid),
    .aligned_o   (aligned_o),
    .rx_slide_o  (rx_slide_o),
    .static_o    (static_unused)
  );

  rx_phase_ctrl #(
    .RX_CONFIG    (RX_CONFIG),
    .EN_CYCLES    (EN_CYCLES),
    .SET_CYCLES   (SET_CYCLES),
    .CHECK_CYCLES (CHECK_CYCLES)
  ) u_phase (
    .clk              (clk),
    .rst              (rst),
    .pll_lock_i       (pll_lock_i),
    .aligned_i        (aligned_o),
    .error_i          (error_o),
    .recheck_i        (recheck_i),
    .phase_align_en_o (phase_align_en_o),
    .set_phase_o      (set_phase_o),
    .phase_legal_o    (phase_legal_o),
    .phase_illegal_o  (phase_illegal_o)
  );

endmodule
