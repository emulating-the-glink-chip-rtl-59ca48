// glink_tx: transmit half of the GLink emulator (the "Tx emulator"). The
// fabric part of a GLink HDMP-1032A replacement: it takes the chip's parallel
// interface (16-bit payload, IsData, IsCtrl, Flag, one word per clock) and
// hands 20-bit CIMT words to the transceiver's 20-bit parallel transmit port,
// while sequencing the transceiver's transmit phase alignment.
//
// Contents: cimt_encoder (4 clocks of latency) and tx_phase_ctrl (Ready).
// The serializer itself is the FPGA's hard transceiver and is outside this
// module: cimt_o and the two phase-control outputs go to it.
module glink_tx #(
  parameter int unsigned EN_CYCLES  = 32,
  parameter int unsigned SET_CYCLES = 8192
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pll_lock_i,
  input  logic        enhanced_i,
  input  logic [15:0] payload_i,
  input  logic        is_data_i,
  input  logic        is_ctrl_i,
  input  logic        flag_i,
  output logic [19:0] cimt_o,
  output logic        phase_align_en_o,
  output logic        set_phase_o,
  output logic        ready_o
);

  logic invert_unused;

  cimt_encoder u_enc (
    .clk        (clk),
    .rst        (rst),
    .enhanced_i (enhanced_i),
    .payload_i  (payload_i),
    .is_data_i  (is_data_i),
    .is_ctrl_i  (is_ctrl_i),
    .flag_i     (flag_i),
    .cimt_o     (cimt_o),
    .invert_o   (invert_unused)
  );

  tx_phase_ctrl #(
    .EN_CYCLES  (EN_CYCLES),
    .SET_CYCLES (SET_CYCLES)
  ) u_phase (
    .clk              (clk),
    .rst              (rst),
    .pll_lock_i       (pll_lock_i),
    .phase_align_en_o (phase_align_en_o),
    .set_phase_o      (set_phase_o),
    .ready_o          (ready_o)
  );

endmodule
