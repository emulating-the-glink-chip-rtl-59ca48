// cimt_decoder: restores payload, IsData / IsCtrl and Flag from received
// 20-bit CIMT words and flags words whose C-field is not valid.
//
// How it works (after the GLink emulator's decoder): the C-field decoder
// maps word[19:16] to IsData / IsCtrl / Invert / Flag'. Any code outside the
// six legal ones (which all have a transition between C[2] and C[1], the
// master transition) raises Error; so does a control-class code whose
// D-field is neither a control word (dummy bits 01 at D[8:7] after
// re-inversion) nor one of the two idle patterns. The conditional inverter
// complements the D-field when Invert is set; in enhanced mode bit 0 of a
// data word is de-scrambled with Flag', and the flag descrambler turns Flag'
// back into Flag. A control word's 14 payload bits are returned in
// payload_o[13:0] with payload_o[15:14] = 0.
//
// Timing: all outputs are registered, one clock after word_i (the one-cycle
// fabric decode latency of the emulator). fs_valid_o marks words that carry a
// Flag' (valid data and idle words). Synchronous active-high reset.
module cimt_decoder
  import glink_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              enhanced_i,
  input  logic [WORD_W-1:0] word_i,
  output logic [DATA_W-1:0] payload_o,
  output logic              is_data_o,
  output logic              is_ctrl_o,
  output logic              is_idle_o,
  output logic              flag_s_o,   // Flag' as received
  output logic              flag_o,     // Flag after de-scrambling
  output logic              fs_valid_o, // flag_s_o is meaningful
  output logic              error_o
);

  logic [3:0]        cf;
  logic [DATA_W-1:0] df, dfi;
  logic              c_data, c_ctrl, c_inv, c_fs, c_err, c_idle;
  logic [DATA_W-1:0] pay;

  // C-field decoder and conditional inverter
  always_comb begin
    cf     = word_i[19:16];
    df     = word_i[15:0];
    c_data = 1'b0;
    c_ctrl = 1'b0;
    c_idle = 1'b0;
    c_inv  = 1'b0;
    c_fs   = 1'b0;
    c_err  = 1'b0;
    unique case (cf)
      CF_DATA_F0:     begin c_data = 1'b1;                          end
      CF_DATA_F1:     begin c_data = 1'b1;              c_fs = 1'b1; end
      CF_DATA_F0_INV: begin c_data = 1'b1; c_inv = 1'b1;             end
      CF_DATA_F1_INV: begin c_data = 1'b1; c_inv = 1'b1; c_fs = 1'b1; end
      CF_CTRL:        c_ctrl = 1'b1;
      CF_CTRL_INV:    begin c_ctrl = 1'b1; c_inv = 1'b1;             end
      default:        c_err  = 1'b1;
    endcase

    dfi = c_inv ? ~df : df;

    if (c_ctrl) begin
      if (!c_inv && (dfi == IDLE_A || dfi == IDLE_B)) begin
        c_ctrl = 1'b0;
        c_idle = 1'b1;
        c_fs   = (dfi == IDLE_B);
      end else if (dfi[8:7] != CTRL_DUMMY) begin
        c_ctrl = 1'b0;
        c_err  = 1'b1;
      end
    end

    pay = '0;
    if (c_data) begin
      pay    = dfi;
      pay[0] = enhanced_i ? (dfi[0] ^ c_fs) : dfi[0];
    end else if (c_ctrl) begin
      pay[13:0] = {dfi[15:9], dfi[6:0]};
    end
  end

  logic flag_comb;

  flag_descrambler u_dscr (
    .clk        (clk),
    .rst        (rst),
    .enhanced_i (enhanced_i),
    .adv_i      (1'b1),
    .is_idle_i  (c_idle),
    .flag_s_i   (c_fs),
    .flag_o     (flag_comb)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      payload_o  <= '0;
      is_data_o  <= 1'b0;
      is_ctrl_o  <= 1'b0;
      is_idle_o  <= 1'b0;
      flag_s_o   <= 1'b0;
      flag_o     <= 1'b0;
      fs_valid_o <= 1'b0;
      error_o    <= 1'b0;
    end else begin
      payload_o  <= pay;
      is_data_o  <= c_data;
      is_ctrl_o  <= c_ctrl;
      is_idle_o  <= c_idle;
      flag_s_o   <= c_fs;
      flag_o     <= c_data ? flag_comb : 1'b0;
      fs_valid_o <= c_data | c_idle;
      error_o    <= c_err;
    end
  end

endmodule
