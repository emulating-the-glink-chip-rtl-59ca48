// cimt_encoder: turns 16-bit payloads, with IsData / IsCtrl / Flag, into
// 20-bit DC-balanced CIMT words for the serializer.
//
// How it works (after the GLink emulator's encoder):
//  * the flag scrambler makes Flag' (Flag itself in basic mode);
//  * the candidate word is built in non-inverted form: a data word is the
//    payload (bit 0 XORed with Flag' in enhanced mode) under C-field 1101 or
//    1011; a control word is 14 payload bits with the dummy bits 01 at D[8:7]
//    under C-field 0011; an idle word is a fixed balanced pattern;
//  * the next-word disparity calculator gives RDSign of the candidate, the
//    total disparity calculator gives TDSign of everything sent so far, and
//    when the two are equal the comparator asserts Invert and the whole word,
//    C-field included, is complemented. Idle words are never inverted.
// If IsData and IsCtrl are both high the word is sent as data; with neither
// high an idle word is sent (the original chip-set's DAV/CAV behaviour).
//
// Timing: one word per clock, no stalls. Four register stages (input,
// candidate, inverted word, output): a word launched at clock edge k (and so
// captured at edge k+1) appears on cimt_o at edge k+4, four clocks later.
// Synchronous active-high reset.
module cimt_encoder
  import glink_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              enhanced_i, // enhanced CIMT mode
  input  logic [DATA_W-1:0] payload_i,
  input  logic              is_data_i,
  input  logic              is_ctrl_i,
  input  logic              flag_i,
  output logic [WORD_W-1:0] cimt_o,
  output logic              invert_o    // Invert used for the word in cimt_o
);

  // ---- stage 0: input register
  logic [DATA_W-1:0] pay_r;
  word_kind_e        kind_r;
  logic              flag_r;

  always_ff @(posedge clk) begin
    if (rst) begin
      pay_r  <= '0;
      kind_r <= WK_IDLE;
      flag_r <= 1'b0;
    end else begin
      pay_r  <= payload_i;
      kind_r <= is_data_i ? WK_DATA : (is_ctrl_i ? WK_CTRL : WK_IDLE);
      flag_r <= flag_i;
    end
  end

  // ---- stage 1: scrambler, candidate word, RDSign
  logic flag_s, pn_unused;

  flag_scrambler u_scr (
    .clk        (clk),
    .rst        (rst),
    .enhanced_i (enhanced_i),
    .adv_i      (1'b1),
    .flag_i     (kind_r == WK_DATA ? flag_r : 1'b0),
    .flag_s_o   (flag_s),
    .pn_o       (pn_unused)
  );

  logic [WORD_W-1:0] cand;
  always_comb begin
    unique case (kind_r)
      WK_DATA: begin
        cand[15:0]  = pay_r;
        cand[0]     = enhanced_i ? (pay_r[0] ^ flag_s) : pay_r[0];
        cand[19:16] = flag_s ? CF_DATA_F1 : CF_DATA_F0;
      end
      WK_CTRL: begin
        cand[15:0]  = {pay_r[13:7], CTRL_DUMMY, pay_r[6:0]};
        cand[19:16] = CF_CTRL;
      end
      default: begin
        cand[15:0]  = flag_s ? IDLE_B : IDLE_A;
        cand[19:16] = CF_CTRL;
      end
    endcase
  end

  dsign_e rdsign;
  next_word_disparity u_nwd (.word_i(cand), .rdsign_o(rdsign));

  logic [WORD_W-1:0] cand_r;
  dsign_e            rdsign_r;
  logic              idle_r;

  always_ff @(posedge clk) begin
    if (rst) begin
      cand_r   <= {CF_CTRL, IDLE_A};
      rdsign_r <= DSIGN_ZERO;
      idle_r   <= 1'b1;
    end else begin
      cand_r   <= cand;
      rdsign_r <= rdsign;
      idle_r   <= (kind_r == WK_IDLE);
    end
  end

  // ---- stage 2: comparator, conditional inverter, running disparity
  dsign_e            tdsign;
  logic              invert;
  logic [WORD_W-1:0] word;
  logic signed [7:0] total_unused;

  always_comb begin
    invert = !idle_r && (rdsign_r == tdsign);
    word   = invert ? ~cand_r : cand_r;
  end

  total_disparity u_tds (
    .clk      (clk),
    .rst      (rst),
    .en_i     (1'b1),
    .word_i   (word),
    .tdsign_o (tdsign),
    .total_o  (total_unused)
  );

  logic [WORD_W-1:0] word_r;
  logic              inv_r;

  always_ff @(posedge clk) begin
    if (rst) begin
      word_r <= {CF_CTRL, IDLE_A};
      inv_r  <= 1'b0;
    end else begin
      word_r <= word;
      inv_r  <= invert;
    end
  end

  // ---- stage 3: output register towards the serializer
  always_ff @(posedge clk) begin
    if (rst) begin
      cimt_o   <= {CF_CTRL, IDLE_A};
      invert_o <= 1'b0;
    end else begin
      cimt_o   <= word_r;
      invert_o <= inv_r;
    end
  end

endmodule
