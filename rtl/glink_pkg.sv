// glink_pkg: constants and types shared by the CIMT encoder, decoder and
// word-align logic of the GLink-compatible link.
//
// A CIMT word is 20 bits: word[19:16] is the C-field (sent as a 4-bit code,
// with a guaranteed 0->1 or 1->0 "master transition" between C[2] and C[1])
// and word[15:0] is the D-field. The field sizes (16 + 4) and the meaning of
// the C-field (it carries IsData, IsCtrl, Invert and Flag') follow the GLink
// CIMT protocol. The concrete 4-bit codes, the position of the two dummy bits
// of a control word and the two idle patterns below are this design's choice,
// modelled on the HDMP-1032A conventions; a link partner must use the same.
package glink_pkg;

  localparam int unsigned WORD_W  = 20;
  localparam int unsigned DATA_W  = 16;

  // C-field codes (word[19:16]). Inverted variants are bitwise complements.
  localparam logic [3:0] CF_DATA_F0     = 4'b1101;  // data, Flag'=0
  localparam logic [3:0] CF_DATA_F1     = 4'b1011;  // data, Flag'=1
  localparam logic [3:0] CF_DATA_F0_INV = 4'b0010;
  localparam logic [3:0] CF_DATA_F1_INV = 4'b0100;
  localparam logic [3:0] CF_CTRL        = 4'b0011;  // control or idle
  localparam logic [3:0] CF_CTRL_INV    = 4'b1100;  // inverted control

  // Dummy bits of a control word sit at D[8:7]; idle words carry 2'b10 there.
  localparam logic [1:0] CTRL_DUMMY = 2'b01;

  // Idle (fill) words: balanced D-fields, never inverted. In enhanced mode the
  // pattern carries the scrambler bit: IDLE_A for Flag'=0, IDLE_B for Flag'=1.
  localparam logic [15:0] IDLE_A = 16'hFF00;  // 1111111_10_0000000
  localparam logic [15:0] IDLE_B = 16'h017F;  // 0000000_10_1111111

  // Disparity sign code used on the RDSign and TDSign buses.
  typedef enum logic [1:0] {
    DSIGN_ZERO = 2'b00,  // as many 1s as 0s
    DSIGN_NEG  = 2'b01,  // majority of 0s
    DSIGN_POS  = 2'b10   // majority of 1s
  } dsign_e;

  // Kind of word presented to the encoder / found by the decoder.
  typedef enum logic [1:0] {
    WK_IDLE = 2'b00,
    WK_DATA = 2'b01,
    WK_CTRL = 2'b10
  } word_kind_e;

  // Scrambler polynomial x^7 + x^6 + 1 (maximal length, period 127).
  localparam int unsigned PN_W = 7;
  localparam logic [PN_W-1:0] PN_SEED = 7'h7F;

  // Feedback of the generator from its two oldest bits, state[6:5].
  function automatic logic pn_feedback(input logic [1:0] taps);
    return taps[1] ^ taps[0];
  endfunction

  // Signed count of ones minus zeros of a 20-bit word.
  function automatic logic signed [7:0] word_disparity(input logic [WORD_W-1:0] w);
    int unsigned ones;
    ones = $countones(w);
    return 8'(2 * ones) - 8'(WORD_W);
  endfunction

  function automatic dsign_e sign_of(input logic signed [7:0] d);
    if (d > 0)      return DSIGN_POS;
    else if (d < 0) return DSIGN_NEG;
    else            return DSIGN_ZERO;
  endfunction

endpackage
