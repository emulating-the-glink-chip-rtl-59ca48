// flag_scrambler: produces Flag', the flag bit as sent in the C-field.
//
// In basic mode Flag' is the user Flag unchanged. In enhanced mode Flag' is
// Flag XOR the output of a free-running pseudo-random generator, so that
// Flag' keeps toggling even when Flag is static; the receiver's word-align
// logic relies on those toggles. The generator is an additive scrambler on
// the polynomial x^7 + x^6 + 1 (period 127, longest run of equal bits 7),
// advanced once per emitted word (adv_i). The polynomial is this design's
// choice; only the existence of a scrambling polynomial is given.
//
// Timing: flag_s_o is combinational from flag_i and the current state; the
// state steps on the clock edge at which adv_i is high.
module flag_scrambler
  import glink_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic enhanced_i, // 1: enhanced CIMT mode
  input  logic adv_i,      // a word is encoded this cycle
  input  logic flag_i,     // user Flag (0 for idle words)
  output logic flag_s_o,   // Flag'
  output logic pn_o        // scrambling bit of this word
);

  logic [PN_W-1:0] state;

  always_comb begin
    pn_o     = pn_feedback(state[6:5]);
    flag_s_o = enhanced_i ? (flag_i ^ pn_o) : flag_i;
  end

  always_ff @(posedge clk) begin
    if (rst)        state <= PN_SEED;
    else if (adv_i) state <= {state[PN_W-2:0], pn_o};
  end

endmodule
