// flag_descrambler: recovers Flag from the received Flag' in enhanced mode.
//
// It runs a copy of the transmitter's x^7 + x^6 + 1 generator, stepped once
// per received word. The generator is kept in step with the transmitter
// without any extra signalling: an idle word carries the bare scrambling bit
// as its Flag' (its Flag is 0), so on idle words the received bit is shifted
// into the state instead of the predicted one. Seven idle words after start-up
// (or after a slip) the copy matches the transmitter. On data and control
// words it free-runs. This synchronisation scheme is this design's own.
//
// Timing: flag_o is combinational; the state steps on the clock edge at which
// adv_i is high. In basic mode flag_o equals flag_s_i.
module flag_descrambler
  import glink_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic enhanced_i,
  input  logic adv_i,      // a word is decoded this cycle
  input  logic is_idle_i,  // it is a valid idle word
  input  logic flag_s_i,   // received Flag'
  output logic flag_o      // recovered Flag
);

  logic [PN_W-1:0] state;
  logic            pn_pred;

  always_comb begin
    pn_pred = pn_feedback(state[6:5]);
    flag_o  = enhanced_i ? (flag_s_i ^ pn_pred) : flag_s_i;
  end

  always_ff @(posedge clk) begin
    if (rst)
      state <= PN_SEED;
    else if (adv_i)
      state <= {state[PN_W-2:0], (is_idle_i ? flag_s_i : pn_pred)};
  end

endmodule
