// total_disparity: the "total disparity calculator" of the CIMT encoder.
// It keeps the running bit disparity (ones minus zeros) of every CIMT word
// the encoder has emitted and reports its sign on the 2-bit TDSign bus, with
// the same coding as RDSign (10 = more ones, 01 = more zeros, 00 = balanced).
//
// Each clock with en_i high, the disparity of word_i is added to the signed
// accumulator. With the encoder's inversion rule the total never leaves
// [-20, +20], so an 8-bit accumulator cannot overflow; it is cleared by the
// synchronous active-high reset (a reset value is this design's choice).
module total_disparity
  import glink_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              en_i,     // word_i is being emitted this cycle
  input  logic [WORD_W-1:0] word_i,   // emitted CIMT word
  output dsign_e            tdsign_o, // sign of the total before word_i
  output logic signed [7:0] total_o   // running disparity
);

  always_ff @(posedge clk) begin
    if (rst)       total_o <= '0;
    else if (en_i) total_o <= total_o + word_disparity(word_i);
  end

  always_comb tdsign_o = sign_of(total_o);

endmodule
