// next_word_disparity: the "next word disparity calculator" of the CIMT
// encoder. It counts the ones of the word about to be sent (in its
// non-inverted form) and reports the sign of its bit disparity on the 2-bit
// RDSign bus: 2'b10 for a majority of ones, 2'b01 for a majority of zeros,
// 2'b00 for a balanced word (that coding follows the GLink emulator).
//
// Purely combinational. The word examined is the whole 20-bit candidate
// (D-field plus non-inverted C-field) rather than the 16-bit payload alone:
// that choice keeps the running disparity bounded even when balanced payloads
// are sent behind an unbalanced C-field.
module next_word_disparity
  import glink_pkg::*;
(
  input  logic [WORD_W-1:0] word_i,   // candidate CIMT word, not inverted
  output dsign_e            rdsign_o  // sign of its disparity
);

  always_comb rdsign_o = sign_of(word_disparity(word_i));

endmodule
