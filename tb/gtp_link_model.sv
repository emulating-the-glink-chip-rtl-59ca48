// gtp_link_model: behavioural stand-in for a pair of FPGA serial transceivers
// joined by a cable, seen from their 20-bit parallel ports. Not synthesizable
// hardware and not part of the design: it exists so that the emulator can be
// simulated end to end.
//
// The transmit word is delayed TX_LAT tx_clk cycles, then sampled in the
// receive clock domain and delayed RX_LAT rx_clk cycles. The deserializer's
// word boundary is modelled as a bit offset into the last two words: with
// offset 0 the receive word equals the sent word, otherwise it straddles two
// words. Each rising edge of rx_slide advances the offset by one bit, like the
// transceiver's bit-slip word aligner. Test hooks: slip_i moves the offset by
// one bit without a request (a lost word boundary), garble_i replaces the
// received words by noise, freeze_i repeats the last received word.
module gtp_link_model #(
  parameter int unsigned TX_LAT = 2,
  parameter int unsigned RX_LAT = 4
) (
  input  logic        tx_clk,
  input  logic [19:0] tx_word_i,
  input  logic        rx_clk,
  input  logic        rx_slide_i,
  input  logic [4:0]  init_ofs_i,  // bit offset after power-up
  input  logic        load_ofs_i,  // load init_ofs_i
  input  logic        slip_i,
  input  logic        garble_i,
  input  logic        freeze_i,
  output logic [19:0] rx_word_o,
  output int          slides_o     // RxSlide requests seen
);

  logic [19:0] txq [TX_LAT];
  logic [19:0] rxq [RX_LAT];
  logic [19:0] prev_w, cur_w;
  logic [39:0] two;
  logic [4:0]  ofs;
  logic        slide_d;

  always @(posedge tx_clk) begin
    txq[0] <= tx_word_i;
    for (int i = 1; i < TX_LAT; i++) txq[i] <= txq[i-1];
  end

  always @(posedge rx_clk) begin
    prev_w  <= cur_w;
    cur_w   <= txq[TX_LAT-1];
    slide_d <= rx_slide_i;
    if (load_ofs_i) begin
      ofs      <= init_ofs_i;
      slides_o <= 0;
    end else if ((rx_slide_i && !slide_d) || slip_i) begin
      ofs <= (ofs == 5'd19) ? 5'd0 : ofs + 5'd1;
      if (rx_slide_i && !slide_d) slides_o <= slides_o + 1;
    end
    two = {prev_w, cur_w};
    if (freeze_i)      rxq[0] <= rxq[0];
    else if (garble_i) rxq[0] <= 20'($urandom);
    else               rxq[0] <= two[ofs +: 20];
    for (int i = 1; i < RX_LAT; i++) rxq[i] <= rxq[i-1];
  end

  assign rx_word_o = rxq[RX_LAT-1];

endmodule
