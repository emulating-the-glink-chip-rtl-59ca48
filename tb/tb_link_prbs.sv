// tb_link_prbs: bit-error-ratio style run of the whole link, at the top's
// default parameters. After the receiver locks on idle words, the
// transmitter sends an unbroken stream of data words whose payloads are a
// 16-bit pseudo-random sequence (each word is 16 further steps of the
// generator x^16 + x^14 + x^13 + x^11 + 1). A checker on the receive side
// seeds its own copy of the generator from the first word it receives, then
// compares every later word bit by bit and counts bit errors, as a bit error
// ratio tester does. Run once in basic and once in enhanced mode; every
// received word must arrive, with no bit errors and no decode errors.
module tb_link_prbs;
  timeunit 1ns;
  timeprecision 100ps;

  localparam int WORDS = 250000;  // per mode: 4 Mbit of payload

  logic tx_clk = 0, rx_clk = 0;
  always #5 tx_clk = ~tx_clk;
  initial begin #4; forever #5 rx_clk = ~rx_clk; end

  logic enh = 0;
  logic rst = 1, lock = 0;
  logic [15:0] tx_pay = '0;
  logic tx_d = 0, tx_f = 0;
  logic tx_ready;
  logic [19:0] txw, rxw;
  logic txen, txset, rslide, rxen, rxset;
  logic [15:0] cfg_rd;
  logic [15:0] rx_pay;
  logic rx_d, rx_c, rx_i, rx_fs, rx_f, rx_err, rx_al, rx_legal, rx_illegal;
  logic load = 1;
  int slides;

  glink_emulator dut (
    .enhanced_i(enh), .idle_lock_i(1'b1),
    .tx_clk(tx_clk), .tx_rst(rst), .tx_pll_lock_i(lock),
    .tx_payload_i(tx_pay), .tx_is_data_i(tx_d), .tx_is_ctrl_i(1'b0), .tx_flag_i(tx_f),
    .tx_ready_o(tx_ready), .gtp_tx_word_o(txw),
    .gtp_tx_phase_align_en_o(txen), .gtp_tx_set_phase_o(txset),
    .rx_clk(rx_clk), .rx_rst(rst), .rx_pll_lock_i(lock),
    .gtp_rx_word_i(rxw), .gtp_rx_slide_o(rslide),
    .gtp_rx_phase_align_en_o(rxen), .gtp_rx_set_phase_o(rxset),
    .rx_recheck_i(1'b0), .rx_cfg_wr_i(1'b0), .rx_cfg_addr_i(1'b0),
    .rx_cfg_wdata_i(16'd0), .rx_cfg_rdata_o(cfg_rd),
    .rx_payload_o(rx_pay), .rx_is_data_o(rx_d), .rx_is_ctrl_o(rx_c), .rx_is_idle_o(rx_i),
    .rx_flag_s_o(rx_fs), .rx_flag_o(rx_f), .rx_error_o(rx_err), .rx_aligned_o(rx_al),
    .rx_phase_legal_o(rx_legal), .rx_phase_illegal_o(rx_illegal));

  gtp_link_model link (
    .tx_clk(tx_clk), .tx_word_i(txw), .rx_clk(rx_clk), .rx_slide_i(rslide),
    .init_ofs_i(5'd11), .load_ofs_i(load), .slip_i(1'b0), .garble_i(1'b0),
    .freeze_i(1'b0), .rx_word_o(rxw), .slides_o(slides));

  int checks = 0, failures = 0;

  function automatic logic [15:0] prbs_next(input logic [15:0] w);
    logic [15:0] s = w;
    for (int i = 0; i < 16; i++) s = {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
    return s;
  endfunction

  // ---- receive-side checker
  logic        seeded = 0, checking = 0;
  logic [15:0] expect_w;
  longint      bits = 0, bit_errors = 0;
  int          words_rx = 0, dec_errors = 0;

  always @(posedge rx_clk) begin
    if (checking && rx_al) begin
      if (rx_err) dec_errors++;
      if (rx_d) begin
        words_rx++;
        if (!seeded) begin
          seeded   = 1;
          expect_w = prbs_next(rx_pay);
        end else begin
          bits       += 16;
          bit_errors += $countones(rx_pay ^ expect_w);
          expect_w    = prbs_next(rx_pay);
        end
      end
    end
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(input logic mode);
    logic [15:0] w;
    int c;
    enh = mode; rst = 1; lock = 0; load = 1;
    tx_d <= 0;
    repeat (4) @(posedge tx_clk);
    rst = 0; lock = 1; load = 0;
    c = 0;
    while (!rx_al && c < 20000) begin @(posedge tx_clk); c++; end
    chk(rx_al, "aligned");
    repeat (40) @(posedge tx_clk);
    seeded = 0; checking = 1; bits = 0; bit_errors = 0; words_rx = 0; dec_errors = 0;
    w = 16'hACE1;
    for (int i = 0; i < WORDS; i++) begin
      tx_pay <= w; tx_d <= 1; tx_f <= w[0];
      w = prbs_next(w);
      @(posedge tx_clk);
    end
    tx_d <= 0;
    repeat (40) @(posedge tx_clk);
    checking = 0;
    $display("mode %0d: %0d words, %0d bits compared, %0d bit errors, %0d decode errors",
             mode, words_rx, bits, bit_errors, dec_errors);
    chk(words_rx == WORDS, "every word received");
    chk(bits == 64'(16 * (WORDS - 1)), "bits compared");
    chk(bit_errors == 0, "no bit errors");
    chk(dec_errors == 0, "no decode errors");
  endtask

  initial begin
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
