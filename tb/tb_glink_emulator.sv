// tb_glink_emulator: end-to-end test of the full-duplex emulator at its
// default parameters (Configuration 1, M = 2, N = 256, full phase-alignment
// counts). The transmitter's words go through a behavioural transceiver
// model (fixed latency, bit-slip word boundary) into the receiver.
//
// Scenarios, each counted as a mechanism that must occur:
//  1. basic mode, boundary 7 bits off: the receiver slides until aligned,
//     the phase check declares the phase legal, Ready rises; mixed data /
//     control / idle traffic is received in order with a fixed latency;
//  2. reset, enhanced mode, idle-only locking, N reprogrammed to 100 through
//     the register port, boundary 15 bits off: alignment again with the same
//     latency as in 1 (deterministic latency), Flag recovered through the
//     scrambler, Flag' toggling under a static Flag;
//  3. an unrequested one-bit slip: errors, Aligned drops, realignment;
//  4. enhanced mode, a frozen receive word: Flag' static with no errors,
//     Aligned drops;
//  5. reset with a garbled line: no alignment within the check window, the
//     phase is declared illegal; a clean line and a recheck make it legal.
// Also counted: inverted words on the line (DC balance) and decoded control
// and idle words.
module tb_glink_emulator;
  timeunit 1ns;
  timeprecision 100ps;

  localparam int EXP_LAT = 11;  // 4 encoder + 2 + 4 model + 1 decoder

  logic tx_clk = 0, rx_clk = 0;
  always #5 tx_clk = ~tx_clk;
  initial begin #3; forever #5 rx_clk = ~rx_clk; end

  logic enh = 0, il = 0;
  logic tx_rst = 1, rx_rst = 1, tx_lock = 0, rx_lock = 0;
  logic [15:0] tx_pay = '0;
  logic tx_d = 0, tx_c = 0, tx_f = 0;
  logic tx_ready;
  logic [19:0] txw, rxw;
  logic txen, txset, rslide, rxen, rxset;
  logic recheck = 0, cfg_wr = 0, cfg_addr = 0;
  logic [15:0] cfg_wd = '0, cfg_rd;
  logic [15:0] rx_pay;
  logic rx_d, rx_c, rx_i, rx_fs, rx_f, rx_err, rx_al, rx_legal, rx_illegal;

  logic [4:0] init_ofs = 5'd7;
  logic load_ofs = 1, slip = 0, garble = 0, freeze = 0;
  int slides;

  glink_emulator dut (
    .enhanced_i(enh), .idle_lock_i(il),
    .tx_clk(tx_clk), .tx_rst(tx_rst), .tx_pll_lock_i(tx_lock),
    .tx_payload_i(tx_pay), .tx_is_data_i(tx_d), .tx_is_ctrl_i(tx_c), .tx_flag_i(tx_f),
    .tx_ready_o(tx_ready), .gtp_tx_word_o(txw),
    .gtp_tx_phase_align_en_o(txen), .gtp_tx_set_phase_o(txset),
    .rx_clk(rx_clk), .rx_rst(rx_rst), .rx_pll_lock_i(rx_lock),
    .gtp_rx_word_i(rxw), .gtp_rx_slide_o(rslide),
    .gtp_rx_phase_align_en_o(rxen), .gtp_rx_set_phase_o(rxset),
    .rx_recheck_i(recheck), .rx_cfg_wr_i(cfg_wr), .rx_cfg_addr_i(cfg_addr),
    .rx_cfg_wdata_i(cfg_wd), .rx_cfg_rdata_o(cfg_rd),
    .rx_payload_o(rx_pay), .rx_is_data_o(rx_d), .rx_is_ctrl_o(rx_c), .rx_is_idle_o(rx_i),
    .rx_flag_s_o(rx_fs), .rx_flag_o(rx_f), .rx_error_o(rx_err), .rx_aligned_o(rx_al),
    .rx_phase_legal_o(rx_legal), .rx_phase_illegal_o(rx_illegal));

  gtp_link_model link (
    .tx_clk(tx_clk), .tx_word_i(txw), .rx_clk(rx_clk), .rx_slide_i(rslide),
    .init_ofs_i(init_ofs), .load_ofs_i(load_ofs), .slip_i(slip),
    .garble_i(garble), .freeze_i(freeze), .rx_word_o(rxw), .slides_o(slides));

  int checks = 0, failures = 0;
  // mechanism counters
  int n_slide_lock = 0, n_aligned = 0, n_legal = 0, n_ready = 0, n_inv = 0;
  int n_ctrl = 0, n_idle = 0, n_data = 0, n_detlat = 0, n_flag_scr = 0;
  int n_loss_err = 0, n_static = 0, n_illegal = 0, n_idle_lock = 0, n_regs = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- cycle counters and the expected-word queue
  int tx_cyc = 0, rx_cyc = 0;
  always @(posedge tx_clk) tx_cyc <= tx_cyc + 1;
  always @(posedge rx_clk) rx_cyc <= rx_cyc + 1;

  typedef struct { int kind; logic [15:0] p; logic f; int t; } sent_t;
  sent_t sent[$];
  logic  compare_on = 0;
  int    lat_seen = -1, n_cmp = 0;
  int    fs_toggles = 0;
  logic  last_fs = 0;

  always @(posedge tx_clk) begin
    if (txw[19:16] == 4'b0010 || txw[19:16] == 4'b0100 || txw[19:16] == 4'b1100) n_inv++;
  end

  always @(posedge rx_clk) begin
    #1;
    if (compare_on && rx_al && (rx_d || rx_c)) begin
      sent_t e;
      if (sent.size() == 0) begin
        chk(0, "unexpected word");
      end else begin
        e = sent.pop_front();
        n_cmp++;
        chk(rx_d == (e.kind == 1) && rx_c == (e.kind == 2), "kind");
        if (e.kind == 1) chk(rx_pay == e.p && rx_f == e.f, "data payload/flag");
        if (e.kind == 2) chk(rx_pay[13:0] == e.p[13:0], "control payload");
        if (lat_seen < 0) lat_seen = rx_cyc - e.t;
        chk(rx_cyc - e.t == lat_seen, $sformatf("latency %0d vs %0d", rx_cyc - e.t, lat_seen));
        if (e.kind == 1) n_data++;
        if (e.kind == 2) n_ctrl++;
      end
    end
    if (compare_on && rx_al && rx_i) n_idle++;
    if (compare_on && rx_al && rx_d) begin
      if (rx_fs != last_fs) fs_toggles++;
      last_fs = rx_fs;
    end
  end

  // ---- transmit helpers (drive at the tx clock edge)
  task automatic send(input int kind, input logic [15:0] p, input logic f, input logic record);
    tx_pay <= p; tx_d <= (kind == 1); tx_c <= (kind == 2); tx_f <= f;
    @(posedge tx_clk);
    if (record && kind != 0) begin
      sent_t e;
      e.kind = kind; e.p = p; e.f = f; e.t = tx_cyc;
      sent.push_back(e);
    end
  endtask

  task automatic send_idles(input int n);
    repeat (n) send(0, '0, 0, 0);
  endtask

  task automatic traffic(input int n, input logic static_flag);
    for (int i = 0; i < n; i++) begin
      int k = $urandom % 4;
      send((k == 3) ? 0 : ((k == 2) ? 2 : 1), 16'($urandom),
           static_flag ? 1'b1 : 1'($urandom), 1);
    end
    send_idles(40);
  endtask

  task automatic reg_write(input logic a, input logic [15:0] v);
    @(negedge rx_clk);
    cfg_wr = 1; cfg_addr = a; cfg_wd = v;
    @(negedge rx_clk);
    cfg_wr = 0;
    #1;
    chk(cfg_rd == v, "register read-back");
    if (cfg_rd == v) n_regs++;
  endtask

  task automatic link_reset(input logic [4:0] ofs);
    compare_on = 0;
    tx_rst = 1; rx_rst = 1; load_ofs = 1; init_ofs = ofs;
    tx_lock = 0; rx_lock = 0;
    send_idles(4);
    tx_rst = 0; rx_rst = 0; load_ofs = 0;
    tx_lock = 1; rx_lock = 1;
  endtask

  // Sends idles until aligned (or a limit); returns the cycles it took.
  task automatic wait_aligned(input int limit, output int took);
    took = 0;
    while (!rx_al && took < limit) begin send_idles(1); took++; end
  endtask

  initial begin
    int took;

    // ---------------- 1. basic mode, default registers
    link_reset(5'd7);
    wait_aligned(20000, took);
    chk(rx_al, "aligned (basic)");
    if (rx_al) n_aligned++;
    chk(slides > 0, "slides needed");
    if (slides > 0) n_slide_lock++;
    $display("basic: aligned after %0d words, %0d slides", took, slides);
    send_idles(12000);   // let both phase sequences finish
    chk(tx_ready, "tx ready"); if (tx_ready) n_ready++;
    chk(rx_legal && !rx_illegal, "phase legal"); if (rx_legal) n_legal++;
    compare_on = 1;
    traffic(1500, 0);
    chk(sent.size() == 0, "all words received (basic)");
    chk(lat_seen == EXP_LAT, $sformatf("latency %0d", lat_seen));
    begin int lat1; lat1 = lat_seen;

    // ---------------- 2. enhanced mode, idle lock, N = 100
    enh = 1; il = 1;
    link_reset(5'd15);
    reg_write(1'b1, 16'd100);
    lat_seen = -1; sent.delete();
    wait_aligned(20000, took);
    chk(rx_al, "aligned (enhanced, idle lock)");
    if (rx_al) begin n_aligned++; n_idle_lock++; end
    $display("enhanced: aligned after %0d words, %0d slides", took, slides);
    send_idles(40);
    compare_on = 1;
    fs_toggles = 0;
    traffic(1500, 1);   // Flag held at 1: Flag' must still toggle
    chk(sent.size() == 0, "all words received (enhanced)");
    chk(lat_seen == lat1, $sformatf("same latency after reset and different boundary: %0d vs %0d", lat_seen, lat1));
    if (lat_seen == lat1) n_detlat++;
    chk(fs_toggles > 100, $sformatf("Flag' toggles %0d", fs_toggles));
    if (fs_toggles > 100) n_flag_scr++;
    end

    // ---------------- 3. unrequested slip
    compare_on = 0;
    @(negedge rx_clk); slip = 1; @(negedge rx_clk); slip = 0;
    took = 0;
    while (rx_al && took < 100) begin send_idles(1); took++; end
    chk(!rx_al, "alignment lost after slip");
    if (!rx_al) n_loss_err++;
    wait_aligned(20000, took);
    chk(rx_al, "realigned after slip");
    send_idles(40);
    sent.delete(); compare_on = 1;
    traffic(200, 0);
    chk(sent.size() == 0, "all words received after realignment");

    // ---------------- 4. frozen word: static Flag' without errors
    compare_on = 0;
    @(negedge rx_clk); freeze = 1;
    took = 0;
    begin
      int errs = 0;
      while (rx_al && took < 200) begin
        send_idles(1); took++;
        if (rx_err) errs++;
      end
      chk(!rx_al && errs == 0 && took <= 32 + 8, $sformatf("static Flag' drop after %0d, errors %0d", took, errs));
      if (!rx_al && errs == 0) n_static++;
    end
    freeze = 0;
    wait_aligned(20000, took);
    chk(rx_al, "realigned after freeze");

    // ---------------- 5. garbled line: illegal phase, then recheck
    enh = 0; il = 0;
    garble = 1;
    link_reset(5'd3);
    took = 0;
    while (!rx_illegal && took < 40000) begin send_idles(1); took++; end
    chk(rx_illegal && !rx_legal, "phase illegal");
    if (rx_illegal) n_illegal++;
    garble = 0;
    @(negedge rx_clk); recheck = 1; @(negedge rx_clk); recheck = 0;
    took = 0;
    while (!rx_legal && took < 40000) begin send_idles(1); took++; end
    chk(rx_legal && rx_al, "phase legal after recheck");

    // ---------------- mechanism coverage
    $display("mechanisms: slide-lock %0d aligned %0d ready %0d legal %0d inverted %0d ctrl %0d idle %0d data %0d",
             n_slide_lock, n_aligned, n_ready, n_legal, n_inv, n_ctrl, n_idle, n_data);
    $display("            fixed-latency %0d flag-scramble %0d loss %0d static %0d illegal %0d idle-lock %0d regs %0d",
             n_detlat, n_flag_scr, n_loss_err, n_static, n_illegal, n_idle_lock, n_regs);
    chk(n_slide_lock > 0, "mechanism: slide to lock");
    chk(n_aligned > 0, "mechanism: aligned");
    chk(n_ready > 0, "mechanism: tx ready");
    chk(n_legal > 0, "mechanism: phase legal");
    chk(n_inv > 0, "mechanism: inverted words");
    chk(n_ctrl > 0, "mechanism: control words");
    chk(n_idle > 0, "mechanism: idle words");
    chk(n_data > 0, "mechanism: data words");
    chk(n_detlat > 0, "mechanism: deterministic latency");
    chk(n_flag_scr > 0, "mechanism: Flag scrambling");
    chk(n_loss_err > 0, "mechanism: loss of alignment on errors");
    chk(n_static > 0, "mechanism: static Flag'");
    chk(n_illegal > 0, "mechanism: illegal phase");
    chk(n_idle_lock > 0, "mechanism: idle-only lock");
    chk(n_regs > 0, "mechanism: register write");
    chk(n_cmp > 2000, "words compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
