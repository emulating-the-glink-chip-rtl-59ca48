// tb_glink_rx: the receive half in Configuration 1 and Configuration 2 side
// by side, each behind its own transceiver model with the word boundary
// 9 bits off. A testbench-side encoder (reference code table, alternating
// inversion) sends idles, then data and control words. Both receivers must
// slide to the boundary, align (N lowered to 16 through the register port),
// report a legal phase and deliver every word in order, with one and the
// same latency, one clock after the word leaves the transceiver model.
module tb_glink_rx;
  import glink_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst = 1, lock = 0, load = 1;
  logic [19:0] txw = '0;
  logic cfg_wr = 0, cfg_addr = 0;
  logic [15:0] cfg_wd = '0;
  int checks = 0, failures = 0;

  typedef struct { int kind; logic [15:0] p; int t; } w_t;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [19:0] rxw   [2];
  logic        slide [2];
  logic [15:0] pay   [2];
  logic        isd [2], isc [2], isi [2], fs [2], fl [2], err [2], al [2], legal [2], illegal [2];
  logic        pen [2], pset [2];
  logic [15:0] rd [2];
  int          slides [2];
  w_t          q [2][$];
  logic        cmp = 0;
  int          n_cmp [2] = '{0, 0};
  int          lat [2] = '{-1, -1};
  ref_dec_t    dec_prev [2];

  for (genvar g = 0; g < 2; g++) begin : g_rx
    gtp_link_model link (
      .tx_clk(clk), .tx_word_i(txw), .rx_clk(clk), .rx_slide_i(slide[g]),
      .init_ofs_i(5'd9), .load_ofs_i(load), .slip_i(1'b0), .garble_i(1'b0),
      .freeze_i(1'b0), .rx_word_o(rxw[g]), .slides_o(slides[g]));

    glink_rx #(.RX_CONFIG(g + 1), .EN_CYCLES(4), .SET_CYCLES(40), .CHECK_CYCLES(2000)) dut (
      .clk(clk), .rst(rst), .pll_lock_i(lock), .enhanced_i(1'b0), .idle_lock_i(1'b0),
      .recheck_i(1'b0), .cfg_wr_i(cfg_wr), .cfg_addr_i(cfg_addr), .cfg_wdata_i(cfg_wd),
      .cfg_rdata_o(rd[g]), .rx_word_i(rxw[g]), .rx_slide_o(slide[g]),
      .phase_align_en_o(pen[g]), .set_phase_o(pset[g]),
      .payload_o(pay[g]), .is_data_o(isd[g]), .is_ctrl_o(isc[g]), .is_idle_o(isi[g]),
      .flag_s_o(fs[g]), .flag_o(fl[g]), .error_o(err[g]), .aligned_o(al[g]),
      .phase_legal_o(legal[g]), .phase_illegal_o(illegal[g]));

    always @(posedge clk) dec_prev[g] <= ref_decode(rxw[g], 1'b0);

    always @(posedge clk) begin
      #1;
      if (cmp && (isd[g] || isc[g])) begin
        if (q[g].size() == 0) chk(0, "unexpected word");
        else begin
          w_t e;
          e = q[g].pop_front();
          n_cmp[g]++;
          chk(isd[g] == (e.kind == 1), "kind");
          chk((e.kind == 1) ? (pay[g] == e.p) : (pay[g][13:0] == e.p[13:0]), "payload");
          // end-to-end latency: the same for every word
          if (lat[g] < 0) lat[g] = cyc - e.t;
          chk(cyc - e.t == lat[g], $sformatf("latency %0d", cyc - e.t));
          // decoder latency: one clock after the word left the model
          chk(dec_prev[g].kind == (isd[g] ? 1 : 2) && dec_prev[g].payload == pay[g], "one-clock decode");
        end
      end
    end
  end

  task automatic send(input int kind, input logic [15:0] p, input logic inv, input logic rec);
    logic [19:0] w;
    w = ref_plain(kind, p, 1'b0, 1'b0);
    txw <= (inv && kind != 0) ? ~w : w;
    @(posedge clk);
    if (rec && kind != 0) begin
      w_t e; e.kind = kind; e.p = p; e.t = cyc;
      q[0].push_back(e); q[1].push_back(e);
    end
  endtask

  initial begin
    int c;
    repeat (3) send(0, 0, 0, 0);
    rst <= 0; load <= 0; lock <= 1;
    @(negedge clk); cfg_wr = 1; cfg_addr = 1; cfg_wd = 16'd16; @(negedge clk); cfg_wr = 0;
    c = 0;
    while (!(al[0] && al[1] && legal[0] && legal[1]) && c < 3000) begin send(0, 0, 0, 0); c++; end
    chk(al[0] && al[1], "both aligned");
    chk(legal[0] && legal[1], "both phases legal");
    chk(slides[0] == 11 && slides[1] == 11, $sformatf("slides %0d %0d", slides[0], slides[1]));
    chk(rd[0] == 16'd16, "N read back");
    repeat (20) send(0, 0, 0, 0);
    cmp = 1;
    for (int i = 0; i < 500; i++) send(1 + int'($urandom % 2), 16'($urandom), 1'(i % 2), 1);
    repeat (20) send(0, 0, 0, 0);
    chk(lat[0] == lat[1] && lat[0] > 0, $sformatf("latencies %0d %0d", lat[0], lat[1]));
    chk(q[0].size() == 0 && q[1].size() == 0 && n_cmp[0] == 500 && n_cmp[1] == 500, "all received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
