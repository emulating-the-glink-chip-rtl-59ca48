// tb_glink_tx: the transmit half with short phase-alignment counts. Random
// data / control / idle words (basic mode) are launched one per clock; every
// word on cimt_o is decoded with the reference decoder and must reproduce
// the word launched exactly 4 clocks earlier. Ready must rise only after the
// enable and set-phase steps (EN_CYCLES + SET_CYCLES clocks after lock is seen).
module tb_glink_tx;
  import glink_ref_pkg::*;
  localparam int EN = 6, SET = 50, LAT = 4;

  logic clk = 0, rst = 1, lock = 0, enh = 0;
  logic [15:0] pay = '0;
  logic isd = 0, isc = 0, flg = 0;
  logic [19:0] cw;
  logic en, setp, rdy;
  int checks = 0, failures = 0;

  glink_tx #(.EN_CYCLES(EN), .SET_CYCLES(SET)) dut (
    .clk(clk), .rst(rst), .pll_lock_i(lock), .enhanced_i(enh),
    .payload_i(pay), .is_data_i(isd), .is_ctrl_i(isc), .flag_i(flg),
    .cimt_o(cw), .phase_align_en_o(en), .set_phase_o(setp), .ready_o(rdy));

  always #5 clk = ~clk;

  typedef struct { int kind; logic [15:0] p; logic f; } w_t;
  w_t q[$];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int rdy_at = -1;
    repeat (2) @(posedge clk);
    rst <= 0; lock <= 1;
    for (int i = 0; i < 600; i++) begin
      w_t e;
      e.kind = $urandom % 3; e.p = 16'($urandom); e.f = 1'($urandom);
      pay <= e.p; isd <= (e.kind == 1); isc <= (e.kind == 2); flg <= e.f;
      q.push_back(e);
      @(posedge clk); #1;
      if (rdy && rdy_at < 0) rdy_at = i;
      if (q.size() >= LAT) begin
        w_t o;
        ref_dec_t r;
        o = q.pop_front();
        r = ref_decode(cw, 1'b0);
        chk(!r.error && r.kind == o.kind, "kind");
        if (o.kind == 1) chk(r.payload == o.p && r.flag_s == o.f, "data");
        if (o.kind == 2) chk(r.payload[13:0] == o.p[13:0], "control");
      end
    end
    // lock seen at edge 0 of the loop: EN clocks of enable, SET of set-phase
    chk(rdy_at == EN + SET, $sformatf("ready after %0d", rdy_at));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
