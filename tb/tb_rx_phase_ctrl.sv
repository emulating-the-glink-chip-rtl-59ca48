// tb_rx_phase_ctrl: Configuration 1 with short counts: enable and set-phase
// sequence, then a legal phase (Aligned arrives within the check window), a
// loss of alignment (back to checking); Aligned with Error is not yet legal, an illegal phase (no alignment within
// CHECK_CYCLES) that holds until recheck. A second instance in Configuration
// 2 must report a legal phase at once and never drive the alignment pins.
module tb_rx_phase_ctrl;
  localparam int EN = 4, SET = 30, CHK = 50;
  logic clk = 0, rst = 1, lock = 0, al = 0, rc = 0, er = 0;
  logic en, setp, legal, illegal;
  logic en2, setp2, legal2, illegal2;
  int checks = 0, failures = 0;

  rx_phase_ctrl #(.RX_CONFIG(1), .EN_CYCLES(EN), .SET_CYCLES(SET), .CHECK_CYCLES(CHK)) dut (
    .clk(clk), .rst(rst), .pll_lock_i(lock), .aligned_i(al), .error_i(er), .recheck_i(rc),
    .phase_align_en_o(en), .set_phase_o(setp), .phase_legal_o(legal), .phase_illegal_o(illegal));

  rx_phase_ctrl #(.RX_CONFIG(2), .EN_CYCLES(EN), .SET_CYCLES(SET), .CHECK_CYCLES(CHK)) dut2 (
    .clk(clk), .rst(rst), .pll_lock_i(lock), .aligned_i(1'b0), .error_i(1'b0), .recheck_i(1'b0),
    .phase_align_en_o(en2), .set_phase_o(setp2), .phase_legal_o(legal2), .phase_illegal_o(illegal2));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic tick(); @(posedge clk); #1; chk(!en2 && !setp2 && !illegal2 && (rst || legal2), "config2"); endtask

  initial begin
    int c;
    repeat (3) @(posedge clk);
    rst = 0;
    tick();
    lock = 1;
    tick();
    c = 0; while (en && !setp && c < 500) begin c++; tick(); end
    chk(c == EN, $sformatf("enable for %0d", c));
    c = 0; while (setp && c < 500) begin c++; tick(); end
    chk(c == SET, $sformatf("set-phase for %0d", c));
    // checking: alignment after 20 clocks -> legal
    repeat (20) begin chk(!legal && !illegal, "checking"); tick(); end
    al = 1; er = 1; tick(); tick();
    chk(!legal && !illegal, "aligned but Error: not yet legal");
    er = 0; tick(); tick();
    chk(legal && !illegal, "legal");
    repeat (30) tick();
    al = 0; tick(); tick();
    chk(!legal && !illegal, "alignment lost: checking again");
    // no alignment for CHK clocks -> illegal
    c = 0; while (!illegal && c < 500) begin c++; tick(); end
    chk(c >= CHK - 2 && c <= CHK, $sformatf("illegal after %0d", c));
    al = 1;
    repeat (10) begin tick(); chk(illegal && !legal, "illegal holds until recheck"); end
    rc = 1; tick(); rc = 0;
    chk(!illegal && en, "recheck restarts");
    c = 0; while (!legal && c < 500) begin c++; tick(); end
    chk(legal && c > SET, "legal after recheck");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
