// tb_tx_phase_ctrl: checks the transmit phase-alignment sequence with short
// counts (EN_CYCLES = 5, SET_CYCLES = 40): nothing before PLL lock, enable
// alone for 5 clocks, enable with set-phase for 40 clocks, then Ready with
// set-phase low; losing lock restarts the sequence.
module tb_tx_phase_ctrl;
  localparam int EN = 5, SET = 40;
  logic clk = 0, rst = 1, lock = 0;
  logic en, setp, rdy;
  int checks = 0, failures = 0;

  tx_phase_ctrl #(.EN_CYCLES(EN), .SET_CYCLES(SET)) dut (
    .clk(clk), .rst(rst), .pll_lock_i(lock),
    .phase_align_en_o(en), .set_phase_o(setp), .ready_o(rdy));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic sequence_check();
    int c_en = 0, c_set = 0;
    // first clock after lock: still idle, then enable
    @(posedge clk); #1;
    while (en && !setp && !rdy && c_en < 1000) begin c_en++; @(posedge clk); #1; end
    chk(c_en == EN, $sformatf("enable alone for %0d", c_en));
    while (en && setp && c_set < 1000) begin c_set++; chk(!rdy, "no ready during set"); @(posedge clk); #1; end
    chk(c_set == SET, $sformatf("set-phase for %0d", c_set));
    chk(rdy && en && !setp, "ready");
    repeat (20) begin @(posedge clk); #1; chk(rdy, "ready holds"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (10) begin @(posedge clk); #1; chk(!en && !setp && !rdy, "waits for lock"); end
    lock = 1;
    sequence_check();
    lock = 0;
    @(posedge clk); #1;
    chk(!en && !rdy, "lock lost");
    lock = 1;
    sequence_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
