// tb_total_disparity: drives random words with random enables and checks the
// running total and its TDSign against a sum kept in the testbench.
module tb_total_disparity;
  import glink_ref_pkg::*;
  import glink_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  logic [19:0] w = '0;
  dsign_e tds;
  logic signed [7:0] tot;
  int exp_tot = 0;
  int checks = 0, failures = 0;

  total_disparity dut (.clk(clk), .rst(rst), .en_i(en), .word_i(w), .tdsign_o(tds), .total_o(tot));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      logic [19:0] v;
      // keep the total within +/-40 by steering the word's sign
      v = 20'($urandom);
      if (exp_tot > 20 && disp20(v) > 0) v = ~v;
      if (exp_tot < -20 && disp20(v) < 0) v = ~v;
      w  <= v;
      en <= ($urandom % 4) != 0;
      @(posedge clk);
      if (en) exp_tot += disp20(w);
      #1;
      checks++;
      if (tot != 8'(exp_tot) || tds !== sign2(exp_tot)) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d tot=%0d exp=%0d tds=%b", i, tot, exp_tot, tds);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
