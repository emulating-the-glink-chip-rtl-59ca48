// tb_flag_scrambler: checks Flag' = Flag in basic mode and Flag XOR the
// x^7+x^6+1 sequence in enhanced mode, that the sequence has period 127, and
// that with a static Flag, Flag' never keeps its value for more than 7 words.
module tb_flag_scrambler;
  import glink_ref_pkg::*;

  logic clk = 0, rst = 1, enh = 0, adv = 1, flag = 0;
  logic fs, pn;
  logic [6:0] s;
  int checks = 0, failures = 0, run, maxrun;
  logic last;

  flag_scrambler dut (.clk(clk), .rst(rst), .enhanced_i(enh), .adv_i(adv),
                      .flag_i(flag), .flag_s_o(fs), .pn_o(pn));

  always #5 clk = ~clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  initial begin
    @(posedge clk); @(posedge clk);
    rst <= 0;
    // basic mode: transparent
    for (int i = 0; i < 50; i++) begin
      flag <= 1'($urandom); @(posedge clk); #1; chk(fs, flag, "basic");
    end
    // enhanced mode from a fresh reset
    enh <= 1; rst <= 1; @(posedge clk); rst <= 0; #1;
    s = 7'h7F;
    run = 0; maxrun = 0; last = 1'bx;
    for (int i = 0; i < 400; i++) begin
      logic b;
      flag = (i < 254) ? 1'b0 : 1'($urandom);
      b = s[6] ^ s[5];
      #1;
      chk(fs, flag ^ b, "enhanced");
      if (i < 254) begin
        if (fs === last) run++; else run = 1;
        if (run > maxrun) maxrun = run;
        last = fs;
      end
      @(posedge clk);
      void'(pn_step(s));
      #1;
    end
    checks++;
    if (maxrun != 7) begin failures++; $display("FAIL longest run %0d", maxrun); end
    // adv low freezes the sequence
    adv <= 0; flag <= 0;
    @(posedge clk); #1;
    begin
      logic f0;
      f0 = fs;
      repeat (5) begin @(posedge clk); #1; chk(fs, f0, "hold"); end
    end
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
