// tb_align_cfg_regs: reset values (M = 2, N = 256), writes to each address,
// read-back, truncation to 8 and 10 bits, and that a write to one register
// leaves the other alone.
module tb_align_cfg_regs;
  logic clk = 0, rst = 1, wr = 0, addr = 0;
  logic [15:0] wd = '0, rd;
  logic [7:0] m;
  logic [9:0] n;
  int checks = 0, failures = 0;

  align_cfg_regs dut (.clk(clk), .rst(rst), .wr_en_i(wr), .addr_i(addr),
                      .wdata_i(wd), .rdata_o(rd), .m_o(m), .n_o(n));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s m=%0d n=%0d rd=%h", what, m, n, rd); end
  endtask

  initial begin
    logic [7:0] em;
    logic [9:0] en;
    @(posedge clk); @(posedge clk); rst <= 0; @(posedge clk); #1;
    chk(m == 8'd2 && n == 10'd256, "reset values");
    addr = 0; #1; chk(rd == 16'd2, "read M");
    addr = 1; #1; chk(rd == 16'd256, "read N");
    em = 2; en = 256;
    for (int i = 0; i < 200; i++) begin
      logic a, w;
      logic [15:0] v;
      a = 1'($urandom);
      v = 16'($urandom);
      w = 1'($urandom);
      @(negedge clk);
      wr = w; addr = a; wd = v;
      @(posedge clk); #1;
      if (w && !a) em = v[7:0];
      if (w && a)  en = v[9:0];
      wr = 0;
      chk(m == em && n == en, "after write");
      addr = 0; #1; chk(rd == {8'd0, em}, "read back M");
      addr = 1; #1; chk(rd == {6'd0, en}, "read back N");
    end
    rst = 1; @(posedge clk); #1; rst = 0;
    chk(m == 8'd2 && n == 10'd256, "reset again");
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
