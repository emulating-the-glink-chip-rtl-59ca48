// tb_flag_descrambler: a testbench-side x^7+x^6+1 generator, started at an
// arbitrary state, scrambles Flag. After 7 idle words (which carry the bare
// generator bit) the descrambler must return Flag exactly on every data word;
// a later burst of idle words must re-synchronise it after the testbench
// jumps its generator to a new state. Basic mode must be transparent.
module tb_flag_descrambler;
  import glink_ref_pkg::*;

  logic clk = 0, rst = 1, enh = 1, adv = 1, idle = 0, fs = 0;
  logic fl;
  int checks = 0, failures = 0;

  flag_descrambler dut (.clk(clk), .rst(rst), .enhanced_i(enh), .adv_i(adv),
                        .is_idle_i(idle), .flag_s_i(fs), .flag_o(fl));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic stream(ref logic [6:0] s, input int n_idle, input int n_data);
    for (int i = 0; i < n_idle + n_data; i++) begin
      logic b = pn_step(s);
      logic f = 1'($urandom);
      idle = (i < n_idle);
      fs   = idle ? b : (f ^ b);
      #1;
      if (!idle) chk(fl == f, "flag");
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    logic [6:0] s = 7'h13;
    @(posedge clk); @(posedge clk);
    rst = 0;
    #1;
    stream(s, 7, 500);
    s = 7'h66;   // the transmitter jumps: the receiver must follow on idles
    stream(s, 7, 500);
    enh = 0;
    for (int i = 0; i < 50; i++) begin
      fs = 1'($urandom); idle = 1'($urandom);
      #1; chk(fl == fs, "basic");
      @(posedge clk); #1;
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
