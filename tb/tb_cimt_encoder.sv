// tb_cimt_encoder: random idle / data / control traffic in basic and enhanced
// mode. The testbench keeps its own scrambler sequence and its own running
// disparity of the words it sees, builds every expected 20-bit word from the
// code definition, and checks each output word exactly, 4 clocks after its
// input (the encoder's latency). It also checks that the running disparity
// stays within +/-20 and that inversion is actually exercised.
module tb_cimt_encoder;
  import glink_ref_pkg::*;

  localparam int LAT = 4;

  logic clk = 0, rst = 1, enh = 0;
  logic [15:0] pay = '0;
  logic isd = 0, isc = 0, flg = 0;
  logic [19:0] cw;
  logic inv;
  int checks = 0, failures = 0, n_inv = 0, maxabs = 0;

  cimt_encoder dut (.clk(clk), .rst(rst), .enhanced_i(enh), .payload_i(pay),
                    .is_data_i(isd), .is_ctrl_i(isc), .flag_i(flg),
                    .cimt_o(cw), .invert_o(inv));

  always #5 clk = ~clk;

  typedef struct { int kind; logic [15:0] p; logic fs; } exp_t;
  exp_t q[$];

  task automatic run_mode(input logic mode, input int nwords);
    logic [6:0] s = 7'h7F;
    int td = 0;
    int cyc = 0;
    enh <= mode;
    rst <= 1; isd <= 0; isc <= 0;
    @(posedge clk); @(posedge clk);
    rst <= 0;
    q.delete();
    for (int i = 0; i < nwords + LAT + 1; i++) begin
      exp_t e;
      int k;
      k = $urandom % 3;
      if (i >= nwords) k = 0;
      pay <= 16'($urandom);
      if ($urandom % 4 == 0) pay <= 16'h00FF;  // balanced payloads too
      isd <= (k == 1);
      isc <= (k == 2);
      flg <= (i % 50 < 25);
      @(posedge clk);
      // what the encoder captured at this edge
      begin
        logic b;
        void'(pn_step(s));
        b = s[6] ^ s[5];  // the bit the encoder uses for this word
        e.kind = isd ? 1 : (isc ? 2 : 0);
        e.p    = pay;
        e.fs   = mode ? (((e.kind == 1) ? flg : 1'b0) ^ b) : ((e.kind == 1) ? flg : 1'b0);
        q.push_back(e);
      end
      #1;
      // the word on cimt_o now belongs to the input launched LAT edges ago
      // (captured LAT-1 edges ago)
      if (q.size() >= LAT) begin
        exp_t o;
        logic [19:0] plain, expw;
        logic        exp_inv;
        o = q.pop_front();
        plain   = ref_plain(o.kind, o.p, o.fs, mode);
        exp_inv = (o.kind != 0) && (sign2(disp20(plain)) == sign2(td));
        expw    = exp_inv ? ~plain : plain;
        checks++;
        if (cw !== expw || inv !== exp_inv) begin
          failures++;
          if (failures < 10) $display("FAIL mode=%0d i=%0d got=%h exp=%h inv=%b/%b td=%0d", mode, i, cw, expw, inv, exp_inv, td);
        end
        if (inv) n_inv++;
      end
      td += disp20(cw);
      if (td > maxabs) maxabs = td;
      if (-td > maxabs) maxabs = -td;
      cyc++;
    end
  endtask

  initial begin
    run_mode(1'b0, 1500);
    run_mode(1'b1, 1500);
    checks++;
    if (maxabs > 20) begin failures++; $display("FAIL running disparity reached %0d", maxabs); end
    checks++;
    if (n_inv == 0) begin failures++; $display("FAIL no inverted word"); end
    $display("inverted words %0d, max |disparity| %0d", n_inv, maxabs);
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
