// tb_cimt_decoder: feeds the decoder words built from the code definition
// (idle, data and control, inverted or not, with a scrambled Flag' in
// enhanced mode) mixed with random corrupt words. Every output is checked one
// clock after its word against the reference decoder; in enhanced mode the
// de-scrambled Flag is checked against the Flag that was encoded, after an
// opening run of idle words has synchronised the receive generator.
module tb_cimt_decoder;
  import glink_ref_pkg::*;

  logic clk = 0, rst = 1, enh = 0;
  logic [19:0] w = '0;
  logic [15:0] pay;
  logic isd, isc, isi, fs, fl, fsv, err;
  int checks = 0, failures = 0, n_err = 0, n_inv = 0, n_ctrl = 0, n_idle = 0;

  cimt_decoder dut (.clk(clk), .rst(rst), .enhanced_i(enh), .word_i(w),
                    .payload_o(pay), .is_data_o(isd), .is_ctrl_o(isc), .is_idle_o(isi),
                    .flag_s_o(fs), .flag_o(fl), .fs_valid_o(fsv), .error_o(err));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s w=%h", what, w);
    end
  endtask

  task automatic run_mode(input logic mode);
    logic [6:0] s = 7'h5A;   // transmitter generator, unknown to the receiver
    enh <= mode; rst <= 1;
    @(posedge clk); @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      int kind;
      logic [15:0] p;
      logic flag, b, fsx, corrupt, doinv;
      logic [19:0] word;
      ref_dec_t r;
      kind  = (i < 20) ? 0 : int'($urandom % 3);
      p     = 16'($urandom);
      flag  = 1'($urandom);
      b     = pn_step(s);
      fsx   = (kind == 1) ? (mode ? flag ^ b : flag) : (mode ? b : 1'b0);
      word  = ref_plain(kind, p, fsx, mode);
      doinv = (kind != 0) && ($urandom % 2 == 0);
      if (doinv) word = ~word;
      corrupt = (i >= 20) && ($urandom % 8 == 0);
      if (corrupt) word = 20'($urandom);
      r = ref_decode(word, mode);
      w <= word;
      @(posedge clk);
      #1;
      chk(err == r.error, "error");
      if (!r.error) begin
        chk(isd == (r.kind == 1) && isc == (r.kind == 2) && isi == (r.kind == 0), "kind");
        chk(fsv == (r.kind != 2), "fs_valid");
        if (r.kind != 2) chk(fs == r.flag_s, "flag_s");
        if (r.kind != 0) chk(pay == r.payload, "payload");
        if (!corrupt) begin
          if (r.kind == 1) chk(pay == p, "payload vs sent");
          if (r.kind == 2) chk(pay[13:0] == p[13:0], "ctrl payload vs sent");
          if (r.kind == 1) chk(fl == flag, "flag");
          if (doinv) n_inv++;
        end
        if (r.kind == 2) n_ctrl++;
        if (r.kind == 0) n_idle++;
      end else n_err++;
    end
  endtask

  initial begin
    run_mode(1'b0);
    run_mode(1'b1);
    $display("errors %0d inverted %0d control %0d idle %0d", n_err, n_inv, n_ctrl, n_idle);
    chk(n_err > 0 && n_inv > 0 && n_ctrl > 0 && n_idle > 0, "coverage");
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
