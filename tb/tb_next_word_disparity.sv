// tb_next_word_disparity: exhaustive-by-sampling check of the RDSign bus:
// random and hand-picked 20-bit words, expected sign from a bit count.
module tb_next_word_disparity;
  import glink_ref_pkg::*;
  import glink_pkg::*;

  logic [19:0] w;
  dsign_e      s;
  int checks = 0, failures = 0;

  next_word_disparity dut (.word_i(w), .rdsign_o(s));

  task automatic check(input logic [19:0] v);
    w = v;
    #1;
    checks++;
    if (s !== sign2(disp20(v))) begin
      failures++;
      $display("FAIL word=%h rdsign=%b exp=%b", v, s, sign2(disp20(v)));
    end
  endtask

  initial begin
    check(20'h00000); check(20'hFFFFF); check(20'h003FF); check(20'h007FF);
    check(20'h001FF); check(20'hAAAAA); check(20'h3FF00);
    repeat (2000) check(20'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
