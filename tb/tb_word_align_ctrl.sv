// tb_word_align_ctrl: directed scenarios for the word-align FSM with exact
// cycle counts: M consecutive errors give a 2-clock RxSlide followed by a
// 14-clock wait; fewer than M do nothing; N good words give Aligned on the
// N-th; M errors or a Flag' static for 32 words (enhanced mode only) drop
// Aligned; with idle_lock set only idle words count towards N.
module tb_word_align_ctrl;

  logic clk = 0, rst = 1, enh = 0, il = 0;
  logic [7:0] m = 8'd2;
  logic [9:0] n = 10'd8;
  logic err = 0, idle = 0, fs = 0, fsv = 0;
  logic aligned, slide, stat;
  int checks = 0, failures = 0;

  word_align_ctrl dut (.clk(clk), .rst(rst), .enhanced_i(enh), .idle_lock_i(il),
                       .m_i(m), .n_i(n), .error_i(err), .is_idle_i(idle),
                       .flag_s_i(fs), .fs_valid_i(fsv), .aligned_o(aligned),
                       .rx_slide_o(slide), .static_o(stat));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one word: 0 good data, 1 error, 2 idle, 3 control
  task automatic word(input int k, input logic f = 0);
    err  = (k == 1);
    idle = (k == 2);
    fsv  = (k == 0 || k == 2);
    fs   = f;
    @(posedge clk); #1;
  endtask

  task automatic do_reset();
    rst = 1; word(0); word(0); rst = 0;
  endtask

  initial begin
    int c;
    #1;
    do_reset();
    // fewer than M errors: nothing
    word(1); chk(!slide && !aligned, "1 error no slide");
    word(0);
    // M = 2 consecutive errors -> slide for exactly 2 clocks
    word(1); word(1);
    c = 0; while (slide) begin c++; word(1); end
    chk(c == 2, $sformatf("slide length %0d", c));
    // during the 14-clock wait nothing reacts, errors included
    c = 0;
    repeat (14) begin if (slide || aligned) c++; word(1); end
    chk(c == 0, "quiet during wait");
    // right after the wait, M errors slide again
    word(1); chk(!slide, "one error after wait");
    word(1); chk(slide, "slide again after wait");
    repeat (2 + 14) word(0);
    // N = 8 good words -> aligned on the 8th
    repeat (7) word(0);
    chk(!aligned, "not aligned after 7");
    word(0); chk(aligned, "aligned after 8");
    // one error keeps alignment, M consecutive drop it (no slide)
    word(1); word(0); chk(aligned, "still aligned");
    word(1); word(1); chk(!aligned && !slide, "dropped without slide");
    repeat (8) word(0); chk(aligned, "re-aligned");
    // basic mode ignores a static Flag'
    repeat (100) word(0, 1'b1); chk(aligned, "basic ignores static flag");
    // enhanced: toggling Flag' keeps lock, control words do not count
    enh = 1;
    for (int i = 0; i < 200; i++) word((i % 5 == 0) ? 3 : 0, 1'((i / 3) % 2));
    chk(aligned, "enhanced toggling keeps lock");
    word(0, 1'b1);
    n = 10'd64;  // keep the FSM from re-locking before the static check fires
    c = 0;
    while (aligned && c < 100) begin word(0, 1'b0); c++; end
    chk(c == 32, $sformatf("static flag drop after %0d", c));
    // unaligned + static -> slide
    c = 0;
    while (!slide && c < 100) begin word(0, 1'b0); c++; end
    chk(slide && c <= 32, $sformatf("static flag slide after %0d", c));
    // idle-lock: good data words do not lock, idle words do
    enh = 0; il = 1; m = 8'd5; n = 10'd20;
    do_reset();
    repeat (100) word(0);
    chk(!aligned, "idle-lock ignores data");
    repeat (19) word(2);
    chk(!aligned, "19 idles");
    word(2); chk(aligned, "20 idles");
    // M = 5
    repeat (4) word(1); word(0); chk(aligned, "4 errors kept");
    repeat (5) word(1); chk(!aligned, "5 errors dropped");
    repeat (4) word(1); chk(!slide, "no slide after 4");
    word(1); chk(slide, "slide after 5");
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
