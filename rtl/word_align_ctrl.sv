// word_align_ctrl: the receiver's word-align control FSM. It watches the
// decoder's Error (and, in enhanced mode, Flag') and drives RxSlide, which
// makes the deserializer move its word boundary by one bit, until the
// received words decode cleanly; then it asserts Aligned.
//
// States (after the emulator's bubble diagram):
//  UNALIGNED  Aligned=0. M consecutive errors, or in enhanced mode a Flag'
//             static for STATIC_LIMIT words, -> SLIDE. N consecutive
//             error-free words (N consecutive idle words when idle_lock_i is
//             set) -> ALIGNED.
//  SLIDE      RxSlide=1 for SLIDE_CYCLES clocks (2), then -> WAIT.
//  WAIT       RxSlide=0 for WAIT_CYCLES clocks (14: the latency of the slip
//             and of the decoder), then -> UNALIGNED.
//  ALIGNED    Aligned=1. M consecutive errors or a static Flag' -> UNALIGNED.
// M (8 bits, default 2) and N (10 bits, default 256) come from registers; a
// value of 0 is treated as 1 (this design's choice). Flag' is judged only on
// words that carry it (data and idle); control words neither reset nor
// advance the run, and a static Flag' is only looked for in enhanced mode.
//
// Timing: one decoded word per clock; Aligned and RxSlide are registered
// state outputs. Synchronous active-high reset to UNALIGNED.
module word_align_ctrl #(
  parameter int unsigned SLIDE_CYCLES = 2,
  parameter int unsigned WAIT_CYCLES  = 14,
  parameter int unsigned STATIC_LIMIT = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enhanced_i,
  input  logic       idle_lock_i,  // lock only on a run of idle words
  input  logic [7:0] m_i,          // consecutive errors that break alignment
  input  logic [9:0] n_i,          // consecutive good words that make it
  input  logic       error_i,
  input  logic       is_idle_i,
  input  logic       flag_s_i,
  input  logic       fs_valid_i,
  output logic       aligned_o,
  output logic       rx_slide_o,
  output logic       static_o      // pulse: Flag' found static (enhanced)
);

  typedef enum logic [1:0] {
    S_UNALIGNED = 2'd0,
    S_SLIDE     = 2'd1,
    S_WAIT      = 2'd2,
    S_ALIGNED   = 2'd3
  } state_e;

  state_e      state;
  logic [7:0]  err_cnt;
  logic [9:0]  good_cnt;
  logic [5:0]  run_cnt;   // words for which Flag' has kept its value
  logic        last_fs;
  logic [4:0]  tmr;

  logic [7:0]  m_eff;
  logic [9:0]  n_eff;
  logic [7:0]  err_nxt;
  logic [9:0]  good_nxt;
  logic [5:0]  run_nxt;
  logic        good_word, errs_hit, static_hit, lock_hit;

  always_comb begin
    m_eff     = (m_i == 0) ? 8'd1 : m_i;
    n_eff     = (n_i == 0) ? 10'd1 : n_i;
    err_nxt   = error_i ? ((err_cnt == 8'hFF) ? err_cnt : err_cnt + 8'd1) : 8'd0;
    good_word = !error_i && (!idle_lock_i || is_idle_i);
    good_nxt  = good_word ? ((good_cnt == 10'h3FF) ? good_cnt : good_cnt + 10'd1) : 10'd0;
    run_nxt   = run_cnt;
    if (fs_valid_i && !error_i)
      run_nxt = (flag_s_i == last_fs && run_cnt != 6'h3F) ? run_cnt + 6'd1
              : (flag_s_i == last_fs) ? run_cnt : 6'd1;
    errs_hit   = (err_nxt >= m_eff);
    static_hit = enhanced_i && (32'(run_nxt) >= STATIC_LIMIT);
    lock_hit   = (good_nxt >= n_eff);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_UNALIGNED;
      err_cnt  <= '0;
      good_cnt <= '0;
      run_cnt  <= '0;
      last_fs  <= 1'b0;
      tmr      <= '0;
      static_o <= 1'b0;
    end else begin
      static_o <= 1'b0;
      unique case (state)
        S_UNALIGNED, S_ALIGNED: begin
          err_cnt  <= err_nxt;
          good_cnt <= good_nxt;
          run_cnt  <= run_nxt;
          if (fs_valid_i && !error_i) last_fs <= flag_s_i;
          if (errs_hit || static_hit) begin
            static_o <= static_hit;
            err_cnt  <= '0;
            good_cnt <= '0;
            run_cnt  <= '0;
            tmr      <= '0;
            state    <= (state == S_ALIGNED) ? S_UNALIGNED : S_SLIDE;
          end else if (state == S_UNALIGNED && lock_hit) begin
            err_cnt  <= '0;
            state    <= S_ALIGNED;
          end
        end
        S_SLIDE: begin
          tmr <= tmr + 5'd1;
          if (32'(tmr) + 1 >= SLIDE_CYCLES) begin
            tmr   <= '0;
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          tmr <= tmr + 5'd1;
          if (32'(tmr) + 1 >= WAIT_CYCLES) begin
            tmr      <= '0;
            err_cnt  <= '0;
            good_cnt <= '0;
            run_cnt  <= '0;
            state    <= S_UNALIGNED;
          end
        end
        default: state <= S_UNALIGNED;
      endcase
    end
  end

  always_comb begin
    aligned_o  = (state == S_ALIGNED);
    rx_slide_o = (state == S_SLIDE);
  end

  // RxSlide is never high while Aligned is.
  assert property (@(posedge clk) disable iff (rst) !(aligned_o && rx_slide_o));

endmodule
