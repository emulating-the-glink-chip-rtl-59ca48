// rx_phase_ctrl: receiver phase align and control logic.
//
// Configuration 1 (RX_CONFIG = 1, receive elastic buffer bypassed, lowest
// latency): after CDR/PLL lock the block runs the same enable / set-phase
// sequence as the transmitter (rxenpmaphasealign for EN_CYCLES clocks, then
// rxpmasetphase for SET_CYCLES clocks) and then checks whether data can be
// taken with the present phase of the receive parallel clock: if the word
// aligner reaches Aligned, with the decoder reporting no Error on that clock,
// within CHECK_CYCLES clocks the phase is declared legal; if not, phase_legal_o stays low and phase_illegal_o is raised, and
// the user must move the clock phase (in the FPGA or outside) and pulse
// recheck_i. A legal phase that later loses alignment goes back to checking.
// Configuration 2 (RX_CONFIG = 2, buffer in use): every phase is legal, no
// alignment sequence is run and phase_legal_o is high after reset.
// That the check exists, what it reports and the two configurations follow
// the emulator; the way the check decides (alignment within a time-out) and
// all counts are this design's choice.
//
// Timing: outputs are registered states. Synchronous active-high reset.
module rx_phase_ctrl #(
  parameter int unsigned RX_CONFIG    = 1,
  parameter int unsigned EN_CYCLES    = 32,
  parameter int unsigned SET_CYCLES   = 8192,
  parameter int unsigned CHECK_CYCLES = 16384
) (
  input  logic clk,
  input  logic rst,
  input  logic pll_lock_i,
  input  logic aligned_i,
  input  logic error_i,           // decoder Error
  input  logic recheck_i,         // phase changed by the user: check again
  output logic phase_align_en_o,  // to RXENPMAPHASEALIGN
  output logic set_phase_o,       // to RXPMASETPHASE
  output logic phase_legal_o,
  output logic phase_illegal_o
);

  typedef enum logic [2:0] {
    R_WAIT_LOCK = 3'd0,
    R_ENABLE    = 3'd1,
    R_SET       = 3'd2,
    R_CHECK     = 3'd3,
    R_LEGAL     = 3'd4,
    R_ILLEGAL   = 3'd5
  } rstate_e;

  rstate_e     state;
  logic [15:0] tmr;

  if (RX_CONFIG == 1) begin : g_cfg1
    always_ff @(posedge clk) begin
      if (rst || !pll_lock_i) begin
        state <= R_WAIT_LOCK;
        tmr   <= '0;
      end else begin
        unique case (state)
          R_WAIT_LOCK: begin
            tmr   <= '0;
            state <= R_ENABLE;
          end
          R_ENABLE: begin
            tmr <= tmr + 16'd1;
            if (32'(tmr) + 1 >= EN_CYCLES) begin
              tmr   <= '0;
              state <= R_SET;
            end
          end
          R_SET: begin
            tmr <= tmr + 16'd1;
            if (32'(tmr) + 1 >= SET_CYCLES) begin
              tmr   <= '0;
              state <= R_CHECK;
            end
          end
          R_CHECK: begin
            tmr <= tmr + 16'd1;
            if (aligned_i && !error_i) begin
              tmr   <= '0;
              state <= R_LEGAL;
            end else if (32'(tmr) + 1 >= CHECK_CYCLES) begin
              tmr   <= '0;
              state <= R_ILLEGAL;
            end
          end
          R_LEGAL: begin
            if (!aligned_i) state <= R_CHECK;
          end
          R_ILLEGAL: begin
            if (recheck_i) begin
              tmr   <= '0;
              state <= R_ENABLE;
            end
          end
          default: state <= R_WAIT_LOCK;
        endcase
      end
    end
  end else begin : g_cfg2
    always_ff @(posedge clk) begin
      tmr <= '0;
      if (rst) state <= R_WAIT_LOCK;
      else     state <= R_LEGAL;
    end
  end

  always_comb begin
    phase_align_en_o = (RX_CONFIG == 1) && (state != R_WAIT_LOCK);
    set_phase_o      = (RX_CONFIG == 1) && (state == R_SET);
    phase_legal_o    = (state == R_LEGAL);
    phase_illegal_o  = (state == R_ILLEGAL);
  end

endmodule
