// tx_phase_ctrl: transmitter phase-control sequencer. With the GTP's transmit
// elastic buffer bypassed, the transceiver's internal parallel clock must be
// phase-aligned to the fabric's transmit clock before data can pass. This
// block steps the transceiver through that alignment and raises Ready when
// it is done, as the emulator's transmit phase control does.
//
// Sequence: wait for the transceiver PLL lock; raise the phase-align enable
// (txenpmaphasealign) and hold it alone for EN_CYCLES clocks; then also raise
// set-phase (txpmasetphase) for SET_CYCLES clocks; then drop set-phase and
// raise ready_o. Losing PLL lock restarts the sequence. The enable/set-phase
// handshake is the Virtex-5 GTP buffer-bypass procedure; the two counts are
// this design's defaults and are parameters.
//
// Timing: outputs are registered. Synchronous active-high reset.
module tx_phase_ctrl #(
  parameter int unsigned EN_CYCLES  = 32,
  parameter int unsigned SET_CYCLES = 8192
) (
  input  logic clk,
  input  logic rst,
  input  logic pll_lock_i,
  output logic phase_align_en_o,  // to TXENPMAPHASEALIGN
  output logic set_phase_o,       // to TXPMASETPHASE
  output logic ready_o
);

  typedef enum logic [1:0] {
    P_WAIT_LOCK = 2'd0,
    P_ENABLE    = 2'd1,
    P_SET       = 2'd2,
    P_READY     = 2'd3
  } pstate_e;

  pstate_e     state;
  logic [15:0] tmr;

  always_ff @(posedge clk) begin
    if (rst || !pll_lock_i) begin
      state <= P_WAIT_LOCK;
      tmr   <= '0;
    end else begin
      unique case (state)
        P_WAIT_LOCK: begin
          tmr   <= '0;
          state <= P_ENABLE;
        end
        P_ENABLE: begin
          tmr <= tmr + 16'd1;
          if (32'(tmr) + 1 >= EN_CYCLES) begin
            tmr   <= '0;
            state <= P_SET;
          end
        end
        P_SET: begin
          tmr <= tmr + 16'd1;
          if (32'(tmr) + 1 >= SET_CYCLES) begin
            tmr   <= '0;
            state <= P_READY;
          end
        end
        default: state <= P_READY;
      endcase
    end
  end

  always_comb begin
    phase_align_en_o = (state != P_WAIT_LOCK);
    set_phase_o      = (state == P_SET);
    ready_o          = (state == P_READY);
  end

endmodule
