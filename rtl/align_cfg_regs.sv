// align_cfg_regs: the two programmable parameters of the word-align control,
// held in writable registers so that the user can stiffen or soften the lock
// condition.
//   address 0: M, 8 bits, consecutive errors that break alignment (reset 2)
//   address 1: N, 10 bits, consecutive good words needed to lock (reset 256)
// Widths and reset values follow the emulator; the register map and the
// simple write/read port are this design's choice.
//
// Timing: a write (wr_en_i high) takes effect at the clock edge; reads are
// combinational. Synchronous active-high reset to the default values.
module align_cfg_regs #(
  parameter logic [7:0] M_DEFAULT = 8'd2,
  parameter logic [9:0] N_DEFAULT = 10'd256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_en_i,
  input  logic        addr_i,
  input  logic [15:0] wdata_i,
  output logic [15:0] rdata_o,
  output logic [7:0]  m_o,
  output logic [9:0]  n_o
);

  always_ff @(posedge clk) begin
    if (rst) begin
      m_o <= M_DEFAULT;
      n_o <= N_DEFAULT;
    end else if (wr_en_i) begin
      if (addr_i == 1'b0) m_o <= wdata_i[7:0];
      else                n_o <= wdata_i[9:0];
    end
  end

  always_comb rdata_o = (addr_i == 1'b0) ? {8'd0, m_o} : {6'd0, n_o};

endmodule
