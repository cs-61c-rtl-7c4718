// regfile: the 32 x 32-bit register file of the MIPS-lite datapath.
//
// Two read ports (Ra -> busA, Rb -> busB) are combinational, so an
// instruction reads its operands in the same cycle it executes. The write
// port (Rw, busW) stores on the rising clock edge when RegWr is high, which
// ends the cycle of the instruction that produced the value. A read of the
// register being written returns the old value until that edge.
//
// Following the MIPS architecture, register 0 always reads as zero and writes
// to it are discarded. A synchronous reset clears every register; both the
// reset and the zero register are this design's choices.
module regfile
  import mips_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              reg_wr,
  input  logic [REG_AW-1:0] rw,
  input  logic [REG_AW-1:0] ra,
  input  logic [REG_AW-1:0] rb,
  input  logic [XLEN-1:0]   bus_w,
  output logic [XLEN-1:0]   bus_a,
  output logic [XLEN-1:0]   bus_b
);

  logic [XLEN-1:0] regs [NUM_REGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (reg_wr && rw != '0) begin
      regs[rw] <= bus_w;
    end
  end

  always_comb begin
    bus_a = (ra == '0) ? '0 : regs[ra];
    bus_b = (rb == '0) ? '0 : regs[rb];
  end

endmodule
