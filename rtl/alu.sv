// alu: the 32-bit arithmetic unit of the MIPS-lite datapath.
//
// ALUctr selects ADD (00), SUB (01) or OR (10). Add and subtract wrap modulo
// 2**32 and raise no overflow, which is the behaviour addu and subu need.
// The zero output is high when the result is all zeros; with SUB selected it
// tells beq that busA equals busB. The unused code 11 gives a zero result
// (a choice of this design). Purely combinational.
module alu
  import mips_pkg::*;
(
  input  alu_ctr_e    alu_ctr,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result,
  output logic        zero
);

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
