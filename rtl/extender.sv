// extender: widens the 16-bit immediate to a 32-bit datapath operand.
//
// ExtOp = 0 ("zero") fills the upper 16 bits with zeros, as ori needs;
// ExtOp = 1 ("sign") copies bit 15 into them, as lw and sw need for their
// address offset. Purely combinational.
module extender (
  input  logic        ext_op,
  input  logic [15:0] imm16,
  output logic [31:0] imm32
);

  always_comb imm32 = {{16{ext_op & imm16[15]}}, imm16};

endmodule
