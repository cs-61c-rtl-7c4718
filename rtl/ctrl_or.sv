// ctrl_or: the "OR" plane of the two-level MIPS-lite controller.
//
// Each control point is the OR of the instruction recognisers that need it:
//   RegDst   = add + sub          ALUSrc  = ori + lw + sw
//   MemtoReg = lw                 RegWrite = add + sub + ori + lw
//   MemWrite = sw                 nPC_sel = beq
//   Jump     = jump               ExtOp   = lw + sw
//   ALUctr[0] = sub + beq         ALUctr[1] = ori
// These equations settle the truth table's don't-care entries: they read 0
// (RegDst for sw and beq, MemtoReg for sw and beq, ExtOp for add, sub, beq).
// Purely combinational.
module ctrl_or
  import mips_pkg::*;
(
  input  inst_dec_t dec,
  output ctrl_t     ctrl
);

  always_comb begin
    ctrl.reg_dst   = dec.add | dec.sub;
    ctrl.alu_src   = dec.ori | dec.lw | dec.sw;
    ctrl.memto_reg = dec.lw;
    ctrl.reg_write = dec.add | dec.sub | dec.ori | dec.lw;
    ctrl.mem_write = dec.sw;
    ctrl.npc_sel   = dec.beq;
    ctrl.jump      = dec.jump;
    ctrl.ext_op    = dec.lw | dec.sw;
    ctrl.alu_ctr   = alu_ctr_e'({dec.ori, dec.sub | dec.beq});
  end

endmodule
