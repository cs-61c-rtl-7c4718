// ctrl_ref_pkg: expected controller outputs, written as the controller truth
// table (one row per instruction, don't-care entries masked out), for the
// control testbenches.
package ctrl_ref_pkg;
  import mips_pkg::*;

  // care: 1 where the table gives a value. Field order follows ctrl_t.
  typedef struct { ctrl_t value; ctrl_t care; } ctrl_ref_t;

  function automatic ctrl_ref_t row(bit rd, bit rd_c, bit as, bit mr, bit mr_c, bit rw,
                                    bit mw, bit np, bit j, bit eo, bit eo_c, alu_ctr_e ac);
    ctrl_ref_t r;
    r.value = '{reg_dst: rd, alu_src: as, memto_reg: mr, reg_write: rw, mem_write: mw,
                npc_sel: np, jump: j, ext_op: eo, alu_ctr: ac};
    r.care  = '{reg_dst: rd_c, alu_src: 1, memto_reg: mr_c, reg_write: 1, mem_write: 1,
                npc_sel: 1, jump: 1, ext_op: eo_c, alu_ctr: alu_ctr_e'(2'b11)};
    return r;
  endfunction

  // Expected control for an instruction given by opcode and funct.
  function automatic ctrl_ref_t expect_ctrl(bit [5:0] op, bit [5:0] fn);
    ctrl_ref_t r;
    //            RegDst  ALUSrc MemtoReg RegWr MemWr nPC Jump ExtOp   ALUctr
    if (op == 6'b000000 && fn == 6'b100000) return row(1,1, 0, 0,1, 1, 0, 0, 0, 0,0, ALU_ADD);
    if (op == 6'b000000 && fn == 6'b100010) return row(1,1, 0, 0,1, 1, 0, 0, 0, 0,0, ALU_SUB);
    if (op == 6'b001101)                    return row(0,1, 1, 0,1, 1, 0, 0, 0, 0,1, ALU_OR);
    if (op == 6'b100011)                    return row(0,1, 1, 1,1, 1, 0, 0, 0, 1,1, ALU_ADD);
    if (op == 6'b101011)                    return row(0,0, 1, 0,0, 0, 1, 0, 0, 1,1, ALU_ADD);
    if (op == 6'b000100)                    return row(0,0, 0, 0,0, 0, 0, 1, 0, 0,0, ALU_SUB);
    // Anything else writes nothing and does not branch; jump raises Jump.
    r = row(0,0, 0, 0,0, 0, 0, 0, (op == 6'b000010), 0,0, ALU_ADD);
    r.care.alu_src = 0; r.care.alu_ctr = alu_ctr_e'(2'b00);
    return r;
  endfunction

  function automatic bit ctrl_ok(ctrl_t got, ctrl_ref_t r);
    return ((got ^ r.value) & r.care) == '0;
  endfunction
endpackage
