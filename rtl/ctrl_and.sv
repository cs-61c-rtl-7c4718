// ctrl_and: the "AND" plane of the two-level MIPS-lite controller.
//
// Each supported instruction has one AND term over the six opcode bits (true
// or inverted), and the two R-type instructions add a term over the six funct
// bits. Exactly one output is high for a recognised instruction and all are
// low for anything else, which the OR plane then turns into "no register
// write, no memory write, PC+4". The product terms are the controller's
// boolean equations: rtype = op 000000, ori = 001101, lw = 100011,
// sw = 101011, beq = 000100, jump = 000010, add = rtype and funct 100000,
// sub = rtype and funct 100010. Purely combinational.
module ctrl_and
  import mips_pkg::*;
(
  input  opcode_t   op,
  input  funct_t    funct,
  output inst_dec_t dec
);

  logic rtype;

  always_comb begin
    rtype    = ~op[5] & ~op[4] & ~op[3] & ~op[2] & ~op[1] & ~op[0];
    dec.ori  = ~op[5] & ~op[4] &  op[3] &  op[2] & ~op[1] &  op[0];
    dec.lw   =  op[5] & ~op[4] & ~op[3] & ~op[2] &  op[1] &  op[0];
    dec.sw   =  op[5] & ~op[4] &  op[3] & ~op[2] &  op[1] &  op[0];
    dec.beq  = ~op[5] & ~op[4] & ~op[3] &  op[2] & ~op[1] & ~op[0];
    dec.jump = ~op[5] & ~op[4] & ~op[3] & ~op[2] &  op[1] & ~op[0];
    dec.add  = rtype & funct[5] & ~funct[4] & ~funct[3] & ~funct[2] & ~funct[1] & ~funct[0];
    dec.sub  = rtype & funct[5] & ~funct[4] & ~funct[3] & ~funct[2] &  funct[1] & ~funct[0];
  end


endmodule
