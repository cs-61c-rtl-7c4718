// control: the MIPS-lite main controller.
//
// Takes the opcode <31:26> and funct <5:0> of the current instruction and
// produces every control point of the datapath in the same cycle. It is built
// as the two-level structure of AND plane (ctrl_and, one recogniser per
// instruction) followed by OR plane (ctrl_or, one OR per control signal).
// Purely combinational; an unrecognised instruction yields all control
// signals low, so it writes nothing and the PC advances by 4. An immediate
// assertion checks that the AND plane never recognises two instructions.
module control
  import mips_pkg::*;
(
  input  opcode_t op,
  input  funct_t  funct,
  output ctrl_t   ctrl
);

  inst_dec_t dec;

  ctrl_and u_and (.op(op), .funct(funct), .dec(dec));
  ctrl_or  u_or  (.dec(dec), .ctrl(ctrl));

  // At most one instruction recogniser may be active at a time.
  always_comb assert ((dec & (dec - 1'b1)) == '0);

endmodule
