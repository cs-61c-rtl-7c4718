// mips_pkg: shared types and constants of the single-cycle MIPS-lite CPU.
//
// The processor executes six instructions: addu, subu, ori, lw, sw and beq.
// Opcode and funct values below are the ones in the controller truth table
// (ori 00 1101, lw 10 0011, sw 10 1011, beq 00 0100, R-type 00 0000 with
// funct 10 0000 for add and 10 0010 for subtract). The jump opcode 00 0010 is
// recognised by the controller because its equations name it, but this
// datapath has no jump path.
//
// The ALU control is two bits wide, encoded 00 ADD, 01 SUB, 10 OR, as the
// controller equations assume. The control signals travel from controller to
// datapath as one packed struct, ctrl_t.
package mips_pkg;

  localparam int unsigned XLEN     = 32;  // bus width printed on every datapath bus
  localparam int unsigned REG_AW   = 5;   // register specifier width (rs, rt, rd)
  localparam int unsigned NUM_REGS = 32;  // 2**REG_AW registers

  typedef logic [5:0] opcode_t;
  typedef logic [5:0] funct_t;

  localparam opcode_t OP_RTYPE = 6'b00_0000;
  localparam opcode_t OP_J     = 6'b00_0010;
  localparam opcode_t OP_BEQ   = 6'b00_0100;
  localparam opcode_t OP_ORI   = 6'b00_1101;
  localparam opcode_t OP_LW    = 6'b10_0011;
  localparam opcode_t OP_SW    = 6'b10_1011;

  localparam funct_t FN_ADD = 6'b10_0000;
  localparam funct_t FN_SUB = 6'b10_0010;

  // ALUctr: 00 ADD, 01 SUB, 10 OR; 11 is not used by any instruction.
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10
  } alu_ctr_e;

  // Instruction fields. R-type: op rs rt rd shamt funct; I-type: op rs rt imm16.
  typedef struct packed {
    opcode_t     op;     // <31:26>
    logic [4:0]  rs;     // <25:21>
    logic [4:0]  rt;     // <20:16>
    logic [4:0]  rd;     // <15:11>
    logic [4:0]  shamt;  // <10:6>
    funct_t      funct;  // <5:0>
  } rtype_t;

  typedef struct packed {
    opcode_t     op;     // <31:26>
    logic [4:0]  rs;     // <25:21>
    logic [4:0]  rt;     // <20:16>
    logic [15:0] imm16;  // <15:0>
  } itype_t;

  // One-hot outputs of the controller's AND plane.
  typedef struct packed {
    logic add;
    logic sub;
    logic ori;
    logic lw;
    logic sw;
    logic beq;
    logic jump;
  } inst_dec_t;

  // Control points of the datapath, driven by the controller's OR plane.
  typedef struct packed {
    logic     reg_dst;    // 0: write rt, 1: write rd
    logic     alu_src;    // 0: busB,     1: extended immediate
    logic     memto_reg;  // 0: ALU,      1: data memory
    logic     reg_write;  // 1: write the register file
    logic     mem_write;  // 1: write the data memory
    logic     npc_sel;    // 1: branch instruction (taken when ALU zero)
    logic     jump;       // jump recognised (no jump path in this datapath)
    logic     ext_op;     // 0: zero-extend, 1: sign-extend
    alu_ctr_e alu_ctr;
  } ctrl_t;

endpackage
