// ifetch: the instruction fetch unit of the single-cycle MIPS-lite CPU.
//
// Holds the program counter and the instruction memory. The PC register keeps
// only bits 31:2; its two low bits are constant 00 because instructions are
// word aligned. Each cycle the unit reads Instruction<31:0> = MEM[PC] and
// computes two candidates for the next PC:
//   PC + 4                          (first adder)
//   PC + 4 + (SignExt(imm16) || 00) (PC Ext, then second adder)
// The next-PC mux takes the branch target when nPC_sel AND zero are both
// high, that is, for a beq whose ALU compare found equal registers; all other
// instructions take PC + 4. nPC_sel therefore means "this is a branch", not a
// direct mux select. The PC loads the chosen value on the rising clock edge.
//
// rst (synchronous, active high) sets the PC to RESET_PC, a choice of this
// design. The ld_* port writes the instruction memory (word index) and is
// meant to be used while rst is held.
module ifetch #(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        npc_sel,
  input  logic        zero,
  input  logic [15:0] imm16,
  output logic [31:0] instr,
  output logic [31:0] pc,
  input  logic        ld_we,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_data
);

  logic [31:2] pc_q;
  logic [31:0] pc_plus4, pc_ext, br_target, pc_next;
  logic        take_branch;

  assign pc = {pc_q, 2'b00};

  always_comb begin
    pc_plus4    = pc + 32'd4;
    pc_ext      = {{14{imm16[15]}}, imm16, 2'b00};
    br_target   = pc_plus4 + pc_ext;
    take_branch = npc_sel & zero;
  end

  mux2 #(.WIDTH(32)) u_npc_mux (
    .sel(take_branch), .in0(pc_plus4), .in1(br_target), .y(pc_next)
  );

  always_ff @(posedge clk) begin
    if (rst) pc_q <= RESET_PC[31:2];
    else     pc_q <= pc_next[31:2];
  end

  inst_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .adr(pc), .instr(instr),
    .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data)
  );

endmodule
