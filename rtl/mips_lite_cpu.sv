// mips_lite_cpu: a single-cycle processor for the MIPS-lite subset
// (addu, subu, ori, lw, sw, beq).
//
// The top joins the controller (control) and the datapath (datapath). Every
// instruction completes in exactly one clock cycle: the controller decodes
// op <31:26> and funct <5:0> of the instruction the datapath fetched, and the
// datapath executes it and updates PC, register file and data memory at the
// next rising edge. CPI is 1; the clock period must cover the slowest
// instruction, lw.
//
// Interface:
//   clk, rst           clock; synchronous active-high reset (PC <= RESET_PC,
//                      registers <= 0)
//   ld_we/addr/data    write one word (word index) of instruction memory;
//                      use while rst is high to load a program
//   pc, instr          the instruction executing this cycle; pc[1:0] is
//                      always 00 (word-aligned fetch)
//   wb_*               this cycle's register write (enable, register, data)
//   mw_*               this cycle's memory write (enable, byte address, data)
//   jump               the controller recognised the jump opcode 00 0010;
//                      there is no jump path, so it otherwise runs as a no-op
module mips_lite_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ld_we,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_data,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        wb_we,
  output logic [4:0]  wb_addr,
  output logic [31:0] wb_data,
  output logic        mw_we,
  output logic [31:0] mw_addr,
  output logic [31:0] mw_data,
  output logic        jump
);

  ctrl_t ctrl;

  control u_ctrl (
    .op(instr[31:26]), .funct(instr[5:0]), .ctrl(ctrl)
  );

  datapath #(
    .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS), .RESET_PC(RESET_PC)
  ) u_dp (
    .clk(clk), .rst(rst), .ctrl(ctrl), .instr(instr), .pc(pc),
    .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data),
    .wb_we(wb_we), .wb_addr(wb_addr), .wb_data(wb_data),
    .mw_we(mw_we), .mw_addr(mw_addr), .mw_data(mw_data)
  );

  assign jump = ctrl.jump;

endmodule
