// datapath: the single-cycle MIPS-lite datapath.
//
// One instruction passes through every unit in one clock cycle:
//   ifetch    supplies Instruction<31:0> and holds the PC;
//   regfile   reads busA = R[rs] and busB = R[rt];
//   extender  widens imm16 (ExtOp zero/sign);
//   ALUSrc    mux feeds the ALU busB or the immediate;
//   alu       adds, subtracts or ORs and reports zero;
//   data_mem  is addressed by the ALU result, written with busB;
//   MemtoReg  mux picks ALU result or memory data for busW;
//   RegDst    mux picks rt or rd as the register written.
// At the rising clock edge the register file, the data memory and the PC are
// updated together. The control points arrive as ctrl (from control); the
// instruction goes back out so the controller can decode op and funct.
//
// The wb_* and mw_* outputs show the register write and memory write of the
// current instruction (the write enables, destinations and data as they
// appear at the units' ports), so a host can trace execution. jump is
// decoded by the controller but this datapath has no jump path.
module datapath
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic              clk,
  input  logic              rst,
  input  ctrl_t             ctrl,
  output logic [31:0]       instr,
  output logic [31:0]       pc,
  input  logic              ld_we,
  input  logic [31:0]       ld_addr,
  input  logic [31:0]       ld_data,
  output logic              wb_we,
  output logic [REG_AW-1:0] wb_addr,
  output logic [31:0]       wb_data,
  output logic              mw_we,
  output logic [31:0]       mw_addr,
  output logic [31:0]       mw_data
);

  rtype_t            r;
  logic [REG_AW-1:0] rw;
  logic [31:0]       bus_a, bus_b, bus_w, imm32, alu_b, alu_out, mem_out;
  logic              zero;

  assign r = rtype_t'(instr);

  ifetch #(.IMEM_WORDS(IMEM_WORDS), .RESET_PC(RESET_PC)) u_ifetch (
    .clk(clk), .rst(rst), .npc_sel(ctrl.npc_sel), .zero(zero),
    .imm16(instr[15:0]), .instr(instr), .pc(pc),
    .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data)
  );

  mux2 #(.WIDTH(REG_AW)) u_regdst_mux (
    .sel(ctrl.reg_dst), .in0(r.rt), .in1(r.rd), .y(rw)
  );

  regfile u_rf (
    .clk(clk), .rst(rst), .reg_wr(ctrl.reg_write), .rw(rw),
    .ra(r.rs), .rb(r.rt), .bus_w(bus_w), .bus_a(bus_a), .bus_b(bus_b)
  );

  extender u_ext (.ext_op(ctrl.ext_op), .imm16(instr[15:0]), .imm32(imm32));

  mux2 #(.WIDTH(32)) u_alusrc_mux (
    .sel(ctrl.alu_src), .in0(bus_b), .in1(imm32), .y(alu_b)
  );

  alu u_alu (
    .alu_ctr(ctrl.alu_ctr), .a(bus_a), .b(alu_b), .result(alu_out), .zero(zero)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .wr_en(ctrl.mem_write), .adr(alu_out), .data_in(bus_b),
    .data_out(mem_out)
  );

  mux2 #(.WIDTH(32)) u_memtoreg_mux (
    .sel(ctrl.memto_reg), .in0(alu_out), .in1(mem_out), .y(bus_w)
  );

  assign wb_we   = ctrl.reg_write;
  assign wb_addr = rw;
  assign wb_data = bus_w;
  assign mw_we   = ctrl.mem_write;
  assign mw_addr = alu_out;
  assign mw_data = bus_b;

endmodule
