// tb_mips_lite_cpu: end-to-end test of the processor at its default sizes.
//
// Loads each program through the instruction-memory load port while reset
// is held, then runs it in lockstep with the reference model: every cycle
// the PC, the register write, the memory write and the jump flag must
// match, so each instruction completes in exactly one cycle. The directed
// program must reach its halt loop in the number of cycles worked out from
// its instruction count (CPI = 1) and leave the expected register and
// memory values. Then random programs follow. Each mechanism of the design
// is counted and must occur at least once: add, subtract, or-immediate,
// load, store, branch taken forward and backward, branch not taken,
// zero-extended and sign-extended immediates, a discarded write to
// register 0 and the jump opcode.
module tb_mips_lite_cpu;
  import mips_iss_pkg::*;

  localparam int N_RANDOM = 20;

  int checks = 0, failures = 0;
  logic        clk = 0, rst, ld_we, wb_we, mw_we, jump;
  logic [31:0] pc, instr, ld_addr, ld_data, wb_data, mw_addr, mw_data;
  logic [4:0]  wb_addr;
  mips_iss     iss = new();

  int n_add, n_sub, n_ori, n_lw, n_sw, n_beq_fwd, n_beq_back, n_beq_not;
  int n_zext_hi, n_sext_neg, n_r0_write, n_jump;

  mips_lite_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL pc=%h instr=%h: %s", pc, instr, what); end
  endtask

  function automatic void count(bit [31:0] ins, effect_t e);
    bit [5:0] op = ins[31:26];
    if (op == 6'h00 && ins[5:0] == 6'h20) n_add++;
    if (op == 6'h00 && ins[5:0] == 6'h22) n_sub++;
    if (op == 6'h0d) begin n_ori++; if (ins[15]) n_zext_hi++; end
    if (op == 6'h23) n_lw++;
    if (op == 6'h2b) n_sw++;
    if ((op == 6'h23 || op == 6'h2b) && ins[15]) n_sext_neg++;
    if (op == 6'h04) begin
      if (!e.branch_taken) n_beq_not++;
      else if (ins[15])    n_beq_back++;
      else                 n_beq_fwd++;
    end
    if (e.wb_we && e.wb_addr == 0) n_r0_write++;
    if (op == 6'h02) n_jump++;
  endfunction

  task automatic run(bit [31:0] prog[$], int halt_idx, output int cycles);
    effect_t e;
    cycles = 0;
    rst = 1; ld_we = 1;
    foreach (prog[i]) begin ld_addr = i; ld_data = prog[i]; @(posedge clk); #1; end
    ld_we = 0; @(posedge clk); #1; rst = 0;
    iss.reset();
    while (pc != 32'(4 * halt_idx) && cycles < 4000) begin
      #1;
      check(pc == iss.pc, $sformatf("pc expected %h", iss.pc));
      e = iss.step(instr);
      count(instr, e);
      check(jump == (instr[31:26] == 6'h02), "jump flag");
      check(wb_we == e.wb_we, "register write enable");
      if (e.wb_we) check(wb_addr == e.wb_addr && (e.mem_unknown || wb_data == e.wb_data),
                         $sformatf("register write r%0d=%h expected r%0d=%h", wb_addr, wb_data, e.wb_addr, e.wb_data));
      check(mw_we == e.mw_we, "memory write enable");
      if (e.mw_we) check(mw_addr == e.mw_addr && mw_data == e.mw_data,
                         $sformatf("memory write [%h]=%h expected [%h]=%h", mw_addr, mw_data, e.mw_addr, e.mw_data));
      @(posedge clk); #1;
      cycles++;
    end
    check(pc == 32'(4 * halt_idx), "program did not reach its halt loop");
    repeat (3) begin @(posedge clk); #1; check(pc == 32'(4 * halt_idx), "halt loop left"); end
  endtask

  task automatic expect_count(string name, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", name); end
    else $display("  %-28s %0d", name, n);
  endtask

  initial begin
    bit [31:0] prog[$];
    int halt_idx, cycles, total_cycles = 0;

    directed_program(prog, halt_idx);
    run(prog, halt_idx, cycles);
    total_cycles += cycles;
    check(cycles == DIRECTED_CYCLES,
          $sformatf("directed program took %0d cycles, expected %0d", cycles, DIRECTED_CYCLES));
    check(dut.u_dp.u_rf.regs[10] == 32'h0000_BEEF && dut.u_dp.u_rf.regs[11] == 32'h0000_1234,
          "swap result in $10/$11");
    check(dut.u_dp.u_dmem.mem[4] == 32'h0000_BEEF && dut.u_dp.u_dmem.mem[5] == 32'h0000_1234,
          "swapped words in memory");
    check(dut.u_dp.u_rf.regs[12] == 32'h0000_1234, "load with negative offset");
    check(dut.u_dp.u_rf.regs[13] == 32'hFFFF_EDCC, "0 - 0x1234");
    check(dut.u_dp.u_dmem.mem[0] == 32'd15, "loop sum 1+..+5 at address 0");

    for (int k = 0; k < N_RANDOM; k++) begin
      random_program(prog, 300, halt_idx);
      run(prog, halt_idx, cycles);
      total_cycles += cycles;
    end

    $display("cycles run (one instruction each): %0d", total_cycles);
    expect_count("addu", n_add);
    expect_count("subu", n_sub);
    expect_count("ori", n_ori);
    expect_count("ori, zero-extended imm[15]=1", n_zext_hi);
    expect_count("lw", n_lw);
    expect_count("sw", n_sw);
    expect_count("lw/sw, negative offset", n_sext_neg);
    expect_count("beq taken forward", n_beq_fwd);
    expect_count("beq taken backward", n_beq_back);
    expect_count("beq not taken", n_beq_not);
    expect_count("write to register 0", n_r0_write);
    expect_count("jump opcode", n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
