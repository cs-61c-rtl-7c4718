// tb_datapath: runs the datapath with its control points driven from the
// controller truth table by the testbench itself, so the datapath is tested
// apart from the control module. The directed program and two random
// programs execute in lockstep with the reference model: every cycle the
// PC, the register write and the memory write must match. Small memories
// keep the run short.
module tb_datapath;
  import mips_pkg::*;
  import mips_iss_pkg::*;
  import ctrl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic        clk = 0, rst, ld_we, wb_we, mw_we;
  logic [31:0] instr, pc, ld_addr, ld_data, wb_data, mw_addr, mw_data;
  logic [4:0]  wb_addr;
  ctrl_t       ctrl;
  mips_iss     iss = new();

  datapath #(.IMEM_WORDS(256), .DMEM_WORDS(64)) dut (.*);

  always_comb ctrl = expect_ctrl(instr[31:26], instr[5:0]).value;

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL pc=%h instr=%h: %s", pc, instr, what); end
  endtask

  task automatic run(bit [31:0] prog[$], int halt_idx);
    effect_t e;
    int cycles = 0;
    rst = 1; ld_we = 1;
    foreach (prog[i]) begin ld_addr = i; ld_data = prog[i]; @(posedge clk); #1; end
    ld_we = 0; @(posedge clk); #1; rst = 0;
    iss.reset();
    while (pc != 32'(4 * halt_idx) && cycles < 4000) begin
      #1;
      check(pc == iss.pc, $sformatf("pc expected %h", iss.pc));
      e = iss.step(instr);
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
    // The halt loop is a taken beq to itself.
    repeat (3) begin @(posedge clk); #1; check(pc == 32'(4 * halt_idx), "halt loop left"); end
  endtask

  initial begin
    bit [31:0] prog[$];
    int halt_idx;
    directed_program(prog, halt_idx);
    run(prog, halt_idx);
    check(iss.mem[0] == 15 && dut.u_dmem.mem[0] == 15, "loop sum stored at address 0");
    for (int k = 0; k < 2; k++) begin
      random_program(prog, 150, halt_idx);
      run(prog, halt_idx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
