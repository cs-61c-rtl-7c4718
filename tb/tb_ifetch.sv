// tb_ifetch: loads random words into the instruction memory, then drives
// nPC_sel, zero and imm16 at random and checks each cycle's PC and
// instruction against a model: PC+4, or PC+4+SignExt(imm16)*4 only when
// nPC_sel and zero are both high. Also checks the PC after reset.
module tb_ifetch;
  localparam int WORDS = 64;
  int checks = 0, failures = 0, taken = 0;
  logic        clk = 0, rst, npc_sel, zero, ld_we;
  logic [15:0] imm16;
  logic [31:0] instr, pc, ld_addr, ld_data;
  logic [31:0] model [WORDS];
  logic [31:0] exp_pc;

  ifetch #(.IMEM_WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; npc_sel = 0; zero = 0; imm16 = 0; ld_we = 1;
    for (int i = 0; i < WORDS; i++) begin
      ld_addr = i; ld_data = $urandom; model[i] = ld_data;
      @(posedge clk); #1;
    end
    ld_we = 0; rst = 0; exp_pc = 0;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset pc=%h", pc); end
    for (int i = 0; i < 2000; i++) begin
      npc_sel = 1'($urandom); zero = 1'($urandom);
      imm16 = 16'($signed(5'($urandom)));   // small offsets, both directions
      #1;
      checks++;
      if (pc !== exp_pc || instr !== model[exp_pc[7:2]]) begin
        failures++; $display("FAIL pc=%h exp %h instr=%h exp %h", pc, exp_pc, instr, model[exp_pc[7:2]]);
      end
      if (npc_sel && zero) begin
        exp_pc = exp_pc + 4 + {{14{imm16[15]}}, imm16, 2'b00};
        taken++;
      end else exp_pc = exp_pc + 4;
      @(posedge clk); #1;
    end
    checks++; if (taken == 0) begin failures++; $display("FAIL no branch taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
