// tb_inst_mem: loads a random program through the load port and reads it
// back at byte addresses, checking word selection by adr[.. :2].
module tb_inst_mem;
  localparam int WORDS = 128;
  int checks = 0, failures = 0;
  logic        clk = 0, ld_we;
  logic [31:0] adr, instr, ld_addr, ld_data;
  logic [31:0] model [WORDS];

  inst_mem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adr = 0; ld_we = 1;
    for (int i = 0; i < WORDS; i++) begin
      ld_addr = i; ld_data = $urandom; model[i] = ld_data;
      @(posedge clk); #1;
    end
    ld_we = 0; ld_data = 32'hdead_beef;
    for (int i = 0; i < 500; i++) begin
      adr = {23'd0, 7'($urandom), 2'b00}; ld_addr = $urandom % WORDS;
      @(posedge clk); #1;
      checks++;
      if (instr !== model[adr[8:2]]) begin
        failures++; $display("FAIL adr=%h got %h exp %h", adr, instr, model[adr[8:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
