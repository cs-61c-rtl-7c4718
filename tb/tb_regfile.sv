// tb_regfile: random reads and writes against an array model. Checks that
// reset clears all registers, that a write lands at the clock edge (the old
// value is read before it), that RegWr low writes nothing and that register
// 0 stays zero.
module tb_regfile;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, reg_wr;
  logic [4:0]  rw, ra, rb;
  logic [31:0] bus_w, bus_a, bus_b;
  logic [31:0] model [32];

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; reg_wr = 0; rw = 0; ra = 0; rb = 0; bus_w = 0;
    @(posedge clk); #1 rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); #1;
      checks++; if (bus_a !== 0 || bus_b !== 0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int i = 0; i < 2000; i++) begin
      reg_wr = 1'($urandom); rw = 5'($urandom); bus_w = $urandom;
      ra = ($urandom % 4 == 0) ? rw : 5'($urandom); rb = 5'($urandom);
      #1;
      checks++;
      if (bus_a !== model[ra] || bus_b !== model[rb]) begin
        failures++; $display("FAIL read ra=%0d a=%h exp %h rb=%0d b=%h exp %h", ra, bus_a, model[ra], rb, bus_b, model[rb]);
      end
      @(posedge clk);
      if (reg_wr && rw != 0) model[rw] = bus_w;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
