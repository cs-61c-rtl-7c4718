// tb_data_mem: fills a small data memory, then random reads and writes
// against a model. Checks the combinational read, the clocked write, that
// WrEn low writes nothing and that the low two address bits are ignored.
module tb_data_mem;
  localparam int WORDS = 64;
  int checks = 0, failures = 0;
  logic        clk = 0, wr_en;
  logic [31:0] adr, data_in, data_out;
  logic [31:0] model [WORDS];

  data_mem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1;
    for (int i = 0; i < WORDS; i++) begin
      adr = 32'(i * 4); data_in = $urandom; model[i] = data_in;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 1000; i++) begin
      wr_en = 1'($urandom); adr = {24'd0, 6'($urandom), 2'($urandom)}; data_in = $urandom;
      #1;
      checks++;
      if (data_out !== model[adr[7:2]]) begin
        failures++; $display("FAIL read adr=%h got %h exp %h", adr, data_out, model[adr[7:2]]);
      end
      @(posedge clk);
      if (wr_en) model[adr[7:2]] = data_in;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
