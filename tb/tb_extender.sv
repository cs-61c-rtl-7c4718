// tb_extender: checks zero and sign extension of edge and random immediates.
module tb_extender;
  int checks = 0, failures = 0;
  logic        ext_op;
  logic [15:0] imm16;
  logic [31:0] imm32;

  extender dut (.ext_op(ext_op), .imm16(imm16), .imm32(imm32));

  task automatic check_one(logic op, logic [15:0] v);
    int signed expect_s;
    ext_op = op; imm16 = v; #1;
    expect_s = op ? int'(signed'(v)) : int'(v);
    checks++;
    if (imm32 !== 32'(expect_s)) begin
      failures++; $display("FAIL ext_op=%0d imm16=%h got %h", op, v, imm32);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(0, 16'h0000); check_one(1, 16'h0000);
    check_one(0, 16'hffff); check_one(1, 16'hffff);
    check_one(0, 16'h8000); check_one(1, 16'h8000);
    check_one(0, 16'h7fff); check_one(1, 16'h7fff);
    for (int i = 0; i < 200; i++) check_one(1'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
