// tb_alu: checks ADD, SUB and OR results and the zero flag, with random
// operands and with equal operands (the beq case).
module tb_alu;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  alu_ctr_e    ctr;
  logic [31:0] a, b, result;
  logic        zero;

  alu dut (.alu_ctr(ctr), .a(a), .b(b), .result(result), .zero(zero));

  task automatic check_one(alu_ctr_e c, logic [31:0] x, logic [31:0] y);
    longint unsigned expect_l;
    logic [31:0] expect_r;
    ctr = c; a = x; b = y; #1;
    case (c)
      ALU_ADD: expect_l = longint'(x) + longint'(y);
      ALU_SUB: expect_l = longint'(x) + (64'h1_0000_0000 - longint'(y));
      default: expect_l = longint'(x | y);
    endcase
    expect_r = expect_l[31:0];
    checks++;
    if (result !== expect_r || zero !== (expect_r == 0)) begin
      failures++; $display("FAIL ctr=%s a=%h b=%h got %h z=%0d", c.name(), x, y, result, zero);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    check_one(ALU_ADD, 32'hffff_ffff, 32'd1);
    check_one(ALU_SUB, 32'd0, 32'd1);
    check_one(ALU_OR, 32'd0, 32'd0);
    for (int i = 0; i < 300; i++) begin
      v = $urandom;
      check_one(ALU_ADD, $urandom, $urandom);
      check_one(ALU_SUB, $urandom, $urandom);
      check_one(ALU_OR,  $urandom, $urandom);
      check_one(ALU_SUB, v, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
