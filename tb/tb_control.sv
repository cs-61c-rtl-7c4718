// tb_control: every opcode with the two R-type functs and random functs,
// compared with the controller truth table (don't-care entries ignored).
module tb_control;
  import mips_pkg::*;
  import ctrl_ref_pkg::*;
  int checks = 0, failures = 0;
  opcode_t op;
  funct_t  funct;
  ctrl_t   ctrl;

  control dut (.op(op), .funct(funct), .ctrl(ctrl));

  task automatic check_one(opcode_t o, funct_t f);
    op = o; funct = f; #1;
    checks++;
    if (!ctrl_ok(ctrl, expect_ctrl(o, f))) begin
      failures++; $display("FAIL op=%b funct=%b ctrl=%p", o, f, ctrl);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) begin
      check_one(6'(o), FN_ADD);
      check_one(6'(o), FN_SUB);
      for (int k = 0; k < 8; k++) check_one(6'(o), 6'($urandom));
    end
    for (int f = 0; f < 64; f++) check_one(OP_RTYPE, 6'(f));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
