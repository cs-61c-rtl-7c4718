// tb_ctrl_or: each one-hot instruction recogniser, and none, compared with
// the controller truth table.
module tb_ctrl_or;
  import mips_pkg::*;
  import ctrl_ref_pkg::*;
  int checks = 0, failures = 0;
  inst_dec_t dec;
  ctrl_t     ctrl;

  ctrl_or dut (.dec(dec), .ctrl(ctrl));

  task automatic check_one(inst_dec_t d, bit [5:0] op, bit [5:0] fn);
    dec = d; #1;
    checks++;
    if (!ctrl_ok(ctrl, expect_ctrl(op, fn))) begin
      failures++; $display("FAIL dec=%b ctrl=%p", d, ctrl);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inst_dec_t d;
    d = '0; d.add  = 1; check_one(d, 6'h00, 6'h20);
    d = '0; d.sub  = 1; check_one(d, 6'h00, 6'h22);
    d = '0; d.ori  = 1; check_one(d, 6'h0d, 6'h00);
    d = '0; d.lw   = 1; check_one(d, 6'h23, 6'h00);
    d = '0; d.sw   = 1; check_one(d, 6'h2b, 6'h00);
    d = '0; d.beq  = 1; check_one(d, 6'h04, 6'h00);
    d = '0; d.jump = 1; check_one(d, 6'h02, 6'h00);
    d = '0;             check_one(d, 6'h3f, 6'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
