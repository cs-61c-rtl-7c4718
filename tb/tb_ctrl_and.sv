// tb_ctrl_and: all 4096 op/funct combinations; exactly the matching
// instruction recogniser must be high.
module tb_ctrl_and;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  opcode_t   op;
  funct_t    funct;
  inst_dec_t dec, exp_dec;

  ctrl_and dut (.op(op), .funct(funct), .dec(dec));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f++) begin
        op = 6'(o); funct = 6'(f); #1;
        exp_dec = '0;
        case (o)
          0:  begin exp_dec.add = (f == 32); exp_dec.sub = (f == 34); end
          2:  exp_dec.jump = 1;
          4:  exp_dec.beq  = 1;
          13: exp_dec.ori  = 1;
          35: exp_dec.lw   = 1;
          43: exp_dec.sw   = 1;
          default: ;
        endcase
        checks++;
        if (dec !== exp_dec) begin
          failures++; $display("FAIL op=%0d funct=%0d dec=%b exp=%b", o, f, dec, exp_dec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
