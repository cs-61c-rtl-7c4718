// tb_mux2: random test of the two-input multiplexer at widths 32 and 5.
module tb_mux2;
  int checks = 0, failures = 0;
  logic        sel;
  logic [31:0] a, b, y;
  logic [4:0]  a5, b5, y5;

  mux2 #(.WIDTH(32)) dut   (.sel(sel), .in0(a),  .in1(b),  .y(y));
  mux2 #(.WIDTH(5))  dut5  (.sel(sel), .in0(a5), .in1(b5), .y(y5));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel = 1'($urandom); a = $urandom; b = $urandom; a5 = 5'($urandom); b5 = 5'($urandom);
      #1;
      checks++; if (y  !== (sel ? b  : a))  begin failures++; $display("mux32 sel=%0d y=%h", sel, y); end
      checks++; if (y5 !== (sel ? b5 : a5)) begin failures++; $display("mux5 sel=%0d y=%h", sel, y5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
