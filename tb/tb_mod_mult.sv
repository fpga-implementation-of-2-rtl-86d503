// tb_mod_mult -- exhaustive modulo-65 multiplication over all residue pairs.
module tb_mod_mult;
  logic [6:0] a, b, p;
  int checks = 0, failures = 0;
  mod_mult #(.M(65)) dut (.a(a), .b(b), .prod(p));
  initial begin
    for (int x = 0; x < 65; x++)
      for (int y = 0; y < 65; y++) begin
        a = 7'(x); b = 7'(y); #1;
        checks++;
        if (int'(p) != (x * y) % 65) begin failures++; if (failures < 10) $display("FAIL %0d*%0d=%0d", x, y, p); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
