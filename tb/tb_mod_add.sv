// tb_mod_add -- exhaustive modulo-65 addition over all residue pairs.
module tb_mod_add;
  logic [6:0] a, b, s;
  int checks = 0, failures = 0;
  mod_add #(.M(65)) dut (.a(a), .b(b), .sum(s));
  initial begin
    for (int x = 0; x < 65; x++)
      for (int y = 0; y < 65; y++) begin
        a = 7'(x); b = 7'(y); #1;
        checks++;
        if (int'(s) != (x + y) % 65) begin failures++; if (failures < 10) $display("FAIL %0d+%0d=%0d", x, y, s); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
