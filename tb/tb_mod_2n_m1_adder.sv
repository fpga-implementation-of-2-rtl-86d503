// tb_mod_2n_m1_adder -- exhaustive check of the modulo 2^7-1 adder and a
// random check of the 2^14-1 instance; outputs must be canonical (< modulus).
module tb_mod_2n_m1_adder;
  logic [6:0]  a7, b7, s7;
  logic [13:0] a14, b14, s14;
  int checks = 0, failures = 0;
  mod_2n_m1_adder #(.W(7))  dut7  (.a(a7), .b(b7), .sum(s7));
  mod_2n_m1_adder #(.W(14)) dut14 (.a(a14), .b(b14), .sum(s14));
  initial begin
    for (int x = 0; x < 128; x++)
      for (int y = 0; y < 128; y++) begin
        a7 = 7'(x); b7 = 7'(y); #1;
        checks++;
        if (int'(s7) != (x + y) % 127) begin failures++; if (failures < 10) $display("FAIL7 %0d+%0d=%0d", x, y, s7); end
      end
    for (int i = 0; i < 20000; i++) begin
      a14 = 14'($urandom()); b14 = 14'($urandom());
      if (i == 0) begin a14 = 14'd16383; b14 = 14'd16383; end
      if (i == 1) begin a14 = 14'd16382; b14 = 14'd1; end
      #1;
      checks++;
      if (int'(s14) != (int'(a14) + int'(b14)) % 16383) begin failures++; if (failures < 10) $display("FAIL14 %0d+%0d=%0d", a14, b14, s14); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
