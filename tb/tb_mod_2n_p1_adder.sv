// tb_mod_2n_p1_adder -- exhaustive check of the modulo 2^7+1 adder.
module tb_mod_2n_p1_adder;
  logic [6:0] a, b;
  logic [7:0] s;
  int checks = 0, failures = 0;
  mod_2n_p1_adder #(.W(7)) dut (.a(a), .b(b), .sum(s));
  initial begin
    for (int x = 0; x < 128; x++)
      for (int y = 0; y < 128; y++) begin
        a = 7'(x); b = 7'(y); #1;
        checks++;
        if (int'(s) != (x + y) % 129) begin failures++; if (failures < 10) $display("FAIL %0d+%0d=%0d", x, y, s); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
