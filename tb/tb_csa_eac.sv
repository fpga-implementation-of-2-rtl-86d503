// tb_csa_eac -- random check that s + cy = a + b + c modulo 2^14 - 1.
module tb_csa_eac;
  localparam int W = 14;
  localparam longint MOD = (longint'(1) << W) - 1;
  logic [W-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0;
  csa_eac #(.W(W)) dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));
  initial begin
    for (int i = 0; i < 20000; i++) begin
      a = W'($urandom()); b = W'($urandom()); c = W'($urandom());
      if (i == 0) begin a = '1; b = '1; c = '1; end
      #1;
      checks++;
      if ((longint'(s) + longint'(cy)) % MOD != (longint'(a) + longint'(b) + longint'(c)) % MOD ||
          s != (a ^ b ^ c)) begin
        failures++; if (failures < 10) $display("FAIL a=%0d b=%0d c=%0d", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
