// tb_bit_rewiring -- for random X < (2^2n-1)2^n, n = 7, checks that
// n1 + n2 + n3 = floor(X/2^n) (mod 2^2n - 1); includes x3 = 2^n cases.
module tb_bit_rewiring;
  localparam int N = 7;
  localparam longint M1 = 127, M2 = 128, M3 = 129, MQ = 16383, MX = M1 * M2 * M3;
  logic [N-1:0] x1, x2;
  logic [N:0] x3;
  logic [2*N-1:0] n1, n2, n3;
  int checks = 0, failures = 0, x3_top = 0;
  bit_rewiring #(.N(N)) dut (.x1(x1), .x2(x2), .x3(x3), .n1(n1), .n2(n2), .n3(n3));
  initial begin
    for (int i = 0; i < 30000; i++) begin
      longint X;
      X = longint'($urandom()) % MX;
      if (i % 50 == 0) X = (longint'($urandom()) % (MX / M3)) * M3 + 128;  // x3 = 2^n
      x1 = N'(X % M1); x2 = N'(X % M2); x3 = (N+1)'(X % M3);
      if (x3[N]) x3_top++;
      #1;
      checks++;
      if ((longint'(n1) + longint'(n2) + longint'(n3)) % MQ != (X >> N) % MQ) begin
        failures++; if (failures < 10) $display("FAIL X=%0d", X);
      end
    end
    checks++;
    if (x3_top == 0) begin failures++; $display("FAIL x3=2^n never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
