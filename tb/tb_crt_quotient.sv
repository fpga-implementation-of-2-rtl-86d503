// tb_crt_quotient -- checks q = floor(X/2^n) exactly for random X and corner
// values (0, max, x3 = 2^n), n = 7.
module tb_crt_quotient;
  localparam int N = 7;
  localparam longint M1 = 127, M2 = 128, M3 = 129, MX = M1 * M2 * M3;
  logic [N-1:0] x1, x2;
  logic [N:0] x3;
  logic [2*N-1:0] q;
  int checks = 0, failures = 0;
  crt_quotient #(.N(N)) dut (.x1(x1), .x2(x2), .x3(x3), .q(q));
  initial begin
    for (int i = 0; i < 30000; i++) begin
      longint X;
      X = longint'($urandom()) % MX;
      if (i == 0) X = 0;
      if (i == 1) X = MX - 1;
      if (i == 2) X = 429872;
      if (i % 50 == 3) X = (longint'($urandom()) % (MX / M3)) * M3 + 128;
      x1 = N'(X % M1); x2 = N'(X % M2); x3 = (N+1)'(X % M3);
      #1;
      checks++;
      if (longint'(q) != (X >> N)) begin failures++; if (failures < 10) $display("FAIL X=%0d q=%0d", X, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
