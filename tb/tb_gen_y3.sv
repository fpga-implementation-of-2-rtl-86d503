// tb_gen_y3 -- channel 2^n+1: y3 = |floor(X/2^r)|_(2^n+1) for random X, the
// special residue x3 = 2^n, and every r in 0..n, n = 7.
module tb_gen_y3;
  localparam int N = 7, RW = 3;
  localparam longint M1 = 127, M2 = 128, M3 = 129, MX = M1 * M2 * M3;
  logic [N-1:0] x2;
  logic [N:0] x3, y3;
  logic [RW-1:0] r, s;
  int checks = 0, failures = 0, x3_top = 0;
  gen_y3 #(.N(N)) dut (.x2(x2), .x3(x3), .r(r), .s(s), .y3(y3));
  initial begin
    for (int i = 0; i < 40000; i++) begin
      longint X; int rr;
      X = longint'($urandom()) % MX; rr = i % (N + 1);
      if ((i / 8) % 20 == 0) X = (longint'($urandom()) % (MX / M3)) * M3 + 128;
      x2 = N'(X % M2); x3 = (N+1)'(X % M3); r = RW'(rr); s = RW'(N - rr);
      if (x3[N]) x3_top++;
      #1;
      checks++;
      if (longint'(y3) != (X >> rr) % M3) begin failures++; if (failures < 10) $display("FAIL X=%0d r=%0d y3=%0d", X, rr, y3); end
    end
    checks++;
    if (x3_top == 0) begin failures++; $display("FAIL x3=2^n never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
