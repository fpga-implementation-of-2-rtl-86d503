// tb_gen_y1 -- channel 2^n-1: y1 = |floor(X/2^r)|_(2^n-1) for random X and
// every r in 0..n, n = 7 (s = n - r supplied by the testbench).
module tb_gen_y1;
  localparam int N = 7, RW = 3;
  localparam longint M1 = 127, M2 = 128, M3 = 129, MX = M1 * M2 * M3;
  logic [N-1:0] x1, x2, y1;
  logic [RW-1:0] r, s;
  int checks = 0, failures = 0;
  gen_y1 #(.N(N)) dut (.x1(x1), .x2(x2), .r(r), .s(s), .y1(y1));
  initial begin
    for (int i = 0; i < 40000; i++) begin
      longint X; int rr;
      X = longint'($urandom()) % MX; rr = i % (N + 1);
      x1 = N'(X % M1); x2 = N'(X % M2); r = RW'(rr); s = RW'(N - rr);
      #1;
      checks++;
      if (longint'(y1) != (X >> rr) % M1) begin failures++; if (failures < 10) $display("FAIL X=%0d r=%0d y1=%0d", X, rr, y1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
