// tb_rns_scaler3 -- three-moduli scaler, n = 7 ({127, 128, 129}): random X
// and every r in 0..n; checks y1, y2, y3, the binary quotient y_bin and x_bin.
// Also replays the worked example X = 429872, r = 3 -> (13, 102, 70).
module tb_rns_scaler3;
  localparam int N = 7, RW = 3;
  localparam longint M1 = 127, M2 = 128, M3 = 129, MX = M1 * M2 * M3;
  logic [N-1:0] x1, x2, y1, y2;
  logic [N:0] x3, y3;
  logic [RW-1:0] r, s;
  logic [3*N-1:0] y_bin, x_bin;
  int checks = 0, failures = 0;
  rns_scaler3 #(.N(N)) dut (.x1(x1), .x2(x2), .x3(x3), .r(r), .s(s),
                            .y1(y1), .y2(y2), .y3(y3), .y_bin(y_bin), .x_bin(x_bin));
  task automatic apply(longint X, int rr);
    longint Y;
    x1 = N'(X % M1); x2 = N'(X % M2); x3 = (N+1)'(X % M3); r = RW'(rr); s = RW'(N - rr);
    #1;
    Y = X >> rr;
    checks++;
    if (longint'(y1) != Y % M1 || longint'(y2) != Y % M2 || longint'(y3) != Y % M3 ||
        longint'(y_bin) != Y || longint'(x_bin) != X) begin
      failures++;
      if (failures < 10) $display("FAIL X=%0d r=%0d got (%0d,%0d,%0d) bin=%0d", X, rr, y1, y2, y3, y_bin);
    end
  endtask
  initial begin
    apply(429872, 3);
    checks++;
    if (y1 != 7'd13 || y2 != 7'd102 || y3 != 8'd70) begin failures++; $display("FAIL worked example"); end
    for (int i = 0; i < 40000; i++) begin
      longint X;
      X = longint'($urandom()) % MX;
      if (i % 40 == 0) X = (longint'($urandom()) % (MX / M3)) * M3 + 128;
      apply(X, i % (N + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
