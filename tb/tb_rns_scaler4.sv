// tb_rns_scaler4 -- end-to-end test of the four-moduli 2^r variable scaler at
// its default size (n = 7, moduli {127, 128, 129, 65}).
//
// A random integer X below the dynamic range M = 127*128*129*65 is converted
// to residues by the testbench, scaled by the design for a rotating r, and the
// outputs are compared with the residues of floor(X/2^r) computed in plain
// integer arithmetic. The worked examples (X = 425629 scaled by 2, 4, 8, 32 and
// X = 429872 scaled by 8) are replayed with their published results. The
// testbench counts how often each mechanism occurs and fails if one never
// does: every scaling exponent r = 0..n, the special residue x3 = 2^n (the
// Q1/Q3 gating and the N4 vector), a non-zero mixed-radix digit T (x4 folds a
// correction into y2 and y4) and T = 0.
module tb_rns_scaler4;
  localparam int N = 7, RW = 3;
  localparam longint M1 = 127, M2 = 128, M3 = 129, M4 = 65;
  localparam longint M123 = M1 * M2 * M3, MX = M123 * M4;
  logic [N-1:0] x1, x2, y1, y2;
  logic [N:0] x3, y3;
  logic [6:0] x4, y4;
  logic [RW-1:0] r;
  int checks = 0, failures = 0;
  int r_seen [N+1];
  int x3_top = 0, t_nonzero = 0, t_zero = 0;

  rns_scaler4 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .r(r),
                   .y1(y1), .y2(y2), .y3(y3), .y4(y4));

  task automatic apply(longint X, int rr);
    longint Y;
    x1 = N'(X % M1); x2 = N'(X % M2); x3 = (N+1)'(X % M3); x4 = 7'(X % M4); r = RW'(rr);
    #1;
    r_seen[rr]++;
    if (x3[N]) x3_top++;
    if (X >= M123) t_nonzero++; else t_zero++;
    Y = X >> rr;
    checks++;
    if (longint'(y1) != Y % M1 || longint'(y2) != Y % M2 ||
        longint'(y3) != Y % M3 || longint'(y4) != Y % M4) begin
      failures++;
      if (failures < 10)
        $display("FAIL X=%0d r=%0d got (%0d,%0d,%0d,%0d) exp (%0d,%0d,%0d,%0d)", X, rr,
                 y1, y2, y3, y4, Y % M1, Y % M2, Y % M3, Y % M4);
    end
  endtask

  task automatic expect4(int e1, int e2, int e3, int e4);
    checks++;
    if (int'(y1) != e1 || int'(y2) != e2 || int'(y3) != e3 || int'(y4) != e4) begin
      failures++;
      $display("FAIL example: got (%0d,%0d,%0d,%0d) exp (%0d,%0d,%0d,%0d)", y1, y2, y3, y4, e1, e2, e3, e4);
    end
  endtask

  initial begin
    for (int k = 0; k <= N; k++) r_seen[k] = 0;
    // worked examples with the published results
    apply(425629, 1); expect4( 89,  78,  93,  4);
    apply(425629, 2); expect4(108,  39, 111,  2);
    apply(425629, 3); expect4(117,  83,  55, 33);
    apply(425629, 5); expect4( 92, 116,  13, 40);
    apply(429872, 3); expect4( 13, 102,  70, 44);
    // corners
    apply(0, 0); apply(MX - 1, 0); apply(MX - 1, N); apply(M123, 1); apply(M123 - 1, 4);
    // random sweep
    for (int i = 0; i < 200000; i++) begin
      longint X;
      X = ((longint'($urandom()) << 16) ^ longint'($urandom())) % MX;
      if (i % 64 == 5) X = ((longint'($urandom()) % (MX / M3)) * M3) + 128;   // x3 = 2^n
      apply(X, i % (N + 1));
    end
    // mechanism coverage
    for (int k = 0; k <= N; k++) begin
      checks++;
      if (r_seen[k] == 0) begin failures++; $display("FAIL r=%0d never applied", k); end
    end
    checks += 3;
    if (x3_top == 0)    begin failures++; $display("FAIL x3 = 2^n never applied"); end
    if (t_nonzero == 0) begin failures++; $display("FAIL mixed-radix digit T != 0 never occurred"); end
    if (t_zero == 0)    begin failures++; $display("FAIL mixed-radix digit T == 0 never occurred"); end
    $display("coverage: x3=2^n %0d, T!=0 %0d, T==0 %0d, per-r %0d", x3_top, t_nonzero, t_zero, r_seen[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
