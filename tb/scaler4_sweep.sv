// scaler4_sweep -- testbench helper: drives one rns_scaler4 of size N with
// random numbers X below the four-moduli dynamic range and every r in 0..N,
// (m4 defaults to 2^(N-1)+1 and may be any odd modulus co-prime to the
// other three), and compares each output with the residues of floor(X/2^r) computed with
// integer arithmetic. Reports its counts through its ports when done.
module scaler4_sweep #(
  parameter int N      = 5,
  parameter int M4P    = (1 << (N - 1)) + 1,
  parameter int TRIALS = 20000
) (
  output int  checks,
  output int  failures,
  output int  x3_top,
  output bit  done
);
  localparam int RW = $clog2(N + 1);
  localparam longint M1 = (longint'(1) << N) - 1, M2 = longint'(1) << N, M3 = M2 + 1;
  localparam longint M4 = longint'(M4P);
  localparam int W4 = $clog2(M4);
  localparam longint MX = M1 * M2 * M3 * M4;
  logic [N-1:0] x1, x2, y1, y2;
  logic [N:0] x3, y3;
  logic [W4-1:0] x4, y4;
  logic [RW-1:0] r;

  rns_scaler4 #(.N(N), .M4(M4P)) dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .r(r),
                            .y1(y1), .y2(y2), .y3(y3), .y4(y4));

  initial begin
    checks = 0; failures = 0; x3_top = 0; done = 0;
    for (int i = 0; i < TRIALS; i++) begin
      longint X, Y; int rr;
      X = ((longint'($urandom()) << 32) | longint'($urandom())) % MX;
      if (X < 0) X = -X;
      if (i % 64 == 7) X = ((((longint'($urandom()) << 16) ^ longint'($urandom())) % (MX / M3)) * M3) + M2;
      rr = i % (N + 1);
      x1 = N'(X % M1); x2 = N'(X % M2); x3 = (N+1)'(X % M3); x4 = W4'(X % M4); r = RW'(rr);
      #1;
      if (x3[N]) x3_top++;
      Y = X >> rr;
      checks++;
      if (longint'(y1) != Y % M1 || longint'(y2) != Y % M2 ||
          longint'(y3) != Y % M3 || longint'(y4) != Y % M4) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d X=%0d r=%0d", N, X, rr);
      end
    end
    done = 1;
  end
endmodule
