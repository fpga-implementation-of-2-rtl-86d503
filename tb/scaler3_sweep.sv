// scaler3_sweep -- testbench helper: drives one rns_scaler3 of size N with
// random X below (2^2N - 1) 2^N and every r in 0..N and checks y1, y2, y3 and
// the binary quotient against integer arithmetic.
module scaler3_sweep #(
  parameter int N      = 5,
  parameter int TRIALS = 20000
) (
  output int  checks,
  output int  failures,
  output bit  done
);
  localparam int RW = $clog2(N + 1);
  localparam longint M1 = (longint'(1) << N) - 1, M2 = longint'(1) << N, M3 = M2 + 1;
  localparam longint MX = M1 * M2 * M3;
  logic [N-1:0] x1, x2, y1, y2;
  logic [N:0] x3, y3;
  logic [RW-1:0] r, s;
  logic [3*N-1:0] y_bin, x_bin;

  rns_scaler3 #(.N(N)) dut (.x1(x1), .x2(x2), .x3(x3), .r(r), .s(s),
                            .y1(y1), .y2(y2), .y3(y3), .y_bin(y_bin), .x_bin(x_bin));

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int i = 0; i < TRIALS; i++) begin
      longint X, Y; int rr;
      X = ((longint'($urandom()) << 16) ^ longint'($urandom())) % MX;
      if (i % 64 == 7) X = ((longint'($urandom()) % (MX / M3)) * M3) + M2;
      rr = i % (N + 1);
      x1 = N'(X % M1); x2 = N'(X % M2); x3 = (N+1)'(X % M3); r = RW'(rr); s = RW'(N - rr);
      #1;
      Y = X >> rr;
      checks++;
      if (longint'(y1) != Y % M1 || longint'(y2) != Y % M2 || longint'(y3) != Y % M3 ||
          longint'(y_bin) != Y) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d X=%0d r=%0d", N, X, rr);
      end
    end
    done = 1;
  end
endmodule
