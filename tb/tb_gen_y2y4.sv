// tb_gen_y2y4 -- MRC extension alone, n = 7, m4 = 65: the testbench supplies
// X_(3<->1) = X mod (127*128*129) and its quotient by 2^r as binary words and
// checks y2 = |floor(X/2^r)|_128 and y4 = |floor(X/2^r)|_65 for random X.
module tb_gen_y2y4;
  localparam int N = 7, RW = 3;
  localparam longint M4 = 65, M123 = 127 * 128 * 129, MX = M123 * M4;
  logic [3*N-1:0] x_bin, y_bin;
  logic [6:0] x4, y4;
  logic [N-1:0] y2;
  logic [RW-1:0] r;
  int checks = 0, failures = 0, t_zero = 0, t_nonzero = 0;
  gen_y2y4 #(.N(N)) dut (.x_bin(x_bin), .y_bin(y_bin), .x4(x4), .r(r), .y2(y2), .y4(y4));
  initial begin
    for (int i = 0; i < 40000; i++) begin
      longint X, X31, Y; int rr;
      X = ((longint'($urandom()) << 8) ^ longint'($urandom())) % MX;
      rr = i % (N + 1);
      X31 = X % M123;
      if (X == X31) t_zero++; else t_nonzero++;
      x_bin = (3*N)'(X31); y_bin = (3*N)'(X31 >> rr); x4 = 7'(X % M4); r = RW'(rr);
      #1;
      Y = X >> rr;
      checks++;
      if (longint'(y2) != Y % 128 || longint'(y4) != Y % M4) begin
        failures++; if (failures < 10) $display("FAIL X=%0d r=%0d y2=%0d y4=%0d", X, rr, y2, y4);
      end
    end
    checks++;
    if (t_nonzero == 0) begin failures++; $display("FAIL T != 0 never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
