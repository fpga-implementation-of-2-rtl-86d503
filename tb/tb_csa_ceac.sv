// tb_csa_ceac -- exhaustive check of the CSA with complementary end-around
// carry, W = 7. With C the raw carry vector, q1 + q2 + q3 = s + 2C and
// 2^7 = -1 (mod 2^7+1), so s + {C[5:0], ~C[6]} = q1 + q2 + q3 + 1 (mod 2^7+1).
module tb_csa_ceac;
  localparam int W = 7, M = 129;
  logic [W-1:0] q1, q2, s, cy;
  logic q3;
  int checks = 0, failures = 0;
  csa_ceac #(.W(W)) dut (.q1(q1), .q2(q2), .q3(q3), .s(s), .cy(cy));
  initial begin
    for (int a = 0; a < 128; a++)
      for (int b = 0; b < 128; b++)
        for (int c = 0; c < 2; c++) begin
          int total, lhs;
          q1 = W'(a); q2 = W'(b); q3 = c[0]; #1;
          total = a + b + c;
          lhs   = int'(s) + int'(cy);
          checks++;
          if (lhs % M != (total + 1) % M) begin
            failures++; if (failures < 10) $display("FAIL q1=%0d q2=%0d q3=%0d s=%0d cy=%0d", a, b, c, s, cy);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
