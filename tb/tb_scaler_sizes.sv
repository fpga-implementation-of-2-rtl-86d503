// tb_scaler_sizes -- runs the scalers at every size for which delay and area
// are reported: the three-moduli scaler for n = 5, 6, 7, 8 and the
// four-moduli scaler ({2^n-1, 2^n, 2^n+1, 2^(n-1)+1}, n odd) for
// n = 5, 7, 9, 11, plus n = 7 with the other fourth modulus m4 = 257. Each instance gets random numbers over its whole dynamic
// range and every r in 0..n; the special residue x3 = 2^n must occur in each
// four-moduli run.
module tb_scaler_sizes;
  int c3 [4], f3 [4], c4 [5], f4 [5], t4 [5];
  bit d3 [4], d4 [5];
  int checks = 0, failures = 0;

  scaler3_sweep #(.N(5)) u3_5 (.checks(c3[0]), .failures(f3[0]), .done(d3[0]));
  scaler3_sweep #(.N(6)) u3_6 (.checks(c3[1]), .failures(f3[1]), .done(d3[1]));
  scaler3_sweep #(.N(7)) u3_7 (.checks(c3[2]), .failures(f3[2]), .done(d3[2]));
  scaler3_sweep #(.N(8)) u3_8 (.checks(c3[3]), .failures(f3[3]), .done(d3[3]));
  scaler4_sweep #(.N(5))  u4_5  (.checks(c4[0]), .failures(f4[0]), .x3_top(t4[0]), .done(d4[0]));
  scaler4_sweep #(.N(7))  u4_7  (.checks(c4[1]), .failures(f4[1]), .x3_top(t4[1]), .done(d4[1]));
  scaler4_sweep #(.N(9))  u4_9  (.checks(c4[2]), .failures(f4[2]), .x3_top(t4[2]), .done(d4[2]));
  scaler4_sweep #(.N(11)) u4_11 (.checks(c4[3]), .failures(f4[3]), .x3_top(t4[3]), .done(d4[3]));
  // a fourth modulus other than 2^(n-1)+1: {127, 128, 129, 257}
  scaler4_sweep #(.N(7), .M4P(257)) u4_7b (.checks(c4[4]), .failures(f4[4]), .x3_top(t4[4]), .done(d4[4]));

  initial begin
    wait (d3[0] && d3[1] && d3[2] && d3[3] && d4[0] && d4[1] && d4[2] && d4[3] && d4[4]);
    for (int k = 0; k < 4; k++) begin
      checks += c3[k] + c4[k] + 1;
      failures += f3[k] + f4[k];
      if (t4[k] == 0) begin failures++; $display("FAIL x3 = 2^n never applied in four-moduli run %0d", k); end
      $display("three-moduli run %0d: %0d checks, %0d failures; four-moduli run %0d: %0d checks, %0d failures",
               k, c3[k], f3[k], k, c4[k], f4[k]);
    end
    checks += c4[4] + 1;
    failures += f4[4];
    if (t4[4] == 0) begin failures++; $display("FAIL x3 = 2^n never applied with m4 = 257"); end
    $display("four-moduli run with m4 = 257: %0d checks, %0d failures", c4[4], f4[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
