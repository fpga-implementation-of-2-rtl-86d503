// tb_shift_sub -- checks s = N - r for every legal r (N = 7).
module tb_shift_sub;
  localparam int N = 7, RW = 3;
  logic [RW-1:0] r, s;
  int checks = 0, failures = 0;
  shift_sub #(.N(N)) dut (.r(r), .s(s));
  initial begin
    for (int i = 0; i <= N; i++) begin
      r = RW'(i); #1;
      checks++;
      if (int'(s) != N - i) begin failures++; $display("FAIL r=%0d s=%0d", i, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
