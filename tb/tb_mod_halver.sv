// tb_mod_halver -- modulo-65 division by 2^r for every residue and r = 0..7:
// checks |dout * 2^r|_65 == din.
module tb_mod_halver;
  logic [6:0] din, dout;
  logic [2:0] amt;
  int checks = 0, failures = 0;
  mod_halver #(.M(65), .SW(3)) dut (.din(din), .amt(amt), .dout(dout));
  initial begin
    for (int x = 0; x < 65; x++)
      for (int a = 0; a < 8; a++) begin
        din = 7'(x); amt = 3'(a); #1;
        checks++;
        if (int'(dout) >= 65 || (int'(dout) * (1 << a)) % 65 != x) begin
          failures++; if (failures < 10) $display("FAIL %0d / 2^%0d = %0d", x, a, dout);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
