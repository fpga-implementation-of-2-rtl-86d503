// tb_crs_shifter -- exhaustive check of the cyclic right shifter, W = 7,
// and of the rotation identity |2^(W-r) x|_(2^W-1) for every r in 0..W.
module tb_crs_shifter;
  localparam int W = 7, SW = 3;
  logic [W-1:0] din, dout;
  logic [SW-1:0] amt;
  int checks = 0, failures = 0;
  crs_shifter #(.W(W), .SW(SW)) dut (.din(din), .amt(amt), .dout(dout));
  initial begin
    for (int v = 0; v < (1 << W); v++)
      for (int a = 0; a <= W; a++) begin
        int exp_v;
        din = W'(v); amt = SW'(a); #1;
        // reference: multiply by 2^(W-a) modulo 2^W-1 (all-ones maps to itself)
        exp_v = (v == (1 << W) - 1) ? v : int'((longint'(v) << (W - a)) % ((1 << W) - 1));
        checks++;
        if (int'(dout) != exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL v=%0d a=%0d got=%0d exp=%0d", v, a, dout, exp_v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
