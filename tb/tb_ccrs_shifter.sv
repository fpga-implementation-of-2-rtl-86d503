// tb_ccrs_shifter -- exhaustive check of the complementary circular right
// shifter, W = 7, r = 0..7: result = ~x[r-1:0] || x[W-1:r].
module tb_ccrs_shifter;
  localparam int W = 7, SW = 3;
  logic [W-1:0] din, dout;
  logic [SW-1:0] amt;
  int checks = 0, failures = 0;
  ccrs_shifter #(.W(W), .SW(SW)) dut (.din(din), .amt(amt), .dout(dout));
  initial begin
    for (int v = 0; v < (1 << W); v++)
      for (int a = 0; a <= W; a++) begin
        int lo, hi, e;
        din = W'(v); amt = SW'(a); #1;
        lo = (~v) & ((1 << a) - 1);          // complemented wrapped bits
        hi = v >> a;
        e  = (lo << (W - a)) | hi;
        checks++;
        if (int'(dout) != e) begin failures++; if (failures < 10) $display("FAIL v=%0d a=%0d got=%0d exp=%0d", v, a, dout, e); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
