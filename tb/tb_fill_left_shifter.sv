// tb_fill_left_shifter -- exhaustive check of the ones-filling left shifter
// in both input polarities, W = 7, shift 0..W.
module tb_fill_left_shifter;
  localparam int W = 7, SW = 3;
  logic [W-1:0] din, d_inv, d_pl;
  logic [SW-1:0] amt;
  int checks = 0, failures = 0;
  fill_left_shifter #(.W(W), .SW(SW), .INVERT(1'b1)) dut_inv (.din(din), .amt(amt), .dout(d_inv));
  fill_left_shifter #(.W(W), .SW(SW), .INVERT(1'b0)) dut_pl  (.din(din), .amt(amt), .dout(d_pl));
  initial begin
    for (int v = 0; v < (1 << W); v++)
      for (int a = 0; a <= W; a++) begin
        longint e_inv, e_pl, ones;
        din = W'(v); amt = SW'(a); #1;
        ones = (longint'(1) << a) - 1;
        e_inv = (((~longint'(v)) << a) | ones) & ((1 << W) - 1);
        e_pl  = ((longint'(v) << a) | ones) & ((1 << W) - 1);
        checks += 2;
        if (longint'(d_inv) != e_inv) begin failures++; if (failures < 10) $display("FAIL inv v=%0d a=%0d", v, a); end
        if (longint'(d_pl)  != e_pl)  begin failures++; if (failures < 10) $display("FAIL pl v=%0d a=%0d", v, a); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
