// tb_logic_right_shifter -- random check of the 3n = 21-bit logical right
// shifter for every shift amount 0..7.
module tb_logic_right_shifter;
  localparam int W = 21, SW = 3;
  logic [W-1:0] din, dout;
  logic [SW-1:0] amt;
  int checks = 0, failures = 0;
  logic_right_shifter #(.W(W), .SW(SW)) dut (.din(din), .amt(amt), .dout(dout));
  initial begin
    for (int i = 0; i < 4000; i++) begin
      longint v;
      v = longint'($urandom()) & ((longint'(1) << W) - 1);
      if (i < 8) v = (longint'(1) << W) - 1;
      din = W'(v); amt = SW'(i % 8); #1;
      checks++;
      if (longint'(dout) != (v >> (i % 8))) begin
        failures++; if (failures < 10) $display("FAIL v=%0h a=%0d got=%0h", v, i % 8, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
