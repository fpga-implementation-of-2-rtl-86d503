// tb_mod_reduce -- random 21-bit inputs reduced modulo 65.
module tb_mod_reduce;
  logic [20:0] din;
  logic [6:0] dout;
  int checks = 0, failures = 0;
  mod_reduce #(.WIN(21), .M(65)) dut (.din(din), .dout(dout));
  initial begin
    for (int i = 0; i < 20000; i++) begin
      din = 21'($urandom());
      if (i == 0) din = '1;
      if (i == 1) din = 21'd64;
      if (i == 2) din = 21'd65;
      #1;
      checks++;
      if (int'(dout) != int'(din) % 65) begin failures++; if (failures < 10) $display("FAIL %0d -> %0d", din, dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
