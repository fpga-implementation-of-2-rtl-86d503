// csa_eac -- carry-save adder with end-around carry (modulo 2^W - 1).
//
// Compresses three W-bit vectors into a sum vector and a carry vector with one
// row of full adders. Because 2^W = 1 modulo 2^W - 1, the carry out of the
// most significant position is wrapped round to bit 0 of the carry vector, so
// a + b + c = s + cy (mod 2^W - 1). Used with W = 2n in the CRT quotient path.
// Purely combinational.
module csa_eac #(
  parameter int unsigned W = 14
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] maj;
  always_comb begin
    s   = a ^ b ^ c;
    maj = (a & b) | (a & c) | (b & c);
    cy  = {maj[W-2:0], maj[W-1]};
  end
endmodule
