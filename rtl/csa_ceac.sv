// csa_ceac -- n-bit carry-save adder with complementary end-around carry.
//
// Adds the three y3-channel operands Q1, Q2 (n bits) and Q3 (one bit) in carry
// save form for modulus 2^n + 1: one full adder at bit 0 (Q1_0, Q2_0, Q3) and
// half adders at bits 1..n-1. Since 2^n = -1 modulo 2^n + 1, the carry out of
// bit n-1 re-enters bit 0 complemented: cy = C_(n-2:0) || ~C_(n-1), following
// the thesis's sum y3 = |S + C_(n-2:0) || ~C_(n-1)|_(2^n+1). The constant
// offset of the complemented carry is already folded into the Q2/Q3 operands.
// Purely combinational.
module csa_ceac #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] q1,
  input  logic [W-1:0] q2,
  input  logic         q3,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] c;
  always_comb begin
    s    = q1 ^ q2;
    c    = q1 & q2;
    s[0] = q1[0] ^ q2[0] ^ q3;                              // full adder at bit 0
    c[0] = (q1[0] & q2[0]) | (q1[0] & q3) | (q2[0] & q3);
    cy   = {c[W-2:0], ~c[W-1]};
  end
endmodule
