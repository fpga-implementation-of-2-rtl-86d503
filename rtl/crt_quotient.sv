// crt_quotient -- floor(X/2^n) of a {2^n-1, 2^n, 2^n+1} residue number.
//
// By the Chinese remainder theorem the integer part floor(X/2^n) of a number
// X < (2^2n - 1) 2^n is a residue modulo 2^2n - 1 of a weighted sum of x1, x2
// and x3. The weights are powers of two, so the bit_rewiring block turns the
// sum into three 2n-bit vectors, a 2n-bit carry-save adder with end-around
// carry compresses them to two, and a modulo 2^2n - 1 adder gives the result
// in 0..2^2n-2. Concatenating x2 below it yields X itself as a 3n-bit binary
// number. Purely combinational.
module crt_quotient #(
  parameter int unsigned N = 7
) (
  input  logic [N-1:0]   x1,
  input  logic [N-1:0]   x2,
  input  logic [N:0]     x3,
  output logic [2*N-1:0] q
);
  logic [2*N-1:0] n1, n2, n3, cs_s, cs_c;

  bit_rewiring #(.N(N)) u_rewire (.x1(x1), .x2(x2), .x3(x3), .n1(n1), .n2(n2), .n3(n3));
  csa_eac #(.W(2*N)) u_csa (.a(n1), .b(n2), .c(n3), .s(cs_s), .cy(cs_c));
  mod_2n_m1_adder #(.W(2*N)) u_add (.a(cs_s), .b(cs_c), .sum(q));
endmodule
