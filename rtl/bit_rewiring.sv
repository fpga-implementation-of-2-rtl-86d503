// bit_rewiring -- forms the CRT operands of floor(X/2^n) mod (2^2n - 1).
//
// For the moduli {2^n-1, 2^n, 2^n+1} the quotient floor(X/2^n) equals
// |(2^(n-1) + 2^(2n-1)) x1 - 2^n x2 + (2^(n-1) + 2^(2n-1) - 1) x3|_(2^2n - 1).
// Every term is a rotation or complement of a residue, so the sum reduces to
// three 2n-bit vectors made only of wires and inverters:
//   n1 = x1_0 || x1 || x1_(n-1:1)                  (2^(2n-1) x1 + 2^(n-1) x1)
//   n2 = ~x2 || ~x3_(n-1:0)                        (-2^n x2 and -x3, regrouped)
//   n3 = x3_0 || (x3_(n-1:0) | {n{x3_n}}) || x3_(n-1:1)
// n3 merges the thesis's N3 and N4: when x3_n = 0, N4 is all ones, which is
// zero modulo 2^2n - 1 and is dropped; when x3_n = 1 (x3 = 2^n), N3 is zero and
// N4 contributes ones in bits 2n-2..n-1. No logic other than inversion.
module bit_rewiring #(
  parameter int unsigned N = 7
) (
  input  logic [N-1:0]   x1,
  input  logic [N-1:0]   x2,
  input  logic [N:0]     x3,
  output logic [2*N-1:0] n1,
  output logic [2*N-1:0] n2,
  output logic [2*N-1:0] n3
);
  always_comb begin
    n1 = {x1[0], x1, x1[N-1:1]};
    n2 = {~x2, ~x3[N-1:0]};
    n3 = {x3[0], x3[N-1:0] | {N{x3[N]}}, x3[N-1:1]};
  end
endmodule
