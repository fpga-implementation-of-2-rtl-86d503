// gen_y2y4 -- mixed-radix extension of the scaler to a fourth modulus m4.
//
// The three-moduli stage gives X_(3<->1) = |X|_(M4) with M4 = (2^2n - 1) 2^n
// as a 3n-bit binary word (x_bin) and its quotient floor(X_(3<->1)/2^r)
// (y_bin). Mixed radix conversion over the two moduli {M4, m4} writes
//   X = X_(3<->1) + T * M4,   T = |(x4 - X_(3<->1)) * |M4^-1|_m4|_m4,
// and, because r <= n divides M4 exactly,
//   floor(X/2^r) = floor(X_(3<->1)/2^r) + T * 2^(n-r) * (2^2n - 1).
// Hence
//   y2 = |y_bin - T * 2^(n-r)|_(2^n)                 (-T, Shifter III, n-bit add)
//   y4 = |y_bin + T * |M4/2^r|_m4|_m4                 (multiplier, Shifter II, CPA)
// The T path is: modulo-m4 converter of x_bin, modular negation, modulo-m4
// adder with x4 and modulo-m4 multiplier by the constant |M4^-1|_m4.
// |M4^-1|_m4 and |M4|_m4 are computed at elaboration (54 and 44 for n = 7,
// m4 = 65). The block follows the thesis's y2/y4 block diagram, with three
// deliberate differences: -|X_(3<->1)|_m4 is an exact modular negation (the
// thesis calls it a one's complement), Shifter II divides modulo m4 (see
// mod_halver) and the floor(X_(3<->1)/2^r) shifter is shared with the
// three-moduli stage instead of being drawn twice. Purely combinational.
module gen_y2y4 #(
  parameter int unsigned N  = 7,
  parameter int unsigned M4 = (1 << (N - 1)) + 1,
  parameter int unsigned RW = $clog2(N + 1),
  parameter int unsigned W4 = $clog2(M4)
) (
  input  logic [3*N-1:0] x_bin,
  input  logic [3*N-1:0] y_bin,
  input  logic [W4-1:0]  x4,
  input  logic [RW-1:0]  r,
  output logic [N-1:0]   y2,
  output logic [W4-1:0]  y4
);
  import rns_pkg::*;

  localparam logic [W4-1:0] M4_MOD = W4'(m123_mod(N, 64'(M4)));
  localparam logic [W4-1:0] M4_INV = W4'(invmod(m123_mod(N, 64'(M4)), 64'(M4)));

  // --- T = |(x4 - X31) * |M4^-1|_m4|_m4 ---
  logic [W4-1:0] x31_mod, x31_neg, diff, t;
  mod_reduce #(.WIN(3*N), .M(M4)) u_x31_mod (.din(x_bin), .dout(x31_mod));
  assign x31_neg = (x31_mod == '0) ? '0 : W4'(M4) - x31_mod;
  mod_add  #(.M(M4)) u_sub  (.a(x4), .b(x31_neg), .sum(diff));
  mod_mult #(.M(M4)) u_tmul (.a(diff), .b(M4_INV), .prod(t));

  // --- y2 = |floor(X31/2^r) - T * 2^(n-r)|_(2^n) ---
  logic [N-1:0]   t_neg;
  logic [2*N-1:0] t_sh;
  assign t_neg = N'(0) - N'(t);                  // two's complement of T
  logic_right_shifter #(.W(2*N), .SW(RW)) u_shifter3 (
    .din({t_neg, {N{1'b0}}}), .amt(r), .dout(t_sh));
  assign y2 = y_bin[N-1:0] + t_sh[N-1:0];        // modulo 2^n: carry dropped

  // --- y4 = |floor(X31/2^r) + T * |M4 / 2^r|_m4|_m4 ---
  logic [W4-1:0] tm, tm_sh, yq_mod;
  mod_mult   #(.M(M4))           u_m4mul    (.a(t), .b(M4_MOD), .prod(tm));
  mod_halver #(.M(M4), .SW(RW))  u_shifter2 (.din(tm), .amt(r), .dout(tm_sh));
  mod_reduce #(.WIN(3*N), .M(M4)) u_yq_mod  (.din(y_bin), .dout(yq_mod));
  mod_add    #(.M(M4))           u_add4     (.a(yq_mod), .b(tm_sh), .sum(y4));
endmodule
