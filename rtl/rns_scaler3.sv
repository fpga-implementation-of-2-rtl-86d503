// rns_scaler3 -- 2^r variable scaler for the moduli set {2^n-1, 2^n, 2^n+1}.
//
// Given the residues (x1, x2, x3) of X and a scaling exponent r in 0..n, it
// returns the residues (y1, y2, y3) of Y = floor(X / 2^r) entirely in the
// residue domain, with no reverse or forward converter:
//   y1 channel: gen_y1 (cyclic shifter, ones-filling shifter, mod 2^n-1 adder)
//   y2 channel: crt_quotient gives floor(X/2^n); with x2 below it this is X as
//               a 3n-bit word, a logical right shifter divides it by 2^r and
//               its n LSBs are y2
//   y3 channel: gen_y3 (complementary shifter, CSA with CEAC, mod 2^n+1 adder)
// Two by-products are brought out: x_bin = X and y_bin = floor(X/2^r) in
// binary. The four-moduli scaler builds on both. The caller supplies
// s = n - r (shift_sub). Purely combinational, no clock and no state.
module rns_scaler3 #(
  parameter int unsigned N  = 7,
  parameter int unsigned RW = $clog2(N + 1)
) (
  input  logic [N-1:0]   x1,
  input  logic [N-1:0]   x2,
  input  logic [N:0]     x3,
  input  logic [RW-1:0]  r,
  input  logic [RW-1:0]  s,
  output logic [N-1:0]   y1,
  output logic [N-1:0]   y2,
  output logic [N:0]     y3,
  output logic [3*N-1:0] y_bin,
  output logic [3*N-1:0] x_bin
);
  logic [2*N-1:0] quot;

  gen_y1 #(.N(N), .RW(RW)) u_gen_y1 (.x1(x1), .x2(x2), .r(r), .s(s), .y1(y1));

  crt_quotient #(.N(N)) u_quot (.x1(x1), .x2(x2), .x3(x3), .q(quot));
  assign x_bin = {quot, x2};
  logic_right_shifter #(.W(3*N), .SW(RW)) u_shifter3 (.din(x_bin), .amt(r), .dout(y_bin));
  assign y2 = y_bin[N-1:0];

  gen_y3 #(.N(N), .RW(RW)) u_gen_y3 (.x2(x2), .x3(x3), .r(r), .s(s), .y3(y3));
endmodule
