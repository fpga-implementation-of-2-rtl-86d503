// rns_scaler4 -- 2^r variable RNS scaler for {2^n-1, 2^n, 2^n+1, m4}.
//
// Scales a number X, held only as its residues (x1, x2, x3, x4), by a run-time
// power of two: the outputs (y1, y2, y3, y4) are the residues of
// floor(X / 2^r) for any r in 0..n, computed without converting X to binary
// and back. Default parameters give the case study n = 7, moduli
// {127, 128, 129, 65}, m4 = 2^(n-1) + 1, dynamic range about 3n + log2 n bits.
//
// Structure (two levels):
//   shift_sub    s = n - r for the ones-filling shifters
//   rns_scaler3  CRT level: y1 and y3 directly (they do not depend on x4),
//                X_(3<->1) = |X|_((2^2n-1) 2^n) and floor(X_(3<->1)/2^r)
//   gen_y2y4     MRC level: folds in x4 to correct y2 and to produce y4
//
// Interface: plain residues; x3 is n+1 bits because its residue can be 2^n.
// Inputs must be valid residues and r must not exceed n. Timing: purely
// combinational, no clock, no reset, no state, as in the thesis, which places
// registers only in its board test harness.
module rns_scaler4 #(
  parameter int unsigned N  = 7,
  parameter int unsigned M4 = (1 << (N - 1)) + 1,
  parameter int unsigned RW = $clog2(N + 1),
  parameter int unsigned W4 = $clog2(M4)
) (
  input  logic [N-1:0]  x1,
  input  logic [N-1:0]  x2,
  input  logic [N:0]    x3,
  input  logic [W4-1:0] x4,
  input  logic [RW-1:0] r,
  output logic [N-1:0]  y1,
  output logic [N-1:0]  y2,
  output logic [N:0]    y3,
  output logic [W4-1:0] y4
);
  logic [RW-1:0]  s;
  logic [3*N-1:0] x_bin, y_bin;

  shift_sub #(.N(N), .RW(RW)) u_sub (.r(r), .s(s));

  rns_scaler3 #(.N(N), .RW(RW)) u_level1 (
    .x1(x1), .x2(x2), .x3(x3), .r(r), .s(s),
    .y1(y1), .y2(), .y3(y3), .y_bin(y_bin), .x_bin(x_bin));

  gen_y2y4 #(.N(N), .M4(M4), .RW(RW), .W4(W4)) u_level2 (
    .x_bin(x_bin), .y_bin(y_bin), .x4(x4), .r(r), .y2(y2), .y4(y4));

  // The three-moduli y2 output is left open: it is the low part of y_bin,
  // and only gen_y2y4's corrected y2 is valid for the four-moduli set.

  // r is only defined for 0..N; simulation flags any larger value.
  always_comb begin
    assert (int'(r) <= N) else $error("rns_scaler4: r=%0d exceeds n=%0d", r, N);
  end
endmodule
