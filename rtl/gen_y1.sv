// gen_y1 -- scaled residue of the 2^n - 1 channel.
//
// y1 = |floor(X/2^r)|_(2^n-1) = |P1 + P2|_(2^n-1) with
//   P1 = CRS_n(x1, r)                = |2^(n-r) x1|_(2^n-1)
//   P2 = ~(x2)_(r-1:0) || 1..1 (n-r) = |-(x2 mod 2^r) 2^(n-r)|_(2^n-1)
// P1 comes from the cyclic right shifter (Shifter 1), P2 from the ones-filling
// left shifter with inverted input (Shifter 2) driven by s = n - r, and a
// modulo 2^n - 1 adder adds them. Structure as in the thesis's three-moduli
// block diagram. Purely combinational; r must be in 0..N and s = N - r.
module gen_y1 #(
  parameter int unsigned N  = 7,
  parameter int unsigned RW = $clog2(N + 1)
) (
  input  logic [N-1:0]  x1,
  input  logic [N-1:0]  x2,
  input  logic [RW-1:0] r,
  input  logic [RW-1:0] s,
  output logic [N-1:0]  y1
);
  logic [N-1:0] p1, p2;

  crs_shifter #(.W(N), .SW(RW)) u_shifter1 (.din(x1), .amt(r), .dout(p1));
  fill_left_shifter #(.W(N), .SW(RW), .INVERT(1'b1)) u_shifter2 (.din(x2), .amt(s), .dout(p2));
  mod_2n_m1_adder #(.W(N)) u_add (.a(p1), .b(p2), .sum(y1));
endmodule
