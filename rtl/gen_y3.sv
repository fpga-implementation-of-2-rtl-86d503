// gen_y3 -- scaled residue of the 2^n + 1 channel.
//
// y3 = |floor(X/2^r)|_(2^n+1) is the modulo 2^n + 1 sum of three operands:
//   Q1 = ~(x3)_n & CCRS_n((x3)_(n-1:0), r)   complementary circular right shift
//   Q2 = (x2)_(r-1:0) || 1..1 (n-r)          ones-filling left shift by s = n - r
//   Q3 = ~(x3)_n                             one bit
// Q1 is gated by n AND gates so that the special residue x3 = 2^n contributes
// nothing from the shifter. A carry-save adder with complementary end-around
// carry reduces Q1, Q2, Q3 to two n-bit vectors and a modulo 2^n + 1 adder
// produces the (n+1)-bit residue. Structure as in the thesis's three-moduli
// block diagram. Purely combinational.
module gen_y3 #(
  parameter int unsigned N  = 7,
  parameter int unsigned RW = $clog2(N + 1)
) (
  input  logic [N-1:0]  x2,
  input  logic [N:0]    x3,
  input  logic [RW-1:0] r,
  input  logic [RW-1:0] s,
  output logic [N:0]    y3
);
  logic [N-1:0] ccrs, q1, q2, cs_s, cs_c;
  logic         q3;

  ccrs_shifter #(.W(N), .SW(RW)) u_shifter4 (.din(x3[N-1:0]), .amt(r), .dout(ccrs));
  fill_left_shifter #(.W(N), .SW(RW), .INVERT(1'b0)) u_shifter2 (.din(x2), .amt(s), .dout(q2));

  always_comb begin
    q1 = ccrs & {N{~x3[N]}};
    q3 = ~x3[N];
  end

  csa_ceac #(.W(N)) u_csa (.q1(q1), .q2(q2), .q3(q3), .s(cs_s), .cy(cs_c));
  mod_2n_p1_adder #(.W(N)) u_add (.a(cs_s), .b(cs_c), .sum(y3));
endmodule
