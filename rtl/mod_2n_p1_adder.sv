// mod_2n_p1_adder -- adder modulo 2^W + 1 for the CSA outputs of channel y3.
//
// Adds two W-bit words and subtracts 2^W + 1 once when the sum reaches it,
// giving a canonical (W+1)-bit residue in 0..2^W. The thesis names this
// adder without drawing it; this is the plain add-and-correct form. Purely
// combinational.
module mod_2n_p1_adder #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   sum
);
  localparam logic [W+1:0] M = (W+2)'((1 << W) + 1);
  logic [W+1:0] raw;
  always_comb begin
    raw = {2'b00, a} + {2'b00, b};
    sum = (raw >= M) ? (W+1)'(raw - M) : raw[W:0];
  end
endmodule
