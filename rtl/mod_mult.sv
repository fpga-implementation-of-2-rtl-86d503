// mod_mult -- multiplier modulo M (the "modulo m4 multiplier").
//
// Returns |a * b|_M for residues a, b in 0..M-1: the full 2*WM-bit product is
// formed and reduced by a constant-modulus remainder. The thesis takes its
// modulo multiplier (a Booth-encoded design) from earlier work; this is the
// simplest circuit with the same function. Purely combinational.
module mod_mult #(
  parameter int unsigned M  = 65,
  parameter int unsigned WM = $clog2(M)
) (
  input  logic [WM-1:0] a,
  input  logic [WM-1:0] b,
  output logic [WM-1:0] prod
);
  localparam logic [2*WM-1:0] MV = (2*WM)'(M);
  logic [2*WM-1:0] full;
  always_comb begin
    full = {{WM{1'b0}}, a} * {{WM{1'b0}}, b};
    prod = WM'(full % MV);
  end
endmodule
