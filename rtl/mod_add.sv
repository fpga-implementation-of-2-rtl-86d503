// mod_add -- carry-propagate adder modulo M (the "modulo m4 CPA").
//
// Adds two residues a, b in 0..M-1 and subtracts M once when the sum reaches
// it, so the output is again in 0..M-1. The thesis takes this adder from
// earlier work; this is the plain add-and-correct form. Purely combinational.
module mod_add #(
  parameter int unsigned M  = 65,
  parameter int unsigned WM = $clog2(M)
) (
  input  logic [WM-1:0] a,
  input  logic [WM-1:0] b,
  output logic [WM-1:0] sum
);
  localparam logic [WM:0] MV = (WM+1)'(M);
  logic [WM:0] raw;
  always_comb begin
    raw = {1'b0, a} + {1'b0, b};
    sum = (raw >= MV) ? WM'(raw - MV) : raw[WM-1:0];
  end
endmodule
