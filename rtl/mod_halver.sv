// mod_halver -- division by 2^r modulo an odd M ("Shifter II").
//
// Returns |din * 2^(-r)|_M. Each of the SMAX = 2^SW - 1 possible steps halves
// the residue modulo M: an even value is shifted right by one, an odd value
// has M added first (M odd makes the sum even) and is then shifted. Step i is
// applied when i < amt, so the chain behaves as a right shifter whose shifted
// -out bits are folded back modulo M. In the four-moduli scaler it turns
// T * |M4|_m4 into T * |M4 / 2^r|_m4, which is the term the scaled residue y4
// needs. The thesis describes Shifter II as a plain logical right shift; that
// does not give the modular quotient, so this modular form is used instead.
// Purely combinational.
module mod_halver #(
  parameter int unsigned M  = 65,
  parameter int unsigned SW = 3,
  parameter int unsigned WM = $clog2(M)
) (
  input  logic [WM-1:0] din,
  input  logic [SW-1:0] amt,
  output logic [WM-1:0] dout
);
  localparam int unsigned SMAX = (1 << SW) - 1;
  localparam logic [WM:0] MV = (WM+1)'(M);
  logic [WM-1:0] stage [SMAX+1];

  assign stage[0] = din;
  for (genvar i = 0; i < SMAX; i++) begin : g_step
    logic [WM-1:0] half;
    always_comb half = WM'(({1'b0, stage[i]} + (stage[i][0] ? MV : '0)) >> 1);
    assign stage[i+1] = (amt > SW'(i)) ? half : stage[i];
  end
  assign dout = stage[SMAX];
endmodule
