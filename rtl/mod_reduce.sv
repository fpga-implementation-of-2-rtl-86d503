// mod_reduce -- modulo-M converter of a binary word.
//
// Returns din mod M for a WIN-bit unsigned input and a constant modulus M.
// In the four-moduli scaler it gives |X_(3<->1)|_m4 and
// |floor(X_(3<->1)/2^r)|_m4 from the 3n-bit binary words of the three-moduli
// stage. The thesis names this converter without drawing it, so it is written
// as a constant-modulus remainder and left to synthesis. Purely combinational.
module mod_reduce #(
  parameter int unsigned WIN = 21,
  parameter int unsigned M   = 65,
  parameter int unsigned WM  = $clog2(M)
) (
  input  logic [WIN-1:0] din,
  output logic [WM-1:0]  dout
);
  localparam logic [WIN-1:0] MV = WIN'(M);
  always_comb dout = WM'(din % MV);
endmodule
