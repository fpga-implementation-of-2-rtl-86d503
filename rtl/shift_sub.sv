// shift_sub -- left-shift amount s = n - r for the ones-filling shifters.
//
// The P2 and Q2 generators shift a residue left by s = n - r bit positions.
// This block forms s from the scaling exponent r with one small subtractor;
// the design takes it from the "sub" block of the scaler's synthesized
// schematic, which drives the channel generators. Combinational; r must lie in
// 0..N, so s lies in N..0 and fits the same width.
module shift_sub #(
  parameter int unsigned N  = 7,
  parameter int unsigned RW = $clog2(N + 1)
) (
  input  logic [RW-1:0] r,
  output logic [RW-1:0] s
);
  localparam logic [RW-1:0] NV = RW'(N);
  always_comb s = NV - r;
endmodule
