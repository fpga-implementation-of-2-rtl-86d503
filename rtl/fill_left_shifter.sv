// fill_left_shifter -- logarithmic left shifter with ones fill (Shifter 2).
//
// Shifts a W-bit word left by amt = s = n - r positions and fills the vacated
// low bits with ones. With INVERT = 1 the input is complemented first, which
// gives P2 = ~(x2)_(r-1:0) || 1..1 = |-(x2 mod 2^r) * 2^(n-r)|_(2^n-1) for the
// 2^n-1 channel; with INVERT = 0 it gives Q2 = (x2)_(r-1:0) || 1..1 for the
// 2^n+1 channel. Rank k shifts by 2^k when amt[k] is set; a rank whose shift
// is W or more forces the word to all ones (the OR-gate rank of the drawn
// 8-bit, 4-rank shifter). Purely combinational.
module fill_left_shifter #(
  parameter int unsigned W      = 7,
  parameter int unsigned SW     = $clog2(W + 1),
  parameter bit          INVERT = 1'b1
) (
  input  logic [W-1:0]  din,
  input  logic [SW-1:0] amt,
  output logic [W-1:0]  dout
);
  logic [W-1:0] stage [SW+1];

  assign stage[0] = INVERT ? ~din : din;
  for (genvar k = 0; k < SW; k++) begin : g_rank
    localparam int unsigned D = 1 << k;
    logic [W-1:0] sh;
    if (D >= W) begin : g_all
      assign sh = '1;
    end else begin : g_sh
      assign sh = {stage[k][W-1-D:0], {D{1'b1}}};
    end
    assign stage[k+1] = amt[k] ? sh : stage[k];
  end
  assign dout = stage[SW];
endmodule
