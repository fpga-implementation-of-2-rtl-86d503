// logic_right_shifter -- logarithmic logical right shifter (Shifters 3, I, III).
//
// Shifts a W-bit word right by amt positions, filling zeros. Rank k shifts by
// 2^k when amt[k] is set. In the three-moduli scaler it divides the 3n-bit word
// X = floor(X/2^n) || x2 by 2^r; in the four-moduli extension it does the same
// for X_(3<->1) and aligns -T. Purely combinational.
module logic_right_shifter #(
  parameter int unsigned W  = 21,
  parameter int unsigned SW = 3
) (
  input  logic [W-1:0]  din,
  input  logic [SW-1:0] amt,
  output logic [W-1:0]  dout
);
  logic [W-1:0] stage [SW+1];

  assign stage[0] = din;
  for (genvar k = 0; k < SW; k++) begin : g_rank
    localparam int unsigned D = 1 << k;
    logic [W-1:0] sh;
    if (D >= W) begin : g_zero
      assign sh = '0;
    end else begin : g_sh
      assign sh = {{D{1'b0}}, stage[k][W-1:D]};
    end
    assign stage[k+1] = amt[k] ? sh : stage[k];
  end
  assign dout = stage[SW];
endmodule
