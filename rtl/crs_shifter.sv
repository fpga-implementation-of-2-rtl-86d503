// crs_shifter -- logarithmic cyclic right shifter (Shifter 1, generates P1).
//
// Rotates a W-bit word right by amt positions. There is one rank of 2:1
// multiplexers per bit of amt; rank k rotates by 2^k (mod W) when amt[k] is
// set, as in the multiplexer drawing of the P1 generator. In the 2^n-1 channel
// a right rotation by r equals a multiplication by 2^(n-r), so
// P1 = |x1 * 2^(n-r)|_(2^n-1). Rotating by W returns the word unchanged, so an
// amount equal to W (r = n) is handled. Purely combinational.
module crs_shifter #(
  parameter int unsigned W  = 7,
  parameter int unsigned SW = $clog2(W + 1)
) (
  input  logic [W-1:0]  din,
  input  logic [SW-1:0] amt,
  output logic [W-1:0]  dout
);
  logic [W-1:0] stage [SW+1];

  assign stage[0] = din;
  for (genvar k = 0; k < SW; k++) begin : g_rank
    localparam int unsigned D = (1 << k) % W;
    logic [W-1:0] rot;
    if (D == 0) begin : g_id
      assign rot = stage[k];
    end else begin : g_rot
      assign rot = {stage[k][D-1:0], stage[k][W-1:D]};
    end
    assign stage[k+1] = amt[k] ? rot : stage[k];
  end
  assign dout = stage[SW];
endmodule
