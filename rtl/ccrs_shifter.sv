// ccrs_shifter -- logarithmic complementary circular right shifter (Shifter 4).
//
// CCRS_W(x, r) rotates x right by r positions and complements the r bits that
// wrap around to the top: the result is (x)_(r-1:0) complemented, followed by
// (x)_(W-1:r). It equals a window onto the 2W-bit ring {~x, x}, so shifts
// compose and a logarithmic structure works: rank k applies CCRS by 2^k when
// amt[k] is set (inverters on the wrapped bits, as drawn for n = 8). A shift of
// W complements the whole word, which is the XOR rank of that drawing. Used on
// (x3)_(n-1:0) to form Q1 of the 2^n+1 channel. Purely combinational.
module ccrs_shifter #(
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
    localparam int unsigned D  = (1 << k) % (2 * W);
    logic [2*W-1:0] ring, rot;
    logic [W-1:0]   sh;
    assign ring = {~stage[k], stage[k]};
    if (D == 0) begin : g_id
      assign rot = ring;
    end else begin : g_rot
      assign rot = {ring[D-1:0], ring[2*W-1:D]};
    end
    assign sh = rot[W-1:0];
    assign stage[k+1] = amt[k] ? sh : stage[k];
  end
  assign dout = stage[SW];
endmodule
