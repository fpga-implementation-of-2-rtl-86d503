// mod_2n_m1_adder -- adder modulo 2^W - 1 with end-around carry.
//
// Adds two W-bit words, feeds the carry out back into the least significant
// position (2^W = 1 modulo 2^W - 1) and maps the all-ones result, the second
// code for zero, to 0 so that the output is always a canonical residue in
// 0..2^W-2. Inputs may be any W-bit values. Used with W = n for channel y1 and
// W = 2n for the CRT quotient. Purely combinational.
module mod_2n_m1_adder #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  logic [W:0]   raw;
  logic [W-1:0] eac;
  always_comb begin
    raw = {1'b0, a} + {1'b0, b};
    eac = raw[W-1:0] + W'(raw[W]);
    sum = (&eac) ? '0 : eac;
  end
endmodule
