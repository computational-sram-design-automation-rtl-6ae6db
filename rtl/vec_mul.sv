// vec_mul -- the wrapper's LANES x ELEM_W-bit multipliers (A x B of the MAC).
//
// The WIDTH-bit operands are split into WIDTH/ELEM_W lanes, lane 0 in the
// least significant bits, and each pair of lanes is multiplied. Each lane
// keeps the low ELEM_W bits of its product, so the result has the width of a
// memory word and can be written back; the product of the two low halves is
// the same for signed and unsigned elements. Combinational. The lane count
// and element size follow the source (16 lanes of 8 bits); truncating the
// product to the element size is this design's reading of its 8-bit
// multipliers with a 128-bit result.
module vec_mul #(
  parameter int unsigned WIDTH  = 128,
  parameter int unsigned ELEM_W = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] p
);

  localparam int unsigned LANES = WIDTH / ELEM_W;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      p[l*ELEM_W +: ELEM_W] = ELEM_W'(a[l*ELEM_W +: ELEM_W] * b[l*ELEM_W +: ELEM_W]);
    end
  end

endmodule
