// vec_add -- the wrapper's LANES x ELEM_W-bit adders (the "+ C" of the MAC).
//
// Adds two WIDTH-bit words lane by lane, lane 0 in the least significant
// bits, each lane wrapping modulo 2^ELEM_W with no carry into the next lane.
// Combinational. Lane count and element size follow the source (16 lanes of
// 8 bits); wrap-around instead of saturation is this design's choice.
module vec_add #(
  parameter int unsigned WIDTH  = 128,
  parameter int unsigned ELEM_W = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s
);

  localparam int unsigned LANES = WIDTH / ELEM_W;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      s[l*ELEM_W +: ELEM_W] = a[l*ELEM_W +: ELEM_W] + b[l*ELEM_W +: ELEM_W];
    end
  end

endmodule
