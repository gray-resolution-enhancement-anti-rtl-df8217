// gret_gradient_lut: the hardware LUT that turns a 3x3 binary neighbourhood
// into a gradient amplitude and one of eight directions (north, north-east,
// ..., north-west) or the zero direction. The 512-entry table is the Sobel
// operator evaluated by gret_pkg::grad_lut, so it synthesises to a
// combinational ROM and answers in the same clock. The LUT and its outputs
// follow the method; the table contents are this design's choice (see
// gret_pkg).
module gret_gradient_lut
  import gret_pkg::*;
(
  input  logic [8:0] nb,   // bit dy*3+dx, dy = 0 the top row
  output grad_t      g
);
  always_comb g = grad_lut(nb);
endmodule
