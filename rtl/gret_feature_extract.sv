// gret_feature_extract: the 9x9 binary window feature extraction of GRET.
// For each of the 49 inner pixels of the window a gradient LUT looks at the
// pixel's 3x3 neighbourhood and returns its gradient direction and amplitude;
// all 49 run in parallel so the whole feature set is ready in one clock.
// Combinational; the binary pixels pass on with the gradients in one feat_t.
// The 9x9 window and the LUT follow the method; restricting gradients to the
// 7x7 pixels with a complete neighbourhood is this design's choice.
module gret_feature_extract
  import gret_pkg::*;
(
  input  logic [NPIX-1:0] pix,
  output feat_t           feat
);
  for (genvar r = 0; r < GWIN; r++) begin : g_row
    for (genvar c = 0; c < GWIN; c++) begin : g_col
      logic [8:0] nb;
      grad_t      g;
      for (genvar dy = 0; dy < 3; dy++) begin : g_dy
        for (genvar dx = 0; dx < 3; dx++) begin : g_dx
          assign nb[dy*3+dx] = pix[(r+dy)*WIN + (c+dx)];
        end
      end
      gret_gradient_lut u_lut (.nb(nb), .g(g));
      assign feat.dir[r*GWIN+c] = g.dir;
      assign feat.amp[r*GWIN+c] = g.amp;
    end
  end
  assign feat.pix = pix;
endmodule
