// gret_rotator: the data rotation of GRET. The direction of the centre pixel
// selects a turn of the whole window so that this direction becomes north;
// pixel values, gradient directions and gradient amplitudes are turned
// together, and every direction code is turned by the same angle. Edges of
// all eight orientations thus reach the decision matrix in one canonical
// orientation, and one set of rules serves them all.
// A turn by k steps of 45 degrees moves each pixel on the square ring of
// radius r around the centre by k*r positions along that ring: exact for
// multiples of 90 degrees, the usual square-grid approximation for the
// diagonals. A centre without direction is not turned. Combinational, one
// 8-to-1 multiplexer per bit. The rotation triggered by the centre direction
// follows the method; the ring-shift geometry is this design's choice.
module gret_rotator
  import gret_pkg::*;
(
  input  feat_t fin,
  output feat_t fout
);
  int unsigned k;   // counter-clockwise steps of 45 degrees
  always_comb
    k = (fin.dir[CGRAD] == DIR_NONE || fin.dir[CGRAD] > DIR_NW)
        ? 0 : int'(fin.dir[CGRAD]) - 1;

  for (genvar p = 0; p < NPIX; p++) begin : g_pix
    localparam int S0 = rot_src(WIN, p, 0), S1 = rot_src(WIN, p, 1),
                   S2 = rot_src(WIN, p, 2), S3 = rot_src(WIN, p, 3),
                   S4 = rot_src(WIN, p, 4), S5 = rot_src(WIN, p, 5),
                   S6 = rot_src(WIN, p, 6), S7 = rot_src(WIN, p, 7);
    always_comb
      case (k)
        1: fout.pix[p] = fin.pix[S1];
        2: fout.pix[p] = fin.pix[S2];
        3: fout.pix[p] = fin.pix[S3];
        4: fout.pix[p] = fin.pix[S4];
        5: fout.pix[p] = fin.pix[S5];
        6: fout.pix[p] = fin.pix[S6];
        7: fout.pix[p] = fin.pix[S7];
        default: fout.pix[p] = fin.pix[S0];
      endcase
  end

  for (genvar p = 0; p < NGRAD; p++) begin : g_grad
    localparam int S0 = rot_src(GWIN, p, 0), S1 = rot_src(GWIN, p, 1),
                   S2 = rot_src(GWIN, p, 2), S3 = rot_src(GWIN, p, 3),
                   S4 = rot_src(GWIN, p, 4), S5 = rot_src(GWIN, p, 5),
                   S6 = rot_src(GWIN, p, 6), S7 = rot_src(GWIN, p, 7);
    logic [DIR_BITS-1:0] d;
    always_comb begin
      case (k)
        1: begin d = fin.dir[S1]; fout.amp[p] = fin.amp[S1]; end
        2: begin d = fin.dir[S2]; fout.amp[p] = fin.amp[S2]; end
        3: begin d = fin.dir[S3]; fout.amp[p] = fin.amp[S3]; end
        4: begin d = fin.dir[S4]; fout.amp[p] = fin.amp[S4]; end
        5: begin d = fin.dir[S5]; fout.amp[p] = fin.amp[S5]; end
        6: begin d = fin.dir[S6]; fout.amp[p] = fin.amp[S6]; end
        7: begin d = fin.dir[S7]; fout.amp[p] = fin.amp[S7]; end
        default: begin d = fin.dir[S0]; fout.amp[p] = fin.amp[S0]; end
      endcase
      fout.dir[p] = rot_dir(d, int'(k));
    end
  end
endmodule
