// gret_gray_detect: the gray value detect function of GRET. It looks at the
// 3x3 neighbourhood of the current pixel and raises gray when any of the nine
// values is neither close to white nor close to black, i.e. lo < v < hi.
// Such a neighbourhood belongs to gray (halftone or continuous-tone) content,
// and the core then prints the original pixel instead of the enhanced one.
// Combinational. The 3x3 window follows the method; the band test with two
// programmable limits is this design's choice.
module gret_gray_detect #(
  parameter int PIX_W = 8
) (
  input  logic [8:0][PIX_W-1:0] win,   // 3x3 window, index dy*3+dx
  input  logic [PIX_W-1:0]      lo,
  input  logic [PIX_W-1:0]      hi,
  output logic                  gray
);
  always_comb begin
    gray = 1'b0;
    for (int i = 0; i < 9; i++)
      if (win[i] > lo && win[i] < hi) gray = 1'b1;
  end
endmodule
