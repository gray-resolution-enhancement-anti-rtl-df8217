// gret_threshold: the data conversion stage of GRET. Each of N incoming gray
// pixels is turned into one binary pixel, 1 when the value is at or above the
// programmable threshold th. Purely combinational; in the core it converts one
// 9-pixel column of the window per clock. The threshold function follows the
// method; the ">=" comparison and the programmable threshold are this
// design's choice.
module gret_threshold #(
  parameter int PIX_W = 8,
  parameter int N     = 9
) (
  input  logic [PIX_W-1:0]        th,
  input  logic [N-1:0][PIX_W-1:0] pix,
  output logic [N-1:0]            bin
);
  always_comb
    for (int i = 0; i < N; i++) bin[i] = (pix[i] >= th);
endmodule
