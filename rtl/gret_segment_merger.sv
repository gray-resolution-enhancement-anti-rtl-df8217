// gret_segment_merger: output side of the multiple-chip GRET arrangement.
// Every GRET core delivers its S+8 pixel segment line by line; only the
// centre S pixels (positions 5 .. S+4, counting from 1) are enhanced from a
// complete neighbourhood, and they are exactly region k of the line. The
// merger keeps those pixels of all SEG cores and puts the enhanced line back
// together, SEG pixels per beat in raster order.
// Two line banks alternate: the cores write one while the other is read out
// in S beats. A core line takes at least S+8 clocks, so a bank is always
// emptied before it is written again. Each region bank has SEG lanes so one
// pixel per core can be written each clock and a whole word read.
// Interface: seg_* is the lock-step output of the cores (strobe, markers,
// pixel of core k in lane k); out_* is the raster stream, no back-pressure,
// with out_sof/out_eof on the first/last beat of the page. A line appears on
// the output one clock after its last segment pixel.
// Keeping pixels 5 .. S+4 of each segment follows the method; the banked
// buffer is this design's choice.
module gret_segment_merger #(
  parameter int PIX_W  = 8,
  parameter int LINE_W = 7200,
  parameter int SEG    = 4,
  localparam int S     = LINE_W / SEG,
  localparam int L     = S + 8,
  localparam int WPR   = S / SEG,
  localparam int JW    = $clog2(L),
  localparam int OW    = $clog2(S)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      seg_valid,
  input  logic                      seg_sof,
  input  logic                      seg_sol,
  input  logic                      seg_eof,
  input  logic [SEG-1:0][PIX_W-1:0] seg_data,
  output logic                      out_valid,
  output logic                      out_sof,
  output logic                      out_eof,
  output logic [SEG-1:0][PIX_W-1:0] out_data
);
  logic [PIX_W-1:0] mem [2][SEG][SEG][WPR];   // bank, region, lane, word
  logic [1:0]       full, bsof, beof;
  logic             wb, rb;
  logic [JW-1:0]    jc;                         // segment position of the next pixel
  logic [JW-1:0]    j;
  logic [OW-1:0]    w;                          // output beat within the line

  assign j = seg_sol ? '0 : jc;

  // ------------------------------------------------------------- write side
  logic keep;
  int   q;
  always_comb begin
    keep = seg_valid && int'(j) >= 4 && int'(j) < S + 4;
    q    = int'(j) - 4;
  end

  always_ff @(posedge clk)
    if (keep)
      for (int k = 0; k < SEG; k++)
        mem[wb][k][q % SEG][q / SEG] <= seg_data[k];

  // -------------------------------------------------------------- read side
  int rk, rw;
  always_comb begin
    rk = int'(w) / WPR;
    rw = int'(w) % WPR;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      full <= '0; bsof <= '0; beof <= '0; wb <= 1'b0; rb <= 1'b0;
      jc <= '0; w <= '0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_eof <= 1'b0; out_data <= '0;
    end else begin
      if (seg_valid) begin
        if (j == '0) bsof[wb] <= seg_sof;
        if (int'(j) == L - 1) begin
          jc       <= '0;
          full[wb] <= 1'b1;
          beof[wb] <= seg_eof;
          wb       <= !wb;
        end else jc <= j + 1'b1;
      end
      out_valid <= full[rb];
      if (full[rb]) begin
        for (int l = 0; l < SEG; l++) out_data[l] <= mem[rb][rk][l][rw];
        out_sof <= bsof[rb] && w == '0;
        out_eof <= beof[rb] && int'(w) == S - 1;
        if (int'(w) == S - 1) begin
          w        <= '0;
          full[rb] <= 1'b0;
          rb       <= !rb;
        end else w <= w + 1'b1;
      end
    end

  initial assert (S % SEG == 0 && S >= 8)
    else $error("LINE_W/SEG must be a multiple of SEG and at least 8");
  assert property (@(posedge clk) disable iff (!rst_n) keep |-> !full[wb])
    else $error("merger bank overrun");
endmodule
