// gret_segment_splitter: input side of the multiple-chip GRET arrangement.
// A print line of LINE_W pixels arrives SEG pixels per beat. It is divided
// into SEG regions of S = LINE_W/SEG pixels, and segment k is sent to GRET
// core k as S+8 pixels: the last 4 pixels of region k-1, region k, and the
// first 4 pixels of region k+1. Beyond the ends of the line the overlap is
// white (0). The 4-pixel overlap on each side is what a 9x9 window needs, so
// each core can enhance all S pixels of its own region.
// Two line banks alternate: one is written from the input while the other is
// read out, one pixel per segment per beat, to all cores in lock step. Each
// region bank is stored as words of SEG pixels; its first and last 4 pixels
// are also kept in registers so that the neighbouring segment can read them
// in the same beat.
// Interface: valid/ready on both sides; in_sof/in_eof mark the first/last
// beat of a page and come out on the first/last segment beat of the page.
// A line takes S input beats and S+8 output beats.
// The segment length S+8 and the overlap follow the method; the banked
// buffer and the handshake are this design's choice.
module gret_segment_splitter #(
  parameter int PIX_W  = 8,
  parameter int LINE_W = 7200,
  parameter int SEG    = 4,
  localparam int S     = LINE_W / SEG,
  localparam int L     = S + 8,
  localparam int WPR   = S / SEG,
  localparam int JW    = $clog2(L),
  localparam int IW    = $clog2(S)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic                      in_sof,
  input  logic                      in_eof,
  input  logic [SEG-1:0][PIX_W-1:0] in_data,
  output logic                      seg_valid,
  input  logic                      seg_ready,
  output logic                      seg_sof,
  output logic                      seg_eof,
  output logic [SEG-1:0][PIX_W-1:0] seg_data   // pixel of segment k in lane k
);
  typedef logic [SEG-1:0][PIX_W-1:0] word_t;

  word_t                       mem  [2][SEG][WPR];
  logic [3:0][PIX_W-1:0]       head [2][SEG];
  logic [3:0][PIX_W-1:0]       tail [2][SEG];
  logic [1:0]                  full, bsof, beof;
  logic                        wb, rb;
  logic [IW-1:0]               wbeat;        // input beat within the line
  logic [JW-1:0]               j;            // output beat within the segment

  // ------------------------------------------------------------- write side
  logic wr;
  int   wk, ww;
  assign in_ready = !full[wb];
  assign wr       = in_valid && in_ready;
  always_comb begin
    wk = int'(wbeat) / WPR;
    ww = int'(wbeat) % WPR;
  end

  always_ff @(posedge clk)
    if (wr) begin
      mem[wb][wk][ww] <= in_data;
      for (int l = 0; l < SEG; l++) begin
        if (ww*SEG + l < 4)      head[wb][wk][ww*SEG + l]         <= in_data[l];
        if (ww*SEG + l >= S - 4) tail[wb][wk][ww*SEG + l - (S-4)] <= in_data[l];
      end
    end

  // -------------------------------------------------------------- read side
  logic  rd;
  word_t rdata;
  assign rd = full[rb] && (!seg_valid || seg_ready);
  always_comb
    for (int k = 0; k < SEG; k++) begin
      if (int'(j) < 4)
        rdata[k] = (k == 0) ? '0 : tail[rb][k-1][j[1:0]];
      else if (int'(j) < S + 4)
        rdata[k] = mem[rb][k][(int'(j) - 4) / SEG][(int'(j) - 4) % SEG];
      else
        rdata[k] = (k == SEG-1) ? '0 : head[rb][k+1][int'(j) - (S+4)];
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      full <= '0; bsof <= '0; beof <= '0; wb <= 1'b0; rb <= 1'b0;
      wbeat <= '0; j <= '0;
      seg_valid <= 1'b0; seg_sof <= 1'b0; seg_eof <= 1'b0; seg_data <= '0;
    end else begin
      if (wr) begin
        if (wbeat == '0) begin
          bsof[wb] <= in_sof;
          beof[wb] <= 1'b0;
        end
        if (in_eof) beof[wb] <= 1'b1;
        if (int'(wbeat) == S - 1) begin
          wbeat    <= '0;
          full[wb] <= 1'b1;
          wb       <= !wb;
        end else wbeat <= wbeat + 1'b1;
      end
      if (seg_valid && seg_ready) seg_valid <= 1'b0;
      if (rd) begin
        seg_valid <= 1'b1;
        seg_data  <= rdata;
        seg_sof   <= bsof[rb] && j == '0;
        seg_eof   <= beof[rb] && int'(j) == L - 1;
        if (int'(j) == L - 1) begin
          j        <= '0;
          full[rb] <= 1'b0;
          rb       <= !rb;
        end else j <= j + 1'b1;
      end
    end

  initial assert (S % SEG == 0 && S >= 8)
    else $error("LINE_W/SEG must be a multiple of SEG and at least 8");
  assert property (@(posedge clk) disable iff (!rst_n) seg_valid && !seg_ready |=> seg_valid && $stable(seg_data))
    else $error("segment beat dropped");
endmodule
