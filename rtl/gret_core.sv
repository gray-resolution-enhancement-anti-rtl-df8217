// gret_core: one GRET component, the gray resolution enhancement
// anti-aliasing pipeline for one stream of LINE_W-pixel lines.
//
// Data path, one pixel per clock:
//   beat -> 9-line FIFO -> threshold + page mask -> 9x9 binary window (and a
//   3x3 window of original values) -> gray detect + 49 gradient LUTs ->
//   rotation to the centre direction -> decision matrix -> output LUT and
//   bypass select.
// The output pixel is the pixel 4 lines and 4 columns behind the incoming
// one, whose 9x9 neighbourhood is then complete. Neighbours outside the page
// read as white (0): lines above the first line are masked by a line count,
// columns outside 0..LINE_W-1 by the centre column, and lines below the last
// are supplied by a flush: after the pixel marked in_eof the core itself
// inserts 4*LINE_W+4 white pixels (in_ready low meanwhile), so every pixel of
// the page leaves the core.
//
// Interface: valid/ready input with in_sof on the first and in_eof on the
// last pixel of a page; output strobe out_valid with out_sof (first pixel of
// the page), out_sol (first pixel of each line) and out_eof (last pixel), no
// back-pressure. Pixels enter at one per clock; the output follows 5 clocks
// after the beat that completes its window. ev_gray, ev_enh and ev_conflict
// mark, with out_valid, a pixel bypassed for gray content, a pixel replaced
// by its enhanced value, and a pixel matched by more than one rule.
// Configuration: thresholds are static inputs; rule table and output LUT are
// written one entry per clock and reset to disabled / zero.
//
// The sequence of functions follows the method; page handling, flush, the
// handshake and the configuration ports are this design's choice.
module gret_core
  import gret_pkg::*;
#(
  parameter int PIX_W  = 8,
  parameter int LINE_W = 1808,
  parameter int NRULES = 16,
  localparam int AW = (NRULES > 1) ? $clog2(NRULES) : 1,
  localparam int CW = $clog2(LINE_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic [PIX_W-1:0] bin_th,
  input  logic [PIX_W-1:0] gray_lo,
  input  logic [PIX_W-1:0] gray_hi,
  input  logic             rule_we,
  input  logic [AW-1:0]    rule_idx,
  input  rule_t            rule,
  input  logic             lut_we,
  input  logic [AW-1:0]    lut_idx,
  input  logic [PIX_W-1:0] lut_val,
  // pixel input
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             in_sof,
  input  logic             in_eof,
  input  logic [PIX_W-1:0] in_data,
  // pixel output
  output logic             out_valid,
  output logic             out_sof,
  output logic             out_sol,
  output logic             out_eof,
  output logic [PIX_W-1:0] out_data,
  output logic             ev_gray,
  output logic             ev_enh,
  output logic             ev_conflict
);
  localparam int FLUSH = 4*LINE_W + 4;
  localparam int FW    = $clog2(FLUSH + 1);

  // ---------------------------------------------------------------- beats
  logic          flushing;
  logic [FW-1:0] flush_cnt;
  logic [CW-1:0] col_q;       // position of the next beat
  logic [3:0]    row_q;       // lines seen this page, saturates at 8
  logic          beat, beat_last;
  logic [CW-1:0] b_col;
  logic [3:0]    b_row;
  logic [PIX_W-1:0] b_data;

  assign in_ready  = !flushing;
  assign beat      = flushing || in_valid;
  assign beat_last = flushing && flush_cnt == FW'(1);
  assign b_data    = flushing ? '0 : in_data;
  assign b_col     = (!flushing && in_sof) ? '0 : col_q;
  assign b_row     = (!flushing && in_sof) ? '0 : row_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      flushing  <= 1'b0;
      flush_cnt <= '0;
      col_q     <= '0;
      row_q     <= 4'd0;
    end else if (beat) begin
      if (b_col == CW'(LINE_W-1)) begin
        col_q <= '0;
        row_q <= (b_row == 4'd8) ? 4'd8 : b_row + 4'd1;
      end else begin
        col_q <= b_col + 1'b1;
        row_q <= b_row;
      end
      if (flushing) begin
        flush_cnt <= flush_cnt - 1'b1;
        if (beat_last) flushing <= 1'b0;
      end else if (in_eof) begin
        flushing  <= 1'b1;
        flush_cnt <= FW'(FLUSH);
      end
    end

  // ----------------------------------------------------- 9-line FIFO (S1)
  logic                      lb_valid;
  logic [8:0][PIX_W-1:0]     lb_col;
  logic [CW-1:0]             s1_col;
  logic [3:0]                s1_row;
  logic                      s1_last;

  gret_line_buffer #(.PIX_W(PIX_W), .LINE_W(LINE_W), .ROWS(9)) u_fifo (
    .clk, .rst_n, .wr(beat), .col(b_col), .eol(b_col == CW'(LINE_W-1)),
    .din(b_data), .col_valid(lb_valid), .col_pix(lb_col)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s1_col <= '0; s1_row <= '0; s1_last <= 1'b0;
    end else if (beat) begin
      s1_col <= b_col; s1_row <= b_row; s1_last <= beat_last;
    end

  // Lines above the page read as white.
  logic [8:0][PIX_W-1:0] mcol;
  logic [8:0]            bcol;
  always_comb
    for (int i = 0; i < 9; i++)
      mcol[i] = (i + int'(s1_row) >= 8) ? lb_col[i] : '0;

  gret_threshold #(.PIX_W(PIX_W), .N(9)) u_thr (.th(bin_th), .pix(mcol), .bin(bcol));

  // ------------------------------------------------------- windows (S2)
  logic [WIN-1:0][WIN-1:0]   wb;       // [column][row], column 8 newest
  logic [5:0][2:0][PIX_W-1:0] wg;      // original values, columns 3..8, rows 3..5
  logic                      w_valid;
  logic [CW-1:0]             w_col;
  logic [3:0]                w_row;
  logic                      w_last;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wb <= '0; wg <= '0; w_valid <= 1'b0;
      w_col <= '0; w_row <= '0; w_last <= 1'b0;
    end else begin
      w_valid <= lb_valid;
      if (lb_valid) begin
        for (int j = 0; j < WIN-1; j++) wb[j] <= wb[j+1];
        wb[WIN-1] <= bcol;
        for (int j = 0; j < 5; j++) wg[j] <= wg[j+1];
        wg[5] <= {mcol[5], mcol[4], mcol[3]};
        w_col <= s1_col; w_row <= s1_row; w_last <= s1_last;
      end
    end

  // Centre position of the window and column masking.
  logic [CW-1:0]   cc;
  logic            c_ok, c_sof, c_sol;
  logic [NPIX-1:0] wpix;
  logic [8:0][PIX_W-1:0] gwin;
  always_comb begin
    cc    = (w_col >= CW'(4)) ? w_col - CW'(4) : CW'(int'(w_col) + LINE_W - 4);
    c_ok  = (w_col >= CW'(4)) ? (w_row >= 4'd4) : (w_row >= 4'd5);
    c_sof = (w_col >= CW'(4)) ? (w_row == 4'd4 && cc == '0) : 1'b0;
    c_sol = (cc == '0);
    for (int j = 0; j < WIN; j++)
      for (int i = 0; i < WIN; i++)
        wpix[i*WIN + j] = (int'(cc) + j - 4 >= 0 && int'(cc) + j - 4 < LINE_W)
                          ? wb[j][i] : 1'b0;
    for (int dx = 0; dx < 3; dx++)
      for (int dy = 0; dy < 3; dy++)
        gwin[dy*3+dx] = (int'(cc) + dx - 1 >= 0 && int'(cc) + dx - 1 < LINE_W)
                        ? wg[dx][dy] : '0;
  end

  logic  gray;
  feat_t feat;
  gret_gray_detect #(.PIX_W(PIX_W)) u_gray (.win(gwin), .lo(gray_lo), .hi(gray_hi), .gray(gray));
  gret_feature_extract u_feat (.pix(wpix), .feat(feat));

  // Bypass path: original centre value, gray flag and markers.
  localparam int SBW = PIX_W + 5;
  logic           sv;
  logic [SBW-1:0] sb_d;
  assign sv = w_valid && c_ok;
  gret_delay #(.W(SBW), .DEPTH(3)) u_bypass (
    .clk, .rst_n,
    .din ({sv, sv && c_sof, sv && c_sol, sv && w_last, gray, wg[1][1]}),
    .dout(sb_d)
  );

  // --------------------------------------------- features, rotation (S3/S4)
  feat_t f_q, r_d, r_q;
  always_ff @(posedge clk) f_q <= feat;
  gret_rotator u_rot (.fin(f_q), .fout(r_d));
  always_ff @(posedge clk) r_q <= r_d;

  // ---------------------------------------------------- decision (S5)
  rule_t [NRULES-1:0] rules;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rules <= '0;
    else if (rule_we) rules[rule_idx] <= rule;

  logic [NRULES-1:0] match;
  logic              hit, hit_q, multi_q;
  logic [AW-1:0]     addr, addr_q;
  gret_decision_matrix #(.NRULES(NRULES)) u_dm (
    .feat(r_q), .rules(rules), .match(match), .hit(hit), .addr(addr)
  );
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      hit_q <= 1'b0; addr_q <= '0; multi_q <= 1'b0;
    end else begin
      hit_q   <= hit;
      addr_q  <= addr;
      multi_q <= (match & (match - 1'b1)) != '0;
    end

  // ------------------------------------------------- output stage (S6)
  logic d_valid, d_gray;
  assign d_valid = sb_d[SBW-1];
  assign d_gray  = sb_d[PIX_W];

  gret_output_stage #(.PIX_W(PIX_W), .NRULES(NRULES)) u_out (
    .clk, .rst_n, .lut_we, .lut_idx, .lut_val,
    .in_valid(d_valid), .hit(hit_q), .addr(addr_q), .gray(d_gray),
    .orig(sb_d[PIX_W-1:0]), .out_valid(out_valid), .out_enh(ev_enh), .out(out_data)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_sof <= 1'b0; out_sol <= 1'b0; out_eof <= 1'b0;
      ev_gray <= 1'b0; ev_conflict <= 1'b0;
    end else begin
      out_sof     <= sb_d[SBW-2];
      out_sol     <= sb_d[SBW-3];
      out_eof     <= sb_d[SBW-4];
      ev_gray     <= d_valid && d_gray;
      ev_conflict <= d_valid && !d_gray && multi_q;
    end

  // A page marker may only arrive with a pixel that is accepted.
  assert property (@(posedge clk) disable iff (!rst_n) in_valid && in_sof |-> in_ready)
    else $error("in_sof offered while the core is flushing");
endmodule
