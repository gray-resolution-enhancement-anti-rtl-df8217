// gret_multichip_top: GRET for wide, high-speed printing with several GRET
// components working side by side. A print line of LINE_W pixels arrives SEG
// pixels per clock; the splitter cuts it into SEG overlapping segments of
// LINE_W/SEG + 8 pixels, SEG GRET cores enhance one segment each at one pixel
// per clock, and the merger keeps the centre LINE_W/SEG pixels of every
// segment and streams the enhanced line out SEG pixels per clock. Because
// each segment carries the 4 neighbouring pixels on each side that a 9x9
// window needs, the result equals that of one core over the whole line.
// Interface: valid/ready raster input with in_sof/in_eof on the first/last
// beat of a page; raster output out_valid/out_sof/out_eof without
// back-pressure. Thresholds, rule table and output LUT are written through
// the cfg_* ports and reach every core. ev_* carry the per-core events
// (gray bypass, enhanced pixel, rule conflict) for monitoring.
// The segmented arrangement with four segments follows the method; the
// line width, the handshakes and the configuration ports are this design's
// choice.
module gret_multichip_top
  import gret_pkg::*;
#(
  parameter int PIX_W  = 8,
  parameter int LINE_W = 7200,
  parameter int SEG    = 4,
  parameter int NRULES = 16,
  localparam int AW = (NRULES > 1) ? $clog2(NRULES) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [PIX_W-1:0]          cfg_bin_th,
  input  logic [PIX_W-1:0]          cfg_gray_lo,
  input  logic [PIX_W-1:0]          cfg_gray_hi,
  input  logic                      cfg_rule_we,
  input  logic [AW-1:0]             cfg_rule_idx,
  input  rule_t                     cfg_rule,
  input  logic                      cfg_lut_we,
  input  logic [AW-1:0]             cfg_lut_idx,
  input  logic [PIX_W-1:0]          cfg_lut_val,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic                      in_sof,
  input  logic                      in_eof,
  input  logic [SEG-1:0][PIX_W-1:0] in_data,
  output logic                      out_valid,
  output logic                      out_sof,
  output logic                      out_eof,
  output logic [SEG-1:0][PIX_W-1:0] out_data,
  output logic [SEG-1:0]            ev_gray,
  output logic [SEG-1:0]            ev_enh,
  output logic [SEG-1:0]            ev_conflict
);
  localparam int SEG_W = LINE_W / SEG + 8;

  logic                      s_valid, s_sof, s_eof;
  logic [SEG-1:0]            s_ready;
  logic [SEG-1:0][PIX_W-1:0] s_data;
  logic [SEG-1:0]            c_valid, c_sof, c_sol, c_eof;
  logic [SEG-1:0][PIX_W-1:0] c_data;

  gret_segment_splitter #(.PIX_W(PIX_W), .LINE_W(LINE_W), .SEG(SEG)) u_split (
    .clk, .rst_n, .in_valid, .in_ready, .in_sof, .in_eof, .in_data,
    .seg_valid(s_valid), .seg_ready(&s_ready), .seg_sof(s_sof), .seg_eof(s_eof),
    .seg_data(s_data)
  );

  for (genvar k = 0; k < SEG; k++) begin : g_core
    gret_core #(.PIX_W(PIX_W), .LINE_W(SEG_W), .NRULES(NRULES)) u_core (
      .clk, .rst_n,
      .bin_th(cfg_bin_th), .gray_lo(cfg_gray_lo), .gray_hi(cfg_gray_hi),
      .rule_we(cfg_rule_we), .rule_idx(cfg_rule_idx), .rule(cfg_rule),
      .lut_we(cfg_lut_we), .lut_idx(cfg_lut_idx), .lut_val(cfg_lut_val),
      .in_valid(s_valid && (&s_ready)), .in_ready(s_ready[k]),
      .in_sof(s_sof), .in_eof(s_eof), .in_data(s_data[k]),
      .out_valid(c_valid[k]), .out_sof(c_sof[k]), .out_sol(c_sol[k]),
      .out_eof(c_eof[k]), .out_data(c_data[k]),
      .ev_gray(ev_gray[k]), .ev_enh(ev_enh[k]), .ev_conflict(ev_conflict[k])
    );
  end

  gret_segment_merger #(.PIX_W(PIX_W), .LINE_W(LINE_W), .SEG(SEG)) u_merge (
    .clk, .rst_n, .seg_valid(c_valid[0]), .seg_sof(c_sof[0]), .seg_sol(c_sol[0]),
    .seg_eof(c_eof[0]), .seg_data(c_data), .out_valid, .out_sof, .out_eof, .out_data
  );

  // The cores run in lock step, so the merger follows the markers of core 0.
  logic lock_step;
  assign lock_step = (c_valid == '0 || c_valid == '1) && (c_sof == '0 || c_sof == '1)
                  && (c_sol == '0 || c_sol == '1) && (c_eof == '0 || c_eof == '1);
  assert property (@(posedge clk) disable iff (!rst_n) lock_step)
    else $error("GRET cores out of step");
endmodule
