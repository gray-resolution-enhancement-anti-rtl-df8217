// gret_output_stage: the output LUT and bypass select of GRET. The decision
// address indexes a writable table of gray exposure values, tuned for the
// multi-level printhead and the electrophotographic process. The delayed
// gray-detect flag then picks the original pixel (gray neighbourhood) or the
// enhanced one; when no rule matched, the original pixel is printed.
// Interface: table write port (lut_we/lut_idx/lut_val, resets to zero) and a
// registered output, one clock after in_valid, marked by out_valid.
// The LUT and the select follow the method; the writable table and the
// no-match behaviour are this design's choice.
module gret_output_stage #(
  parameter int PIX_W  = 8,
  parameter int NRULES = 16,
  localparam int AW = (NRULES > 1) ? $clog2(NRULES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lut_we,
  input  logic [AW-1:0]    lut_idx,
  input  logic [PIX_W-1:0] lut_val,
  input  logic             in_valid,
  input  logic             hit,
  input  logic [AW-1:0]    addr,
  input  logic             gray,
  input  logic [PIX_W-1:0] orig,
  output logic             out_valid,
  output logic             out_enh,    // the enhanced value was taken
  output logic [PIX_W-1:0] out
);
  logic [PIX_W-1:0] lut [NRULES];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < NRULES; i++) lut[i] <= '0;
    end else if (lut_we) lut[lut_idx] <= lut_val;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_enh   <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= in_valid;
      out_enh   <= in_valid && hit && !gray;
      out       <= (hit && !gray) ? lut[addr] : orig;
    end
endmodule
