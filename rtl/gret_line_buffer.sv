// gret_line_buffer: the 9-line FIFO at the input of GRET. It keeps the last
// 8 image lines in 8 line memories used as a ring; with the pixel arriving
// now they make a column of 9 vertically adjacent pixels, which feeds one
// column of the 9x9 window per clock.
// Each accepted pixel (wr) reads the 8 memories at its column and overwrites,
// in the memory holding the oldest line, the pixel just read (read before
// write). eol on the last pixel of a line moves the ring to the next memory.
// col_pix is valid one clock after wr (col_valid); index 0 is the oldest
// line (r-8), index 8 the incoming one (r). Contents are not reset: the core
// masks lines that lie above the page.
// The 9-line buffer follows the method; the ring of single-port memories is
// this design's choice.
module gret_line_buffer #(
  parameter int PIX_W  = 8,
  parameter int LINE_W = 1808,
  parameter int ROWS   = 9,
  localparam int CW    = $clog2(LINE_W),
  localparam int NMEM  = ROWS - 1,
  localparam int PW    = (NMEM > 1) ? $clog2(NMEM) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr,
  input  logic [CW-1:0]                col,
  input  logic                         eol,
  input  logic [PIX_W-1:0]             din,
  output logic                         col_valid,
  output logic [ROWS-1:0][PIX_W-1:0]   col_pix
);
  logic [PW-1:0]    wp;          // memory that holds the oldest line
  logic [PW-1:0]    wp_q;
  logic [PIX_W-1:0] din_q;
  logic [NMEM-1:0][PIX_W-1:0] rd;

  for (genvar m = 0; m < NMEM; m++) begin : g_mem
    logic [PIX_W-1:0] mem [LINE_W];
    always_ff @(posedge clk)
      if (wr) begin
        rd[m] <= mem[col];
        if (PW'(m) == wp) mem[col] <= din;
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp        <= '0;
      wp_q      <= '0;
      din_q     <= '0;
      col_valid <= 1'b0;
    end else begin
      col_valid <= wr;
      if (wr) begin
        wp_q  <= wp;
        din_q <= din;
        if (eol) wp <= (wp == PW'(NMEM-1)) ? '0 : wp + 1'b1;
      end
    end

  // The oldest line sits in memory wp_q, the next in wp_q+1, and so on.
  always_comb begin
    for (int i = 0; i < NMEM; i++)
      col_pix[i] = rd[(int'(wp_q) + i) % NMEM];
    col_pix[ROWS-1] = din_q;
  end
endmodule
