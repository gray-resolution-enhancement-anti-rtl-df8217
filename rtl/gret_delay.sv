// gret_delay: the time delay of the GRET bypass path. A chain of DEPTH
// registers carries the original centre pixel and the gray-detect flag
// alongside the enhancement pipeline, so that the output select sees the
// bypass value and the flag of the same pixel as the enhanced value.
// dout is din delayed by DEPTH clocks; the registers reset to zero. The delay
// itself follows the method; its depth is set by this design's pipeline.
module gret_delay #(
  parameter int W     = 9,
  parameter int DEPTH = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [DEPTH-1:0][W-1:0] sr;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sr <= '0;
    else begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  assign dout = sr[DEPTH-1];
endmodule
