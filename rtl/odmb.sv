// odmb: Output DenseMat Buffer of one PE: 2048 rows of 16 doubles (the
// published 256 KB) holding the partial sums of the output tile.
//
// One write port with a per-lane enable (the MAC array writes whole rows,
// the interconnect writes single elements) and one synchronous read port that
// returns a whole row one cycle after rd_en. A read and a write to the same
// row in one cycle return the old row; the MAC array forwards around that.
module odmb
  import morph_pkg::*;
#(
  parameter int unsigned ROWS = ODMB_ROWS,
  parameter int unsigned NL   = LANES
) (
  input  logic                    clk,
  input  logic [NL-1:0]           we,
  input  logic [$clog2(ROWS)-1:0] wrow,
  input  fp64_t                   wdata [NL],
  input  logic                    rd_en,
  input  logic [$clog2(ROWS)-1:0] rrow,
  output fp64_t                   rdata [NL]
);

  fp64_t mem [ROWS][NL];

  always_ff @(posedge clk) begin
    for (int l = 0; l < NL; l++)
      if (we[l]) mem[wrow][l] <= wdata[l];
    if (rd_en) rdata <= mem[rrow];
  end

endmodule
