// idmb: Input DenseMat Buffer of one PE: 32 rows of 16 doubles (the published
// 4 KB). A row is as wide as the MAC array, so one read feeds all 16 lanes.
//
// Writes come from the interconnect one element at a time (row, lane).
// Two synchronous read ports each return a whole row one cycle after their
// enable: port A serves the dense row prefetcher, port B lets the PE control
// unit read the left operand of a dense (GEMM) tile. The second read port is
// this design's choice; the published text gives the buffer only its size.
module idmb
  import morph_pkg::*;
#(
  parameter int unsigned ROWS = IDMB_ROWS,
  parameter int unsigned NL   = LANES
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] wrow,
  input  logic [$clog2(NL)-1:0]   wlane,
  input  fp64_t                   wdata,
  input  logic                    a_en,
  input  logic [$clog2(ROWS)-1:0] a_row,
  output fp64_t                   a_data [NL],
  input  logic                    b_en,
  input  logic [$clog2(ROWS)-1:0] b_row,
  output fp64_t                   b_data [NL]
);

  fp64_t mem [ROWS][NL];

  always_ff @(posedge clk) begin
    if (we) mem[wrow][wlane] <= wdata;
    if (a_en) a_data <= mem[a_row];
    if (b_en) b_data <= mem[b_row];
  end

endmodule
