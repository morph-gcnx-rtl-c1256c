// drp: DenseRow Prefetcher. Given the dense-row coordinate of a sparse
// element, it fetches that whole row from the IDMB and presents it to the MAC
// array.
//
// Timing: a request in cycle t reads IDMB port A in cycle t, the row returns
// in t+1 and is registered, so out_valid/out_row appear in cycle t+2. One
// request per cycle is accepted and rows come back in request order; the
// look-ahead FIFO holds the matching sparse elements for those two cycles.
// The published design names the block and its job; the fixed two-cycle
// pipeline is this design's choice. busy is high while a request is in flight.
module drp
  import morph_pkg::*;
#(
  parameter int unsigned ROWS = IDMB_ROWS,
  parameter int unsigned NL   = LANES
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  input  logic [$clog2(ROWS)-1:0] req_row,
  // IDMB read port A
  output logic                    idmb_en,
  output logic [$clog2(ROWS)-1:0] idmb_row,
  input  fp64_t                   idmb_data [NL],
  // prefetched row
  output logic                    out_valid,
  output fp64_t                   out_row [NL],
  output logic                    busy
);

  logic rd_pend;

  assign idmb_en  = req_valid;
  assign idmb_row = req_row;
  assign busy     = rd_pend || out_valid;

  always_ff @(posedge clk) begin
    if (rd_pend) out_row <= idmb_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      rd_pend   <= req_valid;
      out_valid <= rd_pend;
    end
  end

endmodule
