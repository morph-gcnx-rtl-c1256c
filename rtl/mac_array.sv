// mac_array: the PE's 1x16 MAC array. For each operand pair it performs one
// step of an outer product: output row `orow` of the ODMB is read, every lane
// l adds a * dense[l] to its element, and the row is written back.
//
// Timing: a two-stage read-modify-write pipeline accepting one operand pair
// per cycle. Cycle 0 registers the operands and issues the ODMB read; cycle 1
// computes the 16 double-precision multiply-adds and writes the row. When two
// consecutive pairs hit the same output row, the second would read the row
// before the first has written it, so the just-computed row is forwarded
// instead (bypass_hit pulses when that happens). busy is high while a pair is
// in the pipeline. The published design gives the array's shape (1x16) and
// its job (outer product with accumulation); the pipeline and the forwarding
// are this design's own.
module mac_array
  import morph_pkg::*;
#(
  parameter int unsigned NL   = LANES,
  parameter int unsigned ROWS = ODMB_ROWS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  fp64_t                   in_a,
  input  fp64_t                   in_dense [NL],
  input  logic [$clog2(ROWS)-1:0] in_orow,
  // ODMB read port (data one cycle after rd_en)
  output logic                    rd_en,
  output logic [$clog2(ROWS)-1:0] rd_row,
  input  fp64_t                   rd_data [NL],
  // ODMB write port (whole row)
  output logic                    wr_en,
  output logic [$clog2(ROWS)-1:0] wr_row,
  output fp64_t                   wr_data [NL],
  output logic                    busy,
  output logic                    bypass_hit
);

  localparam int unsigned RW = $clog2(ROWS);

  logic          s1_valid;
  fp64_t         s1_a;
  fp64_t         s1_dense [NL];
  logic [RW-1:0] s1_row;

  logic          last_valid;
  logic [RW-1:0] last_row;
  fp64_t         last_data [NL];

  fp64_t         acc [NL];
  fp64_t         res [NL];

  assign rd_en  = in_valid;
  assign rd_row = in_orow;

  assign bypass_hit = s1_valid && last_valid && (last_row == s1_row);

  always_comb begin
    for (int l = 0; l < NL; l++) acc[l] = bypass_hit ? last_data[l] : rd_data[l];
  end

  for (genvar l = 0; l < NL; l++) begin : g_lane
    fp64_mac u_mac (.a(s1_a), .b(s1_dense[l]), .c(acc[l]), .y(res[l]));
  end

  assign wr_en   = s1_valid;
  assign wr_row  = s1_row;
  assign wr_data = res;
  assign busy    = s1_valid;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      s1_a     <= in_a;
      s1_dense <= in_dense;
      s1_row   <= in_orow;
    end
    if (s1_valid) begin
      last_row  <= s1_row;
      last_data <= res;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid   <= 1'b0;
      last_valid <= 1'b0;
    end else begin
      s1_valid   <= in_valid;
      last_valid <= s1_valid;
    end
  end

endmodule
