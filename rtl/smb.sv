// smb: SparseMat Buffer of one PE. It holds the nonzeros of a sparse tile in
// compressed sparse column (CSC) order: entry i is the i-th nonzero, stored as
// a 64-bit double value and a 16-bit row index (10 bytes; 32768 entries make
// the published 320 KB). The CSC column pointers live in the PE control unit.
//
// Values and row indices arrive as separate interconnect words, so the two
// fields have separate write enables on a shared address. One synchronous read
// port returns both fields of an entry one cycle after rd_en.
module smb
  import morph_pkg::*;
#(
  parameter int unsigned DEPTH = SMB_DEPTH
) (
  input  logic                     clk,
  input  logic                     we_val,
  input  logic                     we_idx,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  fp64_t                    wval,
  input  logic [IDX_W-1:0]         widx,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output fp64_t                    rval,
  output logic [IDX_W-1:0]         ridx
);

  fp64_t            val_mem [DEPTH];
  logic [IDX_W-1:0] idx_mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_val) val_mem[waddr] <= wval;
    if (we_idx) idx_mem[waddr] <= widx;
    if (rd_en) begin
      rval <= val_mem[raddr];
      ridx <= idx_mem[raddr];
    end
  end

endmodule
