// pe: one processing element of the Morph-GCNX array. The same engine runs the
// sparse products of the aggregation phase (SpMM/SpGEMM) and the dense
// products of the combination phase (GEMM) as outer products, sixteen output
// columns at a time.
//
// Inside: the SparseMat buffer (SMB), the input and output DenseMat buffers
// (IDMB, ODMB), the look-ahead FIFO, the dense row prefetcher (DRP), the 1x16
// MAC array and the PE control unit. The structure and the flow of a sparse
// element through them follow the published PE; the data widths, the command
// set and the flit formats are this design's own.
//
// Interface: flit_in carries words the router has already accepted for this PE
// (its bufsel names the target buffer, addr the word); they are written in the
// cycle they arrive. Loading the ODMB over flit_in while the MAC array is
// writing it is not allowed. cmd_valid/cmd start a command when busy is low;
// done pulses when it has finished. flit_out carries the drained results,
// one registered word per cycle. bypass_hit reports the MAC array forwarding.
module pe
  import morph_pkg::*;
#(
  parameter int unsigned SDEPTH = SMB_DEPTH,
  parameter int unsigned IROWS  = IDMB_ROWS,
  parameter int unsigned OROWS  = ODMB_ROWS,
  parameter int unsigned FDEPTH = FIFO_DEPTH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  flit_t   flit_in,
  output flit_t   flit_out,
  input  logic    cmd_valid,
  input  pe_cmd_t cmd,
  output logic    busy,
  output logic    done,
  output logic    bypass_hit
);

  localparam int unsigned NL = LANES;
  localparam int unsigned SW = $clog2(SDEPTH);
  localparam int unsigned IW = $clog2(IROWS);
  localparam int unsigned OW = $clog2(OROWS);
  localparam int unsigned LW = $clog2(NL);
  localparam int unsigned FW = DATA_W + OW;

  // ---- incoming flit decode
  logic wr_smb_val, wr_smb_idx, wr_idmb, wr_odmb, wr_colptr;
  always_comb begin
    wr_smb_val = flit_in.valid && flit_in.bufsel == BUF_SMB_VAL;
    wr_smb_idx = flit_in.valid && flit_in.bufsel == BUF_SMB_IDX;
    wr_idmb    = flit_in.valid && flit_in.bufsel == BUF_IDMB;
    wr_odmb    = flit_in.valid && flit_in.bufsel == BUF_ODMB;
    wr_colptr  = flit_in.valid && flit_in.bufsel == BUF_COLPTR;
  end

  // ---- control
  logic          smb_rd_en;
  logic [SW-1:0] smb_rd_addr;
  fp64_t         smb_rval;
  logic [IDX_W-1:0] smb_ridx;
  logic          idb_en;
  logic [IW-1:0] idb_row;
  fp64_t         idb_data [NL];
  logic          push;
  fp64_t         push_a;
  logic [OW-1:0] push_orow;
  logic [IW-1:0] drp_row;
  logic          pipe_busy;
  logic          clr_we, drn_rd_en;
  logic [OW-1:0] clr_row, drn_row;
  fp64_t         odmb_rdata [NL];

  pe_ctrl #(.NL(NL), .SDEPTH(SDEPTH), .IROWS(IROWS), .OROWS(OROWS)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd, .busy, .done,
    .colptr_we(wr_colptr), .colptr_addr(($clog2(IROWS+1))'(flit_in.addr)),
    .colptr_data(flit_in.data[IDX_W-1:0]),
    .smb_rd_en, .smb_rd_addr, .smb_rval, .smb_ridx,
    .idb_en, .idb_row, .idb_data,
    .push, .push_a, .push_orow, .drp_row, .pipe_busy,
    .clr_we, .clr_row, .drn_rd_en, .drn_row, .odmb_rdata, .flit_out
  );

  // ---- buffers
  smb #(.DEPTH(SDEPTH)) u_smb (
    .clk, .we_val(wr_smb_val), .we_idx(wr_smb_idx), .waddr(SW'(flit_in.addr)),
    .wval(flit_in.data), .widx(flit_in.data[IDX_W-1:0]),
    .rd_en(smb_rd_en), .raddr(smb_rd_addr), .rval(smb_rval), .ridx(smb_ridx)
  );

  logic          drp_idmb_en;
  logic [IW-1:0] drp_idmb_row;
  fp64_t         drp_idmb_data [NL];

  idmb #(.ROWS(IROWS), .NL(NL)) u_idmb (
    .clk, .we(wr_idmb), .wrow(IW'(flit_in.addr >> LW)), .wlane(LW'(flit_in.addr)),
    .wdata(flit_in.data),
    .a_en(drp_idmb_en), .a_row(drp_idmb_row), .a_data(drp_idmb_data),
    .b_en(idb_en), .b_row(idb_row), .b_data(idb_data)
  );

  // ---- look-ahead FIFO and dense row prefetcher
  logic          fifo_empty, fifo_full;
  logic [FW-1:0] fifo_dout;
  logic [$clog2(FDEPTH+1)-1:0] fifo_count;
  logic          drp_valid, drp_busy;
  fp64_t         drp_out [NL];

  lookahead_fifo #(.WIDTH(FW), .DEPTH(FDEPTH)) u_fifo (
    .clk, .rst_n, .push, .din({push_a, push_orow}), .pop(drp_valid),
    .dout(fifo_dout), .empty(fifo_empty), .full(fifo_full), .count(fifo_count)
  );

  drp #(.ROWS(IROWS), .NL(NL)) u_drp (
    .clk, .rst_n, .req_valid(push), .req_row(drp_row),
    .idmb_en(drp_idmb_en), .idmb_row(drp_idmb_row), .idmb_data(drp_idmb_data),
    .out_valid(drp_valid), .out_row(drp_out), .busy(drp_busy)
  );

  // ---- MAC array and ODMB
  logic          mac_rd_en, mac_wr_en, mac_busy;
  logic [OW-1:0] mac_rd_row, mac_wr_row;
  fp64_t         mac_wr_data [NL];

  mac_array #(.NL(NL), .ROWS(OROWS)) u_mac (
    .clk, .rst_n, .in_valid(drp_valid), .in_a(fifo_dout[FW-1:OW]),
    .in_dense(drp_out), .in_orow(fifo_dout[OW-1:0]),
    .rd_en(mac_rd_en), .rd_row(mac_rd_row), .rd_data(odmb_rdata),
    .wr_en(mac_wr_en), .wr_row(mac_wr_row), .wr_data(mac_wr_data),
    .busy(mac_busy), .bypass_hit
  );

  assign pipe_busy = !fifo_empty || drp_busy || mac_busy;

  logic [NL-1:0] o_we;
  logic [OW-1:0] o_wrow;
  fp64_t         o_wdata [NL];

  always_comb begin
    o_we    = '0;
    o_wrow  = mac_wr_row;
    o_wdata = mac_wr_data;
    if (mac_wr_en) begin
      o_we = '1;
    end else if (clr_we) begin
      o_we   = '1;
      o_wrow = clr_row;
      for (int l = 0; l < NL; l++) o_wdata[l] = '0;
    end else if (wr_odmb) begin
      o_we[LW'(flit_in.addr)] = 1'b1;
      o_wrow = OW'(flit_in.addr >> LW);
      for (int l = 0; l < NL; l++) o_wdata[l] = flit_in.data;
    end
  end

  odmb #(.ROWS(OROWS), .NL(NL)) u_odmb (
    .clk, .we(o_we), .wrow(o_wrow), .wdata(o_wdata),
    .rd_en(mac_rd_en || drn_rd_en), .rrow(drn_rd_en ? drn_row : mac_rd_row),
    .rdata(odmb_rdata)
  );

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_odmb && (mac_wr_en || clr_we)))
    else $error("pe: ODMB loaded over the interconnect while it is being computed");
  assert property (@(posedge clk) disable iff (!rst_n) !(push && fifo_full))
    else $error("pe: look-ahead FIFO overflow");

endmodule
