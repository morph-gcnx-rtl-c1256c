// pe_ctrl: PE Control Unit. It runs one PE command at a time and sequences
// the PE's buffers, the look-ahead FIFO, the dense row prefetcher (DRP) and the
// MAC array through it.
//
//  PE_SPMM  sparse x dense outer product. The sparse tile is in CSC form: the
//           column pointers (up to 33, kept here, loaded over the interconnect)
//           delimit each column's nonzeros in the SMB. For nonzero (i, j) with
//           value v, v goes into the FIFO with output row i, and j is sent to
//           the DRP, which fetches dense row j from the IDMB. Two cycles later
//           the MAC array adds v * row j to output row i. One nonzero per cycle;
//           an empty column costs one cycle.
//  PE_GEMM  dense x dense outer product of an n x k left tile held in IDMB
//           rows 16..16+n-1 (element (i, j) in lane j) with a k x 16 right tile
//           in IDMB rows 0..k-1 (n, k <= 16). Each left row is read once (two
//           cycles), then one product row per cycle.
//  PE_CLEAR zeroes ODMB rows 0..n-1, one row per cycle.
//  PE_DRAIN sends ODMB rows 0..n-1 back, one element per cycle as flits to GLB
//           word glb_base + row*16 + lane (17 cycles per row).
//
// busy is high from the command until the last result is written; done pulses
// for one cycle at the end. The command set, the IDMB layout of dense tiles and
// the cycle timing are this design's choices; the published design describes
// the dataflow (SMB -> FIFO, row index -> DRP -> IDMB, MAC, ODMB, write back).
module pe_ctrl
  import morph_pkg::*;
#(
  parameter int unsigned NL        = LANES,
  parameter int unsigned SDEPTH    = SMB_DEPTH,
  parameter int unsigned IROWS     = IDMB_ROWS,
  parameter int unsigned OROWS     = ODMB_ROWS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cmd_valid,
  input  pe_cmd_t                   cmd,
  output logic                      busy,
  output logic                      done,
  // column pointer writes
  input  logic                      colptr_we,
  input  logic [$clog2(IROWS+1)-1:0] colptr_addr,
  input  logic [IDX_W-1:0]          colptr_data,
  // SMB read
  output logic                      smb_rd_en,
  output logic [$clog2(SDEPTH)-1:0] smb_rd_addr,
  input  fp64_t                     smb_rval,
  input  logic [IDX_W-1:0]          smb_ridx,
  // IDMB read port B (left dense tile)
  output logic                      idb_en,
  output logic [$clog2(IROWS)-1:0]  idb_row,
  input  fp64_t                     idb_data [NL],
  // look-ahead FIFO push and DRP request (issued together)
  output logic                      push,
  output fp64_t                     push_a,
  output logic [$clog2(OROWS)-1:0]  push_orow,
  output logic [$clog2(IROWS)-1:0]  drp_row,
  input  logic                      pipe_busy,
  // ODMB clear and drain
  output logic                      clr_we,
  output logic [$clog2(OROWS)-1:0]  clr_row,
  output logic                      drn_rd_en,
  output logic [$clog2(OROWS)-1:0]  drn_row,
  input  fp64_t                     odmb_rdata [NL],
  output flit_t                     flit_out
);

  localparam int unsigned NCP = IROWS + 1;
  localparam int unsigned SW  = $clog2(SDEPTH);
  localparam int unsigned IW  = $clog2(IROWS);
  localparam int unsigned OW  = $clog2(OROWS);
  localparam int unsigned LW  = $clog2(NL);
  localparam int unsigned XBASE = IROWS / 2;   // first IDMB row of the left dense tile

  typedef enum logic [2:0] {
    S_IDLE, S_SP, S_DN_RD, S_DN_LAT, S_DN_J, S_CLR, S_DR_RD, S_DR_EMIT
  } state_e;

  state_e                state;
  logic                  flushing;
  pe_cmd_t               c;
  logic [IDX_W-1:0]      colptr [NCP];
  logic [IDX_W-1:0]      p, j, i;
  logic [LW-1:0]         lane;
  logic                  sp_pend;
  logic [IW-1:0]         sp_j;
  fp64_t                 xrow [NL];

  // ---- sparse element fetch: one SMB read per cycle while the column has nonzeros
  logic sp_issue;
  assign sp_issue    = (state == S_SP) && (p < colptr[j[IW:0] + 1'b1]);
  assign smb_rd_en   = sp_issue;
  assign smb_rd_addr = SW'(p);

  assign idb_en  = (state == S_DN_RD);
  assign idb_row = IW'(XBASE) + IW'(i);

  // ---- FIFO push / DRP request
  always_comb begin
    push      = 1'b0;
    push_a    = smb_rval;
    push_orow = OW'(smb_ridx);
    drp_row   = sp_j;
    if (sp_pend) begin
      push = 1'b1;
    end else if (state == S_DN_J) begin
      push      = 1'b1;
      push_a    = xrow[LW'(j)];
      push_orow = OW'(i);
      drp_row   = IW'(j);
    end
  end

  assign clr_we    = (state == S_CLR);
  assign clr_row   = OW'(i);
  assign drn_rd_en = (state == S_DR_RD);
  assign drn_row   = OW'(i);

  assign busy = (state != S_IDLE) || flushing || cmd_valid;

  always_ff @(posedge clk) begin
    if (colptr_we) colptr[colptr_addr] <= colptr_data;
    if (state == S_DN_LAT) xrow <= idb_data;
    sp_j <= IW'(j);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      flushing <= 1'b0;
      done     <= 1'b0;
      c        <= '0;
      p        <= '0;
      i        <= '0;
      j        <= '0;
      lane     <= '0;
      sp_pend  <= 1'b0;
      flit_out <= FLIT_IDLE;
    end else begin
      done     <= 1'b0;
      sp_pend  <= sp_issue;
      flit_out <= FLIT_IDLE;
      if (flushing && !pipe_busy && !sp_pend && !push) begin
        flushing <= 1'b0;
        done     <= 1'b1;
      end
      unique case (state)
        S_IDLE: if (cmd_valid && !flushing) begin
          c <= cmd;
          i <= '0;
          j <= '0;
          p <= colptr[0];
          if (cmd.n == '0 || (cmd.mode == PE_GEMM && cmd.k == '0)) begin
            flushing <= 1'b1;
          end else begin
            unique case (cmd.mode)
              PE_SPMM:  state <= S_SP;
              PE_GEMM:  state <= S_DN_RD;
              PE_CLEAR: state <= S_CLR;
              PE_DRAIN: state <= S_DR_RD;
            endcase
          end
        end
        S_SP: begin
          if (sp_issue) begin
            p <= p + 1'b1;
          end else if (j + 1'b1 < c.n) begin
            j <= j + 1'b1;
          end else begin
            state    <= S_IDLE;
            flushing <= 1'b1;
          end
        end
        S_DN_RD:  state <= S_DN_LAT;
        S_DN_LAT: begin
          j     <= '0;
          state <= S_DN_J;
        end
        S_DN_J: begin
          j <= j + 1'b1;
          if (j + 1'b1 == c.k) begin
            i <= i + 1'b1;
            if (i + 1'b1 == c.n) begin
              state    <= S_IDLE;
              flushing <= 1'b1;
            end else begin
              state <= S_DN_RD;
            end
          end
        end
        S_CLR: begin
          i <= i + 1'b1;
          if (i + 1'b1 == c.n) begin
            state    <= S_IDLE;
            flushing <= 1'b1;
          end
        end
        S_DR_RD: begin
          lane  <= '0;
          state <= S_DR_EMIT;
        end
        S_DR_EMIT: begin
          flit_out.valid  <= 1'b1;
          flit_out.bcast  <= 1'b0;
          flit_out.dst    <= '0;
          flit_out.bufsel <= BUF_GLB;
          flit_out.addr   <= c.glb_base + (ADDR_W'(i) << LW) + ADDR_W'(lane);
          flit_out.data   <= odmb_rdata[lane];
          lane <= lane + 1'b1;
          if (lane == LW'(NL - 1)) begin
            i <= i + 1'b1;
            if (i + 1'b1 == c.n) begin
              state    <= S_IDLE;
              flushing <= 1'b1;
            end else begin
              state <= S_DR_RD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(cmd_valid && (state != S_IDLE || flushing)))
    else $error("pe_ctrl: command while busy");

endmodule
