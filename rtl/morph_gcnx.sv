// morph_gcnx: top level of the Morph-GCNX graph convolutional network
// accelerator. A GCN layer is a chain product A*X*W: a sparse aggregation
// (A times a dense matrix) and a dense combination (times W). The array here
// runs either kind on the same PEs, and can be split at run time into
// sub-accelerators that run different GCN tasks, or the two phases of one,
// side by side.
//
// Parts: an optimizer that sizes the partition for up to four tasks and
// programs the link segmentation; a row grouper for density-balanced row
// assignment; the controller that executes commands; ROWS x COLS PEs, each
// with its morphable router; the morphable row and column links; and one
// global-buffer bank per PE row at the west end of that row's link.
//
// Interfaces:
//  host_cmd_*  command stream into the controller (the optimizer's own link
//              commands take precedence while it is running).
//  opt_*       optimizer inputs (per task sampled workload) and decisions.
//  rg_*        row grouper inputs and results.
//  dram_*      per-bank word port for the off-chip memory side (the DRAM
//              itself is outside this design).
//  pe_busy / pe_bypass / link_collision  status for observation.
// All ports are synchronous to clk; rst_n is an asynchronous active-low reset.
// The default parameters are the published configuration: 16 x 16 PEs,
// 320 KB / 4 KB / 256 KB PE buffers and a 32 MB global buffer.
module morph_gcnx
  import morph_pkg::*;
#(
  parameter int unsigned ROWS   = PE_ROWS,
  parameter int unsigned COLS   = PE_COLS,
  parameter int unsigned SDEPTH = SMB_DEPTH,
  parameter int unsigned IROWS  = IDMB_ROWS,
  parameter int unsigned OROWS  = ODMB_ROWS,
  parameter int unsigned BANKW  = BANK_WORDS,
  parameter int unsigned NT     = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host commands
  input  logic                   host_cmd_valid,
  input  ctrl_cmd_t              host_cmd,
  output logic                   host_cmd_ready,
  // optimizer
  input  logic                   opt_start,
  input  logic [NT-1:0]          opt_task_valid,
  input  logic [31:0]            opt_agg_macs  [NT],
  input  logic [31:0]            opt_comb_macs [NT],
  input  logic [15:0]            opt_n_dim     [NT],
  input  logic [15:0]            opt_c_dim     [NT],
  output logic                   opt_busy,
  output logic                   opt_done,
  output logic [4:0]             opt_row0      [NT],
  output logic [4:0]             opt_nrows     [NT],
  output logic [4:0]             opt_agg_cols  [NT],
  output logic [NT-1:0]          opt_parallel,
  output loop_order_e            opt_loop_order [NT],
  // row grouper
  input  logic                   rg_start,
  input  logic [15:0]            rg_nnz        [8],
  output logic                   rg_valid,
  output logic [1:0]             rg_pe_of_row  [8],
  output logic [2:0]             rg_slot_of_row [8],
  output logic [2:0]             rg_row_of     [8],
  // off-chip side of the GLB banks
  input  logic [ROWS-1:0]        dram_we,
  input  logic [ROWS-1:0]        dram_re,
  input  logic [$clog2(BANKW)-1:0] dram_addr  [ROWS],
  input  fp64_t                  dram_wdata [ROWS],
  output fp64_t                  dram_rdata [ROWS],
  // status
  output logic [ROWS*COLS-1:0]   pe_busy,
  output logic [ROWS*COLS-1:0]   pe_bypass,
  output logic                   link_collision
);

  localparam int unsigned NPE = ROWS * COLS;

  // ---- optimizer and command path
  logic      opt_cmd_valid, ctrl_ready, ctrl_valid;
  ctrl_cmd_t opt_cmd, ctrl_cmd;

  optimizer #(.NT(NT), .ROWS(ROWS), .COLS(COLS), .BANKW(BANKW)) u_opt (
    .clk, .rst_n, .start(opt_start), .task_valid(opt_task_valid),
    .agg_macs(opt_agg_macs), .comb_macs(opt_comb_macs), .n_dim(opt_n_dim), .c_dim(opt_c_dim),
    .busy(opt_busy), .done(opt_done), .row0(opt_row0), .nrows(opt_nrows),
    .agg_cols(opt_agg_cols), .parallel(opt_parallel), .loop_order(opt_loop_order),
    .cmd_valid(opt_cmd_valid), .cmd(opt_cmd), .cmd_ready(ctrl_ready && opt_cmd_valid)
  );

  assign ctrl_valid     = opt_cmd_valid || host_cmd_valid;
  assign ctrl_cmd       = opt_cmd_valid ? opt_cmd : host_cmd;
  assign host_cmd_ready = ctrl_ready && !opt_cmd_valid;

  row_grouper #(.R(8), .P(4)) u_rg (
    .clk, .rst_n, .start(rg_start), .nnz(rg_nnz), .valid(rg_valid),
    .pe_of_row(rg_pe_of_row), .slot_of_row(rg_slot_of_row), .row_of(rg_row_of)
  );

  // ---- controller
  router_cfg_t       rcfg    [NPE];
  logic [COLS-1:0]   h_store [ROWS];
  logic [COLS-1:0]   h_dir   [ROWS];
  logic [ROWS-2:0]   v_store [COLS];
  logic [ROWS-2:0]   v_dir   [COLS];
  logic [ROWS-1:0]   bank_cmd_valid, bank_busy;
  logic [ADDR_W-1:0] bank_cmd_base, bank_cmd_len;
  flit_t             bank_cmd_hdr;
  logic [NPE-1:0]    pe_cmd_valid;
  pe_cmd_t           pe_cmd;

  controller #(.ROWS(ROWS), .COLS(COLS)) u_ctrl (
    .clk, .rst_n, .cmd_valid(ctrl_valid), .cmd(ctrl_cmd), .cmd_ready(ctrl_ready),
    .rcfg, .h_store, .h_dir, .v_store, .v_dir,
    .bank_cmd_valid, .bank_cmd_base, .bank_cmd_len, .bank_cmd_hdr, .bank_busy,
    .pe_cmd_valid, .pe_cmd, .pe_busy
  );

  // ---- interconnect
  flit_t pe_tx [NPE];
  flit_t pe_rx [NPE];
  flit_t bank_tx [ROWS];
  flit_t bank_rx [ROWS];

  morph_interconnect #(.ROWS(ROWS), .COLS(COLS)) u_noc (
    .clk, .rst_n, .rcfg, .h_store, .h_dir, .v_store, .v_dir,
    .pe_tx, .pe_rx, .bank_tx, .bank_rx, .collision(link_collision)
  );

  // ---- PE array
  for (genvar p = 0; p < NPE; p++) begin : g_pe
    logic pe_done;
    pe #(.SDEPTH(SDEPTH), .IROWS(IROWS), .OROWS(OROWS)) u_pe (
      .clk, .rst_n, .flit_in(pe_rx[p]), .flit_out(pe_tx[p]),
      .cmd_valid(pe_cmd_valid[p]), .cmd(pe_cmd), .busy(pe_busy[p]), .done(pe_done),
      .bypass_hit(pe_bypass[p])
    );
  end

  // ---- global buffer banks
  for (genvar r = 0; r < ROWS; r++) begin : g_bank
    glb_bank #(.WORDS(BANKW)) u_bank (
      .clk, .rst_n, .cmd_valid(bank_cmd_valid[r]), .cmd_base(bank_cmd_base),
      .cmd_len(bank_cmd_len), .cmd_hdr(bank_cmd_hdr), .busy(bank_busy[r]),
      .link_tx(bank_tx[r]), .link_rx(bank_rx[r]),
      .host_we(dram_we[r]), .host_re(dram_re[r]), .host_addr(dram_addr[r]),
      .host_wdata(dram_wdata[r]), .host_rdata(dram_rdata[r])
    );
  end

endmodule
