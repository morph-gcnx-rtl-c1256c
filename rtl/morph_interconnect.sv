// morph_interconnect: the morphable interconnect of the PE array: ROWS x COLS
// morphable routers in a mesh-like arrangement, one morphable link along
// each row and one along each column.
//
// Row link r has COLS+1 nodes: node 0 is global-buffer bank r at the west
// edge, node c+1 is the router of PE (r, c). Column link c has ROWS nodes, the
// routers of PEs (0..ROWS-1, c). Each link's repeaters are configured by its
// store/dir masks (see morph_link); switching repeaters off cuts the links
// at partition boundaries so that sub-accelerators use disjoint pieces of the
// interconnect. A bank reaches a whole row by broadcast, and a whole column
// through a turn at one router. The 16x16 arrangement and the links along rows
// and columns follow the published design; the bank attachment point is this
// design's choice. collision reports a configuration error on any link.
module morph_interconnect
  import morph_pkg::*;
#(
  parameter int unsigned ROWS = PE_ROWS,
  parameter int unsigned COLS = PE_COLS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  router_cfg_t       rcfg     [ROWS*COLS],
  input  logic [COLS-1:0]   h_store  [ROWS],
  input  logic [COLS-1:0]   h_dir    [ROWS],
  input  logic [ROWS-2:0]   v_store  [COLS],
  input  logic [ROWS-2:0]   v_dir    [COLS],
  input  flit_t             pe_tx    [ROWS*COLS],
  output flit_t             pe_rx    [ROWS*COLS],
  input  flit_t             bank_tx  [ROWS],
  output flit_t             bank_rx  [ROWS],
  output logic              collision
);

  flit_t hl_tx [ROWS][COLS+1];
  flit_t hl_rx [ROWS][COLS+1];
  flit_t vl_tx [COLS][ROWS];
  flit_t vl_rx [COLS][ROWS];
  logic  h_col [ROWS];
  logic  v_col [COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign hl_tx[r][0] = bank_tx[r];
    assign bank_rx[r]  = hl_rx[r][0];
    morph_link #(.NODES(COLS + 1)) u_hlink (
      .tx(hl_tx[r]), .store(h_store[r]), .dir(h_dir[r]), .rx(hl_rx[r]), .collision(h_col[r])
    );
    for (genvar c = 0; c < COLS; c++) begin : g_col
      morph_router u_router (
        .clk, .rst_n, .id(ID_W'(r * COLS + c)), .cfg(rcfg[r*COLS+c]),
        .pe_tx(pe_tx[r*COLS+c]), .pe_rx(pe_rx[r*COLS+c]),
        .h_tx(hl_tx[r][c+1]), .h_rx(hl_rx[r][c+1]),
        .v_tx(vl_tx[c][r]), .v_rx(vl_rx[c][r])
      );
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_vlink
    morph_link #(.NODES(ROWS)) u_vlink (
      .tx(vl_tx[c]), .store(v_store[c]), .dir(v_dir[c]), .rx(vl_rx[c]), .collision(v_col[c])
    );
  end

  always_comb begin
    collision = 1'b0;
    for (int r = 0; r < ROWS; r++) collision |= h_col[r];
    for (int c = 0; c < COLS; c++) collision |= v_col[c];
  end

endmodule
