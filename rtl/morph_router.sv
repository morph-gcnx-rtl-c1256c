// morph_router: morphable router at one PE. It joins its PE to the row link
// through a horizontal switch and to the column link through a vertical
// switch; there is no general mesh routing, only row-wise and column-wise
// movement and a one-cycle registered turn between the two.
//
// cfg.h_inj / cfg.v_inj choose what each switch drives onto its link (nothing,
// the PE's flit, or the flit turned from the other link), cfg.pe_from_v picks
// which link feeds the PE. The flit delivered to the PE (pe_rx) is valid only
// when it is addressed to this router's id or broadcast. Timing: link to PE is
// combinational (the PE registers it), a turn costs one cycle.
module morph_router
  import morph_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [ID_W-1:0] id,
  input  router_cfg_t     cfg,
  input  flit_t           pe_tx,
  output flit_t           pe_rx,
  output flit_t           h_tx,
  input  flit_t           h_rx,
  output flit_t           v_tx,
  input  flit_t           v_rx
);

  flit_t h_turn_q, v_turn_q;   // flits received last cycle, for turning
  logic  h_for_pe, v_for_pe;

  morph_switch u_hsw (.id, .inj(cfg.h_inj), .pe_flit(pe_tx), .turn_flit(v_turn_q),
                      .link_tx(h_tx), .link_rx(h_rx), .for_pe(h_for_pe));
  morph_switch u_vsw (.id, .inj(cfg.v_inj), .pe_flit(pe_tx), .turn_flit(h_turn_q),
                      .link_tx(v_tx), .link_rx(v_rx), .for_pe(v_for_pe));

  always_comb begin
    pe_rx = FLIT_IDLE;
    if (cfg.pe_from_v) begin
      if (v_for_pe) pe_rx = v_rx;
    end else begin
      if (h_for_pe) pe_rx = h_rx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_turn_q <= FLIT_IDLE;
      v_turn_q <= FLIT_IDLE;
    end else begin
      h_turn_q <= h_rx;
      v_turn_q <= v_rx;
    end
  end

endmodule
