// morph_switch: the horizontal or the vertical switch of a morphable router
// (the two are the same circuit, one facing the row link, one the column
// link).
//
// Outgoing: depending on inj, the switch drives nothing, the PE's flit, or the
// flit the other switch received in the previous cycle (a turn from row to
// column or back, one cycle, registered in the router) onto its link.
// Incoming: it passes the flit arriving on its link to the router and marks it
// for the PE when it is valid, not a global-buffer write, and either a
// broadcast or addressed to this router's PE. The published router is made
// of these two switches; their internal selection is this design's choice.
module morph_switch
  import morph_pkg::*;
(
  input  logic [ID_W-1:0] id,
  input  inj_sel_e        inj,
  input  flit_t           pe_flit,
  input  flit_t           turn_flit,
  output flit_t           link_tx,
  input  flit_t           link_rx,
  output logic            for_pe
);

  always_comb begin
    unique case (inj)
      INJ_PE:   link_tx = pe_flit;
      INJ_TURN: link_tx = turn_flit;
      default:  link_tx = FLIT_IDLE;
    endcase
    for_pe = link_rx.valid && link_rx.bufsel != BUF_GLB && (link_rx.bcast || link_rx.dst == id);
  end

endmodule
