// morph_link: one morphable link, the wire that runs along a row or a column
// of routers. Between every two neighbouring nodes sits a quad-state repeater
// with two controls: store[i] switches repeater i (between node i and i+1)
// off, cutting the link into separate segments, and dir[i] sets the way the
// signal passes it: 1 towards the higher-numbered node, 0 towards the lower.
//
// A flit driven by node n travels, in the same cycle, through every repeater
// that is on and points away from n, so all nodes downstream of n in its
// segment receive it (broadcast); a receiver simply ignores flits not meant
// for it (unicast). Because direction is set per repeater, one physical link
// can carry traffic both ways at once in different segments. rx[n] shows what
// arrives at node n from either side; a node does not see its own flit.
// Two flits meeting in one place (a node driving while an upstream flit passes
// it, or flits arriving from both sides) is a configuration error: the nearer
// flit wins and `collision` is raised. Segmentation and reversal follow the
// published repeater; the single-cycle propagation is this design's model of it.
module morph_link
  import morph_pkg::*;
#(
  parameter int unsigned NODES = PE_COLS + 1
) (
  input  flit_t            tx    [NODES],
  input  logic [NODES-2:0] store,
  input  logic [NODES-2:0] dir,
  output flit_t            rx    [NODES],
  output logic             collision
);

  // up[n]: flit leaving node n towards n+1; dn[n]: flit leaving node n towards n-1
  flit_t up [NODES];
  flit_t dn [NODES];
  logic  pass_up [NODES-1];
  logic  pass_dn [NODES-1];

  for (genvar i = 0; i < NODES - 1; i++) begin : g_rep
    assign pass_up[i] = !store[i] &&  dir[i];
    assign pass_dn[i] = !store[i] && !dir[i];
  end

  always_comb begin
    collision = 1'b0;
    // upward chain
    up[0] = tx[0];
    for (int n = 1; n < NODES; n++) begin
      if (tx[n].valid) begin
        up[n] = tx[n];
        if (pass_up[n-1] && up[n-1].valid) collision = 1'b1;
      end else begin
        up[n] = pass_up[n-1] ? up[n-1] : FLIT_IDLE;
      end
    end
    // downward chain
    dn[NODES-1] = tx[NODES-1];
    for (int n = NODES - 2; n >= 0; n--) begin
      if (tx[n].valid) begin
        dn[n] = tx[n];
        if (pass_dn[n] && dn[n+1].valid) collision = 1'b1;
      end else begin
        dn[n] = pass_dn[n] ? dn[n+1] : FLIT_IDLE;
      end
    end
    // what arrives at each node
    for (int n = 0; n < NODES; n++) begin
      rx[n] = FLIT_IDLE;
      if (n > 0 && pass_up[n-1] && up[n-1].valid) rx[n] = up[n-1];
      if (n < NODES - 1 && pass_dn[n] && dn[n+1].valid) begin
        if (rx[n].valid) collision = 1'b1;
        else rx[n] = dn[n+1];
      end
    end
  end

endmodule
