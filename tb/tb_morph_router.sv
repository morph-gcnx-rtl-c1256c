// tb_morph_router: drives a morphable router (and with it both of its
// switches) through every configuration: injection of the PE's flit onto the
// row or the column link, the one-cycle registered turn from row to column and
// from column to row, delivery to the PE from either link with the
// destination filter (own id, broadcast, other id, global-buffer writes).
module tb_morph_router;
  import morph_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] id = 8'd37;
  router_cfg_t cfg;
  flit_t pe_tx, pe_rx, h_tx, h_rx, v_tx, v_rx;
  int checks = 0, failures = 0;

  morph_router dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(logic [7:0] dst, logic bc, buf_sel_e b);
    flit_t f;
    f = FLIT_IDLE;
    f.valid = 1'b1; f.dst = dst; f.bcast = bc; f.bufsel = b; f.addr = 20'($urandom); f.data = {$urandom, $urandom};
    return f;
  endfunction

  task automatic expect_eq(input flit_t got, input flit_t want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL at %0t: got %h want %h", $time, got, want);
    end
  endtask

  initial begin
    flit_t f, g;
    cfg = '{h_inj: INJ_NONE, v_inj: INJ_NONE, pe_from_v: 1'b0};
    pe_tx = FLIT_IDLE; h_rx = FLIT_IDLE; v_rx = FLIT_IDLE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      // PE injection
      f = mk(8'($urandom), 1'b0, BUF_IDMB);
      pe_tx = f;
      cfg.h_inj = INJ_PE; cfg.v_inj = INJ_NONE; #1;
      expect_eq(h_tx, f); expect_eq(v_tx, FLIT_IDLE);
      cfg.h_inj = INJ_NONE; cfg.v_inj = INJ_PE; #1;
      expect_eq(v_tx, f); expect_eq(h_tx, FLIT_IDLE);
      pe_tx = FLIT_IDLE;
      // turn row -> column
      g = mk(8'($urandom), $urandom_range(0, 1), BUF_SMB_VAL);
      h_rx = g; cfg.v_inj = INJ_TURN; cfg.h_inj = INJ_NONE;
      @(negedge clk);
      h_rx = FLIT_IDLE; #1;
      expect_eq(v_tx, g);
      // turn column -> row
      v_rx = g; cfg.h_inj = INJ_TURN; cfg.v_inj = INJ_NONE;
      @(negedge clk);
      v_rx = FLIT_IDLE; #1;
      expect_eq(h_tx, g);
      // delivery filter
      cfg.h_inj = INJ_NONE;
      cfg.pe_from_v = $urandom_range(0, 1);
      case ($urandom_range(0, 3))
        0: f = mk(id, 1'b0, BUF_IDMB);           // for this PE
        1: f = mk(id + 8'd1, 1'b1, BUF_ODMB);    // broadcast
        2: f = mk(id + 8'd1, 1'b0, BUF_IDMB);    // for another PE
        default: f = mk(id, 1'b0, BUF_GLB);      // for the bank
      endcase
      if (cfg.pe_from_v) begin v_rx = f; h_rx = mk(id, 1'b1, BUF_SMB_IDX); end
      else begin h_rx = f; v_rx = mk(id, 1'b1, BUF_SMB_IDX); end
      #1;
      if ((f.dst == id || f.bcast) && f.bufsel != BUF_GLB) expect_eq(pe_rx, f);
      else expect_eq(pe_rx, FLIT_IDLE);
      h_rx = FLIT_IDLE; v_rx = FLIT_IDLE;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
