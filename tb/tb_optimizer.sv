// tb_optimizer: gives the optimizer sets of up to four tasks and checks its
// decisions against a model in the testbench: rows in proportion to each
// task's MAC count (floor, at least one, then rows added to the heaviest task
// or removed from the largest band until all 16 rows are used), bands placed
// in task order, aggregation columns in proportion to the aggregation share
// (clamped to 1..15), the parallel/sequential inter-phase choice from N*C
// against the band's GLB words, and the commands it sends: 16 column-link
// commands cutting the links between bands, then 16 row-link commands.
module tb_optimizer;
  import morph_pkg::*;
  localparam int NT = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NT-1:0] task_valid;
  logic [31:0] agg_macs [NT], comb_macs [NT];
  logic [15:0] n_dim [NT], c_dim [NT];
  logic busy, done;
  logic [4:0] row0 [NT], nrows [NT], agg_cols [NT];
  logic [NT-1:0] parallel;
  loop_order_e loop_order [NT];
  logic cmd_valid, cmd_ready;
  ctrl_cmd_t cmd;
  int checks = 0, failures = 0;
  ctrl_cmd_t got [$];

  optimizer dut (.*);
  always #5 clk = ~clk;
  assign cmd_ready = ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n && cmd_valid && cmd_ready) got.push_back(cmd);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case();
    longint w [NT], ws;
    int rows [NT], tot, hv, bg, r0, ac, exp_cut;
    logic par;
    got.delete();
    ws = 0;
    for (int i = 0; i < NT; i++) begin
      w[i] = task_valid[i] ? longint'(agg_macs[i]) + longint'(comb_macs[i]) : 0;
      ws += w[i];
    end
    tot = 0;
    for (int i = 0; i < NT; i++) begin
      rows[i] = !task_valid[i] ? 0 : ((16 * w[i] / ws) == 0 ? 1 : int'(16 * w[i] / ws));
      tot += rows[i];
    end
    while (tot != 16) begin
      hv = 0; bg = 0;
      for (int i = 0; i < NT; i++) begin
        if (w[i] > w[hv]) hv = i;
        if (rows[i] > rows[bg]) bg = i;
      end
      if (tot > 16) rows[bg]--; else rows[hv]++;
      tot = 0;
      for (int i = 0; i < NT; i++) tot += rows[i];
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    r0 = 0;
    for (int i = 0; i < NT; i++) begin
      checks++;
      if (int'(nrows[i]) != rows[i] || int'(row0[i]) != r0) begin
        failures++;
        $display("FAIL task %0d rows %0d@%0d want %0d@%0d", i, nrows[i], row0[i], rows[i], r0);
      end
      if (task_valid[i]) begin
        ac = (agg_macs[i] + comb_macs[i] == 0) ? 8 : int'(16 * longint'(agg_macs[i]) / (longint'(agg_macs[i]) + longint'(comb_macs[i])));
        ac = ac < 1 ? 1 : (ac > 15 ? 15 : ac);
        par = (longint'(n_dim[i]) * c_dim[i]) < longint'(rows[i]) * 262144;
        checks++;
        if (int'(agg_cols[i]) != ac || parallel[i] != par ||
            loop_order[i] != (par ? LO_PAR_N0_C0_K_M : LO_SEQ_N0C0K_MC1N1)) failures++;
      end
      r0 += rows[i];
    end
    checks++;
    if (got.size() != 32) failures++;
    for (int q = 0; q < got.size(); q++) begin
      checks++;
      if (q < 16) begin
        exp_cut = 0;
        r0 = 0;
        for (int i = 0; i < NT; i++) begin
          r0 += rows[i];
          if (rows[i] != 0 && r0 - 1 < 15) exp_cut |= 1 << (r0 - 1);
        end
        if (got[q].op != OP_CFG_VLINK || int'(got[q].idx) != q || int'(got[q].store) != exp_cut) failures++;
      end else begin
        if (got[q].op != OP_CFG_HLINK || int'(got[q].idx) != q - 16 || got[q].store != '0) failures++;
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // four tasks of different weight, one of them too large for parallel dataflow
    task_valid = 4'b1111;
    agg_macs = '{32'd1000, 32'd5000, 32'd200, 32'd70000};
    comb_macs = '{32'd3000, 32'd5000, 32'd100, 32'd20000};
    n_dim = '{16'd2708, 16'd3327, 16'd100, 16'd60000};
    c_dim = '{16'd16, 16'd16, 16'd8, 16'd200};
    run_case();
    for (int it = 0; it < 40; it++) begin
      task_valid = 4'($urandom_range(1, 15));
      for (int i = 0; i < NT; i++) begin
        agg_macs[i] = $urandom_range(0, 1000000);
        comb_macs[i] = $urandom_range(1, 1000000);
        n_dim[i] = 16'($urandom);
        c_dim[i] = 16'($urandom_range(1, 600));
      end
      run_case();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
