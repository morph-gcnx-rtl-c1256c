// tb_morph_gcnx: end-to-end run of the whole accelerator at a reduced size
// (4 x 4 PEs, 256-entry SMB, 64-row ODMB, 4096-word GLB banks). The same
// scenario runs at the default size in tb_morph_gcnx_full.
//
// Two GCN tasks share the array. The optimizer partitions it (task 0 gets the
// upper band of rows, task 1 the lower) and cuts the column links between the
// bands. The row grouper balances an 8-row tile. Then, over the host command
// port and the off-chip bank ports:
//  - task 0, aggregation on PE (0,0): bank 0 sends a 12 x 8 sparse CSC tile to
//    the PE (unicast) and the 8 x 16 dense tile to all PEs of row 0
//    (broadcast); the PE runs PE_SPMM.
//  - task 1, combination on PE (b+1, 0), b being the first row of band 1:
//    bank b sends a 4 x 6 and a 6 x 16 dense tile along its row to router
//    (b, 0), which turns them down column 0; the PE runs PE_GEMM at the same
//    time as task 0 runs.
//  - both row links are then reversed to point west and each PE drains its
//    result into its row's bank, where the testbench reads it back through
//    the off-chip port and compares it with a real-arithmetic model.
// Mechanisms counted (each must happen): partition cut by the optimizer,
// broadcast delivery, turn, concurrent PE activity, link reversal, MAC
// forwarding, sparse and dense mode, write-back into the GLB.
module tb_morph_gcnx;
  import morph_pkg::*;
  localparam int R = 4, C = 4, N = R * C, NT = 4, BWORDS = 4096;
  localparam int BW = $clog2(BWORDS);

  logic clk = 0, rst_n = 0;
  logic host_cmd_valid = 0, host_cmd_ready;
  ctrl_cmd_t host_cmd = '0;
  logic opt_start = 0, opt_busy, opt_done;
  logic [NT-1:0] opt_task_valid = '0;
  logic [31:0] opt_agg_macs [NT], opt_comb_macs [NT];
  logic [15:0] opt_n_dim [NT], opt_c_dim [NT];
  logic [4:0] opt_row0 [NT], opt_nrows [NT], opt_agg_cols [NT];
  logic [NT-1:0] opt_parallel;
  loop_order_e opt_loop_order [NT];
  logic rg_start = 0, rg_valid;
  logic [15:0] rg_nnz [8];
  logic [1:0] rg_pe_of_row [8];
  logic [2:0] rg_slot_of_row [8], rg_row_of [8];
  logic [R-1:0] dram_we = '0, dram_re = '0;
  logic [BW-1:0] dram_addr [R];
  fp64_t dram_wdata [R], dram_rdata [R];
  logic [N-1:0] pe_busy, pe_bypass;
  logic link_collision;

  morph_gcnx #(.ROWS(R), .COLS(C), .SDEPTH(256), .OROWS(64), .BANKW(BWORDS)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_bcast = 0, n_turn = 0, n_conc = 0, n_bypass = 0, n_wb = 0, n_coll = 0;
  int b1;   // first row of band 1

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism monitors
  always @(posedge clk) if (rst_n) begin
    int nb;
    nb = 0;
    for (int p = 0; p < N; p++) if (dut.pe_rx[p].valid && dut.pe_rx[p].bcast) nb++;
    if (nb >= 2) n_bcast++;
    if (b1 > 0 && dut.pe_rx[(b1 + 1) * C].valid) n_turn++;
    if (b1 > 0 && pe_busy[0] && pe_busy[(b1 + 1) * C]) n_conc++;
    if (pe_bypass != '0) n_bypass++;
    for (int r = 0; r < R; r++) if (dut.bank_rx[r].valid && dut.bank_rx[r].bufsel == BUF_GLB) n_wb++;
    if (link_collision) n_coll++;
  end

  task automatic host(input ctrl_cmd_t c);
    @(negedge clk);
    host_cmd = c; host_cmd_valid = 1;
    @(posedge clk);
    while (!host_cmd_ready) @(posedge clk);
    #1 host_cmd_valid = 0;
  endtask

  task automatic dram_write(input int bank, input int addr, input fp64_t d);
    @(negedge clk);
    dram_we = '0; dram_we[bank] = 1'b1; dram_addr[bank] = BW'(addr); dram_wdata[bank] = d;
    @(negedge clk);
    dram_we = '0;
  endtask

  task automatic dram_read(input int bank, input int addr, output fp64_t d);
    @(negedge clk);
    dram_re = '0; dram_re[bank] = 1'b1; dram_addr[bank] = BW'(addr);
    @(negedge clk);
    dram_re = '0;
    d = dram_rdata[bank];
  endtask

  function automatic ctrl_cmd_t stream(int bank, int base, int len, logic bc, int dst, buf_sel_e b, int addr);
    ctrl_cmd_t c;
    c = '0; c.op = OP_GLB_STREAM; c.idx = 8'(bank); c.base = 20'(base); c.len = 20'(len);
    c.hdr = FLIT_IDLE; c.hdr.bcast = bc; c.hdr.dst = 8'(dst); c.hdr.bufsel = b; c.hdr.addr = 20'(addr);
    return c;
  endfunction

  function automatic ctrl_cmd_t pecmd(int r, int cc, pe_mode_e m, int n, int k, int base);
    ctrl_cmd_t c;
    c = '0; c.op = OP_PE_CMD; c.r0 = 4'(r); c.r1 = 4'(r); c.c0 = 4'(cc); c.c1 = 4'(cc);
    c.pcmd = '{mode: m, n: 16'(n), k: 16'(k), glb_base: 20'(base)};
    return c;
  endfunction

  function automatic ctrl_cmd_t rtr(int id, inj_sel_e h, inj_sel_e v, logic fv);
    ctrl_cmd_t c;
    c = '0; c.op = OP_CFG_ROUTER; c.idx = 8'(id); c.rcfg = '{h_inj: h, v_inj: v, pe_from_v: fv};
    return c;
  endfunction

  function automatic ctrl_cmd_t hlink(int row, logic [16:0] st, logic [16:0] d);
    ctrl_cmd_t c;
    c = '0; c.op = OP_CFG_HLINK; c.idx = 8'(row); c.store = st; c.dir = d;
    return c;
  endfunction

  function automatic real rv();
    return $itor($urandom_range(0, 3000)) / 128.0 - 11.7;
  endfunction

  real am [12][16];   // aggregation result model
  real cm [4][16];    // combination result model

  initial begin
    int colptr [9];
    int rows [$];
    real vals [$];
    real xd [8][16];
    real wd [6][16];
    real xl [4][6];
    int nnz, lastr, cyc0;
    ctrl_cmd_t c;
    fp64_t d;
    b1 = 0;
    for (int r = 0; r < R; r++) begin dram_addr[r] = '0; dram_wdata[r] = '0; end
    for (int i = 0; i < NT; i++) begin
      opt_agg_macs[i] = '0; opt_comb_macs[i] = '0; opt_n_dim[i] = '0; opt_c_dim[i] = '0;
    end
    for (int i = 0; i < 8; i++) rg_nnz[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 1. optimizer: two tasks (Cora-like and Citeseer-like sampled sizes)
    @(negedge clk);
    opt_task_valid = 4'b0011;
    opt_agg_macs[0] = 32'd700000;  opt_comb_macs[0] = 32'd300000;
    opt_agg_macs[1] = 32'd300000;  opt_comb_macs[1] = 32'd700000;
    opt_n_dim[0] = 16'd2708; opt_c_dim[0] = 16'd16;
    opt_n_dim[1] = 16'd3327; opt_c_dim[1] = 16'd16;
    opt_start = 1;
    @(negedge clk);
    opt_start = 0;
    while (!opt_done) @(negedge clk);
    repeat (2) @(negedge clk);
    b1 = int'(opt_row0[1]);
    checks++;
    if (int'(opt_nrows[0]) + int'(opt_nrows[1]) != R || b1 < 1 || b1 + 1 >= R) begin
      failures++;
      $display("FAIL optimizer rows %0d/%0d", opt_nrows[0], opt_nrows[1]);
    end
    checks++;
    if (dut.v_store[0] != (R-1)'(1 << (b1 - 1)) || dut.h_store[0] != '0) begin
      failures++;
      $display("FAIL link partition");
    end

    // ---- 2. row grouper
    for (int i = 0; i < 8; i++) rg_nnz[i] = 16'(i == 5 ? 10 : i == 4 ? 1 : 5 + i % 3);
    @(negedge clk); rg_start = 1; @(negedge clk); rg_start = 0;
    checks++;
    if (!rg_valid || rg_pe_of_row[5] != rg_pe_of_row[4]) failures++;

    // ---- 3. operands into the GLB through the off-chip ports
    nnz = 0; lastr = 0;
    for (int j = 0; j < 8; j++) begin
      colptr[j] = nnz;
      if (j != 2)
        for (int e = 0; e < 1 + (j * 5) % 7; e++) begin
          lastr = (e % 2 == 1) ? lastr : $urandom_range(0, 11);
          rows.push_back(lastr); vals.push_back(rv()); nnz++;
        end
    end
    colptr[8] = nnz;
    for (int j = 0; j < 9; j++) dram_write(0, j, 64'(colptr[j]));
    for (int e = 0; e < nnz; e++) begin
      dram_write(0, 100 + e, $realtobits(vals[e]));
      dram_write(0, 300 + e, 64'(rows[e]));
    end
    for (int j = 0; j < 8; j++) for (int l = 0; l < 16; l++) begin
      xd[j][l] = rv(); dram_write(0, 1000 + j * 16 + l, $realtobits(xd[j][l]));
    end
    for (int j = 0; j < 6; j++) for (int l = 0; l < 16; l++) begin
      wd[j][l] = rv(); dram_write(b1, j * 16 + l, $realtobits(wd[j][l]));
    end
    for (int i = 0; i < 4; i++) for (int l = 0; l < 16; l++) begin
      if (l < 6) xl[i][l] = rv();
      dram_write(b1, 200 + i * 16 + l, (l < 6) ? $realtobits(xl[i][l]) : 64'd0);
    end
    for (int i = 0; i < 12; i++) for (int l = 0; l < 16; l++) am[i][l] = 0.0;
    for (int j = 0; j < 8; j++)
      for (int e = colptr[j]; e < colptr[j + 1]; e++)
        for (int l = 0; l < 16; l++) am[rows[e]][l] = am[rows[e]][l] + vals[e] * xd[j][l];
    for (int i = 0; i < 4; i++) for (int l = 0; l < 16; l++) cm[i][l] = 0.0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 6; j++)
        for (int l = 0; l < 16; l++) cm[i][l] = cm[i][l] + xl[i][j] * wd[j][l];

    // ---- 4. task 0 loads (row 0, links point east from the bank)
    host(stream(0, 0, 9, 0, 0, BUF_COLPTR, 0));
    host(stream(0, 100, nnz, 0, 0, BUF_SMB_VAL, 0));
    host(stream(0, 300, nnz, 0, 0, BUF_SMB_IDX, 0));
    host(stream(0, 1000, 128, 1, 0, BUF_IDMB, 0));          // broadcast to row 0
    // ---- task 1 loads: bank b1 -> router (b1,0) turns down column 0 -> PE (b1+1,0)
    host(rtr(b1 * C, INJ_NONE, INJ_TURN, 1'b0));
    host(rtr((b1 + 1) * C, INJ_NONE, INJ_NONE, 1'b1));
    host(stream(b1, 0, 96, 0, (b1 + 1) * C, BUF_IDMB, 0));
    host(stream(b1, 200, 64, 0, (b1 + 1) * C, BUF_IDMB, 256));
    c = '0; c.op = OP_WAIT; c.r0 = 0; c.r1 = 4'(R - 1); c.c0 = 0; c.c1 = 4'(C - 1);
    host(c);

    // ---- 5. both tasks compute at once
    host(pecmd(0, 0, PE_CLEAR, 12, 0, 0));
    host(pecmd(b1 + 1, 0, PE_CLEAR, 4, 0, 0));
    cyc0 = 0;
    host(pecmd(0, 0, PE_SPMM, 8, 0, 0));
    host(pecmd(b1 + 1, 0, PE_GEMM, 4, 6, 0));
    host(c);

    // ---- 6. reverse both row links towards the banks and drain
    host(hlink(0, 17'd0, 17'd0));
    host(hlink(b1 + 1, 17'd0, 17'd0));
    host(rtr(0, INJ_PE, INJ_NONE, 1'b0));
    host(rtr((b1 + 1) * C, INJ_PE, INJ_NONE, 1'b1));
    host(pecmd(0, 0, PE_DRAIN, 12, 0, 2048));
    host(pecmd(b1 + 1, 0, PE_DRAIN, 4, 0, 2048));
    host(c);
    host('0);   // a NOP is taken only once the wait has ended

    // ---- 7. read back and compare
    for (int i = 0; i < 12; i++) for (int l = 0; l < 16; l++) begin
      dram_read(0, 2048 + i * 16 + l, d);
      checks++;
      if (d !== $realtobits(am[i][l])) begin
        failures++;
        if (failures < 20) $display("FAIL agg (%0d,%0d) %h want %h", i, l, d, $realtobits(am[i][l]));
      end
    end
    for (int i = 0; i < 4; i++) for (int l = 0; l < 16; l++) begin
      dram_read(b1 + 1, 2048 + i * 16 + l, d);
      checks++;
      if (d !== $realtobits(cm[i][l])) begin
        failures++;
        if (failures < 20) $display("FAIL comb (%0d,%0d)", i, l);
      end
    end
    $display("mechanisms: broadcast=%0d turn=%0d concurrent=%0d bypass=%0d writeback=%0d collisions=%0d",
             n_bcast, n_turn, n_conc, n_bypass, n_wb, n_coll);
    checks++; if (n_bcast == 0) failures++;
    checks++; if (n_turn == 0) failures++;
    checks++; if (n_conc == 0) failures++;
    checks++; if (n_bypass == 0) failures++;
    checks++; if (n_wb != (12 + 4) * 16) failures++;
    checks++; if (n_coll != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
