// tb_controller: feeds the controller a command sequence with models of the
// PE busy flags and the bank busy flags (PEs busy for a fixed time after a
// start, banks for the stream length) and checks: router and link registers
// after configuration commands; the reset state of the links (all repeaters
// off); that a stream command pulses only its bank and blocks until the bank
// is idle; that a PE command starts exactly the PEs of its rectangle at once
// and waits for busy PEs; and that WAIT holds cmd_ready low until they finish.
module tb_controller;
  import morph_pkg::*;
  localparam int R = 16, C = 16, N = R * C;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  ctrl_cmd_t cmd = '0;
  router_cfg_t rcfg [N];
  logic [C-1:0] h_store [R], h_dir [R];
  logic [R-2:0] v_store [C], v_dir [C];
  logic [R-1:0] bank_cmd_valid, bank_busy;
  logic [19:0] bank_cmd_base, bank_cmd_len;
  flit_t bank_cmd_hdr;
  logic [N-1:0] pe_cmd_valid, pe_busy;
  pe_cmd_t pe_cmd;
  int checks = 0, failures = 0;
  int pe_left [N];
  int bank_left [R];
  int pe_starts [N];
  int bank_starts [R];

  controller dut (.*);
  always #5 clk = ~clk;

  always_comb for (int p = 0; p < N; p++) pe_busy[p] = (pe_left[p] > 0) || pe_cmd_valid[p];
  always_comb for (int r = 0; r < R; r++) bank_busy[r] = (bank_left[r] > 0) || bank_cmd_valid[r];
  always @(posedge clk) begin
    for (int p = 0; p < N; p++) begin
      if (rst_n && pe_cmd_valid[p]) begin
        if (pe_left[p] > 0) failures++;   // started while busy
        pe_left[p] <= 20;
        pe_starts[p]++;
      end else if (pe_left[p] > 0) pe_left[p] <= pe_left[p] - 1;
    end
    for (int r = 0; r < R; r++) begin
      if (rst_n && bank_cmd_valid[r]) begin
        bank_left[r] <= int'(bank_cmd_len) + 2;
        bank_starts[r]++;
      end else if (bank_left[r] > 0) bank_left[r] <= bank_left[r] - 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("state=%0d pe_busy=%h bank_busy=%h rect=%h", dut.state, pe_busy, bank_busy, dut.rect);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input ctrl_cmd_t c, output int waited);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    waited = 0;
    while (!cmd_ready) begin @(negedge clk); waited++; end
    @(posedge clk);
    #1 cmd_valid = 0;
  endtask

  initial begin
    ctrl_cmd_t c;
    int w, t0;
    for (int p = 0; p < N; p++) begin pe_left[p] = 0; pe_starts[p] = 0; end
    for (int r = 0; r < R; r++) begin bank_left[r] = 0; bank_starts[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (h_store[3] != '1 || v_store[9] != '1 || rcfg[5].h_inj != INJ_NONE) failures++;
    // configuration
    c = '0; c.op = OP_CFG_ROUTER; c.idx = 8'd77; c.rcfg = '{h_inj: INJ_TURN, v_inj: INJ_PE, pe_from_v: 1'b1};
    issue(c, w);
    c = '0; c.op = OP_CFG_HLINK; c.idx = 8'd4; c.store = 17'h00F0; c.dir = 17'h1234;
    issue(c, w);
    c = '0; c.op = OP_CFG_VLINK; c.idx = 8'd11; c.store = 17'h0101; c.dir = 17'h7FFF;
    issue(c, w);
    @(negedge clk);
    checks++;
    if (rcfg[77] != '{h_inj: INJ_TURN, v_inj: INJ_PE, pe_from_v: 1'b1} || rcfg[76].h_inj != INJ_NONE) failures++;
    checks++;
    if (h_store[4] != 16'h00F0 || h_dir[4] != 16'h1234 || h_store[5] != '1) failures++;
    checks++;
    if (v_store[11] != 15'h0101 || v_dir[11] != 15'h7FFF) failures++;
    // stream blocks until the bank is done
    c = '0; c.op = OP_GLB_STREAM; c.idx = 8'd6; c.base = 20'd100; c.len = 20'd30; c.hdr.bufsel = BUF_SMB_VAL;
    t0 = $time;
    issue(c, w);
    c = '0; c.op = OP_NOP;
    issue(c, w);
    checks++;
    if (bank_starts[6] != 1 || bank_starts[5] != 0 || w < 30) begin
      failures++;
      $display("FAIL stream did not block (%0d)", w);
    end
    // PE command to rows 2..3, columns 4..6
    c = '0; c.op = OP_PE_CMD; c.r0 = 2; c.r1 = 3; c.c0 = 4; c.c1 = 6; c.pcmd.mode = PE_SPMM; c.pcmd.n = 16'd5;
    issue(c, w);
    // second command to an overlapping rectangle must wait for those PEs
    c.r0 = 3; c.r1 = 3; c.c0 = 6; c.c1 = 8;
    issue(c, w);
    c = '0; c.op = OP_NOP;
    issue(c, w);
    checks++;
    if (w < 15) begin failures++; $display("FAIL PE command did not wait (%0d)", w); end
    c = '0; c.op = OP_WAIT; c.r0 = 0; c.r1 = 15; c.c0 = 0; c.c1 = 15;
    issue(c, w);
    c = '0; c.op = OP_NOP;
    issue(c, w);
    checks++;
    if (w < 15 || pe_busy != '0) begin failures++; $display("FAIL wait (%0d)", w); end
    for (int r = 0; r < R; r++)
      for (int cc = 0; cc < C; cc++) begin
        int want;
        want = (r >= 2 && r <= 3 && cc >= 4 && cc <= 6) ? 1 : 0;
        if (r == 3 && cc >= 6 && cc <= 8) want++;
        checks++;
        if (pe_starts[r*C+cc] != want) failures++;
      end
    checks++;
    if (pe_cmd.mode != PE_SPMM || pe_cmd.n != 16'd5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
