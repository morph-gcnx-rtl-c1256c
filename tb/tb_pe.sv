// tb_pe: end-to-end test of one processing element.
// 1. Loads a random 24 x 8 sparse tile in CSC form (column pointers, SMB values
//    and row indices, with repeated rows in consecutive nonzeros so the MAC
//    array's forwarding path is used) and an 8 x 16 dense tile into the IDMB,
//    clears the ODMB, runs PE_SPMM and drains the result; every drained word
//    and its GLB address are compared with a model that accumulates the same
//    products in the same order in real arithmetic.
// 2. Loads a 5 x 7 left and 7 x 16 right dense tile and does the same with
//    PE_GEMM.
// It also checks that SPMM takes about one cycle per nonzero (at most
// nnz + columns + 8 cycles) and that a drain takes 17 cycles per row.
module tb_pe;
  import morph_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t flit_in, flit_out;
  logic cmd_valid = 0;
  pe_cmd_t cmd;
  logic busy, done, bypass_hit;
  int checks = 0, failures = 0, bypasses = 0;

  pe dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (bypass_hit) bypasses++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real model [32][16];
  real xd [32][16];
  fp64_t got [int];

  always @(posedge clk) if (rst_n && flit_out.valid) begin
    got[int'(flit_out.addr)] = flit_out.data;
    if (flit_out.bufsel != BUF_GLB) failures++;
  end

  task automatic send(input buf_sel_e b, input int addr, input fp64_t d);
    @(negedge clk);
    flit_in = '{valid: 1'b1, bcast: 1'b0, dst: '0, bufsel: b, addr: ADDR_W'(addr), data: d};
  endtask

  task automatic run(input pe_mode_e m, input int n, input int k, input int base, output int cyc);
    @(negedge clk);
    flit_in = FLIT_IDLE;
    cmd = '{mode: m, n: CNT_W'(n), k: CNT_W'(k), glb_base: ADDR_W'(base)};
    cmd_valid = 1;
    @(posedge clk);
    #1 cmd_valid = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); cyc++; end
    @(posedge clk);
  endtask

  task automatic compare(input int rows, input int base);
    for (int r = 0; r < rows; r++)
      for (int l = 0; l < 16; l++) begin
        checks++;
        if (!got.exists(base + r * 16 + l) || got[base + r * 16 + l] !== $realtobits(model[r][l])) begin
          failures++;
          if (failures < 8) $display("FAIL row %0d lane %0d", r, l);
        end
      end
  endtask

  function automatic real rv();
    return $itor($urandom_range(0, 2000)) / 64.0 - 15.3 + $itor($urandom) / 4294967296.0;
  endfunction

  initial begin
    int colptr [9];
    int rows [$];
    real vals [$];
    int nnz, cyc, lastr;
    flit_in = FLIT_IDLE;
    cmd = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // ---- sparse tile 24 x 8
    nnz = 0;
    lastr = 0;
    for (int j = 0; j < 8; j++) begin
      colptr[j] = nnz;
      if (j != 3) begin  // column 3 is empty
        for (int e = 0; e < $urandom_range(1, 9); e++) begin
          lastr = (e % 3 == 2) ? lastr : $urandom_range(0, 23);
          rows.push_back(lastr);
          vals.push_back(rv());
          nnz++;
        end
      end
    end
    colptr[8] = nnz;
    // the first nonzero of column 4 repeats the last row of column 2
    if (colptr[4] < colptr[5] && colptr[3] > 0) rows[colptr[4]] = rows[colptr[3] - 1];
    for (int j = 0; j < 9; j++) send(BUF_COLPTR, j, 64'(colptr[j]));
    for (int e = 0; e < nnz; e++) begin
      send(BUF_SMB_VAL, e, $realtobits(vals[e]));
      send(BUF_SMB_IDX, e, 64'(rows[e]));
    end
    for (int j = 0; j < 8; j++)
      for (int l = 0; l < 16; l++) begin
        xd[j][l] = rv();
        send(BUF_IDMB, j * 16 + l, $realtobits(xd[j][l]));
      end
    for (int r = 0; r < 32; r++) for (int l = 0; l < 16; l++) model[r][l] = 0.0;
    for (int j = 0; j < 8; j++)
      for (int e = colptr[j]; e < colptr[j + 1]; e++)
        for (int l = 0; l < 16; l++) model[rows[e]][l] = model[rows[e]][l] + vals[e] * xd[j][l];

    run(PE_CLEAR, 24, 0, 0, cyc);
    run(PE_SPMM, 8, 0, 0, cyc);
    checks++;
    if (cyc > nnz + 8 + 8) begin
      failures++;
      $display("FAIL SPMM took %0d cycles for %0d nonzeros", cyc, nnz);
    end
    $display("SPMM: %0d nonzeros in %0d cycles", nnz, cyc);
    run(PE_DRAIN, 24, 0, 1000, cyc);
    checks++;
    if (cyc < 24 * 17 || cyc > 24 * 17 + 4) begin
      failures++;
      $display("FAIL drain took %0d cycles", cyc);
    end
    compare(24, 1000);

    // ---- dense tile: (5 x 7) x (7 x 16)
    got.delete();
    for (int j = 0; j < 7; j++)
      for (int l = 0; l < 16; l++) begin
        xd[j][l] = rv();
        send(BUF_IDMB, j * 16 + l, $realtobits(xd[j][l]));
      end
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 7; j++) begin
        xd[16 + i][j] = rv();
        send(BUF_IDMB, (16 + i) * 16 + j, $realtobits(xd[16 + i][j]));
      end
    for (int r = 0; r < 32; r++) for (int l = 0; l < 16; l++) model[r][l] = 0.0;
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 7; j++)
        for (int l = 0; l < 16; l++) model[i][l] = model[i][l] + xd[16 + i][j] * xd[j][l];
    run(PE_CLEAR, 5, 0, 0, cyc);
    run(PE_GEMM, 5, 7, 0, cyc);
    $display("GEMM: 5x7 tile in %0d cycles", cyc);
    run(PE_DRAIN, 5, 0, 64, cyc);
    compare(5, 64);

    checks++;
    if (bypasses == 0) begin
      failures++;
      $display("FAIL forwarding path never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
