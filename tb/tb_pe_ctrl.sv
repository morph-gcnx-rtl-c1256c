// tb_pe_ctrl: exercises the PE control unit on its own, with the SMB and IDMB
// modelled in the testbench (one-cycle reads) and the downstream pipeline
// reported busy for a few cycles after each push.
//  - PE_SPMM: the sequence of (value, output row, dense row) pushes must be the
//    CSC nonzeros in order, each paired with its column; an empty column must
//    cost one cycle; the whole command must take nnz + columns + 6 cycles at most.
//  - PE_GEMM: pushes must be (X[i][j], i, j) for i < n, j < k in order.
//  - PE_CLEAR: clears rows 0..n-1 exactly once each.
//  - PE_DRAIN: emits rows 0..n-1 lane by lane with GLB addresses base+row*16+lane.
module tb_pe_ctrl;
  import morph_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  pe_cmd_t cmd = '0;
  logic busy, done;
  logic colptr_we = 0;
  logic [5:0] colptr_addr = '0;
  logic [15:0] colptr_data = '0;
  logic smb_rd_en;
  logic [14:0] smb_rd_addr;
  fp64_t smb_rval;
  logic [15:0] smb_ridx;
  logic idb_en;
  logic [4:0] idb_row;
  fp64_t idb_data [16];
  logic push;
  fp64_t push_a;
  logic [10:0] push_orow;
  logic [4:0] drp_row;
  logic pipe_busy;
  logic clr_we, drn_rd_en;
  logic [10:0] clr_row, drn_row;
  fp64_t odmb_rdata [16];
  flit_t flit_out;

  pe_ctrl dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  fp64_t sval [64];
  logic [15:0] sidx [64];
  fp64_t xmem [32][16];
  int tail = 0;
  typedef struct { fp64_t a; int orow; int drow; } push_t;
  push_t pushes [$];
  int clears [$];
  flit_t flits [$];

  // memory models and downstream pipeline
  always @(posedge clk) begin
    if (smb_rd_en) begin
      smb_rval <= sval[smb_rd_addr];
      smb_ridx <= sidx[smb_rd_addr];
    end
    if (idb_en) idb_data <= xmem[idb_row];
    if (drn_rd_en) for (int l = 0; l < 16; l++) odmb_rdata[l] <= 64'(drn_row * 100 + l);
    tail <= push ? 3 : (tail > 0 ? tail - 1 : 0);
    if (rst_n && push) pushes.push_back('{push_a, int'(push_orow), int'(drp_row)});
    if (rst_n && clr_we) clears.push_back(int'(clr_row));
    if (rst_n && flit_out.valid) flits.push_back(flit_out);
  end
  assign pipe_busy = (tail != 0);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input pe_mode_e m, input int n, input int k, input int base, output int cyc);
    @(negedge clk);
    cmd = '{mode: m, n: CNT_W'(n), k: CNT_W'(k), glb_base: ADDR_W'(base)};
    cmd_valid = 1;
    @(posedge clk);
    #1 cmd_valid = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); cyc++; end
  endtask

  initial begin
    int cp [7] = '{0, 3, 3, 7, 8, 8, 12};  // columns 1 and 4 are empty
    int cyc, e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      sval[i] = {$urandom, $urandom};
      sidx[i] = 16'($urandom_range(0, 2047));
    end
    for (int r = 0; r < 32; r++) for (int l = 0; l < 16; l++) xmem[r][l] = {$urandom, $urandom};
    for (int j = 0; j < 7; j++) begin
      @(negedge clk);
      colptr_we = 1; colptr_addr = 6'(j); colptr_data = 16'(cp[j]);
    end
    @(negedge clk);
    colptr_we = 0;

    // ---- SPMM over 6 columns, 12 nonzeros
    run(PE_SPMM, 6, 0, 0, cyc);
    checks++;
    if (cyc > 12 + 6 + 6) begin failures++; $display("FAIL SPMM %0d cycles", cyc); end
    checks++;
    if (pushes.size() != 12) failures++;
    e = 0;
    for (int j = 0; j < 6; j++)
      for (int p = cp[j]; p < cp[j + 1]; p++) begin
        checks++;
        if (e >= pushes.size() || pushes[e].a !== sval[p] || pushes[e].orow != int'(sidx[p][10:0])
            || pushes[e].drow != j) failures++;
        e++;
      end

    // ---- GEMM 3 x 5
    pushes.delete();
    run(PE_GEMM, 3, 5, 0, cyc);
    checks++;
    if (pushes.size() != 15) failures++;
    e = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 5; j++) begin
        checks++;
        if (e >= pushes.size() || pushes[e].a !== xmem[16 + i][j] || pushes[e].orow != i
            || pushes[e].drow != j) failures++;
        e++;
      end

    // ---- CLEAR 7 rows
    run(PE_CLEAR, 7, 0, 0, cyc);
    checks++;
    if (clears.size() != 7) failures++;
    foreach (clears[q]) begin
      checks++;
      if (clears[q] != q) failures++;
    end

    // ---- DRAIN 3 rows to base 500
    run(PE_DRAIN, 3, 0, 500, cyc);
    repeat (2) @(posedge clk);
    checks++;
    if (flits.size() != 48) failures++;
    foreach (flits[q]) begin
      checks++;
      if (flits[q].bufsel != BUF_GLB || int'(flits[q].addr) != 500 + q
          || flits[q].data != 64'((q / 16) * 100 + q % 16)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
