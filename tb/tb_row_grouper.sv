// tb_row_grouper: checks the density-sorted row grouping. First a fixed 8-row
// case in which row 5 is the densest and row 4 the sparsest (they must share
// a PE, and every PE's group must sum to a near-equal nonzero count), then
// random row densities, each checked against an independent sort in the
// testbench: the PE of the k-th densest row must be k for k < 4 and 7-k
// otherwise, and the row_of table must invert the mapping.
module tb_row_grouper;
  logic clk = 0, rst_n = 0, start = 0, valid;
  logic [15:0] nnz [8];
  logic [1:0] pe_of_row [8];
  logic [2:0] slot_of_row [8], row_of [8];
  int checks = 0, failures = 0;

  row_grouper dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_case();
    int order [8];
    int tmp, expect_pe;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // independent ranking: stable selection sort, densest first
    for (int i = 0; i < 8; i++) order[i] = i;
    for (int i = 0; i < 8; i++)
      for (int j = i + 1; j < 8; j++)
        if (nnz[order[j]] > nnz[order[i]] ||
            (nnz[order[j]] == nnz[order[i]] && order[j] < order[i])) begin
          tmp = order[i]; order[i] = order[j]; order[j] = tmp;
        end
    checks++;
    if (!valid) failures++;
    for (int k = 0; k < 8; k++) begin
      expect_pe = (k < 4) ? k : 7 - k;
      checks++;
      if (int'(pe_of_row[order[k]]) != expect_pe || int'(slot_of_row[order[k]]) != k / 4) failures++;
      checks++;
      if (int'(row_of[expect_pe * 2 + k / 4]) != order[k]) failures++;
    end
  endtask

  initial begin
    int sums [4];
    int d [8] = '{6, 7, 8, 5, 1, 10, 3, 4};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) nnz[i] = 16'(d[i]);
    check_case();
    checks++;
    if (pe_of_row[5] != pe_of_row[4]) failures++;
    for (int p = 0; p < 4; p++) sums[p] = 0;
    for (int i = 0; i < 8; i++) sums[pe_of_row[i]] += d[i];
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (sums[p] < 11 || sums[p] > 12) failures++;
    end
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 8; i++) nnz[i] = 16'($urandom_range(0, (n % 2) ? 5 : 500));
      check_case();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
