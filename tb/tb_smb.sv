// tb_smb: writes random nonzeros (value and row index through their separate
// enables) at random addresses of the full 32768-entry SparseMat buffer, then
// reads them back and checks both fields and the one-cycle read latency.
module tb_smb;
  import morph_pkg::*;
  localparam int D = SMB_DEPTH;
  logic clk = 0;
  logic we_val = 0, we_idx = 0, rd_en = 0;
  logic [14:0] waddr = '0, raddr = '0;
  fp64_t wval = '0, rval;
  logic [15:0] widx = '0, ridx;
  int checks = 0, failures = 0;
  fp64_t mval [int];
  logic [15:0] midx [int];

  smb dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      a = (i < 2) ? i * (D - 1) : $urandom_range(0, D - 1);
      waddr <= 15'(a); wval <= {$urandom, $urandom}; widx <= 16'($urandom);
      we_val <= 1; we_idx <= 1;
      @(posedge clk);
      mval[a] = wval; midx[a] = widx;
    end
    // overwrite only the value of one entry, only the index of another
    waddr <= 15'd5; wval <= 64'h1234; we_val <= 1; we_idx <= 0; @(posedge clk);
    mval[5] = 64'h1234;
    waddr <= 15'd5; widx <= 16'h77; we_val <= 0; we_idx <= 1;
    if (!midx.exists(5)) mval[5] = 64'h1234;
    @(posedge clk);
    midx[5] = 16'h77;
    we_val <= 0; we_idx <= 0;
    foreach (mval[k]) begin
      raddr <= 15'(k); rd_en <= 1;
      @(posedge clk);
      rd_en <= 0;
      #1;
      checks++;
      if (rval !== mval[k] || ridx !== midx[k]) begin
        failures++;
        $display("FAIL addr %0d: %h/%h want %h/%h", k, rval, ridx, mval[k], midx[k]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
