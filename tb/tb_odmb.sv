// tb_odmb: writes whole rows and single lanes (per-lane enables) of the
// 2048-row output DenseMat buffer, checks read-back of every written row and
// that a read in the same cycle as a write to that row returns the old row.
module tb_odmb;
  import morph_pkg::*;
  logic clk = 0;
  logic [15:0] we = '0;
  logic [10:0] wrow = '0, rrow = '0;
  logic rd_en = 0;
  fp64_t wdata [16], rdata [16];
  fp64_t model [int][16];
  int checks = 0, failures = 0;

  odmb dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    fp64_t old [16];
    for (int l = 0; l < 16; l++) wdata[l] = '0;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      r = (i == 0) ? 2047 : $urandom_range(0, 2047);
      if (!model.exists(r)) begin
        for (int l = 0; l < 16; l++) wdata[l] = {$urandom, $urandom};
        we <= '1;
      end else begin
        for (int l = 0; l < 16; l++) wdata[l] = {$urandom, $urandom};
        we <= 16'(1 << $urandom_range(0, 15));
      end
      wrow <= 11'(r);
      @(posedge clk);
      #1;
      for (int l = 0; l < 16; l++) if (we[l]) model[r][l] = wdata[l];
    end
    we <= '0;
    foreach (model[k]) begin
      rrow <= 11'(k); rd_en <= 1;
      @(posedge clk);
      rd_en <= 0; #1;
      for (int l = 0; l < 16; l++) begin
        checks++;
        if (rdata[l] !== model[k][l]) failures++;
      end
    end
    // read-during-write returns the old contents
    @(negedge clk);
    rrow <= 11'd2047; wrow <= 11'd2047; rd_en <= 1; we <= '1;
    old = model[2047];
    for (int l = 0; l < 16; l++) wdata[l] = 64'(l);
    @(posedge clk);
    rd_en <= 0; we <= '0; #1;
    for (int l = 0; l < 16; l++) begin
      checks++;
      if (rdata[l] !== old[l]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
