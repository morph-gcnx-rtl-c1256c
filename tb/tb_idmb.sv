// tb_idmb: fills all 32 rows x 16 lanes of the input DenseMat buffer element by
// element with random doubles, then reads rows through both read ports at once
// (different rows on the two ports) and checks every lane.
module tb_idmb;
  import morph_pkg::*;
  logic clk = 0;
  logic we = 0, a_en = 0, b_en = 0;
  logic [4:0] wrow = '0, a_row = '0, b_row = '0;
  logic [3:0] wlane = '0;
  fp64_t wdata = '0;
  fp64_t a_data [16], b_data [16];
  fp64_t model [32][16];
  int checks = 0, failures = 0;

  idmb dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int r = 0; r < 32; r++)
      for (int l = 0; l < 16; l++) begin
        wrow <= 5'(r); wlane <= 4'(l); wdata <= {$urandom, $urandom}; we <= 1;
        @(posedge clk);
        model[r][l] = wdata;
      end
    we <= 0;
    for (int r = 0; r < 32; r++) begin
      a_row <= 5'(r); b_row <= 5'(31 - r); a_en <= 1; b_en <= 1;
      @(posedge clk);
      a_en <= 0; b_en <= 0;
      #1;
      for (int l = 0; l < 16; l++) begin
        checks += 2;
        if (a_data[l] !== model[r][l]) failures++;
        if (b_data[l] !== model[31 - r][l]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
