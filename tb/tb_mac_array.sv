// tb_mac_array: drives the MAC array with one operand pair per cycle against a
// real ODMB (16 rows here). Output rows are drawn from a small set so that
// consecutive pairs often hit the same row; the final ODMB contents are read
// back through a second pass and compared with a real-arithmetic model. It
// checks the write-back latency (row written one cycle after the pair) and
// that forwarding happened.
module tb_mac_array;
  import morph_pkg::*;
  localparam int R = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  fp64_t in_a = '0;
  fp64_t in_dense [16];
  logic [3:0] in_orow = '0;
  logic rd_en, wr_en, busy, bypass_hit;
  logic [3:0] rd_row, wr_row;
  fp64_t rd_data [16], wr_data [16];
  real model [R][16];
  int checks = 0, failures = 0, bypasses = 0;

  mac_array #(.ROWS(R)) dut (.*);
  odmb #(.ROWS(R)) u_odmb (.clk, .we({16{wr_en}}), .wrow(wr_row), .wdata(wr_data),
                           .rd_en, .rrow(rd_row), .rdata(rd_data));
  always #5 clk = ~clk;
  always @(posedge clk) if (bypass_hit) bypasses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, d [16];
    int r;
    for (int l = 0; l < 16; l++) in_dense[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // start from an all-zero ODMB
    for (int i = 0; i < R; i++) for (int l = 0; l < 16; l++) begin
      u_odmb.mem[i][l] = '0;
      model[i][l] = 0.0;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 0;
      end else begin
        r = (n % 2 == 1) ? int'(in_orow) : $urandom_range(0, 3);
        a = $itor($urandom_range(0, 1000)) / 37.0 - 13.0;
        in_valid = 1; in_a = $realtobits(a); in_orow = 4'(r);
        for (int l = 0; l < 16; l++) begin
          d[l] = $itor($urandom_range(0, 1000)) / 19.0 - 20.0;
          in_dense[l] = $realtobits(d[l]);
          model[r][l] = model[r][l] + a * d[l];
        end
        @(posedge clk);
        #1;
        // one cycle later the row is written back
        checks++;
        if (!busy || !wr_en || wr_row != 4'(r)) failures++;
        in_valid = 0;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 4; i++)
      for (int l = 0; l < 16; l++) begin
        checks++;
        if (u_odmb.mem[i][l] !== $realtobits(model[i][l])) begin
          failures++;
          if (failures < 5) $display("FAIL row %0d lane %0d", i, l);
        end
      end
    checks++;
    if (bypasses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
