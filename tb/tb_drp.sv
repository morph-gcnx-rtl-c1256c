// tb_drp: fills an IDMB with random rows, then sends the dense row prefetcher
// a random request stream (with gaps) and checks that each requested row
// comes out exactly two cycles after its request, in order, with all 16 lanes.
module tb_drp;
  import morph_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0;
  logic [4:0] req_row = '0;
  logic idmb_en, out_valid, busy;
  logic [4:0] idmb_row;
  fp64_t idmb_data [16], out_row [16], bdata [16];
  logic we = 0;
  logic [4:0] wrow = '0;
  logic [3:0] wlane = '0;
  fp64_t wdata = '0;
  fp64_t model [32][16];
  int checks = 0, failures = 0;
  int exp_q [$];
  int hist [2];

  drp dut (.*);
  idmb u_idmb (.clk, .we, .wrow, .wlane, .wdata, .a_en(idmb_en), .a_row(idmb_row),
               .a_data(idmb_data), .b_en(1'b0), .b_row(5'd0), .b_data(bdata));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // requests two cycles ago: hist[1] holds the row requested two cycles back
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != (hist[1] >= 0)) failures++;
      else if (out_valid)
        for (int l = 0; l < 16; l++) if (out_row[l] !== model[hist[1]][l]) begin
          failures++;
          break;
        end
      hist[1] = hist[0];
      hist[0] = req_valid ? int'(req_row) : -1;
    end
  end

  initial begin
    hist[0] = -1; hist[1] = -1;
    for (int r = 0; r < 32; r++)
      for (int l = 0; l < 16; l++) begin
        model[r][l] = {$urandom, $urandom};
        u_idmb.mem[r][l] = model[r][l];
      end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      req_valid = ($urandom_range(0, 3) != 0);
      req_row = 5'($urandom);
    end
    @(negedge clk);
    req_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
