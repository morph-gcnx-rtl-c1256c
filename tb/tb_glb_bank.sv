// tb_glb_bank: one global-buffer bank (reduced to 4096 words). Fills it
// through the host port, streams a block out and checks every flit (header,
// consecutive target addresses, data, one flit per cycle, first flit two
// cycles after the command), writes words back through the link side and
// reads them through the host port.
module tb_glb_bank;
  import morph_pkg::*;
  localparam int W = 4096;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  logic [19:0] cmd_base = '0, cmd_len = '0;
  flit_t cmd_hdr = FLIT_IDLE, link_tx, link_rx = FLIT_IDLE;
  logic busy;
  logic host_we = 0, host_re = 0;
  logic [11:0] host_addr = '0;
  fp64_t host_wdata = '0, host_rdata;
  fp64_t model [W];
  int checks = 0, failures = 0;

  glb_bank #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first, n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < W; a++) begin
      @(negedge clk);
      host_we = 1; host_addr = 12'(a); host_wdata = {$urandom, $urandom};
      model[a] = host_wdata;
    end
    @(negedge clk);
    host_we = 0;
    // stream 100 words from 1000 to IDMB of PE 9 starting at address 40
    cmd_base = 1000; cmd_len = 100;
    cmd_hdr = FLIT_IDLE; cmd_hdr.dst = 8'd9; cmd_hdr.bufsel = BUF_IDMB; cmd_hdr.addr = 20'd40;
    cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    first = -1; n = 0;
    for (int c = 0; c < 110; c++) begin
      if (link_tx.valid) begin
        if (first < 0) first = c;
        checks++;
        if (link_tx.dst != 8'd9 || link_tx.bufsel != BUF_IDMB || link_tx.addr != 20'(40 + n)
            || link_tx.data !== model[1000 + n] || c != first + n) failures++;
        n++;
      end
      @(negedge clk);
    end
    checks++;
    if (n != 100 || first != 2 || busy) begin
      failures++;
      $display("FAIL stream n=%0d first=%0d", n, first);
    end
    // link write-back
    for (int k = 0; k < 50; k++) begin
      link_rx = FLIT_IDLE; link_rx.valid = 1; link_rx.bufsel = BUF_GLB;
      link_rx.addr = 20'(2000 + 3 * k); link_rx.data = {$urandom, $urandom};
      model[2000 + 3 * k] = link_rx.data;
      @(negedge clk);
    end
    // flits for other buffers are ignored
    link_rx.bufsel = BUF_IDMB; link_rx.addr = 20'd5; link_rx.data = '1;
    @(negedge clk);
    link_rx = FLIT_IDLE;
    for (int a = 0; a < W; a += 1) begin
      host_re = 1; host_addr = 12'(a);
      @(negedge clk);
      checks++;
      if (host_rdata !== model[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
