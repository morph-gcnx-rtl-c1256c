// tb_morph_link: checks the morphable link against a reference written as an
// explicit walk over the repeaters. Random repeater settings (store/dir) and
// random sets of driving nodes are applied; for each node the testbench walks
// outwards to find the nearest driver whose flit can reach it through
// repeaters that are on and point towards it, and compares rx. Directed
// cases: whole-link broadcast from node 0, a link cut into two segments
// carrying traffic in opposite directions, and a collision.
module tb_morph_link;
  import morph_pkg::*;
  localparam int N = 17;
  flit_t tx [N], rx [N];
  logic [N-2:0] store, dir;
  logic collision;
  int checks = 0, failures = 0;

  morph_link #(.NODES(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(int n);
    flit_t f;
    f = FLIT_IDLE;
    f.valid = 1'b1; f.bcast = 1'b1; f.bufsel = BUF_IDMB; f.addr = ADDR_W'(n); f.data = 64'(n * 1000 + 7);
    return f;
  endfunction

  // reference: flit reaching node n from below (lower indices) or above
  function automatic int from_below(int n);
    for (int m = n - 1; m >= 0; m--) begin
      if (store[m] || !dir[m]) return -1;   // repeater m (between m and m+1) blocks
      if (tx[m].valid) return m;
    end
    return -1;
  endfunction
  function automatic int from_above(int n);
    for (int m = n + 1; m < N; m++) begin
      if (store[m-1] || dir[m-1]) return -1;
      if (tx[m].valid) return m;
    end
    return -1;
  endfunction

  task automatic check_all(input logic expect_collision_free);
    int b, a;
    #1;
    for (int n = 0; n < N; n++) begin
      b = from_below(n);
      a = from_above(n);
      checks++;
      if (b >= 0) begin
        if (!(rx[n].valid && rx[n].addr == ADDR_W'(b))) failures++;
      end else if (a >= 0) begin
        if (!(rx[n].valid && rx[n].addr == ADDR_W'(a))) failures++;
      end else if (rx[n].valid) failures++;
    end
    if (expect_collision_free) begin
      checks++;
      if (collision) failures++;
    end
  endtask

  initial begin
    for (int n = 0; n < N; n++) tx[n] = FLIT_IDLE;
    // broadcast from node 0 to all others
    store = '0; dir = '1;
    tx[0] = mk(0);
    check_all(1);
    for (int n = 1; n < N; n++) begin
      checks++;
      if (!rx[n].valid || rx[n].data != 64'(7)) failures++;
    end
    // two segments: nodes 0..7 flowing down from 7, nodes 8..16 flowing up from 8
    tx[0] = FLIT_IDLE;
    store = '0; store[7] = 1'b1;
    dir = '0; for (int i = 8; i < N - 1; i++) dir[i] = 1'b1;
    tx[7] = mk(7); tx[8] = mk(8);
    check_all(1);
    checks++;
    if (rx[0].addr != 7 || rx[16].addr != 8 || rx[7].valid || rx[8].valid) failures++;
    // collision: node 3 drives while node 1's flit passes
    for (int n = 0; n < N; n++) tx[n] = FLIT_IDLE;
    store = '0; dir = '1;
    tx[1] = mk(1); tx[3] = mk(3);
    #1;
    checks++;
    if (!collision) failures++;
    // random configurations with few drivers
    for (int it = 0; it < 3000; it++) begin
      store = (N-1)'($urandom) & (N-1)'($urandom);
      dir = (N-1)'($urandom);
      for (int n = 0; n < N; n++) tx[n] = ($urandom_range(0, 5) == 0) ? mk(n) : FLIT_IDLE;
      check_all(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
