// tb_morph_interconnect: the 16x16 interconnect with its links and routers.
//  1. Row broadcast: bank 5 drives its row link (all repeaters on, pointing
//     east); every PE of row 5 whose router listens to the row gets the flit,
//     no PE of another row does.
//  2. Column broadcast through a turn: bank 2 sends to router (2, 9), which
//     turns the flit onto column 9 one cycle later; column 9 is cut below row
//     11, so PEs (0..11, 9) except (2, 9) receive it and PEs (12..15, 9) not.
//  3. Unicast write-back: PE (7, 3) drives its row link westward to bank 7,
//     while in the same cycle PE (7, 12) drives a flit eastward on the other
//     segment of the same link (segmented at repeater 8) to PE (7, 15).
module tb_morph_interconnect;
  import morph_pkg::*;
  localparam int R = 16, C = 16, N = R * C;
  logic clk = 0, rst_n = 0;
  router_cfg_t rcfg [N];
  logic [C-1:0] h_store [R], h_dir [R];
  logic [R-2:0] v_store [C], v_dir [C];
  flit_t pe_tx [N], pe_rx [N], bank_tx [R], bank_rx [R];
  logic collision;
  int checks = 0, failures = 0;

  morph_interconnect dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(logic bc, logic [7:0] dst, buf_sel_e b, int tag);
    flit_t f;
    f = FLIT_IDLE;
    f.valid = 1; f.bcast = bc; f.dst = dst; f.bufsel = b; f.addr = 20'(tag); f.data = 64'(tag * 3);
    return f;
  endfunction

  task automatic idle_all();
    for (int p = 0; p < N; p++) begin
      pe_tx[p] = FLIT_IDLE;
      rcfg[p] = '{h_inj: INJ_NONE, v_inj: INJ_NONE, pe_from_v: 1'b0};
    end
    for (int r = 0; r < R; r++) begin bank_tx[r] = FLIT_IDLE; h_store[r] = '1; h_dir[r] = '0; end
    for (int c = 0; c < C; c++) begin v_store[c] = '1; v_dir[c] = '0; end
  endtask

  initial begin
    flit_t f;
    idle_all();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. row broadcast
    @(negedge clk);
    h_store[5] = '0; h_dir[5] = '1;
    f = mk(1, 0, BUF_IDMB, 11);
    bank_tx[5] = f;
    #1;
    for (int p = 0; p < N; p++) begin
      checks++;
      if ((p / C == 5) ? (pe_rx[p] !== f) : pe_rx[p].valid) failures++;
    end
    checks++;
    if (collision) failures++;
    // 2. column broadcast through a turn at (2, 9)
    @(negedge clk);
    idle_all();
    h_store[2] = '0; h_dir[2] = '1;
    rcfg[2*C+9].v_inj = INJ_TURN;
    for (int r = 0; r < R; r++) rcfg[r*C+9].pe_from_v = 1'b1;
    v_store[9] = '0; v_store[9][11] = 1'b1;
    v_dir[9] = '0; for (int r = 2; r < 15; r++) v_dir[9][r] = 1'b1;   // away from row 2
    f = mk(1, 0, BUF_SMB_VAL, 22);
    bank_tx[2] = f;
    @(negedge clk);
    bank_tx[2] = FLIT_IDLE;
    #1;
    for (int r = 0; r < R; r++) begin
      checks++;
      if (r <= 11 && r != 2) begin
        if (pe_rx[r*C+9] !== f) failures++;
      end else if (pe_rx[r*C+9].valid) failures++;
    end
    // 3. two segments of row 7 used at once
    @(negedge clk);
    idle_all();
    h_store[7] = '0; h_store[7][8] = 1'b1;   // cut between node 8 (PE 7) and node 9 (PE 8)
    h_dir[7] = '0; for (int i = 9; i < C; i++) h_dir[7][i] = 1'b1;
    rcfg[7*C+3].h_inj = INJ_PE;
    rcfg[7*C+12].h_inj = INJ_PE;
    pe_tx[7*C+3] = mk(0, 0, BUF_GLB, 33);
    pe_tx[7*C+12] = mk(0, 8'(7*C+15), BUF_ODMB, 44);
    #1;
    checks++;
    if (bank_rx[7] !== pe_tx[7*C+3]) failures++;
    checks++;
    if (pe_rx[7*C+15] !== pe_tx[7*C+12]) failures++;
    for (int c = 0; c < C; c++) if (c != 15) begin
      checks++;
      if (pe_rx[7*C+c].valid) failures++;   // GLB flit is not for PEs; unicast only to 15
    end
    checks++;
    if (collision) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
