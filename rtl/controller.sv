// controller: the accelerator's Control Unit. It executes, one at a time, the
// commands that the optimizer (or a host) sends it, and so sets up and runs
// the sub-accelerators:
//
//  OP_CFG_ROUTER  writes the configuration register of router idx.
//  OP_CFG_HLINK / OP_CFG_VLINK  write the repeater store/dir masks of row or
//                 column link idx (this is how the links are segmented
//                 between sub-accelerators and how their direction is set).
//  OP_GLB_STREAM  starts bank idx streaming a block of words onto its row link
//                 and waits until the bank is done.
//  OP_PE_CMD      waits until every PE in rows r0..r1, columns c0..c1 is idle,
//                 then starts the PE command on all of them at once.
//  OP_WAIT        waits until those PEs and all GLB banks are idle.
//
// Handshake: a command is taken in a cycle where cmd_valid and cmd_ready are
// both high. Configuration writes take one cycle. PE commands do not block,
// so sub-accelerators in different rectangles run concurrently. Register
// resets: all routers idle, all repeaters off (every link cut into single
// hops). The published design gives the controller only its role; the command
// set is this design's own.
module controller
  import morph_pkg::*;
#(
  parameter int unsigned ROWS = PE_ROWS,
  parameter int unsigned COLS = PE_COLS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  ctrl_cmd_t         cmd,
  output logic              cmd_ready,
  // interconnect configuration
  output router_cfg_t       rcfg     [ROWS*COLS],
  output logic [COLS-1:0]   h_store  [ROWS],
  output logic [COLS-1:0]   h_dir    [ROWS],
  output logic [ROWS-2:0]   v_store  [COLS],
  output logic [ROWS-2:0]   v_dir    [COLS],
  // GLB banks
  output logic [ROWS-1:0]   bank_cmd_valid,
  output logic [ADDR_W-1:0] bank_cmd_base,
  output logic [ADDR_W-1:0] bank_cmd_len,
  output flit_t             bank_cmd_hdr,
  input  logic [ROWS-1:0]   bank_busy,
  // PEs
  output logic [ROWS*COLS-1:0] pe_cmd_valid,
  output pe_cmd_t           pe_cmd,
  input  logic [ROWS*COLS-1:0] pe_busy
);

  localparam int unsigned NPE = ROWS * COLS;

  typedef enum logic [1:0] {S_IDLE, S_BANK, S_PE, S_WAIT} state_e;

  state_e          state;
  ctrl_cmd_t       cur;
  logic [NPE-1:0]  rect;
  logic            rect_busy;

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        rect[r*COLS+c] = (4'(r) >= cur.r0) && (4'(r) <= cur.r1) &&
                         (4'(c) >= cur.c0) && (4'(c) <= cur.c1);
    rect_busy = |(rect & pe_busy);
  end

  assign cmd_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      cur            <= '0;
      bank_cmd_valid <= '0;
      bank_cmd_base  <= '0;
      bank_cmd_len   <= '0;
      bank_cmd_hdr   <= FLIT_IDLE;
      pe_cmd_valid   <= '0;
      pe_cmd         <= '0;
      for (int p = 0; p < NPE; p++) rcfg[p] <= '{h_inj: INJ_NONE, v_inj: INJ_NONE, pe_from_v: 1'b0};
      for (int r = 0; r < ROWS; r++) begin
        h_store[r] <= '1;
        h_dir[r]   <= '0;
      end
      for (int c = 0; c < COLS; c++) begin
        v_store[c] <= '1;
        v_dir[c]   <= '0;
      end
    end else begin
      bank_cmd_valid <= '0;
      pe_cmd_valid   <= '0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cur <= cmd;
          unique case (cmd.op)
            OP_CFG_ROUTER: rcfg[cmd.idx] <= cmd.rcfg;
            OP_CFG_HLINK: begin
              h_store[cmd.idx[3:0]] <= cmd.store[COLS-1:0];
              h_dir[cmd.idx[3:0]]   <= cmd.dir[COLS-1:0];
            end
            OP_CFG_VLINK: begin
              v_store[cmd.idx[3:0]] <= cmd.store[ROWS-2:0];
              v_dir[cmd.idx[3:0]]   <= cmd.dir[ROWS-2:0];
            end
            OP_GLB_STREAM: begin
              bank_cmd_valid[cmd.idx[3:0]] <= 1'b1;
              bank_cmd_base <= cmd.base;
              bank_cmd_len  <= cmd.len;
              bank_cmd_hdr  <= cmd.hdr;
              state         <= S_BANK;
            end
            OP_PE_CMD: state <= S_PE;
            OP_WAIT:   state <= S_WAIT;
            default: ;
          endcase
        end
        S_BANK: if (bank_cmd_valid == '0 && !bank_busy[cur.idx[3:0]]) state <= S_IDLE;
        S_PE: if (!rect_busy) begin
          pe_cmd_valid <= rect;
          pe_cmd       <= cur.pcmd;
          state        <= S_IDLE;
        end
        S_WAIT: if (!rect_busy && bank_busy == '0) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
