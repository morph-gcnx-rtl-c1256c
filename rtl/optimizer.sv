// optimizer: the hardware side of the hardware-application co-exploration.
// For up to NT concurrent GCN tasks, each described by its sampled workload
// (aggregation and combination multiply-accumulate counts and the N and C
// dimensions of its chain product), it decides:
//
//  1. the PE-array partition: each active task gets a band of whole PE rows
//     (with the GLB bank of each of those rows), in proportion to its total
//     MAC count, at least one row each, leftover rows to the heaviest task;
//  2. the split of each band into aggregation and combination engines: a
//     number of PE columns for aggregation in proportion to the aggregation
//     share of the MACs, at least one column for each engine;
//  3. the inter-phase dataflow, following the greedy rule: parallel when
//     N*C is smaller than the band's GLB capacity (in words), else sequential;
//     and the loop order that goes with it (see loop_order_e);
//
// and then sends the controller the link configuration for that partition:
// every column link is cut between bands (repeaters on, pointing towards
// higher rows inside a band) and every row link is switched on, pointing away
// from its bank. Timing: start, then about 3*NT + ROWS + COLS cycles; done
// pulses after the last command has been taken. The proportional allocation
// and the table-driven dataflow choice follow the published algorithm;
// neighbour sampling, the logarithmic cost model and the tile-size search
// are not built here.
module optimizer
  import morph_pkg::*;
#(
  parameter int unsigned NT   = 4,
  parameter int unsigned ROWS = PE_ROWS,
  parameter int unsigned COLS = PE_COLS,
  parameter int unsigned BANKW = BANK_WORDS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [NT-1:0] task_valid,
  input  logic [31:0] agg_macs  [NT],
  input  logic [31:0] comb_macs [NT],
  input  logic [15:0] n_dim     [NT],
  input  logic [15:0] c_dim     [NT],
  output logic        busy,
  output logic        done,
  output logic [4:0]  row0      [NT],
  output logic [4:0]  nrows     [NT],
  output logic [4:0]  agg_cols  [NT],
  output logic [NT-1:0] parallel,
  output loop_order_e loop_order [NT],
  // commands to the controller
  output logic        cmd_valid,
  output ctrl_cmd_t   cmd,
  input  logic        cmd_ready
);

  localparam int unsigned TW = $clog2(NT) > 0 ? $clog2(NT) : 1;

  typedef enum logic [2:0] {S_IDLE, S_DIV, S_ADJ, S_SPLIT, S_VL, S_HL} state_e;

  state_e        state;
  logic [TW-1:0] t;
  logic [4:0]    k;
  logic [32:0]   w    [NT];
  logic [36:0]   wsum;
  logic [5:0]    total;
  logic [TW-1:0] t_heavy, t_big;
  logic [4:0]    prefix;
  logic [ROWS-2:0] vcut;

  always_comb begin
    wsum  = '0;
    total = '0;
    t_heavy = '0;
    t_big   = '0;
    for (int i = 0; i < NT; i++) begin
      w[i] = task_valid[i] ? 33'(agg_macs[i]) + 33'(comb_macs[i]) : '0;
      wsum  += 37'(w[i]);
      total += 6'(nrows[i]);
    end
    for (int i = 0; i < NT; i++) begin
      if (w[i] > w[t_heavy]) t_heavy = TW'(i);
      if (nrows[i] > nrows[t_big]) t_big = TW'(i);
    end
    // column links: cut the repeater below the last row of every band
    vcut = '0;
    for (int i = 0; i < NT; i++)
      if (nrows[i] != 0 && int'(row0[i]) + int'(nrows[i]) - 1 < ROWS - 1)
        vcut[int'(row0[i]) + int'(nrows[i]) - 1] = 1'b1;
  end

  // one division per cycle (share of the rows, share of the columns)
  logic [63:0] rows_q, cols_q;
  logic [32:0] ab;
  always_comb begin
    rows_q = (wsum == 0) ? '0 : (64'(ROWS) * 64'(w[t])) / 64'(wsum);
    ab     = 33'(agg_macs[t]) + 33'(comb_macs[t]);
    cols_q = (ab == 0) ? 64'(COLS / 2) : (64'(COLS) * 64'(agg_macs[t])) / 64'(ab);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      t         <= '0;
      k         <= '0;
      done      <= 1'b0;
      prefix    <= '0;
      parallel  <= '0;
      cmd_valid <= 1'b0;
      cmd       <= '0;
      for (int i = 0; i < NT; i++) begin
        row0[i] <= '0; nrows[i] <= '0; agg_cols[i] <= '0;
        loop_order[i] <= LO_PAR_N0_C0_K_M;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          t <= '0;
          state <= (task_valid == '0) ? S_IDLE : S_DIV;
          done  <= (task_valid == '0);
        end
        S_DIV: begin
          nrows[t] <= !task_valid[t] ? 5'd0 : (rows_q == 0) ? 5'd1 : 5'(rows_q);
          t <= t + 1'b1;
          if (t == TW'(NT - 1)) state <= S_ADJ;
        end
        S_ADJ: begin
          if (total > 6'(ROWS)) nrows[t_big] <= nrows[t_big] - 1'b1;
          else if (total < 6'(ROWS)) nrows[t_heavy] <= nrows[t_heavy] + 1'b1;
          else begin
            state  <= S_SPLIT;
            t      <= '0;
            prefix <= '0;
          end
        end
        S_SPLIT: begin
          row0[t] <= prefix;
          prefix  <= prefix + nrows[t];
          agg_cols[t] <= !task_valid[t] ? 5'd0 :
                         (cols_q < 1) ? 5'd1 : (cols_q > 64'(COLS - 1)) ? 5'(COLS - 1) : 5'(cols_q);
          parallel[t] <= (32'(n_dim[t]) * 32'(c_dim[t])) < (32'(nrows[t]) * 32'(BANKW));
          loop_order[t] <= ((32'(n_dim[t]) * 32'(c_dim[t])) < (32'(nrows[t]) * 32'(BANKW)))
                           ? LO_PAR_N0_C0_K_M : LO_SEQ_N0C0K_MC1N1;
          t <= t + 1'b1;
          if (t == TW'(NT - 1)) begin
            state <= S_VL;
            k     <= '0;
          end
        end
        S_VL: begin
          if (!cmd_valid || cmd_ready) begin
            cmd_valid <= 1'b1;
            cmd       <= '0;
            cmd.op    <= OP_CFG_VLINK;
            cmd.idx   <= ID_W'(k);
            cmd.store <= (PE_COLS + 1)'(vcut);
            cmd.dir   <= '1;
            k <= k + 1'b1;
            if (k == 5'(COLS - 1)) begin
              state <= S_HL;
              k     <= '0;
            end
          end
        end
        S_HL: begin
          if (cmd_valid && cmd_ready && k == 5'(ROWS)) begin
            cmd_valid <= 1'b0;
            state     <= S_IDLE;
            done      <= 1'b1;
          end else if ((!cmd_valid || cmd_ready) && k != 5'(ROWS)) begin
            cmd_valid <= 1'b1;
            cmd       <= '0;
            cmd.op    <= OP_CFG_HLINK;
            cmd.idx   <= ID_W'(k);
            cmd.store <= '0;
            cmd.dir   <= '1;
            k <= k + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
