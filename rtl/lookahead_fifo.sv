// lookahead_fifo: the PE's look-ahead FIFO, a synchronous first-in first-out
// queue of WIDTH-bit entries, DEPTH entries deep (16 in the published design).
//
// Sparse elements wait here while the dense row prefetcher fetches the
// matching dense row, so the MAC array receives both operands in the same
// cycle. push and pop may happen in the same cycle; pop returns the head
// combinationally (dout is valid whenever empty is low). count reports the
// occupancy. Pushing when full or popping when empty is an error and is
// flagged by assertions. Reset empties the queue.
module lookahead_fifo #(
  parameter int unsigned WIDTH = 80,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;

  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (push ? CW'(1) : CW'(0)) - (pop ? CW'(1) : CW'(0));
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("lookahead_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("lookahead_fifo: pop while empty");

endmodule
