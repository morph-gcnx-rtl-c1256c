// tb_lookahead_fifo: drives random pushes and pops into the look-ahead FIFO
// and compares every popped entry, the empty/full flags and the count against
// a queue model kept in the testbench. It also fills the FIFO to its full
// depth of 16 and drains it.
module tb_lookahead_fifo;
  localparam int W = 80, D = 16;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  lookahead_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic do_push, input logic do_pop);
    logic [W-1:0] v;
    v = {16'($urandom), $urandom, $urandom};
    push = do_push && !(full && !do_pop);
    pop  = do_pop && !empty;
    din  = v;
    #1;
    checks++;
    if (pop && (model.size() == 0 || dout !== model[0])) failures++;
    @(posedge clk);
    if (pop) void'(model.pop_front());
    if (push) model.push_back(v);
    #1;
    push = 0; pop = 0;
    checks++;
    if (count != 5'(model.size()) || empty != (model.size() == 0) || full != (model.size() == D)) begin
      failures++;
      $display("FAIL count=%0d model=%0d", count, model.size());
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < D; i++) step(1, 0);
    checks++;
    if (!full) failures++;
    for (int i = 0; i < D; i++) step(0, 1);
    checks++;
    if (!empty) failures++;
    for (int i = 0; i < 3000; i++) step($urandom_range(0, 1), $urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
