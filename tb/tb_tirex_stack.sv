// tb_tirex_stack: self-checking testbench of the context stack.
//
// Random push, pop, rewrite-top and clear operations (at most one per cycle)
// are applied and the top entry, empty, full and overflow flags are compared
// with a queue model. Pushing when full must set the sticky overflow flag and
// leave the contents alone; popping when empty does nothing; clear empties
// the stack and clears overflow.
// Timing: one operation per cycle, flags checked before each edge;
// watchdog 100000 cycles. Push on call and pop on return follow the
// document; depth and overflow behaviour are this design's.
`timescale 1ns/1ps
module tb_tirex_stack;
  localparam int DEPTH = 16;
  localparam int WIDTH = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             clear = 1'b0, push = 1'b0, pop = 1'b0, wr_top = 1'b0;
  logic [WIDTH-1:0] din = '0, top;
  logic             empty, full, overflow;

  tirex_stack dut (.clk, .rst_n, .clear, .push, .pop, .wr_top, .din, .top, .empty, .full, .overflow);

  int checks = 0, failures = 0;
  int n_full = 0, n_ovf = 0;
  logic [WIDTH-1:0] q [$];
  bit ovf = 1'b0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      int op;
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      check(overflow == ovf, "overflow flag");
      if (q.size() > 0) check(top == q[$], $sformatf("top with %0d entries", q.size()));
      if (full) n_full++;
      if (overflow) n_ovf++;
      // bias towards pushes in the first half so that the stack fills up
      op = int'($urandom_range(0, 99));
      clear = 1'b0; push = 1'b0; pop = 1'b0; wr_top = 1'b0;
      din = $urandom;
      if (op < 2) clear = 1'b1;
      else if (op < ((n % 2000) < 1000 ? 60 : 30)) push = 1'b1;
      else if (op < 80) pop = 1'b1;
      else if (op < 95) wr_top = 1'b1;
      @(posedge clk);
      if (clear) begin q.delete(); ovf = 1'b0; end
      else if (push) begin if (q.size() == DEPTH) ovf = 1'b1; else q.push_back(din); end
      else if (pop) begin if (q.size() > 0) void'(q.pop_back()); end
      else if (wr_top) begin if (q.size() > 0) q[$] = din; end
    end
    check(n_full > 0 && n_ovf > 0, "stack filled and overflowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
