// tb_tirex_im: self-checking testbench of the instruction memory.
//
// Writes random instruction words to random addresses through the write port,
// keeping a copy in the testbench, and reads random addresses on the three
// asynchronous read ports A, B and C, which must return the stored words in
// the same cycle. A read of an address that is being written returns the old
// word until the clock edge. Only written addresses are compared.
// Timing: reads are checked 1 ns after the addresses change, before the
// next edge; watchdog 100000 cycles. The three read ports follow the tile
// structure; the random access pattern is this testbench's.
`timescale 1ns/1ps
module tb_tirex_im;
  localparam int DEPTH = 256;
  localparam int WIDTH = 38;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             we = 1'b0;
  logic [7:0]       waddr = '0, ra = '0, rb = '0, rc = '0;
  logic [WIDTH-1:0] wdata = '0, da, db, dc;

  tirex_im dut (.clk, .we, .waddr, .wdata, .raddr_a(ra), .raddr_b(rb), .raddr_c(rc),
                .rdata_a(da), .rdata_b(db), .rdata_c(dc));

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];
  bit written [DEPTH];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [WIDTH-1:0] rnd();
    return {6'($urandom), $urandom};
  endfunction

  initial begin
    // Fill every entry once.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(a); wdata = rnd();
      model[a] = wdata; written[a] = 1'b1;
    end
    @(negedge clk) we = 1'b0;
    // Random mix of writes and three-port reads.
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 2) == 0);
      waddr = 8'($urandom); wdata = rnd();
      ra = 8'($urandom); rb = 8'($urandom); rc = ($urandom_range(0, 3) == 0) ? waddr : 8'($urandom);
      #1;
      check(da == model[ra], $sformatf("port A addr %0d", ra));
      check(db == model[rb], $sformatf("port B addr %0d", rb));
      check(dc == model[rc], $sformatf("port C addr %0d", rc));
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
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
