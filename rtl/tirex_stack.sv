// tirex_stack: TiReX stack buffer, the context memory of the control unit.
//
// A LIFO of WIDTH-bit context entries. One operation per cycle: push, pop,
// write of the top entry (used to update a loop's saved context after each
// iteration) or clear. `top` shows the most recent entry combinationally;
// `empty` and `full` report the fill level. A push on a full stack is
// dropped and raises `overflow` until the next clear.
// The document names the stack buffer and that contexts are pushed on a call
// and popped on a return; the depth and the update-top operation are this
// design's.
// Lint note: the assertions below use rst_n in `disable iff`, a synchronous
// use of the asynchronous reset; verilator reports this as SYNCASYNCNET. The
// assertions are simulation checks only and add no hardware, so the warning
// is expected.
module tirex_stack #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned SPW  = $clog2(DEPTH + 1),
  localparam int unsigned IXW  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             push,
  input  logic             pop,
  input  logic             wr_top,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] top,
  output logic             empty,
  output logic             full,
  output logic             overflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [SPW-1:0]   sp;

  assign empty = (sp == '0);
  assign full  = (sp == SPW'(DEPTH));
  logic [IXW-1:0] top_ix;
  assign top_ix = IXW'(sp - SPW'(1));
  assign top    = empty ? '0 : mem[top_ix];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp       <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      sp       <= '0;
      overflow <= 1'b0;
    end else if (push) begin
      if (full) overflow <= 1'b1;
      else      sp <= sp + SPW'(1);
    end else if (pop) begin
      if (!empty) sp <= sp - SPW'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (!clear && push && !full)          mem[sp[IXW-1:0]]   <= din;
    else if (!clear && wr_top && !empty)  mem[top_ix] <= din;
  end

  // One stack operation per cycle.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({push, pop, wr_top}));

endmodule
