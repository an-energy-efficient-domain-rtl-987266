// tirex_im: TiReX instruction memory.
//
// Holds the compiled regular-expression program, one instruction word per
// entry. The host writes it through a single synchronous write port before a
// run. Three asynchronous read ports feed the three fetch/decode units: port A
// the first instruction (rollback copy), port B the next sequential
// instruction, port C the compiler-hinted jump target. Each FDU registers what
// it reads, so a read address presented in cycle k is the instruction the
// execute stage may use in cycle k+1.
// The document gives the memory's role and the 38-bit word; the depth and the
// read-port arrangement are this design's choices.
module tirex_im #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned WIDTH  = 38,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr_a,
  input  logic [AW-1:0]    raddr_b,
  input  logic [AW-1:0]    raddr_c,
  output logic [WIDTH-1:0] rdata_a,
  output logic [WIDTH-1:0] rdata_b,
  output logic [WIDTH-1:0] rdata_c
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
  assign rdata_c = mem[raddr_c];

endmodule
