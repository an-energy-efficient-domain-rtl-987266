// tirex_data_mem: private data cache of a TiReX tile.
//
// Byte-organised input data stored as 32-bit words (the width of one host
// AXI-Lite write), written by the host with per-byte strobes. The data buffer
// reads NRD consecutive words starting at word address raddr in one cycle,
// enough to cover any window of NCluster+ClusterWidth-1 characters at any byte
// offset. Reads are synchronous, like an FPGA block RAM: rdata is valid the
// clock after raddr. The document gives only that each tile has a private data
// memory in block RAM; size, word width and port count are this design's.
module tirex_data_mem #(
  parameter int unsigned BYTES  = 16384,
  parameter int unsigned NRD    = 3,
  localparam int unsigned WORDS = BYTES / 4,
  localparam int unsigned WAW   = $clog2(WORDS)
) (
  input  logic               clk,
  input  logic               we,
  input  logic [WAW-1:0]     waddr,
  input  logic [31:0]        wdata,
  input  logic [3:0]         wstrb,
  input  logic [WAW-1:0]     raddr,
  output logic [NRD-1:0][31:0] rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < 4; b++)
        if (wstrb[b]) mem[waddr][8*b +: 8] <= wdata[8*b +: 8];
    end
  end

  // Word addresses past the end wrap; the data buffer marks those bytes invalid.
  always_ff @(posedge clk) begin
    for (int r = 0; r < int'(NRD); r++)
      rdata[r] <= mem[WAW'(raddr + WAW'(r))];
  end

endmodule
