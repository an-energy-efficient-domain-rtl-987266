// tirex_db: TiReX data buffer.
//
// Presents to the clusters the window of WIN = NCluster+ClusterWidth-1 input
// characters starting at the data pointer, with a valid bit per character
// (a character is valid when its byte address is below the end of data).
// Each cycle the control unit gives the data pointer of the next execute
// cycle (next_dp); the buffer reads the covering words from the tile's data
// cache and registers the pointer, and in the following cycle a byte-offset
// multiplexer cuts the window out of those words. The window therefore always
// belongs to the instruction executing in that cycle.
// The document shows a set of registers in front of a multiplexer steered by
// the control unit's offset selection; which candidate inputs each register
// holds is not given, so this design keeps the word registers of the data
// cache read and one pointer register, and selects by byte offset.
// Timing: next_dp in cycle k, window valid for the execute stage in cycle
// k+1. mem_raddr is next_dp's word-address bits, wired straight through, so
// synthesis of this block alone sees those output bits as copies of an input.
module tirex_db #(
  parameter int unsigned NCL    = 4,
  parameter int unsigned CW     = 4,
  parameter int unsigned BYTES  = 16384,
  localparam int unsigned WIN   = NCL + CW - 1,
  localparam int unsigned NRD   = (WIN + 6) / 4,
  localparam int unsigned DPW   = $clog2(BYTES) + 1,
  localparam int unsigned WAW   = $clog2(BYTES / 4)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DPW-1:0]       next_dp,
  input  logic [DPW-1:0]       eod,
  // to the data cache
  output logic [WAW-1:0]       mem_raddr,
  input  logic [NRD-1:0][31:0] mem_rdata,
  // to the clusters
  output logic [WIN-1:0][7:0]  win,
  output logic [WIN-1:0]       win_valid
);

  logic [DPW-1:0] dp_q;

  assign mem_raddr = next_dp[WAW+1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dp_q <= '0;
    else        dp_q <= next_dp;
  end

  logic [NRD*32-1:0] flat;
  always_comb begin
    flat = mem_rdata;
    for (int i = 0; i < int'(WIN); i++) begin
      win[i]       = flat[8*(int'(dp_q[1:0]) + i) +: 8];
      win_valid[i] = (DPW'(dp_q + DPW'(i)) < eod);
    end
  end

endmodule
