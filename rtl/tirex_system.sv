// tirex_system: multi-core TiReX regular-expression matcher, embedded-host
// model.
//
// NCORES identical tiles, each with a private instruction memory and a private
// data cache, sit behind an AXI-Lite crossbar driven by a host processor (the
// host is outside this module; its AXI-Lite master port is the s_axil_* port).
// Software decides how the tiles are used:
//   - multiple expressions, single data stream (MISD-like): a different
//     program in each tile, the same text in every data cache;
//   - single expression, multiple data streams (SIMD-like): the same program
//     in every tile, a different chunk of the text in each data cache.
//     The host computes the chunks with an overlap of Tr characters
//     (batch = S/N, EoD_i = min(batch*(i+1)+Tr, S), SoD_i = EoD_(i-1)-Tr)
//     and writes each tile's SOD/EOD.
// A broadcast write (address bit 24) loads every tile at once. The host then
// starts the tiles; `found_any` rises as soon as one tile has reported a match
// and `all_done` when every tile has completed. Per-tile done/found lines are
// also brought out, with one pulse per tile execution event (core_events),
// and per-tile results, positions and cycle counts are read
// through each tile's register window (tile t at t * 0x10_0000).
// Interface: host AXI-Lite slave port as request/response structs
// (tirex_pkg::axil_req_t / axil_rsp_t).
// Timing: a single-tile AXI-Lite write takes about six cycles through the
// crossbar, a read about five; the tiles then run as described in tirex_core.
// Defaults: 16 tiles, 4 clusters of width 4, 256-instruction programs, 16 KiB
// of data per tile, 16 stack entries. The tile count and the (4,4) cluster
// configuration are the document's; memory sizes and stack depth are this
// design's.
// Lint note: assertions inside the tiles and the crossbar use rst_n in
// `disable iff`; verilator reports this as SYNCASYNCNET on rst_n. They are
// simulation checks only and add no hardware, so the warning is expected.
module tirex_system
  import tirex_pkg::*;
#(
  parameter int unsigned NCORES        = 16,
  parameter int unsigned NCLUSTER      = 4,
  parameter int unsigned CLUSTER_WIDTH = 4,
  parameter int unsigned IM_DEPTH      = 256,
  parameter int unsigned DATA_BYTES    = 16384,
  parameter int unsigned STACK_DEPTH   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axil_req_t         s_axil_req,
  output axil_rsp_t         s_axil_rsp,
  output logic [NCORES-1:0] core_done,
  output logic [NCORES-1:0] core_found,
  output tirex_events_t [NCORES-1:0] core_events,
  output logic              found_any,
  output logic              all_done
);

  localparam int unsigned CW  = CLUSTER_WIDTH;
  localparam int unsigned IW  = OPC_W + 8 * CW;
  localparam int unsigned PCW = $clog2(IM_DEPTH);
  localparam int unsigned DPW = $clog2(DATA_BYTES) + 1;
  localparam int unsigned WAW = $clog2(DATA_BYTES / 4);

  axil_req_t t_req [NCORES];
  axil_rsp_t t_rsp [NCORES];

  tirex_axil_xbar #(.N(NCORES)) u_xbar (
    .clk, .rst_n, .s_req(s_axil_req), .s_rsp(s_axil_rsp), .m_req(t_req), .m_rsp(t_rsp)
  );

  for (genvar t = 0; t < int'(NCORES); t++) begin : g_tile
    logic           im_we, dm_we, start, busy, done, found, error;
    logic [PCW-1:0] im_waddr;
    logic [IW-1:0]  im_wdata;
    logic [WAW-1:0] dm_waddr;
    logic [31:0]    dm_wdata;
    logic [3:0]     dm_wstrb;
    logic [DPW-1:0] sod, eod, match_start, match_end;
    logic           ev_rollback, ev_loop_back, ev_alt_next, ev_chain_exit, ev_redirect;

    tirex_axil_ctrl #(.CW(CW), .IM_DEPTH(IM_DEPTH), .DATA_BYTES(DATA_BYTES)) u_ctrl (
      .clk, .rst_n, .s_req(t_req[t]), .s_rsp(t_rsp[t]),
      .im_we, .im_waddr, .im_wdata, .dm_we, .dm_waddr, .dm_wdata, .dm_wstrb,
      .start, .sod, .eod, .busy, .done, .found, .error, .match_start, .match_end
    );

    tirex_core #(
      .NCLUSTER(NCLUSTER), .CLUSTER_WIDTH(CLUSTER_WIDTH), .IM_DEPTH(IM_DEPTH),
      .DATA_BYTES(DATA_BYTES), .STACK_DEPTH(STACK_DEPTH)
    ) u_core (
      .clk, .rst_n, .im_we, .im_waddr, .im_wdata, .dm_we, .dm_waddr, .dm_wdata, .dm_wstrb,
      .start, .sod, .eod, .busy, .done, .found, .error, .match_start, .match_end,
      .ev_rollback, .ev_loop_back, .ev_alt_next, .ev_chain_exit, .ev_redirect
    );

    assign core_done[t]  = done;
    assign core_found[t] = done && found;
    assign core_events[t] = '{rollback: ev_rollback, loop_back: ev_loop_back,
                              alt_next: ev_alt_next, chain_exit: ev_chain_exit,
                              redirect: ev_redirect};
  end

  assign found_any = |core_found;
  assign all_done  = &core_done;

endmodule
