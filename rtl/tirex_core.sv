// tirex_core: one TiReX tile, a software-programmable regular-expression
// matching processor.
//
// A regular expression compiled to the TiReX ISA is loaded into the
// instruction memory and the text into the private data cache; a start pulse
// then runs the matcher over bytes [sod, eod) and reports whether (and where)
// the expression first matches.
//
// Pipeline (two stages):
//   Fetch/Decode: three FDUs read the instruction memory and register the
//     decoded opcode, reference and valid_ref: FDU-A the first instruction,
//     FDU-B the next sequential one, FDU-C the target named by the innermost
//     loop or OR-chain context. The control unit's registered selection
//     picks one of them for the next cycle.
//   Execute: NCLUSTER clusters of CLUSTER_WIDTH comparators compare the
//     reference with the data window from the data buffer; the engine merges
//     their results; the control unit updates pc, data pointer, match state
//     and the stack buffer.
// Cluster c sees window characters [c, c+CLUSTER_WIDTH): with the defaults
// (4 clusters of width 4) the window is 7 characters wide.
//
// Interface: host-side write ports for instructions (im_*) and data words
// (dm_*), `start` with `sod`/`eod`, and the results `busy`, `done`, `found`,
// `error`, `match_start`, `match_end` (exclusive). Event outputs pulse once per
// rollback, loop back-jump, next OR alternative, OR-chain exit and loop-exit
// redirect.
// Timing: start in cycle 0, instruction 0 fetched in cycle 1 and executed
// in cycle 2, then one instruction per cycle (one extra cycle for a
// loop-exit redirect and per group unwound after a failure); done rises the
// cycle after EOP executes and stays high until the next start.
// The structure follows the document's tile; memory sizes, stack depth and the
// host write ports are this design's choices.
// Lint note: assertions inside the tiles and the crossbar use rst_n in
// `disable iff`; verilator reports this as SYNCASYNCNET on rst_n. They are
// simulation checks only and add no hardware, so the warning is expected.
module tirex_core
  import tirex_pkg::*;
#(
  parameter int unsigned NCLUSTER      = 4,
  parameter int unsigned CLUSTER_WIDTH = 4,
  parameter int unsigned IM_DEPTH      = 256,
  parameter int unsigned DATA_BYTES    = 16384,
  parameter int unsigned STACK_DEPTH   = 16,
  localparam int unsigned CW   = CLUSTER_WIDTH,
  localparam int unsigned NCL  = NCLUSTER,
  localparam int unsigned IW   = OPC_W + 8 * CW,
  localparam int unsigned PCW  = $clog2(IM_DEPTH),
  localparam int unsigned DPW  = $clog2(DATA_BYTES) + 1,
  localparam int unsigned WAW  = $clog2(DATA_BYTES / 4),
  localparam int unsigned WIN  = NCL + CW - 1,
  localparam int unsigned NRD  = (WIN + 6) / 4,
  localparam int unsigned OFW  = $clog2(NCL + CW + 1),
  localparam int unsigned CTXW = 2 + 2 * PCW + DPW + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // program and data loading
  input  logic            im_we,
  input  logic [PCW-1:0]  im_waddr,
  input  logic [IW-1:0]   im_wdata,
  input  logic            dm_we,
  input  logic [WAW-1:0]  dm_waddr,
  input  logic [31:0]     dm_wdata,
  input  logic [3:0]      dm_wstrb,
  // run control and result
  input  logic            start,
  input  logic [DPW-1:0]  sod,
  input  logic [DPW-1:0]  eod,
  output logic            busy,
  output logic            done,
  output logic            found,
  output logic            error,
  output logic [DPW-1:0]  match_start,
  output logic [DPW-1:0]  match_end,
  // execution events
  output logic            ev_rollback,
  output logic            ev_loop_back,
  output logic            ev_alt_next,
  output logic            ev_chain_exit,
  output logic            ev_redirect
);

  // ---------------- instruction memory and FDUs ----------------
  logic [PCW-1:0] addr_b, addr_c;
  logic [IW-1:0]  word_a, word_b, word_c;
  logic           load_a, load_bc;
  fdu_sel_e       fdu_sel;

  tirex_im #(.DEPTH(IM_DEPTH), .WIDTH(IW)) u_im (
    .clk, .we(im_we), .waddr(im_waddr), .wdata(im_wdata),
    .raddr_a('0), .raddr_b(addr_b), .raddr_c(addr_c),
    .rdata_a(word_a), .rdata_b(word_b), .rdata_c(word_c)
  );

  cm_op_e          cm_a, cm_b, cm_c, ex_cm;
  cf_op_e          cf_a, cf_b, cf_c, ex_cf;
  logic [8*CW-1:0] ref_a, ref_b, ref_c, ex_ref;
  logic [CW-1:0]   vr_a, vr_b, vr_c, ex_vr;

  tirex_fdu #(.CW(CW)) u_fdu_a (.clk, .rst_n, .load(load_a),  .word(word_a),
                                .cm(cm_a), .cf(cf_a), .refc(ref_a), .valid_ref(vr_a));
  tirex_fdu #(.CW(CW)) u_fdu_b (.clk, .rst_n, .load(load_bc), .word(word_b),
                                .cm(cm_b), .cf(cf_b), .refc(ref_b), .valid_ref(vr_b));
  tirex_fdu #(.CW(CW)) u_fdu_c (.clk, .rst_n, .load(load_bc), .word(word_c),
                                .cm(cm_c), .cf(cf_c), .refc(ref_c), .valid_ref(vr_c));

  always_comb begin
    unique case (fdu_sel)
      FDU_B:   begin ex_cm = cm_b; ex_cf = cf_b; ex_ref = ref_b; ex_vr = vr_b; end
      FDU_C:   begin ex_cm = cm_c; ex_cf = cf_c; ex_ref = ref_c; ex_vr = vr_c; end
      default: begin ex_cm = cm_a; ex_cf = cf_a; ex_ref = ref_a; ex_vr = vr_a; end
    endcase
  end

  // ---------------- data cache and data buffer ----------------
  logic [DPW-1:0]       next_dp;
  logic [WAW-1:0]       dm_raddr;
  logic [NRD-1:0][31:0] dm_rdata;
  logic [WIN-1:0][7:0]  win;
  logic [WIN-1:0]       win_valid;

  tirex_data_mem #(.BYTES(DATA_BYTES), .NRD(NRD)) u_dmem (
    .clk, .we(dm_we), .waddr(dm_waddr), .wdata(dm_wdata), .wstrb(dm_wstrb),
    .raddr(dm_raddr), .rdata(dm_rdata)
  );

  tirex_db #(.NCL(NCL), .CW(CW), .BYTES(DATA_BYTES)) u_db (
    .clk, .rst_n, .next_dp, .eod,
    .mem_raddr(dm_raddr), .mem_rdata(dm_rdata),
    .win, .win_valid
  );

  // ---------------- execute unit: clusters and engine ----------------
  logic [NCL-1:0] cl_en, cl_match;
  logic           search, eng_match;
  logic [OFW-1:0] eng_start_off, eng_advance;

  for (genvar c = 0; c < int'(NCL); c++) begin : g_cluster
    tirex_cluster #(.CW(CW)) u_cluster (
      .en(cl_en[c]), .cm(ex_cm), .refc(ex_ref), .valid_ref(ex_vr),
      .data(win[c +: CW]), .data_valid(win_valid[c +: CW]),
      .match(cl_match[c])
    );
  end

  tirex_engine #(.NCL(NCL), .CW(CW)) u_engine (
    .search, .cm(ex_cm), .valid_ref(ex_vr), .cl_match,
    .cl_en, .match(eng_match), .start_off(eng_start_off), .advance(eng_advance)
  );

  // ---------------- control unit and stack buffer ----------------
  logic            stk_clear, stk_push, stk_pop, stk_wr_top;
  logic            stk_empty, stk_full, stk_overflow;
  logic [CTXW-1:0] stk_din, stk_top;

  tirex_stack #(.DEPTH(STACK_DEPTH), .WIDTH(CTXW)) u_stack (
    .clk, .rst_n, .clear(stk_clear), .push(stk_push), .pop(stk_pop),
    .wr_top(stk_wr_top), .din(stk_din), .top(stk_top),
    .empty(stk_empty), .full(stk_full), .overflow(stk_overflow)
  );

  logic cu_error;

  tirex_cu #(
    .NCL(NCL), .CW(CW), .IM_DEPTH(IM_DEPTH), .BYTES(DATA_BYTES)
  ) u_cu (
    .clk, .rst_n,
    .start, .sod, .eod, .busy, .done, .found, .error(cu_error),
    .match_start, .match_end,
    .ex_cm, .ex_cf, .ex_addr(ex_ref[PCW-1:0]),
    .search, .eng_match, .eng_start_off, .eng_advance,
    .fdu_sel, .load_a, .load_bc, .addr_b, .addr_c,
    .next_dp,
    .stk_clear, .stk_push, .stk_pop, .stk_wr_top, .stk_din,
    .stk_top, .stk_empty, .stk_full,
    .ev_rollback, .ev_loop_back, .ev_alt_next, .ev_chain_exit, .ev_redirect
  );

  assign error = cu_error | stk_overflow;

endmodule
