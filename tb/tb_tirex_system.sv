// tb_tirex_system: end-to-end test of the multi-core TiReX system at its
// default size (16 tiles, 16 KiB of data per tile), driven like the host
// would drive it over AXI-Lite.
//
// Phase 1, single expression / multiple data streams: the expression
// (CAGT)|(GGGG)|(TTGG)TGCA(C|G)+ is broadcast to all tiles; a 16 KiB text is
// split with the overlapping-chunk rule (Tr = 100) and each chunk written to
// one tile. Two occurrences are planted, one right at a chunk boundary so
// that only the overlap lets tile 0 see it whole.
// Phase 2, multiple expressions / single data stream: the same 16 KiB text
// is broadcast to every tile and each tile gets its own expression.
// The background text uses only A and C, so every occurrence of the
// expressions (which all need G or T) is a planted one and the expected
// positions are worked out by hand in the comments below.
// Every mechanism of the tiles (rollback, loop back-jump, next alternative,
// chain exit, loop-exit redirect) and of the system (broadcast, overlap,
// found_any, all_done) is counted and must occur.
// Timing: about 90k cycles; the watchdog stops it at 2M cycles. The split
// rule and the benchmark expression follow the document; the planted texts,
// the per-tile expressions and the register sequence are this testbench's.
`timescale 1ns/1ps
module tb_tirex_system;
  import tirex_pkg::*;
  import tirex_asm_pkg::*;

  localparam int NC    = 16;
  localparam int BYTES = 16384;
  localparam int TR    = 100;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic [NC-1:0] core_done, core_found;
  tirex_events_t [NC-1:0] core_events;
  logic found_any, all_done;

  tirex_system dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
    .core_done, .core_found, .core_events, .found_any, .all_done
  );

  int checks = 0, failures = 0;
  int n_rollback = 0, n_loop = 0, n_alt = 0, n_exit = 0, n_redir = 0;
  int n_bcast = 0, n_overlap = 0, n_found_any = 0, n_all_done = 0;

  always @(posedge clk) begin
    for (int t = 0; t < NC; t++) begin
      n_rollback += int'(core_events[t].rollback);
      n_loop     += int'(core_events[t].loop_back);
      n_alt      += int'(core_events[t].alt_next);
      n_exit     += int'(core_events[t].chain_exit);
      n_redir    += int'(core_events[t].redirect);
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- AXI-Lite host model ----------------
  logic [1:0] last_bresp, last_rresp;
  task automatic axi_write(logic [31:0] addr, logic [31:0] data);
    @(negedge clk);
    req.awaddr = addr; req.awvalid = 1'b1;
    req.wdata = data; req.wstrb = 4'hF; req.wvalid = 1'b1;
    req.bready = 1'b1;
    fork
      begin
        @(posedge clk);
        while (!(req.awvalid && rsp.awready)) @(posedge clk);
        #1 req.awvalid = 1'b0;
      end
      begin
        @(posedge clk);
        while (!(req.wvalid && rsp.wready)) @(posedge clk);
        #1 req.wvalid = 1'b0;
      end
    join
    while (!rsp.bvalid) @(posedge clk);
    last_bresp = rsp.bresp;
    @(posedge clk);
    #1 req.bready = 1'b0;
    if (addr[24]) n_bcast++;
  endtask

  task automatic axi_read(logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    req.araddr = addr; req.arvalid = 1'b1; req.rready = 1'b1;
    @(posedge clk);
    while (!rsp.arready) @(posedge clk);
    #1 req.arvalid = 1'b0;
    while (!rsp.rvalid) @(posedge clk);
    data = rsp.rdata;
    last_rresp = rsp.rresp;
    @(posedge clk);
    #1 req.rready = 1'b0;
  endtask

  function automatic logic [31:0] tile(int t);
    return 32'(t) << 20;
  endfunction
  localparam logic [31:0] ALL = 32'h0100_0000;

  task automatic write_prog(logic [31:0] base, logic [37:0] p [$]);
    foreach (p[i]) begin
      axi_write(base | 32'(IM_BASE) | 32'(8 * i),     p[i][31:0]);
      axi_write(base | 32'(IM_BASE) | 32'(8 * i + 4), 32'(p[i][37:32]));
    end
  endtask

  byte text [BYTES];

  task automatic write_text(logic [31:0] base, int from, int to);
    for (int a = from; a < to; a += 4) begin
      logic [31:0] w;
      for (int b = 0; b < 4; b++) w[8*b +: 8] = (a + b < to) ? text[a + b] : 8'h00;
      axi_write(base | 32'(DM_BASE) | 32'(a - from), w);
    end
  endtask

  function automatic void plant(int at, string s);
    for (int i = 0; i < s.len(); i++) text[at + i] = s[i];
  endfunction

  task automatic wait_all_done();
    int guard = 0;
    while (!all_done && guard < 200000) begin
      @(posedge clk);
      guard++;
    end
    check(all_done, "all tiles completed");
  endtask

  logic [37:0] prog [$];
  logic [37:0] progs [NC][$];
  int sod [NC], eod [NC];

  initial begin
    logic [31:0] st, ms, me, cyc;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < BYTES; i++) text[i] = ($urandom_range(0, 1) == 1) ? "A" : "C";

    // ================= phase 1: one expression, split data =================
    // GGGG TGCA CCG, stopped by A: global [1020, 1031), straddles 1024.
    plant(1020, "GGGGTGCACCGA");
    // CAGT TGCA G, stopped by T: global [9000, 9009).
    plant(9000, "CAGTTGCAGT");
    prog = '{ins_addr(OP_JIM, 4), ins(OP_AND | OP_ALT, "CAGT"), ins(OP_AND | OP_ALT, "GGGG"),
             ins(OP_AND | OP_ALT, "TTGG"), ins(OP_AND, "TGCA"), ins_addr(OP_OKP, 6),
             ins(OP_OR | OP_PLUS, "CG"), ins(OP_EOP, "")};
    write_prog(ALL, prog);
    begin
      int bsize = BYTES / NC;
      for (int i = 0; i < NC; i++) begin
        eod[i] = (bsize * (i + 1) + TR < BYTES) ? bsize * (i + 1) + TR : BYTES;
        sod[i] = (i == 0) ? 0 : eod[i-1] - TR;
        if (eod[i] > bsize * (i + 1)) n_overlap++;
        write_text(tile(i), sod[i], eod[i]);
        axi_write(tile(i) | 32'(REG_SOD), 0);
        axi_write(tile(i) | 32'(REG_EOD), 32'(eod[i] - sod[i]));
      end
    end
    axi_write(ALL | 32'(REG_CTRL), 1);
    wait_all_done();
    if (found_any) n_found_any++;
    if (all_done) n_all_done++;
    for (int i = 0; i < NC; i++) begin
      bit exp_found;
      exp_found = (i == 0) || (i == 8);
      axi_read(tile(i) | 32'(REG_STATUS), st);
      check(st[2:1] == {exp_found, 1'b1}, $sformatf("SIMD tile %0d status %b", i, st[3:0]));
      check(st[3] == 1'b0, $sformatf("SIMD tile %0d no error", i));
      check(core_found[i] == exp_found, $sformatf("SIMD tile %0d found line", i));
      if (exp_found) begin
        axi_read(tile(i) | 32'(REG_MATCH_START), ms);
        axi_read(tile(i) | 32'(REG_MATCH_END), me);
        check(int'(ms) + sod[i] == ((i == 0) ? 1020 : 9000),
              $sformatf("SIMD tile %0d start %0d", i, int'(ms) + sod[i]));
        check(int'(me) + sod[i] == ((i == 0) ? 1031 : 9009),
              $sformatf("SIMD tile %0d end %0d", i, int'(me) + sod[i]));
      end
    end

    // ================= phase 2: one data stream, many expressions ==========
    for (int i = 0; i < BYTES; i++) text[i] = ($urandom_range(0, 1) == 1) ? "A" : "C";
    plant(1000, "TACGTACG");     // T(ACGTAC)*G -> [1000,1008); GTA at 1003; ACG at 1001
    plant(3000, "ACCGTGGA");     // ACCGTGGA -> [3000,3008); CCGTGG at 3001
    plant(6000, "TTTTTTTTCT");   // (TTTT)+CT -> [6000,6010)
    write_text(ALL, 0, BYTES);
    axi_write(ALL | 32'(REG_SOD), 0);
    axi_write(ALL | 32'(REG_EOD), BYTES);
    progs[0] = '{ins(OP_AND, "ACCG"), ins(OP_AND, "TGGA"), ins(OP_EOP, "")};
    progs[1] = '{ins_addr(OP_OKP, 1), ins(OP_AND | OP_PLUS, "TTTT"), ins(OP_AND, "CT"), ins(OP_EOP, "")};
    progs[2] = '{ins(OP_AND, "T"), ins_addr(OP_OKP, 3), ins(OP_AND, "ACGT"),
                 ins(OP_AND | OP_STAR, "AC"), ins(OP_AND, "G"), ins(OP_EOP, "")};
    progs[3] = '{ins_addr(OP_JIM, 4), ins(OP_AND, "GGAC"), ins(OP_AND | OP_ALT, "GT"),
                 ins(OP_AND | OP_ALT, "GT"), ins(OP_AND, "A"), ins(OP_EOP, "")};
    progs[4] = '{ins(OP_AND, "A"), ins(OP_CALL, ""), ins(OP_AND | OP_RET, "C"), ins(OP_AND, "G"), ins(OP_EOP, "")};
    for (int i = 5; i < NC; i++)
      progs[i] = (i % 2 == 1) ? '{ins(OP_AND, "CCGT"), ins(OP_AND, "GG"), ins(OP_EOP, "")}
                              : '{ins(OP_AND, "TTTT"), ins(OP_AND, "TTTT"), ins(OP_AND, "T"), ins(OP_EOP, "")};
    for (int i = 0; i < NC; i++) write_prog(tile(i), progs[i]);
    axi_write(ALL | 32'(REG_CTRL), 1);
    wait_all_done();
    if (found_any) n_found_any++;
    if (all_done) n_all_done++;
    for (int i = 0; i < NC; i++) begin
      int es, ee;
      bit ef;
      unique case (i)
        0: begin ef = 1; es = 3000; ee = 3008; end
        1: begin ef = 1; es = 6000; ee = 6010; end
        2: begin ef = 1; es = 1000; ee = 1008; end
        3: begin ef = 1; es = 1003; ee = 1006; end
        4: begin ef = 1; es = 1001; ee = 1004; end
        default: begin
          ef = (i % 2 == 1); es = 3001; ee = 3007;
        end
      endcase
      axi_read(tile(i) | 32'(REG_STATUS), st);
      check(st[2:1] == {ef, 1'b1}, $sformatf("MISD tile %0d status %b", i, st[3:0]));
      check(st[3] == 1'b0, $sformatf("MISD tile %0d no error", i));
      if (ef) begin
        axi_read(tile(i) | 32'(REG_MATCH_START), ms);
        axi_read(tile(i) | 32'(REG_MATCH_END), me);
        check(int'(ms) == es, $sformatf("MISD tile %0d start %0d expected %0d", i, ms, es));
        check(int'(me) == ee, $sformatf("MISD tile %0d end %0d expected %0d", i, me, ee));
      end
    end
    // A literal that is absent is searched NCluster characters per cycle:
    // 16384 / 4 = 4096 execute cycles, plus start-up and the rare rollbacks.
    axi_read(tile(6) | 32'(REG_CYCLES), cyc);
    check(cyc >= 4096 && cyc < 4300, $sformatf("search rate: %0d cycles for 16 KiB", cyc));
    // Reads cannot be broadcast: the crossbar refuses them.
    axi_read(ALL | 32'(REG_STATUS), st);
    check(last_rresp == AXI_DECERR, "broadcast read refused with DECERR");
    axi_write(tile(3) | 32'(REG_SOD), 0);
    check(last_bresp == AXI_OKAY, "tile write answered OKAY");

    check(n_rollback > 0, "rollback happened");
    check(n_loop > 0, "loop back-jump happened");
    check(n_alt > 0, "next OR alternative happened");
    check(n_exit > 0, "OR-chain exit happened");
    check(n_redir > 0, "loop-exit redirect happened");
    check(n_bcast > 0, "broadcast writes happened");
    check(n_overlap > 0, "overlapping chunks used");
    check(n_found_any == 2, "found_any raised in both phases");
    check(n_all_done == 2, "all_done raised in both phases");
    $display("events: rollback=%0d loop=%0d alt=%0d chain_exit=%0d redirect=%0d bcast=%0d",
             n_rollback, n_loop, n_alt, n_exit, n_redir, n_bcast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
