// tb_tirex_core: self-checking testbench of one TiReX tile.
//
// Loads hand-assembled programs and texts through the tile's write ports,
// runs them and compares found / match_start / match_end with expected
// values. Directed cases cover the worked ACGT(A|C)* example (including its
// seven-cycle timing), the three latency-test expressions, a loop whose body
// fails mid-way (loop-exit redirect), an OR chain whose first alternative
// fails mid-way (skip), and groups. A random part searches random DNA text
// for random literal strings and checks against a brute-force search done in
// the testbench; a no-match run checks the NCluster-characters-per-cycle
// search rate.
// Timing: each run is limited to 20000 cycles, the whole bench to 400000.
// The worked example, its cycle count and the benchmark expressions follow
// the document; the other programs, texts and the random part are this
// testbench's.
`timescale 1ns/1ps
module tb_tirex_core;
  import tirex_asm_pkg::*;

  localparam int unsigned BYTES = 4096;
  localparam int unsigned DPW   = $clog2(BYTES) + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            im_we = 1'b0;
  logic [7:0]      im_waddr = '0;
  logic [37:0]     im_wdata = '0;
  logic            dm_we = 1'b0;
  logic [9:0]      dm_waddr = '0;
  logic [31:0]     dm_wdata = '0;
  logic [3:0]      dm_wstrb = '0;
  logic            start = 1'b0;
  logic [DPW-1:0]  sod = '0, eod = '0;
  logic            busy, done, found, error;
  logic [DPW-1:0]  match_start, match_end;
  logic            ev_rollback, ev_loop_back, ev_alt_next, ev_chain_exit, ev_redirect;

  tirex_core #(.DATA_BYTES(BYTES)) dut (
    .clk, .rst_n, .im_we, .im_waddr, .im_wdata,
    .dm_we, .dm_waddr, .dm_wdata, .dm_wstrb,
    .start, .sod, .eod, .busy, .done, .found, .error, .match_start, .match_end,
    .ev_rollback, .ev_loop_back, .ev_alt_next, .ev_chain_exit, .ev_redirect
  );

  int checks = 0, failures = 0;
  int n_rollback = 0, n_loop = 0, n_alt = 0, n_exit = 0, n_redir = 0;
  always @(posedge clk) begin
    n_rollback += int'(ev_rollback);
    n_loop     += int'(ev_loop_back);
    n_alt      += int'(ev_alt_next);
    n_exit     += int'(ev_chain_exit);
    n_redir    += int'(ev_redirect);
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [37:0] prog [$];
  byte         text [$];

  task automatic load_prog();
    foreach (prog[i]) begin
      @(negedge clk);
      im_we = 1'b1; im_waddr = 8'(i); im_wdata = prog[i];
    end
    @(negedge clk) im_we = 1'b0;
  endtask

  task automatic load_text();
    for (int w = 0; w < (text.size() + 3) / 4; w++) begin
      @(negedge clk);
      dm_we = 1'b1; dm_waddr = 10'(w); dm_wstrb = 4'hF;
      for (int b = 0; b < 4; b++)
        dm_wdata[8*b +: 8] = (4*w + b < text.size()) ? text[4*w + b] : 8'h00;
    end
    @(negedge clk) dm_we = 1'b0;
  endtask

  function automatic void set_text(string s);
    text.delete();
    for (int i = 0; i < s.len(); i++) text.push_back(s[i]);
  endfunction

  // Runs the loaded program over [s, e); returns the cycles from start to done.
  task automatic run(int s, int e, output int cycles);
    @(negedge clk);
    sod = DPW'(s); eod = DPW'(e); start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    cycles = 0;
    while (!done && cycles < 20000) begin
      @(posedge clk); #1 cycles++;
    end
  endtask

  task automatic expect_run(string name, int s, int e, bit exp_found,
                            int exp_start, int exp_end, int exp_cycles = -1);
    int cyc;
    load_prog();
    load_text();
    run(s, e, cyc);
    check(done, {name, ": done"});
    check(!error, {name, ": no error"});
    check(found == exp_found, $sformatf("%s: found=%0d expected %0d", name, found, exp_found));
    if (exp_found) begin
      check(int'(match_start) == exp_start,
            $sformatf("%s: start=%0d expected %0d", name, match_start, exp_start));
      check(int'(match_end) == exp_end,
            $sformatf("%s: end=%0d expected %0d", name, match_end, exp_end));
    end
    if (exp_cycles >= 0)
      check(cyc == exp_cycles, $sformatf("%s: %0d cycles, expected %0d", name, cyc, exp_cycles));
  endtask

  // Brute-force first occurrence of pattern p in text[0:n).
  function automatic int find_first(string p, int n);
    for (int i = 0; i + p.len() <= n; i++) begin
      bit ok = 1'b1;
      for (int j = 0; j < p.len(); j++) if (text[i+j] != p[j]) ok = 1'b0;
      if (ok) return i;
    end
    return -1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Worked example: ACGT(A|C)* over CCGTACGTATTGCACTA; EOP executes in
    // cycle 7 counting the fetch of the first instruction as cycle 1.
    prog = '{ins(OP_AND, "ACGT"), ins_addr(OP_OKP, 2), ins(OP_OR | OP_STAR, "AC"), ins(OP_EOP, "")};
    set_text("CCGTACGTATTGCACTA");
    expect_run("example", 0, 17, 1'b1, 4, 9, 7);

    // Latency test 1: ACCGTGGA.
    prog = '{ins(OP_AND, "ACCG"), ins(OP_AND, "TGGA"), ins(OP_EOP, "")};
    set_text("TTACCGTAACCGTGGACC");
    expect_run("test1", 0, 18, 1'b1, 8, 16);
    // ... and not present.
    set_text("TTACCGTAACCGTGCACC");
    expect_run("test1-miss", 0, 18, 1'b0, 0, 0);

    // Latency test 2: (TTTT)+CT.
    prog = '{ins_addr(OP_OKP, 1), ins(OP_AND | OP_PLUS, "TTTT"), ins(OP_AND, "CT"), ins(OP_EOP, "")};
    set_text("GATTTTGTTTTTTTTCTA");
    expect_run("test2", 0, 18, 1'b1, 7, 17);
    set_text("GATTTCTTTTGCT");
    expect_run("test2-miss", 0, 13, 1'b0, 0, 0);

    // Latency test 3: (CAGT)|(GGGG)|(TTGG)TGCA(C|G)+.
    prog = '{ins_addr(OP_JIM, 4), ins(OP_AND | OP_ALT, "CAGT"), ins(OP_AND | OP_ALT, "GGGG"),
             ins(OP_AND | OP_ALT, "TTGG"), ins(OP_AND, "TGCA"), ins_addr(OP_OKP, 6),
             ins(OP_OR | OP_PLUS, "CG"), ins(OP_EOP, "")};
    set_text("ATTGGTGCATTTGGTGCAGCGA");
    expect_run("test3", 0, 22, 1'b1, 10, 21);

    // Loop with a two-instruction body that fails inside: T(ACGTAC)*G.
    prog = '{ins(OP_AND, "T"), ins_addr(OP_OKP, 3), ins(OP_AND, "ACGT"),
             ins(OP_AND | OP_STAR, "AC"), ins(OP_AND, "G"), ins(OP_EOP, "")};
    set_text("CCTACGTACG");
    expect_run("loop-exit", 0, 10, 1'b1, 2, 10);

    // OR chain whose first alternative has two instructions: (GGACGT)|(GT)A.
    prog = '{ins_addr(OP_JIM, 4), ins(OP_AND, "GGAC"), ins(OP_AND | OP_ALT, "GT"),
             ins(OP_AND | OP_ALT, "GT"), ins(OP_AND, "A"), ins(OP_EOP, "")};
    set_text("CCGTAC");
    expect_run("or-skip", 0, 6, 1'b1, 2, 5);
    set_text("CGGACGTA");
    expect_run("or-first", 0, 8, 1'b1, 1, 8);

    // Group and failing group: A(C)G.
    prog = '{ins(OP_AND, "A"), ins(OP_CALL, ""), ins(OP_AND | OP_RET, "C"), ins(OP_AND, "G"), ins(OP_EOP, "")};
    set_text("ATACTACG");
    expect_run("group", 0, 8, 1'b1, 5, 8);

    // Any-character and SoD/EoD window: A.G inside [3, 12).
    prog = '{ins(OP_AND, "A"), ins(OP_ANY, ""), ins(OP_AND, "G"), ins(OP_EOP, "")};
    set_text("ATGCCCCCCCCATG");
    expect_run("window-miss", 3, 12, 1'b0, 0, 0);
    expect_run("window-hit", 3, 14, 1'b1, 11, 14);

    // Search rate: no match in 64 characters takes 64/NCluster execute cycles.
    prog = '{ins(OP_AND, "AAAA"), ins(OP_EOP, "")};
    text.delete();
    repeat (64) text.push_back("C");
    expect_run("search-rate", 0, 64, 1'b0, 0, 0, 17);

    // Random literal strings over random DNA text.
    for (int t = 0; t < 40; t++) begin
      string p;
      int n, plen, pos;
      byte alpha[4] = '{"A", "C", "G", "T"};
      n = 40 + int'($urandom_range(0, 200));
      text.delete();
      for (int i = 0; i < n; i++) text.push_back(alpha[$urandom_range(0, 3)]);
      plen = 1 + int'($urandom_range(0, 8));
      p = "";
      if ($urandom_range(0, 1) == 1) begin
        // take it from the text so that it is usually found
        automatic int at = int'($urandom_range(0, n - plen));
        for (int j = 0; j < plen; j++) p = $sformatf("%s%c", p, text[at + j]);
      end else begin
        for (int j = 0; j < plen; j++) p = $sformatf("%s%c", p, alpha[$urandom_range(0, 3)]);
      end
      prog.delete();
      for (int j = 0; j < plen; j += 4) prog.push_back(ins(OP_AND, p.substr(j, (j + 3 < plen) ? j + 3 : plen - 1)));
      prog.push_back(ins(OP_EOP, ""));
      pos = find_first(p, n);
      expect_run($sformatf("random%0d(%s)", t, p), 0, n, pos >= 0, pos, pos + plen);
    end

    check(n_rollback > 0, "rollback happened");
    check(n_loop > 0, "loop back-jump happened");
    check(n_alt > 0, "next OR alternative happened");
    check(n_exit > 0, "OR-chain exit happened");
    check(n_redir > 0, "loop-exit redirect happened");
    $display("events: rollback=%0d loop=%0d alt=%0d chain_exit=%0d redirect=%0d",
             n_rollback, n_loop, n_alt, n_exit, n_redir);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
