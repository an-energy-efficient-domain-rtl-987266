// tb_tirex_engine: self-checking testbench of the engine that combines the
// cluster results.
//
// Random cluster hit vectors, operations and valid-reference masks are
// applied in both modes and compared with a model. Searching (not yet inside
// a match): all clusters are enabled, the lowest hitting cluster gives the
// match start offset, and the pointer moves by that offset plus the
// characters consumed (used reference characters for AND, one for OR and
// "any"); with no hit it moves by NCluster. Matching: only cluster 0 is
// enabled and the pointer moves by the characters consumed.
// Timing: combinational, checked 1 ns after each input change; watchdog
// 1 ms. The two modes follow the document; lowest-cluster priority is this
// design's.
`timescale 1ns/1ps
module tb_tirex_engine;
  import tirex_pkg::*;
  localparam int NCL = 4;
  localparam int CW  = 4;

  logic           search;
  cm_op_e         cm;
  logic [CW-1:0]  valid_ref;
  logic [NCL-1:0] cl_match, cl_en;
  logic           match;
  logic [3:0]     start_off, advance;

  tirex_engine dut (.search, .cm, .valid_ref, .cl_match, .cl_en, .match, .start_off, .advance);

  int checks = 0, failures = 0;
  int n_search_hit = 0, n_search_miss = 0, n_match_mode = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    cm_op_e ops [3] = '{CM_AND, CM_OR, CM_ANY};
    for (int n = 0; n < 20000; n++) begin
      int consumed, first, e_adv;
      bit e_match;
      search    = ($urandom_range(0, 1) == 1);
      cm        = ops[$urandom_range(0, 2)];
      valid_ref = 4'($urandom) | 4'b0001;
      cl_match  = 4'($urandom);
      if (!search) cl_match[NCL-1:1] = '0;
      #1;
      consumed = (cm == CM_AND) ? $countones(valid_ref) : 1;
      first = -1;
      for (int c = NCL - 1; c >= 0; c--) if (cl_match[c]) first = c;
      if (search) begin
        e_match = (first >= 0);
        e_adv   = e_match ? first + consumed : NCL;
        check(cl_en == '1, "all clusters enabled while searching");
        if (e_match) begin
          check(int'(start_off) == first, $sformatf("start offset %0d expected %0d", start_off, first));
          n_search_hit++;
        end else n_search_miss++;
      end else begin
        e_match = cl_match[0];
        e_adv   = e_match ? consumed : 0;
        check(cl_en == 4'b0001, "only cluster 0 enabled while matching");
        n_match_mode++;
      end
      check(match == e_match, $sformatf("match %0d expected %0d (hits %b)", match, e_match, cl_match));
      if (e_match || search)
        check(int'(advance) == e_adv, $sformatf("advance %0d expected %0d", advance, e_adv));
      #1;
    end
    check(n_search_hit > 0 && n_search_miss > 0 && n_match_mode > 0, "all modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
