// tb_tirex_fdu: self-checking testbench of one fetch/decode unit.
//
// Presents random 38-bit instruction words, with and without the load
// strobe, and checks the registered decoded fields one cycle later against a
// decoder written in the testbench: comparison half (OR, AND, any, group
// open, none), control-flow half (star, plus, alternative, group close, loop
// entry OKP, OR-chain entry JIM, none), the four reference characters and the
// valid-reference mask (a zero byte is an unused slot). Unused opcode codes
// must decode to "none". Without load the outputs must hold.
// Timing: one load per cycle, outputs checked after the edge; watchdog
// 100000 cycles. Opcode values follow the document's encoding table; the
// zero-byte rule for valid_ref is this design's.
`timescale 1ns/1ps
module tb_tirex_fdu;
  import tirex_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        load = 1'b0;
  logic [37:0] word = '0;
  cm_op_e      cm;
  cf_op_e      cf;
  logic [31:0] refc;
  logic [3:0]  valid_ref;

  tirex_fdu dut (.clk, .rst_n, .load, .word, .cm, .cf, .refc, .valid_ref);

  int checks = 0, failures = 0;
  int seen_cm [8], seen_cf [8];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic cm_op_e ref_cm(logic [2:0] c);
    case (c)
      3'b001: return CM_OR;
      3'b010: return CM_AND;
      3'b011: return CM_ANY;
      3'b100: return CM_CALL;
      default: return CM_NONE;
    endcase
  endfunction

  function automatic cf_op_e ref_cf(logic [2:0] c);
    case (c)
      3'b001: return CF_STAR;
      3'b010: return CF_PLUS;
      3'b011: return CF_ALT;
      3'b100: return CF_RET;
      3'b101: return CF_OKP;
      3'b111: return CF_JIM;
      default: return CF_NONE;
    endcase
  endfunction

  initial begin
    logic [37:0] held;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(cm == CM_NONE && cf == CF_NONE && valid_ref == '0, "reset state");
    held = '0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      load = ($urandom_range(0, 3) != 0);
      word = {6'($urandom), $urandom};
      // make empty character slots common
      for (int i = 0; i < 4; i++) if ($urandom_range(0, 3) == 0) word[8*i +: 8] = 8'h00;
      if (load) held = word;
      @(posedge clk); #1;
      check(cm == ref_cm(held[37:35]), $sformatf("cm of %h", held));
      check(cf == ref_cf(held[34:32]), $sformatf("cf of %h", held));
      check(refc == held[31:0], $sformatf("reference of %h", held));
      for (int i = 0; i < 4; i++)
        check(valid_ref[i] == (held[8*i +: 8] != 8'h00), $sformatf("valid_ref[%0d] of %h", i, held));
      seen_cm[held[37:35]]++;
      seen_cf[held[34:32]]++;
    end
    for (int i = 0; i < 8; i++) check(seen_cm[i] > 0 && seen_cf[i] > 0, "every opcode code exercised");
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
