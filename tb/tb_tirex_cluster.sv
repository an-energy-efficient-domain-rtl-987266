// tb_tirex_cluster: self-checking testbench of one comparator cluster.
//
// Random references, valid-reference masks and data (drawn from a small
// alphabet so that equalities are frequent, and sometimes copied from the
// reference to force a hit) are applied for every operation and compared
// with a model: AND needs every used reference character equal to the data
// character in the same slot, OR needs the first data character equal to
// any used reference character, "any" needs one valid data character, and a
// disabled cluster never matches. Characters past the end of data never
// match.
// Timing: combinational, checked 1 ns after each input change; watchdog
// 1 ms. AND/OR feeding follows the document; the treatment of characters
// past the end of data is this design's.
`timescale 1ns/1ps
module tb_tirex_cluster;
  import tirex_pkg::*;
  localparam int CW = 4;

  logic               en;
  cm_op_e             cm;
  logic [CW-1:0][7:0] refc, data;
  logic [CW-1:0]      valid_ref, data_valid;
  logic               match;

  tirex_cluster dut (.en, .cm, .refc, .valid_ref, .data, .data_valid, .match);

  int checks = 0, failures = 0;
  int hits [cm_op_e];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit model();
    bit m;
    if (!en) return 1'b0;
    case (cm)
      CM_AND: begin
        m = 1'b1;
        for (int i = 0; i < CW; i++)
          if (valid_ref[i] && !(data_valid[i] && data[i] == refc[i])) m = 1'b0;
      end
      CM_OR: begin
        m = 1'b0;
        for (int i = 0; i < CW; i++)
          if (valid_ref[i] && data_valid[0] && data[0] == refc[i]) m = 1'b1;
      end
      CM_ANY:  m = data_valid[0];
      default: m = 1'b1;
    endcase
    return m;
  endfunction

  initial begin
    cm_op_e ops [5] = '{CM_AND, CM_OR, CM_ANY, CM_NONE, CM_CALL};
    for (int n = 0; n < 20000; n++) begin
      cm = ops[$urandom_range(0, 4)];
      en = ($urandom_range(0, 7) != 0);
      for (int i = 0; i < CW; i++) begin
        refc[i] = 8'("A") + 8'($urandom_range(0, 3));
        data[i] = 8'("A") + 8'($urandom_range(0, 3));
      end
      valid_ref  = 4'($urandom) | 4'b0001;
      data_valid = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'hF;
      if ($urandom_range(0, 2) == 0) data = refc;
      #1;
      check(match == model(), $sformatf("op %s en %0d ref %h vr %b data %h dv %b",
                                        cm.name(), en, refc, valid_ref, data, data_valid));
      if (match) hits[cm]++;
      #1;
    end
    check(hits[CM_AND] > 0 && hits[CM_OR] > 0 && hits[CM_ANY] > 0, "each operation matched");
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
