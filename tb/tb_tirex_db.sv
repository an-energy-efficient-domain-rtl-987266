// tb_tirex_db: self-checking testbench of the data buffer.
//
// The testbench plays the data cache: it holds a random text and answers the
// buffer's word read address one clock later with NRD consecutive words, as
// the real cache does. It then drives a random sequence of data pointers
// (small steps like a running tile, and jumps like a rollback) and random
// end-of-data values, and checks that one clock after a pointer is given the
// buffer shows the NCluster+ClusterWidth-1 characters starting at that
// pointer, each marked valid only if it lies before the end of data.
// Timing: pointer given before an edge, window checked after it; watchdog
// 100000 cycles. The window width NCluster+ClusterWidth-1 follows the
// document; the pointer sequences are this testbench's.
`timescale 1ns/1ps
module tb_tirex_db;
  localparam int NCL   = 4;
  localparam int CW    = 4;
  localparam int BYTES = 16384;
  localparam int WIN   = NCL + CW - 1;
  localparam int NRD   = (WIN + 6) / 4;
  localparam int DPW   = $clog2(BYTES) + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [DPW-1:0]       next_dp = '0, eod = '0;
  logic [11:0]          mem_raddr;
  logic [NRD-1:0][31:0] mem_rdata;
  logic [WIN-1:0][7:0]  win;
  logic [WIN-1:0]       win_valid;

  tirex_db dut (.clk, .rst_n, .next_dp, .eod, .mem_raddr, .mem_rdata, .win, .win_valid);

  byte text [BYTES];
  always_ff @(posedge clk)
    for (int r = 0; r < NRD; r++)
      for (int b = 0; b < 4; b++)
        mem_rdata[r][8*b +: 8] <= text[(4 * (int'(mem_raddr) + r) + b) % BYTES];

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int dp;
    for (int i = 0; i < BYTES; i++) text[i] = byte'($urandom_range(33, 126));
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    dp = 0;
    for (int n = 0; n < 5000; n++) begin
      int e;
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) dp = int'($urandom_range(0, BYTES - 1));
      else                           dp = (dp + int'($urandom_range(0, NCL + CW))) % BYTES;
      e = ($urandom_range(0, 1) == 1) ? dp + int'($urandom_range(0, WIN + 1)) : BYTES;
      if (e > BYTES) e = BYTES;
      next_dp = DPW'(dp); eod = DPW'(e);
      @(posedge clk); #1;
      for (int i = 0; i < WIN; i++) begin
        check(win_valid[i] == (dp + i < e), $sformatf("valid %0d at dp %0d eod %0d", i, dp, e));
        if (dp + i < BYTES)
          check(win[i] == 8'(text[dp + i]), $sformatf("char %0d at dp %0d", i, dp));
      end
    end
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
