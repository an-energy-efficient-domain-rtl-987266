// tb_tirex_axil_ctrl: self-checking testbench of a tile's AXI-Lite control
// port.
//
// The testbench drives AXI-Lite writes and reads (address and data channels
// in random order and with random delays, random response back-pressure) and
// plays a simple tile: it records instruction and data-cache writes and
// answers with fixed status and match values. It checks that instruction
// words are assembled from the two 32-bit halves, that data words carry
// their strobes, that SOD/EOD read back, that a CTRL write gives a one-cycle
// start pulse (and none while the tile is busy), that the status and match
// registers read what the tile shows and that the cycle counter counts the
// busy cycles of a run.
// Timing: handshakes with 0-2 cycle random delays; watchdog 100000 cycles.
// The AXI-Lite link and the cycle and position counters follow the
// document; the register map is this design's.
`timescale 1ns/1ps
module tb_tirex_axil_ctrl;
  import tirex_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic        im_we, dm_we, start;
  logic [7:0]  im_waddr;
  logic [37:0] im_wdata;
  logic [11:0] dm_waddr;
  logic [31:0] dm_wdata;
  logic [3:0]  dm_wstrb;
  logic [14:0] sod, eod;
  logic        busy = 1'b0, done = 1'b0, found = 1'b0, error = 1'b0;
  logic [14:0] match_start = '0, match_end = '0;

  tirex_axil_ctrl dut (
    .clk, .rst_n, .s_req(req), .s_rsp(rsp), .im_we, .im_waddr, .im_wdata,
    .dm_we, .dm_waddr, .dm_wdata, .dm_wstrb, .start, .sod, .eod,
    .busy, .done, .found, .error, .match_start, .match_end
  );

  int checks = 0, failures = 0;
  int n_start = 0;
  logic [37:0] im_model [256];
  logic [31:0] dm_model [4096];
  bit          im_seen [256];

  always @(posedge clk) begin
    if (im_we) begin im_model[im_waddr] <= im_wdata; im_seen[im_waddr] <= 1'b1; end
    if (dm_we) dm_model[dm_waddr] <= dm_wdata & {{8{dm_wstrb[3]}}, {8{dm_wstrb[2]}}, {8{dm_wstrb[1]}}, {8{dm_wstrb[0]}}};
    if (start) n_start++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic axi_write(logic [31:0] addr, logic [31:0] data, logic [3:0] strb = 4'hF);
    int daw, dw;
    daw = int'($urandom_range(0, 2)); dw = int'($urandom_range(0, 2));
    fork
      begin
        repeat (daw) @(posedge clk);
        #1 req.awaddr = addr; req.awvalid = 1'b1;
        @(posedge clk);
        while (!rsp.awready) @(posedge clk);
        #1 req.awvalid = 1'b0;
      end
      begin
        repeat (dw) @(posedge clk);
        #1 req.wdata = data; req.wstrb = strb; req.wvalid = 1'b1;
        @(posedge clk);
        while (!rsp.wready) @(posedge clk);
        #1 req.wvalid = 1'b0;
      end
    join
    repeat ($urandom_range(0, 2)) @(posedge clk);
    #1 req.bready = 1'b1;
    @(posedge clk);
    while (!rsp.bvalid) @(posedge clk);
    check(rsp.bresp == AXI_OKAY, "write response OKAY");
    #1 req.bready = 1'b0;
  endtask

  task automatic axi_read(logic [31:0] addr, output logic [31:0] data);
    #1 req.araddr = addr; req.arvalid = 1'b1;
    @(posedge clk);
    while (!rsp.arready) @(posedge clk);
    #1 req.arvalid = 1'b0;
    while (!rsp.rvalid) @(posedge clk);
    repeat ($urandom_range(0, 2)) begin
      @(posedge clk);
      check(rsp.rvalid, "read data held until accepted");
    end
    data = rsp.rdata;
    #1 req.rready = 1'b1;
    @(posedge clk);
    #1 req.rready = 1'b0;
  endtask

  initial begin
    logic [31:0] r;
    logic [37:0] iw [256];
    logic [31:0] dw [4096];
    req = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // instruction memory: 64 random instructions
    for (int i = 0; i < 64; i++) begin
      automatic int a = int'($urandom_range(0, 255));
      iw[a] = {6'($urandom), $urandom};
      axi_write(32'(IM_BASE) + 32'(8 * a), iw[a][31:0]);
      axi_write(32'(IM_BASE) + 32'(8 * a + 4), 32'(iw[a][37:32]));
      repeat (2) @(posedge clk);
      check(im_seen[a] && im_model[a] == iw[a], $sformatf("instruction %0d", a));
    end
    // data cache: 200 random words with random strobes
    for (int i = 0; i < 200; i++) begin
      automatic int a = int'($urandom_range(0, 4095));
      automatic logic [3:0] s = 4'($urandom);
      automatic logic [31:0] d = $urandom;
      axi_write(32'(DM_BASE) + 32'(4 * a), d, s);
      repeat (2) @(posedge clk);
      check(dm_model[a] == (d & {{8{s[3]}}, {8{s[2]}}, {8{s[1]}}, {8{s[0]}}}), $sformatf("data word %0d", a));
    end
    // window registers
    for (int i = 0; i < 20; i++) begin
      automatic int s = int'($urandom_range(0, 16384));
      automatic int e = int'($urandom_range(0, 16384));
      axi_write(32'(REG_SOD), 32'(s));
      axi_write(32'(REG_EOD), 32'(e));
      check(int'(sod) == s && int'(eod) == e, "SOD/EOD outputs");
      axi_read(32'(REG_SOD), r); check(int'(r) == s, "SOD read back");
      axi_read(32'(REG_EOD), r); check(int'(r) == e, "EOD read back");
    end
    // start, a 37-cycle run, then status, match and cycles
    n_start = 0;
    axi_write(32'(REG_CTRL), 1);
    @(posedge clk);
    check(n_start == 1, "one start pulse");
    #1 busy = 1'b1;
    axi_write(32'(REG_CTRL), 1);
    @(posedge clk);
    check(n_start == 1, "no start while busy");
    repeat (30) @(posedge clk);
    #1 busy = 1'b0; done = 1'b1; found = 1'b1; match_start = 15'd1234; match_end = 15'd1242;
    axi_read(32'(REG_STATUS), r);   check(r == 32'b0110, $sformatf("status %b", r));
    axi_read(32'(REG_MATCH_START), r); check(r == 1234, "match start");
    axi_read(32'(REG_MATCH_END), r);   check(r == 1242, "match end");
    axi_read(32'(REG_CYCLES), r);
    check(r > 32'd30 && r < 32'd60, $sformatf("cycle counter %0d", r));
    #1 error = 1'b1; busy = 1'b1;
    axi_read(32'(REG_STATUS), r);   check(r == 32'b1111, $sformatf("status %b", r));
    axi_read(32'h0000_0100, r);     check(r == 0, "unmapped reads 0");
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
