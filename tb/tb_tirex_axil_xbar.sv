// tb_tirex_axil_xbar: self-checking testbench of the host-to-tile AXI-Lite
// crossbar.
//
// Sixteen simple register-file slaves sit on the tile ports; each accepts
// address and data and answers with random delays, stores the word, and
// returns SLVERR for one reserved register. The host side issues random
// single-tile writes, broadcast writes and reads. The testbench checks that a
// write lands only in the addressed tile (or in all tiles for a broadcast),
// that reads come back from the addressed tile, that a broadcast read is
// refused with DECERR, and that a slave's error response reaches the host.
// Timing: slaves are ready about two cycles in three; watchdog 200000
// cycles. The crossbar itself is named by the document; address map,
// broadcast and error responses are this design's.
`timescale 1ns/1ps
module tb_tirex_axil_xbar;
  import tirex_pkg::*;
  localparam int N = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t s_req;
  axil_rsp_t s_rsp;
  axil_req_t m_req [N];
  axil_rsp_t m_rsp [N];

  tirex_axil_xbar dut (.clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp);

  logic [31:0] regs [N][64];
  int checks = 0, failures = 0;
  int n_bcast = 0, n_decerr = 0, n_slverr = 0;

  // ---------------- slaves ----------------
  for (genvar s = 0; s < N; s++) begin : g_slave
    logic aw_h, w_h, b_v, r_v, rdy;
    logic [5:0] wa;
    logic [31:0] wd, rd;
    logic [1:0] br;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        aw_h <= 1'b0; w_h <= 1'b0; b_v <= 1'b0; r_v <= 1'b0; rdy <= 1'b0;
        wa <= '0; wd <= '0; rd <= '0; br <= AXI_OKAY;
      end else begin
        rdy <= ($urandom_range(0, 2) != 0);
        if (m_req[s].awvalid && rdy && !aw_h) begin aw_h <= 1'b1; wa <= m_req[s].awaddr[7:2]; end
        if (m_req[s].wvalid && rdy && !w_h) begin w_h <= 1'b1; wd <= m_req[s].wdata; end
        if (aw_h && w_h && !b_v) begin
          regs[s][wa] <= wd;
          br  <= (wa == 6'd63) ? 2'b10 : AXI_OKAY;
          b_v <= 1'b1; aw_h <= 1'b0; w_h <= 1'b0;
        end
        if (b_v && m_req[s].bready) b_v <= 1'b0;
        if (m_req[s].arvalid && rdy && !r_v) begin
          r_v <= 1'b1; rd <= regs[s][m_req[s].araddr[7:2]];
        end else if (r_v && m_req[s].rready) r_v <= 1'b0;
      end
    end
    always_comb begin
      m_rsp[s] = '0;
      m_rsp[s].awready = rdy && !aw_h;
      m_rsp[s].wready  = rdy && !w_h;
      m_rsp[s].bvalid  = b_v;
      m_rsp[s].bresp   = br;
      m_rsp[s].arready = rdy && !r_v;
      m_rsp[s].rvalid  = r_v;
      m_rsp[s].rdata   = rd;
      m_rsp[s].rresp   = AXI_OKAY;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- host ----------------
  task automatic axi_write(logic [31:0] addr, logic [31:0] data, output logic [1:0] resp);
    @(negedge clk);
    s_req.awaddr = addr; s_req.awvalid = 1'b1;
    s_req.wdata = data; s_req.wstrb = 4'hF; s_req.wvalid = 1'b1; s_req.bready = 1'b1;
    fork
      begin
        @(posedge clk);
        while (!s_rsp.awready) @(posedge clk);
        #1 s_req.awvalid = 1'b0;
      end
      begin
        @(posedge clk);
        while (!s_rsp.wready) @(posedge clk);
        #1 s_req.wvalid = 1'b0;
      end
    join
    while (!s_rsp.bvalid) @(posedge clk);
    resp = s_rsp.bresp;
    @(posedge clk);
    #1 s_req.bready = 1'b0;
  endtask

  task automatic axi_read(logic [31:0] addr, output logic [31:0] data, output logic [1:0] resp);
    @(negedge clk);
    s_req.araddr = addr; s_req.arvalid = 1'b1; s_req.rready = 1'b1;
    @(posedge clk);
    while (!s_rsp.arready) @(posedge clk);
    #1 s_req.arvalid = 1'b0;
    while (!s_rsp.rvalid) @(posedge clk);
    data = s_rsp.rdata; resp = s_rsp.rresp;
    @(posedge clk);
    #1 s_req.rready = 1'b0;
  endtask

  logic [31:0] model [N][64];

  initial begin
    logic [1:0] resp;
    logic [31:0] d;
    s_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // define every register by broadcasting
    for (int r = 0; r < 63; r++) begin
      d = $urandom;
      axi_write(32'h0100_0000 | 32'(4 * r), d, resp);
      for (int s = 0; s < N; s++) model[s][r] = d;
    end
    for (int n = 0; n < 1500; n++) begin
      automatic int t = int'($urandom_range(0, N - 1));
      automatic int r = int'($urandom_range(0, 62));
      automatic int k = int'($urandom_range(0, 9));
      case (k)
        0: begin
          d = $urandom;
          axi_write(32'h0100_0000 | 32'(4 * r), d, resp);
          check(resp == AXI_OKAY, "broadcast write OKAY");
          for (int s = 0; s < N; s++) model[s][r] = d;
          n_bcast++;
        end
        1, 2, 3, 4: begin
          d = $urandom;
          axi_write((32'(t) << 20) | 32'(4 * r), d, resp);
          check(resp == AXI_OKAY, "tile write OKAY");
          model[t][r] = d;
        end
        5: begin
          axi_read(32'h0100_0000 | 32'(4 * r), d, resp);
          check(resp == AXI_DECERR, "broadcast read DECERR");
          n_decerr++;
        end
        6: begin
          axi_write((32'(t) << 20) | 32'(4 * 63), $urandom, resp);
          check(resp == 2'b10, "slave error passed to the host");
          n_slverr++;
        end
        default: begin
          axi_read((32'(t) << 20) | 32'(4 * r), d, resp);
          check(resp == AXI_OKAY && d == model[t][r], $sformatf("read tile %0d reg %0d", t, r));
        end
      endcase
    end
    // every register of every tile must equal the model
    repeat (4) @(posedge clk);
    for (int s = 0; s < N; s++)
      for (int r = 0; r < 63; r++)
        check(regs[s][r] == model[s][r], $sformatf("final tile %0d reg %0d", s, r));
    check(n_bcast > 0 && n_decerr > 0 && n_slverr > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
