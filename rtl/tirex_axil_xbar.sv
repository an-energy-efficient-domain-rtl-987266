// tirex_axil_xbar: AXI-Lite crossbar from the host to the TiReX tiles.
//
// One host (master) port, N tile (slave) ports. Address bits
// [SEL_LSB +: SELW] pick the tile, so each tile owns a 1 MiB window
// (tile t at t * 0x10_0000). A write with address bit BCAST_BIT set goes to
// every tile at once, which loads the same program (SIMD-like use: one
// expression, many data chunks) or the same text (MISD-like use: one data
// stream, many expressions) in one transaction; its response is OKAY unless
// a tile reports an error (then SLVERR). Reads are never broadcast. A tile index with no tile
// behind it, or a broadcast read, gets a DECERR response.
// Each direction carries one transaction at a time: the request is held in
// the crossbar, issued to the chosen tile(s), and the response is returned to
// the host, so a write costs about four cycles plus the tile's latency.
// The document names the crossbar between the embedded processor and the
// tiles; its address map, broadcast and one-at-a-time policy are this
// design's.
// Lint note: the assertions below use rst_n in `disable iff`, a synchronous
// use of the asynchronous reset; verilator reports this as SYNCASYNCNET. The
// assertions are simulation checks only and add no hardware, so the warning
// is expected.
module tirex_axil_xbar
  import tirex_pkg::*;
#(
  parameter int unsigned N         = 16,
  parameter int unsigned SEL_LSB   = 20,
  parameter int unsigned BCAST_BIT = 24,
  localparam int unsigned SELW     = (N > 1) ? $clog2(N) : 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  output axil_req_t m_req [N],
  input  axil_rsp_t m_rsp [N]
);

  typedef enum logic [1:0] {X_IDLE, X_ISSUE, X_RESP} xstate_e;

  // Tile write responses gathered into vectors, one bit per tile.
  logic [N-1:0] awready_v, wready_v, bvalid_v, berr_v;
  always_comb begin
    for (int s = 0; s < int'(N); s++) begin
      awready_v[s] = m_rsp[s].awready;
      wready_v[s]  = m_rsp[s].wready;
      bvalid_v[s]  = m_rsp[s].bvalid;
      berr_v[s]    = (m_rsp[s].bresp != AXI_OKAY);
    end
  end

  // ---------------- write path ----------------
  xstate_e         wst;
  logic            aw_have, w_have;
  logic [31:0]     aw_addr, w_data;
  logic [3:0]      w_strb;
  logic [N-1:0]    wmask, aw_done, w_done, b_done, b_fire;
  logic [1:0]      bresp;
  logic [SELW-1:0] w_sel;

  assign w_sel  = aw_addr[SEL_LSB +: SELW];
  assign b_fire = wmask & aw_done & w_done & bvalid_v & ~b_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wst     <= X_IDLE;
      aw_have <= 1'b0;
      w_have  <= 1'b0;
      aw_addr <= '0;
      w_data  <= '0;
      w_strb  <= '0;
      wmask   <= '0;
      aw_done <= '0;
      w_done  <= '0;
      b_done  <= '0;
      bresp   <= AXI_OKAY;
    end else begin
      unique case (wst)
        X_IDLE: begin
          if (s_req.awvalid && !aw_have) begin
            aw_have <= 1'b1;
            aw_addr <= s_req.awaddr;
          end
          if (s_req.wvalid && !w_have) begin
            w_have <= 1'b1;
            w_data <= s_req.wdata;
            w_strb <= s_req.wstrb;
          end
          if (aw_have && w_have) begin
            if (aw_addr[BCAST_BIT])         wmask <= '1;
            else if (int'(w_sel) < int'(N)) wmask <= N'(1) << w_sel;
            else                            wmask <= '0;
            aw_done <= '0;
            w_done  <= '0;
            b_done  <= '0;
            bresp   <= AXI_OKAY;
            wst     <= X_ISSUE;
          end
        end
        X_ISSUE: begin
          aw_done <= aw_done | (wmask & awready_v);
          w_done  <= w_done | (wmask & wready_v);
          b_done  <= b_done | b_fire;
          if ((b_fire & berr_v) != '0) bresp <= AXI_SLVERR;
          if (wmask == '0) begin
            bresp <= AXI_DECERR;
            wst   <= X_RESP;
          end else if ((b_done | b_fire | ~wmask) == '1) begin
            wst <= X_RESP;
          end
        end
        X_RESP: begin
          if (s_req.bready) begin
            aw_have <= 1'b0;
            w_have  <= 1'b0;
            wst     <= X_IDLE;
          end
        end
        default: wst <= X_IDLE;
      endcase
    end
  end

  // ---------------- read path ----------------
  xstate_e         rst_q;
  logic [31:0]     ar_addr, r_data;
  logic [SELW-1:0] r_sel;
  logic            r_bad, ar_done;
  logic [1:0]      rresp;
  logic            r_arready, r_rvalid;
  logic [31:0]     r_rdata;
  logic [1:0]      r_rresp;

  assign r_sel     = ar_addr[SEL_LSB +: SELW];
  assign r_arready = m_rsp[r_sel].arready;
  assign r_rvalid  = m_rsp[r_sel].rvalid;
  assign r_rdata   = m_rsp[r_sel].rdata;
  assign r_rresp   = m_rsp[r_sel].rresp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_q   <= X_IDLE;
      ar_addr <= '0;
      r_data  <= '0;
      r_bad   <= 1'b0;
      ar_done <= 1'b0;
      rresp   <= AXI_OKAY;
    end else begin
      unique case (rst_q)
        X_IDLE: begin
          if (s_req.arvalid) begin
            ar_addr <= s_req.araddr;
            r_bad   <= s_req.araddr[BCAST_BIT] ||
                       (int'(s_req.araddr[SEL_LSB +: SELW]) >= int'(N));
            ar_done <= 1'b0;
            rst_q   <= X_ISSUE;
          end
        end
        X_ISSUE: begin
          if (r_bad) begin
            r_data <= '0;
            rresp  <= AXI_DECERR;
            rst_q  <= X_RESP;
          end else begin
            if (r_arready) ar_done <= 1'b1;
            if (ar_done && r_rvalid) begin
              r_data <= r_rdata;
              rresp  <= r_rresp;
              rst_q  <= X_RESP;
            end
          end
        end
        X_RESP: begin
          if (s_req.rready) rst_q <= X_IDLE;
        end
        default: rst_q <= X_IDLE;
      endcase
    end
  end

  // ---------------- port drive ----------------
  always_comb begin
    for (int s = 0; s < int'(N); s++) begin
      m_req[s]         = '0;
      m_req[s].awaddr  = aw_addr;
      m_req[s].wdata   = w_data;
      m_req[s].wstrb   = w_strb;
      m_req[s].araddr  = ar_addr;
      m_req[s].awvalid = (wst == X_ISSUE) && wmask[s] && !aw_done[s];
      m_req[s].wvalid  = (wst == X_ISSUE) && wmask[s] && !w_done[s];
      m_req[s].bready  = (wst == X_ISSUE) && wmask[s] && aw_done[s] && w_done[s] && !b_done[s];
      m_req[s].arvalid = (rst_q == X_ISSUE) && !r_bad && (int'(r_sel) == s) && !ar_done;
      m_req[s].rready  = (rst_q == X_ISSUE) && !r_bad && (int'(r_sel) == s) && ar_done;
    end
    s_rsp         = '0;
    s_rsp.awready = (wst == X_IDLE) && !aw_have;
    s_rsp.wready  = (wst == X_IDLE) && !w_have;
    s_rsp.bvalid  = (wst == X_RESP);
    s_rsp.bresp   = bresp;
    s_rsp.arready = (rst_q == X_IDLE);
    s_rsp.rvalid  = (rst_q == X_RESP);
    s_rsp.rdata   = r_data;
    s_rsp.rresp   = rresp;
  end

  // The host must hold a request until it is accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_req.awvalid && !s_rsp.awready |=> s_req.awvalid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_req.arvalid && !s_rsp.arready |=> s_req.arvalid);

endmodule
