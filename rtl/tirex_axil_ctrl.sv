// tirex_axil_ctrl: AXI-Lite control port of one TiReX tile.
//
// The host reaches each tile through 32-bit AXI-Lite transactions: it fills
// the instruction memory and the private data cache, sets the data window
// [SOD, EOD), starts the tile and polls the result and a cycle counter.
// Register map (byte offsets inside the tile's window, see tirex_pkg):
//   0x00000 CTRL        W   bit0: start the tile (ignored while busy)
//   0x00004 STATUS      R   {error, found, done, busy} in bits [3:0]
//   0x00008 SOD         RW  first data byte
//   0x0000C EOD         RW  end of data (exclusive)
//   0x00010 MATCH_START R   first byte of the match
//   0x00014 MATCH_END   R   byte after the match
//   0x00018 CYCLES      R   clock cycles from start to done of the last run
//   0x40000 + 8*i       W   instruction i, reference bits [31:0] (held)
//   0x40004 + 8*i       W   instruction i, opcode in bits [5:0]; this write
//                           stores {opcode, held reference} into the memory
//   0x80000 + 4*w       W   data word w (byte strobes honoured)
// Unmapped reads return 0; every response is OKAY.
// Handshake: one write and one read in flight; AW and W may arrive in either
// order; the write is performed and B raised once both are held. A read
// answers one cycle after AR.
// The document gives the AXI-Lite control link, 32 bits per transaction and
// the clock-cycle and match-position performance counters; the register map
// and instruction packing are this design's.
// Lint note: the assertions below use rst_n in `disable iff`, a synchronous
// use of the asynchronous reset; verilator reports this as SYNCASYNCNET. The
// assertions are simulation checks only and add no hardware, so the warning
// is expected.
// Constant outputs: bresp and rresp are always OKAY (the tile never refuses
// an access), so synthesis sees those four response bits as constants.
module tirex_axil_ctrl
  import tirex_pkg::*;
#(
  parameter int unsigned CW         = 4,
  parameter int unsigned IM_DEPTH   = 256,
  parameter int unsigned DATA_BYTES = 16384,
  localparam int unsigned IW  = OPC_W + 8 * CW,
  localparam int unsigned PCW = $clog2(IM_DEPTH),
  localparam int unsigned DPW = $clog2(DATA_BYTES) + 1,
  localparam int unsigned WAW = $clog2(DATA_BYTES / 4)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  axil_req_t      s_req,
  output axil_rsp_t      s_rsp,
  // to the tile
  output logic           im_we,
  output logic [PCW-1:0] im_waddr,
  output logic [IW-1:0]  im_wdata,
  output logic           dm_we,
  output logic [WAW-1:0] dm_waddr,
  output logic [31:0]    dm_wdata,
  output logic [3:0]     dm_wstrb,
  output logic           start,
  output logic [DPW-1:0] sod,
  output logic [DPW-1:0] eod,
  input  logic           busy,
  input  logic           done,
  input  logic           found,
  input  logic           error,
  input  logic [DPW-1:0] match_start,
  input  logic [DPW-1:0] match_end
);

  // ---------------- write channel ----------------
  logic        aw_have, w_have, b_valid;
  logic [19:0] aw_addr;
  logic [31:0] w_data;
  logic [3:0]  w_strb;
  logic [31:0] ref_hold;
  logic        do_write;

  assign do_write = aw_have && w_have && !b_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_have <= 1'b0;
      w_have  <= 1'b0;
      b_valid <= 1'b0;
      aw_addr <= '0;
      w_data  <= '0;
      w_strb  <= '0;
    end else begin
      if (s_req.awvalid && !aw_have) begin
        aw_have <= 1'b1;
        aw_addr <= s_req.awaddr[19:0];
      end
      if (s_req.wvalid && !w_have) begin
        w_have <= 1'b1;
        w_data <= s_req.wdata;
        w_strb <= s_req.wstrb;
      end
      if (do_write) begin
        aw_have <= 1'b0;
        w_have  <= 1'b0;
        b_valid <= 1'b1;
      end
      if (b_valid && s_req.bready) b_valid <= 1'b0;
    end
  end

  logic is_im, is_dm;
  assign is_im = (aw_addr[19:18] == IM_BASE[19:18]);
  assign is_dm = (aw_addr[19] == DM_BASE[19]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sod      <= '0;
      eod      <= '0;
      ref_hold <= '0;
      start    <= 1'b0;
    end else begin
      start <= 1'b0;
      if (do_write && !is_im && !is_dm) begin
        unique case (aw_addr)
          REG_CTRL: start <= w_data[0] && !busy;
          REG_SOD:  sod   <= DPW'(w_data);
          REG_EOD:  eod   <= DPW'(w_data);
          default: ;
        endcase
      end
      if (do_write && is_im && !aw_addr[2]) ref_hold <= w_data;
    end
  end

  assign im_we    = do_write && is_im && aw_addr[2];
  assign im_waddr = aw_addr[PCW+2:3];
  assign im_wdata = {w_data[OPC_W-1:0], ref_hold[8*CW-1:0]};
  assign dm_we    = do_write && is_dm;
  assign dm_waddr = aw_addr[WAW+1:2];
  assign dm_wdata = w_data;
  assign dm_wstrb = w_strb;

  // ---------------- cycle counter ----------------
  logic [31:0] cycles;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cycles <= '0;
    else if (start) cycles <= 32'd1;
    else if (busy)  cycles <= cycles + 32'd1;
  end

  // ---------------- read channel ----------------
  logic        r_valid;
  logic [31:0] r_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r_data  <= '0;
    end else begin
      if (s_req.arvalid && !r_valid) begin
        r_valid <= 1'b1;
        unique case (s_req.araddr[19:0])
          REG_STATUS:      r_data <= {28'd0, error, found, done, busy};
          REG_SOD:         r_data <= 32'(sod);
          REG_EOD:         r_data <= 32'(eod);
          REG_MATCH_START: r_data <= 32'(match_start);
          REG_MATCH_END:   r_data <= 32'(match_end);
          REG_CYCLES:      r_data <= cycles;
          default:         r_data <= '0;
        endcase
      end else if (r_valid && s_req.rready) begin
        r_valid <= 1'b0;
      end
    end
  end

  always_comb begin
    s_rsp         = '0;
    s_rsp.awready = !aw_have;
    s_rsp.wready  = !w_have;
    s_rsp.bvalid  = b_valid;
    s_rsp.bresp   = AXI_OKAY;
    s_rsp.arready = !r_valid;
    s_rsp.rvalid  = r_valid;
    s_rsp.rdata   = r_data;
    s_rsp.rresp   = AXI_OKAY;
  end

  // AXI rule: a response stays valid, unchanged, until it is accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_rsp.bvalid && !s_req.bready |=> s_rsp.bvalid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_rsp.rvalid && !s_req.rready |=> s_rsp.rvalid && $stable(s_rsp.rdata));

endmodule
