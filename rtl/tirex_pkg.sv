// tirex_pkg: types and constants shared by the TiReX regular-expression
// matching tile and its multi-core system.
//
// Instruction word: {opcode[5:0], reference[8*CLUSTER_WIDTH-1:0]}, 38 bits for
// the default four-character reference. The 6-bit opcode follows the encoding
// table of the TiReX ISA and is read here as two 3-bit halves that compose:
//   opcode[5:3] character-match part : 010 AND, 001 OR, 011 ANY ('.'), 100 '(' call
//   opcode[2:0] control-flow part    : 100 ')', 001 ')*', 010 ')+', 011 ')|',
//                                      101 OKP, 111 JIM
// 000000 is EOP. A bundle such as "|)* AC" (opcode 001_001) is an OR match whose
// success closes a Kleene-star loop. Character i of the reference sits in
// bits [8*i+7:8*i]; a zero byte marks an unused reference slot. For OKP and JIM
// the reference carries an instruction address (see tirex_cu).
// The AXI-Lite request/response structs carry the host control bus.
// Lint note: each module that imports this package uses only part of it,
// so a lint run with all warnings on reports the other constants as
// UNUSEDPARAM; this is expected.
package tirex_pkg;

  localparam int unsigned OPC_W = 6;

  // Character-match half of the opcode.
  typedef enum logic [2:0] {
    CM_NONE = 3'b000,
    CM_OR   = 3'b001,
    CM_AND  = 3'b010,
    CM_ANY  = 3'b011,
    CM_CALL = 3'b100
  } cm_op_e;

  // Control-flow half of the opcode.
  typedef enum logic [2:0] {
    CF_NONE = 3'b000,
    CF_STAR = 3'b001,
    CF_PLUS = 3'b010,
    CF_ALT  = 3'b011,
    CF_RET  = 3'b100,
    CF_OKP  = 3'b101,
    CF_JIM  = 3'b111
  } cf_op_e;

  // Kind of context held in the stack buffer.
  typedef enum logic [1:0] {
    CTX_GROUP   = 2'd0,  // plain '(' ... ')'
    CTX_LOOP    = 2'd1,  // OKP ... ')*' or ')+'
    CTX_ORCHAIN = 2'd2   // JIM (..)|(..)|
  } ctx_kind_e;

  // Which fetch/decode unit feeds the execute stage.
  typedef enum logic [1:0] {
    FDU_A = 2'd0,  // copy of the first instruction (rollback)
    FDU_B = 2'd1,  // next sequential instruction
    FDU_C = 2'd2   // compiler-hinted jump target
  } fdu_sel_e;

  // One pulse per execution event of a tile, brought out for counters/tests.
  typedef struct packed {
    logic rollback;    // false partial match: restart from FDU-A
    logic loop_back;   // Kleene iteration completed: back-jump via FDU-C
    logic alt_next;    // OR alternative failed: next alternative
    logic chain_exit;  // OR alternative matched: forward jump via FDU-C
    logic redirect;    // failure inside a loop body: jump to its closer
  } tirex_events_t;

  // AXI-Lite, 32-bit address and data.
  typedef struct packed {
    logic [31:0] awaddr;
    logic        awvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wvalid;
    logic        bready;
    logic [31:0] araddr;
    logic        arvalid;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  localparam logic [1:0] AXI_OKAY   = 2'b00;
  localparam logic [1:0] AXI_SLVERR = 2'b10;
  localparam logic [1:0] AXI_DECERR = 2'b11;

  // Per-tile register map (byte offsets inside a tile's 1 MiB window).
  localparam logic [19:0] REG_CTRL        = 20'h0_0000;  // W: bit0 = start
  localparam logic [19:0] REG_STATUS      = 20'h0_0004;  // R: {error, found, done, busy}
  localparam logic [19:0] REG_SOD         = 20'h0_0008;  // RW: start of data (byte)
  localparam logic [19:0] REG_EOD         = 20'h0_000C;  // RW: end of data (byte, exclusive)
  localparam logic [19:0] REG_MATCH_START = 20'h0_0010;  // R
  localparam logic [19:0] REG_MATCH_END   = 20'h0_0014;  // R
  localparam logic [19:0] REG_CYCLES      = 20'h0_0018;  // R: clock cycles of last run
  localparam logic [19:0] IM_BASE         = 20'h4_0000;  // 8 bytes per instruction
  localparam logic [19:0] DM_BASE         = 20'h8_0000;  // 4 bytes per data word

endpackage
