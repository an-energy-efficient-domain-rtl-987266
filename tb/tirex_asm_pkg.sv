// tirex_asm_pkg: hand-assembly helpers for TiReX programs in testbenches.
// Builds 38-bit instruction words {opcode[5:0], reference[31:0]} with
// reference character i in byte i, and a zero byte for unused slots.
// Interface: OP_* opcode constants, ins(opcode, chars) and
// ins_addr(opcode, address) for OKP/JIM. No timing (functions only).
// Opcode values follow the document's encoding table; the byte order and the
// OKP/JIM operand meaning are this design's.
package tirex_asm_pkg;

  localparam logic [5:0] OP_EOP   = 6'b000_000;
  localparam logic [5:0] OP_AND   = 6'b010_000;
  localparam logic [5:0] OP_OR    = 6'b001_000;
  localparam logic [5:0] OP_ANY   = 6'b011_000;
  localparam logic [5:0] OP_CALL  = 6'b100_000;
  localparam logic [5:0] OP_RET   = 6'b000_100;
  localparam logic [5:0] OP_STAR  = 6'b000_001;
  localparam logic [5:0] OP_PLUS  = 6'b000_010;
  localparam logic [5:0] OP_ALT   = 6'b000_011;
  localparam logic [5:0] OP_OKP   = 6'b000_101;
  localparam logic [5:0] OP_JIM   = 6'b000_111;

  // Character instruction: opc is a character-match code OR-ed with an
  // optional closer code, s holds up to four reference characters.
  function automatic logic [37:0] ins(logic [5:0] opc, string s);
    logic [31:0] r;
    r = '0;
    for (int i = 0; i < s.len() && i < 4; i++) r[8*i +: 8] = s[i];
    return {opc, r};
  endfunction

  // Instruction whose reference is an instruction address (OKP, JIM).
  function automatic logic [37:0] ins_addr(logic [5:0] opc, int unsigned a);
    return {opc, 32'(a)};
  endfunction

endpackage
