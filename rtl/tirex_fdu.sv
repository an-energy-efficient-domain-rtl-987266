// tirex_fdu: TiReX fetch/decode unit.
//
// Unpacks one instruction word into the three pieces the execute stage and
// control unit need: the opcode (split into its character-match and
// control-flow halves), the reference field, and valid_ref, one bit per
// reference character that is really present. The decoded fields are held in
// registers loaded when `load` is high, so the unit forms the Fetch/Decode
// pipeline stage. A tile has three of these (A, B, C).
// valid_ref is derived here from non-zero reference bytes: the document says
// the FDU produces valid_ref but not how, so that rule is this design's
// choice. Opcode halves with no defined meaning decode to NONE.
// Timing: outputs change one clock after a load.
module tirex_fdu
  import tirex_pkg::*;
#(
  parameter int unsigned CW    = 4,               // ClusterWidth: characters per reference
  localparam int unsigned REF_W = 8 * CW,
  localparam int unsigned IW    = OPC_W + REF_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [IW-1:0]    word,
  output cm_op_e           cm,
  output cf_op_e           cf,
  output logic [REF_W-1:0] refc,
  output logic [CW-1:0]    valid_ref
);

  cm_op_e           cm_d;
  cf_op_e           cf_d;
  logic [CW-1:0]    vr_d;

  always_comb begin
    unique case (word[IW-1 -: 3])
      3'b001:  cm_d = CM_OR;
      3'b010:  cm_d = CM_AND;
      3'b011:  cm_d = CM_ANY;
      3'b100:  cm_d = CM_CALL;
      default: cm_d = CM_NONE;
    endcase
    unique case (word[IW-4 -: 3])
      3'b001:  cf_d = CF_STAR;
      3'b010:  cf_d = CF_PLUS;
      3'b011:  cf_d = CF_ALT;
      3'b100:  cf_d = CF_RET;
      3'b101:  cf_d = CF_OKP;
      3'b111:  cf_d = CF_JIM;
      default: cf_d = CF_NONE;
    endcase
    for (int i = 0; i < int'(CW); i++) vr_d[i] = |word[8*i +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cm        <= CM_NONE;
      cf        <= CF_NONE;
      refc      <= '0;
      valid_ref <= '0;
    end else if (load) begin
      cm        <= cm_d;
      cf        <= cf_d;
      refc      <= word[REF_W-1:0];
      valid_ref <= vr_d;
    end
  end

endmodule
