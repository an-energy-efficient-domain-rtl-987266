// tirex_engine: combines the results of the NCluster clusters.
//
// In the not-matching (search) state every cluster is enabled; cluster c
// checks the instruction at start position dp+c, the lowest matching cluster
// wins, and the engine reports a match, the winning start offset c and the
// data-pointer advance c + consumed. Without a winner the advance is NCluster,
// so the next search window starts right after this one. In the matching
// state only cluster 0 is enabled (the match must continue at dp) and the
// advance is the number of characters consumed: the count of valid reference
// characters for AND, one for OR and ANY, zero for instructions with no
// character-match part. Purely combinational.
// The document gives the two modes and that the offset depends on the
// matching cluster; the priority to the lowest cluster is this design's.
module tirex_engine
  import tirex_pkg::*;
#(
  parameter int unsigned NCL  = 4,
  parameter int unsigned CW   = 4,
  localparam int unsigned OFW = $clog2(NCL + CW + 1)
) (
  input  logic           search,
  input  cm_op_e         cm,
  input  logic [CW-1:0]  valid_ref,
  input  logic [NCL-1:0] cl_match,
  output logic [NCL-1:0] cl_en,
  output logic           match,
  output logic [OFW-1:0] start_off,
  output logic [OFW-1:0] advance
);

  logic [OFW-1:0] consumed;

  always_comb begin
    unique case (cm)
      CM_AND: begin
        consumed = '0;
        for (int i = 0; i < int'(CW); i++) consumed += OFW'(valid_ref[i]);
      end
      CM_OR, CM_ANY: consumed = OFW'(1);
      default:       consumed = '0;
    endcase

    cl_en     = search ? '1 : NCL'(1);
    match     = 1'b0;
    start_off = '0;
    advance   = search ? OFW'(NCL) : '0;
    if (search) begin
      for (int c = int'(NCL) - 1; c >= 0; c--) begin
        if (cl_match[c]) begin
          match     = 1'b1;
          start_off = OFW'(c);
          advance   = OFW'(c) + consumed;
        end
      end
    end else if (cl_match[0]) begin
      match   = 1'b1;
      advance = consumed;
    end
  end

endmodule
