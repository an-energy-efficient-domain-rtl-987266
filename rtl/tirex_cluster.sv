// tirex_cluster: one TiReX execute cluster.
//
// ClusterWidth character comparators that check the reference against the
// data characters fed to this cluster. AND (concatenation): comparator i sees
// data character i, and the cluster matches when every valid reference
// character equals its data character. OR (alternation): every comparator sees
// data character 0, and the cluster matches when any valid reference character
// equals it. ANY ('.') matches any one valid data character. Opcodes with no
// character-match part match trivially. A disabled cluster never matches.
// Purely combinational. The comparator arrangement follows the document; the
// treatment of invalid (past end of data) characters is this design's.
module tirex_cluster
  import tirex_pkg::*;
#(
  parameter int unsigned CW = 4
) (
  input  logic               en,
  input  cm_op_e             cm,
  input  logic [CW-1:0][7:0] refc,
  input  logic [CW-1:0]      valid_ref,
  input  logic [CW-1:0][7:0] data,
  input  logic [CW-1:0]      data_valid,
  output logic               match
);

  logic [CW-1:0] eq_and, eq_or;

  always_comb begin
    for (int i = 0; i < int'(CW); i++) begin
      eq_and[i] = data_valid[i] && (data[i] == refc[i]);
      eq_or[i]  = data_valid[0] && (data[0] == refc[i]);
    end
    unique case (cm)
      CM_AND:  match = &(eq_and | ~valid_ref);
      CM_OR:   match = |(eq_or & valid_ref);
      CM_ANY:  match = data_valid[0];
      default: match = 1'b1;
    endcase
    if (!en) match = 1'b0;
  end

endmodule
