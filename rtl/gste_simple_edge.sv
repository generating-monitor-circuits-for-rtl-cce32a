// gste_simple_edge: an edge of the assertion graph that needs no symbolic-constant
// values.
//
// On the cycle a token pair arrives (in_tok, from the source vertex) the edge applies
// its antecedent `ant` and consequent `cons`: a happy token stays happy if both hold,
// turns condemned if only the consequent fails, and a condemned token stays condemned
// while the antecedent holds; a failed antecedent blesses the path and the token
// vanishes. The result appears at once on now_tok (used by the output logic for
// terminal edges) and one cycle later on out_tok, which drives the destination vertex.
// The antecedent and consequent are boolean expressions over the observed signals,
// computed outside by the monitor that instantiates this edge.
// Reset: synchronous, active high, clears the delayed token.
module gste_simple_edge
  import gste_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  token_t in_tok,
  input  logic   ant,
  input  logic   cons,
  output token_t now_tok,
  output token_t out_tok
);

  assign now_tok = edge_eval(in_tok, ant, cons);

  always_ff @(posedge clk) begin
    if (rst) out_tok <= NO_TOKEN;
    else     out_tok <= now_tok;
  end

endmodule
