// gste_assign_simple_edge: a simple edge that carries assignment statements, so the
// token leaving it must be given a fresh instance id.
//
// The edge evaluates its antecedent and consequent as a simple edge does, giving
// now_tok; where the label uses a constant assigned on this same edge, the enclosing
// monitor substitutes the assigned signal directly. now_tok goes to the instance
// manager as this edge's request. The manager answers in the same cycle with next_tok,
// K token pairs of which at most one is set (the granted id); the edge delays them one
// cycle onto out_tok. If no id is free the manager raises this edge's overflow and
// the token is lost. A failed antecedent makes no request, so no value is stored.
// Reset: synchronous, active high, clears all delayed tokens.
module gste_assign_simple_edge
  import gste_pkg::*;
#(
  parameter int unsigned K = 3  // instance ids
) (
  input  logic   clk,
  input  logic   rst,
  input  token_t in_tok,
  input  logic   ant,
  input  logic   cons,
  output token_t now_tok,
  input  token_t next_tok [K],
  output token_t out_tok  [K]
);

  assign now_tok = edge_eval(in_tok, ant, cons);

  always_ff @(posedge clk) begin
    for (int j = 0; j < int'(K); j++) begin
      if (rst) out_tok[j] <= NO_TOKEN;
      else     out_tok[j] <= next_tok[j];
    end
  end

endmodule
