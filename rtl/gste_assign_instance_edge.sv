// gste_assign_instance_edge: an instance edge that carries assignment statements.
//
// Tokens arrive under instance ids i = 0..K-1 and are evaluated as on an instance edge
// (now_tok[i]). Every active now_tok[i] is a request to the instance manager for a new
// id, because the token's assigned values change here; the manager copies the values
// this edge does not assign from bank i into the new bank. The manager's answer,
// next_tok[j], is indexed by the new id j and is delayed one cycle onto out_tok[j].
// Reset: synchronous, active high, clears all delayed tokens.
module gste_assign_instance_edge
  import gste_pkg::*;
#(
  parameter int unsigned K = 3  // instance ids
) (
  input  logic   clk,
  input  logic   rst,
  input  token_t in_tok   [K],
  input  logic   ant      [K],
  input  logic   cons     [K],
  output token_t now_tok  [K],
  input  token_t next_tok [K],
  output token_t out_tok  [K]
);

  always_comb begin
    for (int i = 0; i < int'(K); i++) now_tok[i] = edge_eval(in_tok[i], ant[i], cons[i]);
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < int'(K); j++) begin
      if (rst) out_tok[j] <= NO_TOKEN;
      else     out_tok[j] <= next_tok[j];
    end
  end

endmodule
