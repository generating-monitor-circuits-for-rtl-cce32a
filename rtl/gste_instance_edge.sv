// gste_instance_edge: an edge of the assertion graph whose label reads symbolic
// constants, or that leads to one that does, so tokens on it keep their instance ids.
//
// It is K copies of the simple edge working side by side. Copy i takes the token pair
// of instance id i from the source vertex and its own antecedent/consequent results
// ant[i]/cons[i], which the enclosing monitor computes from the observed signals and
// the i-th bank of assigned values. now_tok[i] is the same-cycle result; out_tok[i] is
// it delayed by one cycle, still under id i.
// Reset: synchronous, active high, clears all delayed tokens.
module gste_instance_edge
  import gste_pkg::*;
#(
  parameter int unsigned K = 3  // instance ids
) (
  input  logic   clk,
  input  logic   rst,
  input  token_t in_tok  [K],
  input  logic   ant     [K],
  input  logic   cons    [K],
  output token_t now_tok [K],
  output token_t out_tok [K]
);

  always_comb begin
    for (int i = 0; i < int'(K); i++) now_tok[i] = edge_eval(in_tok[i], ant[i], cons[i]);
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(K); i++) begin
      if (rst) out_tok[i] <= NO_TOKEN;
      else     out_tok[i] <= now_tok[i];
    end
  end

endmodule
