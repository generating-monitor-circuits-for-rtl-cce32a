// gste_instance_vertex: a vertex of the assertion graph from which at least one
// instance edge leaves, so its tokens must keep their instance ids.
//
// Every incoming edge is an instance edge and delivers K token pairs, one per instance
// id. Output pair i is the OR of the input pairs with id i; ids are never mixed. The
// per-id outputs also feed the instance manager, where they tell which ids are in use.
// Purely combinational, no clock or reset.
module gste_instance_vertex
  import gste_pkg::*;
#(
  parameter int unsigned N_IN = 1,  // incoming instance edges
  parameter int unsigned K    = 3   // instance ids
) (
  input  token_t in_tok  [N_IN][K],
  output token_t out_tok [K]
);

  always_comb begin
    for (int i = 0; i < int'(K); i++) begin
      out_tok[i] = NO_TOKEN;
      for (int e = 0; e < int'(N_IN); e++) out_tok[i] = tok_or(out_tok[i], in_tok[e][i]);
    end
  end

endmodule
