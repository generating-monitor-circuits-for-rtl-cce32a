// gste_pkg: types and helper functions shared by the monitor-circuit building blocks.
//
// A monitor built from an assertion graph moves tokens along the graph, one edge per
// clock cycle. Each token wire is a pair of bits: `happy` (every antecedent and every
// consequent on the path so far held) and `condemned` (every antecedent held but some
// consequent failed). A blessed path (some antecedent failed) carries no token at all.
// edge_eval() is the per-edge rule that every edge flavour shares:
//   happy_now     = happy_in & ant & cons
//   condemned_now = ant & (happy_in & ~cons | condemned_in)
// The rule follows the token semantics of the monitor construction; packing the pair
// into one struct is this implementation's choice.
package gste_pkg;

  typedef struct packed {
    logic happy;
    logic condemned;
  } token_t;

  localparam token_t NO_TOKEN = '{happy: 1'b0, condemned: 1'b0};

  // Result of one edge for one arriving token pair: antecedent `ant`, consequent `cons`.
  function automatic token_t edge_eval(token_t tin, logic ant, logic cons);
    token_t t;
    t.happy     = tin.happy & ant & cons;
    t.condemned = ant & ((tin.happy & ~cons) | tin.condemned);
    return t;
  endfunction

  // A token of either kind is present.
  function automatic logic tok_active(token_t t);
    return t.happy | t.condemned;
  endfunction

  // Merge two token pairs (vertex disjunction).
  function automatic token_t tok_or(token_t a, token_t b);
    token_t t;
    t.happy     = a.happy | b.happy;
    t.condemned = a.condemned | b.condemned;
    return t;
  endfunction

  // Gate a token pair with a single enable bit.
  function automatic token_t tok_and(token_t a, logic en);
    token_t t;
    t.happy     = a.happy & en;
    t.condemned = a.condemned & en;
    return t;
  endfunction

endpackage
