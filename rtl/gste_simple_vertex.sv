// gste_simple_vertex: a vertex of the assertion graph whose outgoing edges need no
// symbolic-constant values.
//
// The vertex is combinational: its outgoing token pair is the OR of the token pairs
// delivered by its incoming edges. Incoming simple edges bring one pair each
// (in_tok); incoming instance edges bring K pairs each (in_itok), which are merged
// over all instance ids because the assigned values no longer matter past this point.
// The initial vertex (INITIAL = 1) also emits a happy token on the first cycle after
// reset, which is how the monitor places a token on the edges leaving v0. That
// first-cycle flag is the only register here. N_IN and N_IIN may be 0; the port
// arrays then keep one entry, which is ignored.
// Timing: out_tok is valid in the same cycle as the inputs. Reset is synchronous and
// active high; out_tok is forced to no token while rst is high.
module gste_simple_vertex
  import gste_pkg::*;
#(
  parameter int unsigned N_IN    = 1,     // incoming simple edges
  parameter int unsigned N_IIN   = 0,     // incoming instance edges
  parameter int unsigned K       = 1,     // instance ids per instance edge
  parameter bit          INITIAL = 1'b0   // this is the initial vertex v0
) (
  input  logic   clk,
  input  logic   rst,
  input  token_t in_tok  [(N_IN  > 0 ? N_IN  : 1)],
  input  token_t in_itok [(N_IIN > 0 ? N_IIN : 1)][K],
  output token_t out_tok
);

  logic first_q;

  if (INITIAL) begin : g_init
    always_ff @(posedge clk) first_q <= rst;
  end else begin : g_noinit
    assign first_q = 1'b0;
  end

  always_comb begin
    token_t t;
    t = NO_TOKEN;
    t.happy = first_q;
    for (int e = 0; e < int'(N_IN); e++) t = tok_or(t, in_tok[e]);
    for (int e = 0; e < int'(N_IIN); e++)
      for (int i = 0; i < int'(K); i++) t = tok_or(t, in_itok[e][i]);
    out_tok = tok_and(t, ~rst);
  end

endmodule
