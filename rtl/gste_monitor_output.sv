// gste_monitor_output: the two outputs of a monitor circuit.
//
// accept is high unless some terminal edge generates a condemned token in this cycle,
// whether the terminal edge is simple (tse_now, one pair each) or an instance edge
// (tie_now, K pairs each). overflow is the OR of the per-edge overflow flags of all
// assigning edges, which the instance manager produces; while it is high the monitor
// has dropped a token and accept can no longer be trusted. Both outputs are
// combinational, in the same cycle as the edge results. Counts of 0 are allowed; the
// port arrays then keep one ignored entry.
module gste_monitor_output
  import gste_pkg::*;
#(
  parameter int unsigned N_TSE = 1,  // terminal simple edges
  parameter int unsigned N_TIE = 1,  // terminal instance edges
  parameter int unsigned K     = 3,  // instance ids
  parameter int unsigned N_AE  = 1   // assigning edges (overflow sources)
) (
  input  token_t tse_now  [(N_TSE > 0 ? N_TSE : 1)],
  input  token_t tie_now  [(N_TIE > 0 ? N_TIE : 1)][K],
  input  logic   edge_ovf [(N_AE  > 0 ? N_AE  : 1)],
  output logic   accept,
  output logic   overflow
);

  always_comb begin
    logic cond;
    cond = 1'b0;
    for (int e = 0; e < int'(N_TSE); e++) cond |= tse_now[e].condemned;
    for (int e = 0; e < int'(N_TIE); e++)
      for (int i = 0; i < int'(K); i++) cond |= tie_now[e][i].condemned;
    accept = ~cond;
    overflow = 1'b0;
    for (int e = 0; e < int'(N_AE); e++) overflow |= edge_ovf[e];
  end

endmodule
