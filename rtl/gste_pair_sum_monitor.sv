// gste_pair_sum_monitor: a second, smaller monitor circuit, built to exercise the
// assigning instance edge: a token that already carries one assigned constant gets a
// second one assigned later, so the instance manager must give it a new id and copy
// the first value into the new bank.
//
// The observed circuit is a two-tap adder: y, two cycles after x(t) was seen, must
// equal x(t) + x(t+1). The assertion graph (one edge per clock cycle):
//   eL : v0 -> v0   ant true                (a new pair may start any cycle)
//   f0 : v0 -> v1   assign A = x            (assigning simple edge)
//   f1 : v1 -> v2   assign B = x            (assigning instance edge: A is carried)
//   f2 : v2 -> v3   cons y == A + B         (terminal instance edge)
// All other antecedents and consequents are true. f1 and f2 are instance edges, v1 and
// v2 instance vertices. Each cycle f0 and f1 both request an id while two ids are held
// by the tokens at v1 and v2, so K = 4 ids are needed; with fewer, f1 (lower priority
// than f0) overflows.
// Outputs and reset behave as in gste_pipe_adder_monitor: accept low when f2 forms a
// condemned token, overflow high when an assigning edge finds no id; synchronous,
// active-high reset.
// The edge, vertex and instance-manager rules are those of the monitor construction;
// this particular graph, its observed circuit, K = 4 and the widths are this design's
// own example.
module gste_pair_sum_monitor
  import gste_pkg::*;
#(
  parameter int unsigned K = 4,  // instance ids
  parameter int unsigned W = 8   // sample width
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] x,
  input  logic [W:0]   y,
  output logic         accept,
  output logic         overflow
);

  localparam int unsigned C_A = 0;
  localparam int unsigned C_B = 1;

  token_t v0_tok, eL_now, eL_out;
  token_t f0_now, f0_out [K];
  token_t v1_tok [K], v2_tok [K];
  token_t f1_now [K], f1_out [K];
  token_t f2_now [K], f2_out [K];

  logic         f1_ant [K], f1_cons [K], f2_ant [K], f2_cons [K];
  logic [W-1:0] const_q [2][K];

  always_comb begin
    for (int i = 0; i < int'(K); i++) begin
      f1_ant[i]  = 1'b1;
      f1_cons[i] = 1'b1;
      f2_ant[i]  = 1'b1;
      f2_cons[i] = (y == ({1'b0, const_q[C_A][i]} + {1'b0, const_q[C_B][i]}));
    end
  end

  // ---- vertices ---------------------------------------------------------------------
  token_t v0_in [1];
  token_t v0_iin [1][K];
  token_t v1_in [1][K];
  token_t v2_in [1][K];
  assign v0_in[0] = eL_out;
  always_comb begin
    for (int i = 0; i < int'(K); i++) begin
      v0_iin[0][i] = NO_TOKEN;
      v1_in[0][i]  = f0_out[i];
      v2_in[0][i]  = f1_out[i];
    end
  end

  gste_simple_vertex #(.N_IN(1), .N_IIN(0), .K(K), .INITIAL(1'b1)) u_v0 (
    .clk, .rst, .in_tok(v0_in), .in_itok(v0_iin), .out_tok(v0_tok)
  );
  gste_instance_vertex #(.N_IN(1), .K(K)) u_v1 (.in_tok(v1_in), .out_tok(v1_tok));
  gste_instance_vertex #(.N_IN(1), .K(K)) u_v2 (.in_tok(v2_in), .out_tok(v2_tok));

  // ---- edges ------------------------------------------------------------------------
  token_t ase_next [1][K];
  token_t aie_next [1][K];

  gste_simple_edge u_eL (
    .clk, .rst, .in_tok(v0_tok), .ant(1'b1), .cons(1'b1), .now_tok(eL_now), .out_tok(eL_out)
  );

  gste_assign_simple_edge #(.K(K)) u_f0 (
    .clk, .rst, .in_tok(v0_tok), .ant(1'b1), .cons(1'b1),
    .now_tok(f0_now), .next_tok(ase_next[0]), .out_tok(f0_out)
  );

  gste_assign_instance_edge #(.K(K)) u_f1 (
    .clk, .rst, .in_tok(v1_tok), .ant(f1_ant), .cons(f1_cons),
    .now_tok(f1_now), .next_tok(aie_next[0]), .out_tok(f1_out)
  );

  gste_instance_edge #(.K(K)) u_f2 (
    .clk, .rst, .in_tok(v2_tok), .ant(f2_ant), .cons(f2_cons), .now_tok(f2_now), .out_tok(f2_out)
  );

  // ---- instance manager -------------------------------------------------------------
  token_t       iv_tok  [2][K];
  token_t       ase_now [1];
  token_t       aie_now [1][K];
  logic [W-1:0] ase_val [1][2];
  logic [W-1:0] aie_val [1][2];
  logic         edge_ovf [2];

  always_comb begin
    for (int i = 0; i < int'(K); i++) begin
      iv_tok[0][i]  = v1_tok[i];
      iv_tok[1][i]  = v2_tok[i];
      aie_now[0][i] = f1_now[i];
    end
    ase_val[0][C_A] = x;
    ase_val[0][C_B] = '0;     // f0 does not assign B
    aie_val[0][C_A] = '0;     // f1 does not assign A: copied from the source bank
    aie_val[0][C_B] = x;
  end
  assign ase_now[0] = f0_now;

  gste_instance_manager #(
    .K(K), .N_ASE(1), .N_AIE(1), .N_IV(2), .N_CONST(2), .CW(W),
    .ASE_ASSIGNS(2'b01), .AIE_ASSIGNS(2'b10)
  ) u_im (
    .clk, .rst,
    .iv_tok, .ase_now, .ase_val, .aie_now, .aie_val,
    .ase_next, .aie_next, .const_q, .edge_ovf
  );

  // ---- outputs ----------------------------------------------------------------------
  token_t tse_now [1];
  token_t tie_now [1][K];
  assign tse_now[0] = NO_TOKEN;
  always_comb for (int i = 0; i < int'(K); i++) tie_now[0][i] = f2_now[i];

  gste_monitor_output #(.N_TSE(0), .N_TIE(1), .K(K), .N_AE(2)) u_out (
    .tse_now, .tie_now, .edge_ovf, .accept, .overflow
  );

endmodule
