// gste_pipe_adder_monitor: monitor circuit for the simulation-friendly assertion graph
// of a 2-stage pipelined, stallable adder. It watches the adder's in0, in1, stall and
// sum and says, cycle by cycle, whether every addition seen so far came out right.
//
// The assertion graph (vertices v0..v3, one edge per clock cycle):
//   eL : v0 -> v0   ant true                        (a new addition may start any cycle)
//   e0 : v0 -> v1   ant !stall; assign A = in0, B = in1
//   e1 : v1 -> v1   ant stall                       (wait while the pipe is stalled)
//   e2 : v1 -> v2   ant !stall                      (second stage advances)
//   e3 : v2 -> v3   cons sum == A + B               (terminal edge)
// So an operand pair taken on a non-stalled cycle must show up as the sum one cycle
// after the next non-stalled cycle. All consequents not listed are true.
// Instance edges (those whose future reads A or B before reassigning them) are e1, e2
// and e3; v1 and v2 are instance vertices. e0 is an assigning simple edge: every
// token on it asks the instance manager for a free id 0..K-1 and the manager stores A
// and B in that id's bank. Each token then carries its own A and B, which makes the
// graph retrigger on every cycle without knots. K = 3 ids suffice: a token lives three
// cycles on e0/e2/e3 and no new token enters during a stall. With a smaller K the
// monitor raises overflow when ids run out.
// Outputs: accept is low in a cycle where e3 forms a condemned token (some sum was
// wrong); overflow is high in a cycle where e0 could not get an id. Both are
// combinational from the inputs and the monitor's registers. Reset is synchronous and
// active high; the first cycle with rst low is the first cycle of the trace.
// The graph shape and K = 3 follow the pipelined-adder example of the construction;
// the operand width W, the sum width W+1 and the port names are this design's choice.
module gste_pipe_adder_monitor
  import gste_pkg::*;
#(
  parameter int unsigned K = 3,  // instance ids
  parameter int unsigned W = 8   // adder operand width
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic         stall,
  input  logic [W:0]   sum,
  output logic         accept,
  output logic         overflow
);

  localparam int unsigned C_A = 0;
  localparam int unsigned C_B = 1;

  // ---- tokens -----------------------------------------------------------------------
  token_t v0_tok;                       // simple vertex v0
  token_t eL_now, eL_out;               // self-loop on v0
  token_t e0_now, e0_next [K], e0_out [K];
  token_t v1_tok [K], v2_tok [K];       // instance vertices
  token_t e1_now [K], e1_out [K];
  token_t e2_now [K], e2_out [K];
  token_t e3_now [K], e3_out [K];

  // ---- labels -----------------------------------------------------------------------
  logic         e1_ant [K], e2_ant [K], e3_ant [K];
  logic         e1_cons[K], e2_cons[K], e3_cons[K];
  logic [W-1:0] const_q [2][K];         // banks: [constant][instance id]
  logic [W-1:0] e0_val  [1][2];
  logic         e0_ovf  [1];

  always_comb begin
    for (int i = 0; i < int'(K); i++) begin
      e1_ant[i]  = stall;
      e1_cons[i] = 1'b1;
      e2_ant[i]  = ~stall;
      e2_cons[i] = 1'b1;
      e3_ant[i]  = 1'b1;
      e3_cons[i] = (sum == ({1'b0, const_q[C_A][i]} + {1'b0, const_q[C_B][i]}));
    end
  end

  assign e0_val[0][C_A] = in0;
  assign e0_val[0][C_B] = in1;

  // ---- vertices ---------------------------------------------------------------------
  token_t v0_in [1];
  token_t v0_iin [1][K];
  assign v0_in[0] = eL_out;
  always_comb for (int i = 0; i < int'(K); i++) v0_iin[0][i] = NO_TOKEN;

  gste_simple_vertex #(.N_IN(1), .N_IIN(0), .K(K), .INITIAL(1'b1)) u_v0 (
    .clk, .rst, .in_tok(v0_in), .in_itok(v0_iin), .out_tok(v0_tok)
  );

  token_t v1_in [2][K];
  token_t v2_in [1][K];
  always_comb begin
    for (int i = 0; i < int'(K); i++) begin
      v1_in[0][i] = e0_out[i];
      v1_in[1][i] = e1_out[i];
      v2_in[0][i] = e2_out[i];
    end
  end

  gste_instance_vertex #(.N_IN(2), .K(K)) u_v1 (.in_tok(v1_in), .out_tok(v1_tok));
  gste_instance_vertex #(.N_IN(1), .K(K)) u_v2 (.in_tok(v2_in), .out_tok(v2_tok));

  // ---- edges ------------------------------------------------------------------------
  gste_simple_edge u_eL (
    .clk, .rst, .in_tok(v0_tok), .ant(1'b1), .cons(1'b1), .now_tok(eL_now), .out_tok(eL_out)
  );

  gste_assign_simple_edge #(.K(K)) u_e0 (
    .clk, .rst, .in_tok(v0_tok), .ant(~stall), .cons(1'b1),
    .now_tok(e0_now), .next_tok(e0_next), .out_tok(e0_out)
  );

  gste_instance_edge #(.K(K)) u_e1 (
    .clk, .rst, .in_tok(v1_tok), .ant(e1_ant), .cons(e1_cons), .now_tok(e1_now), .out_tok(e1_out)
  );

  gste_instance_edge #(.K(K)) u_e2 (
    .clk, .rst, .in_tok(v1_tok), .ant(e2_ant), .cons(e2_cons), .now_tok(e2_now), .out_tok(e2_out)
  );

  gste_instance_edge #(.K(K)) u_e3 (
    .clk, .rst, .in_tok(v2_tok), .ant(e3_ant), .cons(e3_cons), .now_tok(e3_now), .out_tok(e3_out)
  );

  // ---- instance manager -------------------------------------------------------------
  token_t iv_tok [2][K];
  token_t ase_now [1];
  token_t ase_next [1][K];
  token_t aie_now [1][K];
  logic [W-1:0] aie_val [1][2];
  token_t aie_next [1][K];

  always_comb begin
    for (int i = 0; i < int'(K); i++) begin
      iv_tok[0][i]  = v1_tok[i];
      iv_tok[1][i]  = v2_tok[i];
      aie_now[0][i] = NO_TOKEN;
      e0_next[i]    = ase_next[0][i];
    end
    aie_val[0][C_A] = '0;
    aie_val[0][C_B] = '0;
  end
  assign ase_now[0] = e0_now;

  gste_instance_manager #(
    .K(K), .N_ASE(1), .N_AIE(0), .N_IV(2), .N_CONST(2), .CW(W),
    .ASE_ASSIGNS(2'b11), .AIE_ASSIGNS(2'b00)
  ) u_im (
    .clk, .rst,
    .iv_tok, .ase_now, .ase_val(e0_val), .aie_now, .aie_val,
    .ase_next, .aie_next, .const_q, .edge_ovf(e0_ovf)
  );

  // ---- outputs ----------------------------------------------------------------------
  token_t tse_now [1];
  token_t tie_now [1][K];
  assign tse_now[0] = NO_TOKEN;
  always_comb for (int i = 0; i < int'(K); i++) tie_now[0][i] = e3_now[i];

  gste_monitor_output #(.N_TSE(0), .N_TIE(1), .K(K), .N_AE(1)) u_out (
    .tse_now, .tie_now, .edge_ovf(e0_ovf), .accept, .overflow
  );

endmodule
