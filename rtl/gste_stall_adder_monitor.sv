// gste_stall_adder_monitor: monitor circuit for the unpipelined, stallable adder with
// one cycle minimum latency, a graph that needs only one instance (k = 1). It shows
// the reduced monitor for that case, in which the instance manager is left out.
//
// The assertion graph (one edge per clock cycle):
//   e0 : v0 -> v1   ant !stall; assign A = in0, B = in1
//   e1 : v1 -> v1   ant stall                    (wait while stalled)
//   e2 : v1 -> v2   ant !stall; cons sum == A + B (terminal)
//   e3 : v2 -> v0   ant true                      (ready for the next addition)
// The antecedents leaving each vertex exclude each other, so at most one token is in
// flight and k = 1. e1 and e2 are instance edges (with one id), v1 an instance vertex;
// v2 is a simple vertex that merges e2's id away, and e3 a simple edge. A trace starts
// with a token at v0 on the first cycle after reset; a stall while the token is at v0
// blesses it and ends the checking for that trace.
// LIGHT = 1 (default): no instance manager; A and B sit in one register each, written
// whenever e0 produces a token, and overflow is constant 0 because with k = 1 and
// exclusive antecedents no second token can ask for storage.
// LIGHT = 0: the general construction with an instance manager of one id, which also
// produces overflow.
// Outputs are combinational per cycle; reset is synchronous and active high.
// The graph follows the stallable-adder example, including the return path from v2 to
// v0 for the next addition; its width W and the port names are this design's choice.
module gste_stall_adder_monitor
  import gste_pkg::*;
#(
  parameter int unsigned W     = 8,    // adder operand width
  parameter bit          LIGHT = 1'b1  // leave out the instance manager (k = 1)
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

  localparam int unsigned K   = 1;
  localparam int unsigned C_A = 0;
  localparam int unsigned C_B = 1;

  token_t       v0_tok, v2_tok;
  token_t       v1_tok [K];
  token_t       e0_now, e0_next [K], e0_out [K];
  token_t       e1_now [K], e1_out [K];
  token_t       e2_now [K], e2_out [K];
  token_t       e3_now, e3_out;
  logic [W-1:0] const_q [2][K];
  logic         e1_ant [K], e1_cons [K], e2_ant [K], e2_cons [K];

  always_comb begin
    e1_ant[0]  = stall;
    e1_cons[0] = 1'b1;
    e2_ant[0]  = ~stall;
    e2_cons[0] = (sum == ({1'b0, const_q[C_A][0]} + {1'b0, const_q[C_B][0]}));
  end

  // ---- vertices ---------------------------------------------------------------------
  token_t v0_in [1], v2_in [1];
  token_t v0_iin [1][K], v1_in [2][K], v2_iin [1][K];
  assign v0_in[0]     = e3_out;
  assign v0_iin[0][0] = NO_TOKEN;
  assign v1_in[0][0]  = e0_out[0];
  assign v1_in[1][0]  = e1_out[0];
  assign v2_in[0]     = NO_TOKEN;
  assign v2_iin[0][0] = e2_out[0];

  gste_simple_vertex #(.N_IN(1), .N_IIN(0), .K(K), .INITIAL(1'b1)) u_v0 (
    .clk, .rst, .in_tok(v0_in), .in_itok(v0_iin), .out_tok(v0_tok)
  );
  gste_instance_vertex #(.N_IN(2), .K(K)) u_v1 (.in_tok(v1_in), .out_tok(v1_tok));
  gste_simple_vertex #(.N_IN(0), .N_IIN(1), .K(K), .INITIAL(1'b0)) u_v2 (
    .clk, .rst, .in_tok(v2_in), .in_itok(v2_iin), .out_tok(v2_tok)
  );

  // ---- edges ------------------------------------------------------------------------
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
  gste_simple_edge u_e3 (
    .clk, .rst, .in_tok(v2_tok), .ant(1'b1), .cons(1'b1), .now_tok(e3_now), .out_tok(e3_out)
  );

  // ---- storage of A and B -----------------------------------------------------------
  logic e0_ovf [1];

  if (LIGHT) begin : g_light
    // one register per constant, written whenever e0 emits a token
    assign e0_next[0] = e0_now;
    assign e0_ovf[0]  = 1'b0;
    always_ff @(posedge clk) begin
      if (rst) begin
        const_q[C_A][0] <= '0;
        const_q[C_B][0] <= '0;
      end else if (tok_active(e0_now)) begin
        const_q[C_A][0] <= in0;
        const_q[C_B][0] <= in1;
      end
    end
  end else begin : g_full
    token_t       iv_tok [1][K];
    token_t       ase_now [1], ase_next [1][K];
    token_t       aie_now [1][K], aie_next [1][K];
    logic [W-1:0] ase_val [1][2], aie_val [1][2];
    assign iv_tok[0][0]    = v1_tok[0];
    assign ase_now[0]      = e0_now;
    assign aie_now[0][0]   = NO_TOKEN;
    assign ase_val[0][C_A] = in0;
    assign ase_val[0][C_B] = in1;
    assign aie_val[0][C_A] = '0;
    assign aie_val[0][C_B] = '0;
    assign e0_next[0]      = ase_next[0][0];

    gste_instance_manager #(
      .K(K), .N_ASE(1), .N_AIE(0), .N_IV(1), .N_CONST(2), .CW(W),
      .ASE_ASSIGNS(2'b11), .AIE_ASSIGNS(2'b00)
    ) u_im (
      .clk, .rst,
      .iv_tok, .ase_now, .ase_val, .aie_now, .aie_val,
      .ase_next, .aie_next, .const_q, .edge_ovf(e0_ovf)
    );
  end

  // ---- outputs ----------------------------------------------------------------------
  token_t tse_now [1];
  token_t tie_now [1][K];
  assign tse_now[0]    = NO_TOKEN;
  assign tie_now[0][0] = e2_now[0];

  gste_monitor_output #(.N_TSE(0), .N_TIE(1), .K(K), .N_AE(1)) u_out (
    .tse_now, .tie_now, .edge_ovf(e0_ovf), .accept, .overflow
  );

endmodule
