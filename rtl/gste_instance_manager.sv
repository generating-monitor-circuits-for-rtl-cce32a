// gste_instance_manager: hands out instance ids to tokens leaving assigning edges and
// stores the assigned values of the symbolic constants, K banks of them.
//
// In use: id j is busy when any instance vertex holds a happy or condemned token with
// id j (iv_tok). Requests: every active token pair leaving an assigning edge asks for
// a free id. Assigning simple edges (ASE, ase_now) make one request each; assigning
// instance edges (AIE, aie_now) one per source id i. Requests are served in one fixed
// priority order: all ASEs by index, then the AIEs by index, and within an AIE the
// source ids from 0 up. Each request takes the lowest id that is neither in use nor
// granted to a request of higher priority in this cycle. A request left without an id
// raises that edge's overflow flag (edge_ovf: the ASEs first, then the AIEs).
// Tokens: ase_next[e][j] / aie_next[e][j] is the token pair re-labelled with its new id
// j; the assigning edge registers it.
// Values: for each constant c and bank j, the bank is written when an edge granted j
// assigns c (value ase_val/aie_val) or when an AIE granted j for a token of id i does
// not assign c, in which case bank i is copied so the token keeps its other values.
// An ASE that does not assign c leaves bank j of c untouched. ASE_ASSIGNS[e][c] and
// AIE_ASSIGNS[e][c] say which edge assigns which constant.
// Two concurrent assertions check the allocation rules: no id is granted twice in a
// cycle, and no id is granted while a vertex holds it.
// Timing: grants, next tokens and overflow are combinational in the request cycle; the
// banks are registers written at the end of it and read (const_q) from the next cycle,
// when the granted token reaches the next vertex. Reset (synchronous, active high)
// clears the banks.
// The grant equations, the bank write-enable and data-in rules follow the monitor
// construction; the id numbering from 0, the exact order within an AIE and clearing
// the banks at reset are this implementation's choices.
module gste_instance_manager
  import gste_pkg::*;
#(
  parameter int unsigned K       = 3,   // instance ids (banks)
  parameter int unsigned N_ASE   = 1,   // assigning simple edges
  parameter int unsigned N_AIE   = 0,   // assigning instance edges
  parameter int unsigned N_IV    = 1,   // instance vertices
  parameter int unsigned N_CONST = 2,   // symbolic constants
  parameter int unsigned CW      = 8,   // bits per symbolic constant
  parameter bit [(N_ASE > 0 ? N_ASE : 1)-1:0][N_CONST-1:0] ASE_ASSIGNS = '1,
  parameter bit [(N_AIE > 0 ? N_AIE : 1)-1:0][N_CONST-1:0] AIE_ASSIGNS = '1
) (
  input  logic            clk,
  input  logic            rst,
  input  token_t          iv_tok   [N_IV][K],
  input  token_t          ase_now  [(N_ASE > 0 ? N_ASE : 1)],
  input  logic [CW-1:0]   ase_val  [(N_ASE > 0 ? N_ASE : 1)][N_CONST],
  input  token_t          aie_now  [(N_AIE > 0 ? N_AIE : 1)][K],
  input  logic [CW-1:0]   aie_val  [(N_AIE > 0 ? N_AIE : 1)][N_CONST],
  output token_t          ase_next [(N_ASE > 0 ? N_ASE : 1)][K],
  output token_t          aie_next [(N_AIE > 0 ? N_AIE : 1)][K],
  output logic [CW-1:0]   const_q  [N_CONST][K],
  output logic            edge_ovf [((N_ASE + N_AIE) > 0 ? (N_ASE + N_AIE) : 1)]
);

  localparam int unsigned NA  = (N_ASE > 0) ? N_ASE : 1;
  localparam int unsigned NI  = (N_AIE > 0) ? N_AIE : 1;
  localparam int unsigned NO  = ((N_ASE + N_AIE) > 0) ? (N_ASE + N_AIE) : 1;

  logic          in_use  [K];
  logic          ase_ack [NA][K];      // ack(e)_j for an ASE
  logic          aie_ack [NI][K][K];   // ack(e)_{i,j} for an AIE: source i, new id j
  logic [CW-1:0] const_d [N_CONST][K];

  // inUse_j: some instance vertex holds a token with id j.
  always_comb begin
    for (int j = 0; j < int'(K); j++) begin
      in_use[j] = 1'b0;
      for (int v = 0; v < int'(N_IV); v++) in_use[j] |= tok_active(iv_tok[v][j]);
    end
  end

  // Priority matching of requests to free ids.
  always_comb begin
    logic taken   [K];
    logic granted;
    logic act;
    for (int j = 0; j < int'(K); j++) taken[j] = 1'b0;
    for (int e = 0; e < int'(NA); e++)
      for (int j = 0; j < int'(K); j++) ase_ack[e][j] = 1'b0;
    for (int e = 0; e < int'(NI); e++)
      for (int i = 0; i < int'(K); i++)
        for (int j = 0; j < int'(K); j++) aie_ack[e][i][j] = 1'b0;
    for (int e = 0; e < int'(NO); e++) edge_ovf[e] = 1'b0;

    for (int e = 0; e < int'(N_ASE); e++) begin
      act     = tok_active(ase_now[e]);
      granted = 1'b0;
      for (int j = 0; j < int'(K); j++) begin
        ase_ack[e][j] = act & ~in_use[j] & ~taken[j] & ~granted;
        granted  |= ase_ack[e][j];
        taken[j] |= ase_ack[e][j];
      end
      edge_ovf[e] = act & ~granted;
    end

    for (int e = 0; e < int'(N_AIE); e++) begin
      for (int i = 0; i < int'(K); i++) begin
        act     = tok_active(aie_now[e][i]);
        granted = 1'b0;
        for (int j = 0; j < int'(K); j++) begin
          aie_ack[e][i][j] = act & ~in_use[j] & ~taken[j] & ~granted;
          granted  |= aie_ack[e][i][j];
          taken[j] |= aie_ack[e][i][j];
        end
        edge_ovf[N_ASE + e] |= act & ~granted;
      end
    end
  end

  // Tokens re-labelled with their new ids.
  always_comb begin
    for (int e = 0; e < int'(NA); e++)
      for (int j = 0; j < int'(K); j++)
        ase_next[e][j] = tok_and(ase_now[e], ase_ack[e][j]);
    for (int e = 0; e < int'(NI); e++)
      for (int j = 0; j < int'(K); j++) begin
        aie_next[e][j] = NO_TOKEN;
        for (int i = 0; i < int'(K); i++)
          aie_next[e][j] = tok_or(aie_next[e][j], tok_and(aie_now[e][i], aie_ack[e][i][j]));
      end
  end

  // Bank write-enable and data-in. At most one request is granted a given id per
  // cycle, so at most one of the writes below applies to each bank.
  always_comb begin
    for (int c = 0; c < int'(N_CONST); c++)
      for (int j = 0; j < int'(K); j++) begin
        const_d[c][j] = const_q[c][j];
        for (int e = 0; e < int'(N_ASE); e++)
          if (ase_ack[e][j] && ASE_ASSIGNS[e][c]) const_d[c][j] = ase_val[e][c];
        for (int e = 0; e < int'(N_AIE); e++)
          for (int i = 0; i < int'(K); i++)
            if (aie_ack[e][i][j])
              const_d[c][j] = AIE_ASSIGNS[e][c] ? aie_val[e][c] : const_q[c][i];
      end
  end

  // Allocation rules: an id is handed out at most once per cycle, and only when free.
  logic [K-1:0] id_twice, id_busy;
  always_comb begin
    for (int j = 0; j < int'(K); j++) begin
      int n;
      n = 0;
      for (int e = 0; e < int'(N_ASE); e++) n += int'(ase_ack[e][j]);
      for (int e = 0; e < int'(N_AIE); e++)
        for (int i = 0; i < int'(K); i++) n += int'(aie_ack[e][i][j]);
      id_twice[j] = (n > 1);
      id_busy[j]  = (n > 0) && in_use[j];
    end
  end

  a_id_once: assert property (@(posedge clk) disable iff (rst) id_twice == '0)
    else $error("instance id granted twice in one cycle");
  a_id_free: assert property (@(posedge clk) disable iff (rst) id_busy == '0)
    else $error("instance id granted while in use");

  always_ff @(posedge clk) begin
    for (int c = 0; c < int'(N_CONST); c++)
      for (int j = 0; j < int'(K); j++)
        if (rst) const_q[c][j] <= '0;
        else     const_q[c][j] <= const_d[c][j];
  end

endmodule
