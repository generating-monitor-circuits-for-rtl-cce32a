// tb_gste_instance_manager: random test of gste_instance_manager with 3 ids, two
// assigning simple edges, two assigning instance edges, two instance vertices and two
// 8-bit constants.
//
// Edge ASE0 assigns A and B, ASE1 only B; AIE0 assigns B (A is copied from the source
// bank), AIE1 assigns A (B is copied). Each cycle the test draws which ids are held at
// the vertices, which edges request, and the values to assign. The reference walks
// the requests in priority order (ASE0, ASE1, AIE0 by source id, AIE1 by source id),
// gives each the lowest id neither held nor already granted, and records an overflow
// for the edge when none is left. It compares the re-labelled tokens and the overflow
// flags in the same cycle, and keeps its own copy of the banks, which must match
// const_q every cycle after reset.
module tb_gste_instance_manager;
  import gste_pkg::*;

  localparam int unsigned K = 3, NASE = 2, NAIE = 2, NIV = 2, NC = 2, CW = 8;
  localparam int unsigned CYCLES = 3000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  token_t          iv_tok   [NIV][K];
  token_t          ase_now  [NASE];
  logic [CW-1:0]   ase_val  [NASE][NC];
  token_t          aie_now  [NAIE][K];
  logic [CW-1:0]   aie_val  [NAIE][NC];
  token_t          ase_next [NASE][K];
  token_t          aie_next [NAIE][K];
  logic [CW-1:0]   const_q  [NC][K];
  logic            edge_ovf [NASE + NAIE];

  localparam bit [NASE-1:0][NC-1:0] ASE_AS = {2'b10, 2'b11};
  localparam bit [NAIE-1:0][NC-1:0] AIE_AS = {2'b01, 2'b10};

  gste_instance_manager #(
    .K(K), .N_ASE(NASE), .N_AIE(NAIE), .N_IV(NIV), .N_CONST(NC), .CW(CW),
    .ASE_ASSIGNS(ASE_AS), .AIE_ASSIGNS(AIE_AS)
  ) dut (.*);

  logic [CW-1:0] mdl [NC][K];
  int checks = 0, failures = 0;
  int n_grant = 0, n_copy = 0, n_ovf = 0;

  function automatic token_t rnd_tok(int pct);
    token_t t;
    t.happy     = ($urandom_range(99) < pct);
    t.condemned = ($urandom_range(99) < pct / 2);
    return t;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("t=%0t mismatch: %s", $time, what);
    end
  endtask

  initial begin
    for (int c = 0; c < NC; c++) for (int j = 0; j < K; j++) mdl[c][j] = '0;
    for (int v = 0; v < NIV; v++) for (int j = 0; j < K; j++) iv_tok[v][j] = NO_TOKEN;
    for (int e = 0; e < NASE; e++) ase_now[e] = NO_TOKEN;
    for (int e = 0; e < NAIE; e++) for (int j = 0; j < K; j++) aie_now[e][j] = NO_TOKEN;
    for (int e = 0; e < NASE; e++) for (int c = 0; c < NC; c++) ase_val[e][c] = '0;
    for (int e = 0; e < NAIE; e++) for (int c = 0; c < NC; c++) aie_val[e][c] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    repeat (CYCLES) begin
      bit     busy [K];
      int     owner_e, owner_i;
      token_t exp_ase [NASE][K];
      token_t exp_aie [NAIE][K];
      bit     exp_ovf [NASE + NAIE];
      logic [CW-1:0] nmdl [NC][K];
      @(negedge clk);
      for (int v = 0; v < NIV; v++) for (int j = 0; j < K; j++) iv_tok[v][j] = rnd_tok(20);
      for (int e = 0; e < NASE; e++) ase_now[e] = rnd_tok(40);
      for (int e = 0; e < NAIE; e++) for (int j = 0; j < K; j++) aie_now[e][j] = rnd_tok(20);
      for (int e = 0; e < NASE; e++) for (int c = 0; c < NC; c++) ase_val[e][c] = CW'($urandom);
      for (int e = 0; e < NAIE; e++) for (int c = 0; c < NC; c++) aie_val[e][c] = CW'($urandom);
      #1;
      // reference
      for (int j = 0; j < K; j++) begin
        busy[j] = 1'b0;
        for (int v = 0; v < NIV; v++) busy[j] |= iv_tok[v][j].happy | iv_tok[v][j].condemned;
      end
      for (int e = 0; e < NASE; e++) for (int j = 0; j < K; j++) exp_ase[e][j] = NO_TOKEN;
      for (int e = 0; e < NAIE; e++) for (int j = 0; j < K; j++) exp_aie[e][j] = NO_TOKEN;
      for (int e = 0; e < NASE + NAIE; e++) exp_ovf[e] = 1'b0;
      nmdl = mdl;
      for (int e = 0; e < NASE; e++) begin
        if (ase_now[e].happy || ase_now[e].condemned) begin
          int got;
          got = -1;
          for (int j = K - 1; j >= 0; j--) if (!busy[j]) got = j;
          if (got < 0) begin
            exp_ovf[e] = 1'b1;
          end else begin
            busy[got] = 1'b1;
            exp_ase[e][got] = ase_now[e];
            for (int c = 0; c < NC; c++) if (ASE_AS[e][c]) nmdl[c][got] = ase_val[e][c];
            n_grant++;
          end
        end
      end
      for (int e = 0; e < NAIE; e++) begin
        for (int i = 0; i < K; i++) begin
          if (aie_now[e][i].happy || aie_now[e][i].condemned) begin
            int got;
          got = -1;
            for (int j = K - 1; j >= 0; j--) if (!busy[j]) got = j;
            if (got < 0) begin
              exp_ovf[NASE + e] = 1'b1;
            end else begin
              busy[got] = 1'b1;
              exp_aie[e][got].happy     |= aie_now[e][i].happy;
              exp_aie[e][got].condemned |= aie_now[e][i].condemned;
              for (int c = 0; c < NC; c++)
                nmdl[c][got] = AIE_AS[e][c] ? aie_val[e][c] : mdl[c][i];
              n_copy++;
            end
          end
        end
      end
      for (int e = 0; e < NASE + NAIE; e++) if (exp_ovf[e]) n_ovf++;
      // compare
      for (int c = 0; c < NC; c++) for (int j = 0; j < K; j++)
        chk(const_q[c][j] == mdl[c][j], $sformatf("bank c%0d id%0d", c, j));
      for (int e = 0; e < NASE; e++) for (int j = 0; j < K; j++)
        chk(ase_next[e][j] == exp_ase[e][j], $sformatf("ase_next e%0d id%0d", e, j));
      for (int e = 0; e < NAIE; e++) for (int j = 0; j < K; j++)
        chk(aie_next[e][j] == exp_aie[e][j], $sformatf("aie_next e%0d id%0d", e, j));
      for (int e = 0; e < NASE + NAIE; e++)
        chk(edge_ovf[e] == exp_ovf[e], $sformatf("edge_ovf %0d", e));
      mdl = nmdl;
    end
    chk(n_grant > 0 && n_copy > 0 && n_ovf > 0, "some grants, copies and overflows happened");
    $display("grants %0d, instance-edge grants %0d, overflows %0d", n_grant, n_copy, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
