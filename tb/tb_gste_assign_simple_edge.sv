// tb_gste_assign_simple_edge: random test of gste_assign_simple_edge with 3 ids.
//
// Each cycle draws the arriving token pair, antecedent, consequent and the instance
// manager's answer (a one-hot or empty set of re-labelled token pairs). now_tok must
// follow the token table (the edge's request to the manager); out_tok[j] must be the
// manager's answer for id j from the previous cycle; reset must clear every id.
module tb_gste_assign_simple_edge;
  import gste_pkg::*;

  localparam int unsigned K = 3;
  localparam int unsigned CYCLES = 1000;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  always #5 clk = ~clk;

  token_t in_tok, now_tok;
  token_t next_tok [K], out_tok [K];
  logic   ant, cons;

  gste_assign_simple_edge #(.K(K)) dut (.*);

  int checks = 0, failures = 0;
  token_t prev [K];

  function automatic token_t expect_tok(token_t t, logic a, logic c);
    token_t r;
    r = NO_TOKEN;
    if (a) begin
      if (t.happy && c)  r.happy = 1'b1;
      if (t.happy && !c) r.condemned = 1'b1;
      if (t.condemned)   r.condemned = 1'b1;
    end
    return r;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("t=%0t mismatch: %s", $time, what);
    end
  endtask

  initial begin
    int g;
    in_tok = NO_TOKEN; ant = 1'b0; cons = 1'b0;
    for (int j = 0; j < K; j++) begin
      next_tok[j] = NO_TOKEN; prev[j] = NO_TOKEN;
    end
    @(negedge clk);
    for (int j = 0; j < K; j++) chk(out_tok[j] == NO_TOKEN, "reset clears out_tok");
    rst = 1'b0;
    repeat (CYCLES) begin
      in_tok = token_t'($urandom_range(3));
      ant    = $urandom_range(1);
      cons   = $urandom_range(1);
      g      = $urandom_range(K);     // K means: no id granted
      for (int j = 0; j < K; j++)
        next_tok[j] = (j == g) ? token_t'($urandom_range(1, 3)) : NO_TOKEN;
      #1;
      chk(now_tok == expect_tok(in_tok, ant, cons), "now_tok");
      for (int j = 0; j < K; j++) begin
        chk(out_tok[j] == prev[j], $sformatf("out_tok[%0d]", j));
        prev[j] = next_tok[j];
      end
      @(negedge clk);
    end
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
