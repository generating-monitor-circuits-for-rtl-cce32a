// tb_gste_simple_edge: random test of gste_simple_edge.
//
// Each cycle draws an arriving token pair and the antecedent/consequent results. The
// expected same-cycle result comes from the token table: a failed antecedent leaves no
// token; a happy token stays happy when the consequent holds and becomes condemned
// when it fails; a condemned token stays condemned. out_tok must equal the previous
// cycle's expected result, and reset must clear it.
module tb_gste_simple_edge;
  import gste_pkg::*;

  localparam int unsigned CYCLES = 1000;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  always #5 clk = ~clk;

  token_t in_tok, now_tok, out_tok;
  logic   ant, cons;

  gste_simple_edge dut (.*);

  int checks = 0, failures = 0;
  token_t prev;

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
    in_tok = NO_TOKEN; ant = 1'b0; cons = 1'b0;
    @(negedge clk);
    chk(out_tok == NO_TOKEN, "reset clears out_tok");
    rst = 1'b0;
    prev = NO_TOKEN;
    repeat (CYCLES) begin
      in_tok = token_t'($urandom_range(3));
      ant    = $urandom_range(1);
      cons   = $urandom_range(1);
      #1;
      chk(now_tok == expect_tok(in_tok, ant, cons), "now_tok");
      chk(out_tok == prev, "out_tok is last cycle's now_tok");
      prev = expect_tok(in_tok, ant, cons);
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
