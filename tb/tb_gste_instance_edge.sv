// tb_gste_instance_edge: random test of gste_instance_edge with 3 ids.
//
// Each id gets its own random token pair, antecedent and consequent every cycle. The
// expected same-cycle result per id follows the token table (see tb_gste_simple_edge);
// out_tok[i] must equal id i's result of the previous cycle, so ids never mix, and
// reset must clear every id.
module tb_gste_instance_edge;
  import gste_pkg::*;

  localparam int unsigned K = 3;
  localparam int unsigned CYCLES = 1000;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  always #5 clk = ~clk;

  token_t in_tok [K], now_tok [K], out_tok [K];
  logic   ant [K], cons [K];

  gste_instance_edge #(.K(K)) dut (.*);

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
    for (int i = 0; i < K; i++) begin
      in_tok[i] = NO_TOKEN; ant[i] = 1'b0; cons[i] = 1'b0; prev[i] = NO_TOKEN;
    end
    @(negedge clk);
    for (int i = 0; i < K; i++) chk(out_tok[i] == NO_TOKEN, "reset clears out_tok");
    rst = 1'b0;
    repeat (CYCLES) begin
      for (int i = 0; i < K; i++) begin
        in_tok[i] = token_t'($urandom_range(3));
        ant[i]    = $urandom_range(1);
        cons[i]   = $urandom_range(1);
      end
      #1;
      for (int i = 0; i < K; i++) begin
        chk(now_tok[i] == expect_tok(in_tok[i], ant[i], cons[i]), $sformatf("now_tok[%0d]", i));
        chk(out_tok[i] == prev[i], $sformatf("out_tok[%0d]", i));
        prev[i] = expect_tok(in_tok[i], ant[i], cons[i]);
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
