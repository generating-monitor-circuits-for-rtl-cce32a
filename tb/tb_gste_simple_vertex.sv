// tb_gste_simple_vertex: random test of gste_simple_vertex as an initial vertex with
// two incoming simple edges and two incoming instance edges of 3 ids each.
//
// Expected output: the OR over all incoming pairs, every id of the instance inputs
// merged, plus a happy token on exactly the first cycle after reset, and no token
// while reset is high. A second reset in mid-run must produce the first-cycle token
// again.
module tb_gste_simple_vertex;
  import gste_pkg::*;

  localparam int unsigned K = 3, NIN = 2, NIIN = 2;
  localparam int unsigned CYCLES = 1000;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  always #5 clk = ~clk;

  token_t in_tok [NIN];
  token_t in_itok [NIIN][K];
  token_t out_tok;

  gste_simple_vertex #(.N_IN(NIN), .N_IIN(NIIN), .K(K), .INITIAL(1'b1)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("t=%0t mismatch: %s", $time, what);
    end
  endtask

  task automatic drive(input int pct);
    for (int e = 0; e < NIN; e++)
      in_tok[e] = '{happy: $urandom_range(99) < pct, condemned: $urandom_range(99) < pct};
    for (int e = 0; e < NIIN; e++)
      for (int i = 0; i < K; i++)
        in_itok[e][i] = '{happy: $urandom_range(99) < pct, condemned: $urandom_range(99) < pct};
  endtask

  function automatic token_t expect_or();
    token_t r;
    r = NO_TOKEN;
    foreach (in_tok[e]) if (in_tok[e].happy) r.happy = 1'b1;
    foreach (in_tok[e]) if (in_tok[e].condemned) r.condemned = 1'b1;
    foreach (in_itok[e, i]) if (in_itok[e][i].happy) r.happy = 1'b1;
    foreach (in_itok[e, i]) if (in_itok[e][i].condemned) r.condemned = 1'b1;
    return r;
  endfunction

  initial begin
    token_t e;
    logic   prev_rst;
    int     starts;
    drive(50);
    prev_rst = 1'b1;
    starts = 0;
    repeat (CYCLES) begin
      @(negedge clk);
      prev_rst = rst;
      rst = ($urandom_range(99) < 3);
      drive(15);
      #1;
      e = expect_or();
      if (rst) begin
        chk(out_tok == NO_TOKEN, "no token during reset");
      end else begin
        if (prev_rst) begin
          e.happy = 1'b1;   // first cycle of a trace
          starts++;
        end
        chk(out_tok == e, "merged token");
      end
    end
    chk(starts > 1, "several trace starts seen");
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
