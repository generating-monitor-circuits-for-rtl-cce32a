// tb_gste_monitor_output: random test of gste_monitor_output with two terminal simple
// edges, two terminal instance edges of 3 ids and three assigning edges. accept must
// be low exactly when some terminal pair carries a condemned token (happy tokens do
// not matter); overflow must be high exactly when some edge flags overflow.
module tb_gste_monitor_output;
  import gste_pkg::*;

  localparam int unsigned K = 3, NT = 2, NI = 2, NA = 3;
  localparam int unsigned CYCLES = 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  token_t tse_now [NT];
  token_t tie_now [NI][K];
  logic   edge_ovf [NA];
  logic   accept, overflow;

  gste_monitor_output #(.N_TSE(NT), .N_TIE(NI), .K(K), .N_AE(NA)) dut (.*);

  int checks = 0, failures = 0;
  int n_rej = 0, n_ovf = 0;

  initial begin
    repeat (CYCLES) begin
      int ncond, novf;
      @(negedge clk);
      ncond = 0;
      novf = 0;
      foreach (tse_now[e]) begin
        tse_now[e] = '{happy: $urandom_range(1), condemned: $urandom_range(99) < 8};
        ncond += int'(tse_now[e].condemned);
      end
      foreach (tie_now[e, i]) begin
        tie_now[e][i] = '{happy: $urandom_range(1), condemned: $urandom_range(99) < 8};
        ncond += int'(tie_now[e][i].condemned);
      end
      foreach (edge_ovf[e]) begin
        edge_ovf[e] = ($urandom_range(99) < 15);
        novf += int'(edge_ovf[e]);
      end
      #1;
      checks += 2;
      if (accept != (ncond == 0)) begin
        failures++;
        $display("t=%0t accept=%b with %0d condemned", $time, accept, ncond);
      end
      if (overflow != (novf != 0)) begin
        failures++;
        $display("t=%0t overflow=%b with %0d flags", $time, overflow, novf);
      end
      if (ncond != 0) n_rej++;
      if (novf != 0) n_ovf++;
    end
    checks++;
    if (n_rej == 0 || n_ovf == 0) failures++;
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
