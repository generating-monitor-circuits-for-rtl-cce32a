// tb_gste_instance_vertex: random test of gste_instance_vertex with three incoming
// instance edges of 3 ids each. Output id i must be the OR of the inputs with id i
// only, for happy and condemned separately.
module tb_gste_instance_vertex;
  import gste_pkg::*;

  localparam int unsigned K = 3, NIN = 3;
  localparam int unsigned CYCLES = 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  token_t in_tok [NIN][K];
  token_t out_tok [K];

  gste_instance_vertex #(.N_IN(NIN), .K(K)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (CYCLES) begin
      @(negedge clk);
      foreach (in_tok[e, i])
        in_tok[e][i] = '{happy: $urandom_range(99) < 25, condemned: $urandom_range(99) < 25};
      #1;
      for (int i = 0; i < K; i++) begin
        int nh, nc;
        nh = 0;
        nc = 0;
        for (int e = 0; e < NIN; e++) begin
          nh += int'(in_tok[e][i].happy);
          nc += int'(in_tok[e][i].condemned);
        end
        checks++;
        if (out_tok[i].happy != (nh > 0) || out_tok[i].condemned != (nc > 0)) begin
          failures++;
          $display("t=%0t id %0d: got %b%b expected %b%b", $time, i,
                   out_tok[i].happy, out_tok[i].condemned, nh > 0, nc > 0);
        end
      end
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
