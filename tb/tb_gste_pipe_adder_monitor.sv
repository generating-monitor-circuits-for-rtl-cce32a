// tb_gste_pipe_adder_monitor: gste_pipe_adder_monitor against its reference.
//
// Two copies run side by side, each driven by a model of the stallable pipelined adder
// with random stalls and injected wrong sums (tb_pa_env): one with the default 3 ids,
// where overflow must never happen, and one with 2 ids, where back-to-back issues must
// overflow. Every cycle accept and overflow are compared with the reference.
module tb_gste_pipe_adder_monitor;

  localparam int unsigned CYCLES = 3000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [7:0] a_in0, a_in1, b_in0, b_in1;
  logic       a_stall, b_stall;
  logic [8:0] a_sum, b_sum;
  logic       a_acc, a_ovf, b_acc, b_ovf;

  gste_pipe_adder_monitor u_k3 (
    .clk, .rst, .in0(a_in0), .in1(a_in1), .stall(a_stall), .sum(a_sum),
    .accept(a_acc), .overflow(a_ovf)
  );
  gste_pipe_adder_monitor #(.K(2)) u_k2 (
    .clk, .rst, .in0(b_in0), .in1(b_in1), .stall(b_stall), .sum(b_sum),
    .accept(b_acc), .overflow(b_ovf)
  );

  int c[2], f[2], ret[2], det[2], hold[2], ovf[2];

  tb_pa_env #(.K(3), .SEED(31)) u_env3 (
    .clk, .rst, .in0(a_in0), .in1(a_in1), .stall(a_stall), .sum(a_sum),
    .accept(a_acc), .overflow(a_ovf), .checks(c[0]), .failures(f[0]),
    .n_retire(ret[0]), .n_detect(det[0]), .n_hold(hold[0]), .n_ovf(ovf[0])
  );
  tb_pa_env #(.K(2), .SEED(32)) u_env2 (
    .clk, .rst, .in0(b_in0), .in1(b_in1), .stall(b_stall), .sum(b_sum),
    .accept(b_acc), .overflow(b_ovf), .checks(c[1]), .failures(f[1]),
    .n_retire(ret[1]), .n_detect(det[1]), .n_hold(hold[1]), .n_ovf(ovf[1])
  );

  int checks = 0, failures = 0;

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("never seen: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (CYCLES) @(posedge clk);
    @(negedge clk);
    #1;
    checks += c[0] + c[1];
    failures += f[0] + f[1];
    need("completed checks", ret[0]);
    need("wrong sum detected", det[0]);
    need("stall hold", hold[0]);
    need("overflow with 2 ids", ovf[1]);
    checks++;
    if (ovf[0] != 0) begin
      failures++;
      $display("overflow with 3 ids: %0d", ovf[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
