// tb_gste_pair_sum_monitor: gste_pair_sum_monitor against its reference.
//
// Two copies, each watching a model of the two-tap adder with injected wrong sums
// (tb_ps_env): one with the default 4 ids, where overflow must never happen, and one
// with 3 ids, where the second-value request on the assigning instance edge must run
// out of ids. Every cycle accept and overflow are compared with the reference, which
// also checks that the first value survives the move to a new id.
module tb_gste_pair_sum_monitor;

  localparam int unsigned CYCLES = 3000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [7:0] a_x, b_x;
  logic [8:0] a_y, b_y;
  logic       a_acc, a_ovf, b_acc, b_ovf;

  gste_pair_sum_monitor u_k4 (.clk, .rst, .x(a_x), .y(a_y), .accept(a_acc), .overflow(a_ovf));
  gste_pair_sum_monitor #(.K(3)) u_k3 (.clk, .rst, .x(b_x), .y(b_y), .accept(b_acc), .overflow(b_ovf));

  int c[2], f[2], ret[2], det[2], ovf[2], sec[2];

  tb_ps_env #(.K(4), .SEED(41)) u_env4 (
    .clk, .rst, .x(a_x), .y(a_y), .accept(a_acc), .overflow(a_ovf),
    .checks(c[0]), .failures(f[0]), .n_retire(ret[0]), .n_detect(det[0]),
    .n_ovf(ovf[0]), .n_second(sec[0])
  );
  tb_ps_env #(.K(3), .SEED(42)) u_env3 (
    .clk, .rst, .x(b_x), .y(b_y), .accept(b_acc), .overflow(b_ovf),
    .checks(c[1]), .failures(f[1]), .n_retire(ret[1]), .n_detect(det[1]),
    .n_ovf(ovf[1]), .n_second(sec[1])
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
    need("second value assigned", sec[0]);
    need("overflow with 3 ids", ovf[1]);
    checks++;
    if (ovf[0] != 0) begin
      failures++;
      $display("overflow with 4 ids: %0d", ovf[0]);
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
