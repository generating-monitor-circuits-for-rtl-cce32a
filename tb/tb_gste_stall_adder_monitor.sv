// tb_gste_stall_adder_monitor: gste_stall_adder_monitor in both forms, the reduced
// one without instance manager (LIGHT = 1) and the general one with a one-id instance
// manager (LIGHT = 0), each against the reference of tb_sa_env, with random stalls,
// injected wrong sums and a reset every 400 cycles. A condemned token must keep
// rejecting the later checks of its trace. Both must agree with the
// reference every cycle and never overflow.
module tb_gste_stall_adder_monitor;

  localparam int unsigned CYCLES = 4000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [7:0] a_in0, a_in1, b_in0, b_in1;
  logic       a_stall, b_stall;
  logic [8:0] a_sum, b_sum;
  logic       a_acc, a_ovf, b_acc, b_ovf;

  gste_stall_adder_monitor u_light (
    .clk, .rst, .in0(a_in0), .in1(a_in1), .stall(a_stall), .sum(a_sum),
    .accept(a_acc), .overflow(a_ovf)
  );
  gste_stall_adder_monitor #(.LIGHT(1'b0)) u_full (
    .clk, .rst, .in0(b_in0), .in1(b_in1), .stall(b_stall), .sum(b_sum),
    .accept(b_acc), .overflow(b_ovf)
  );

  int c[2], f[2], ret[2], det[2], hold[2], bl[2], cry[2];

  tb_sa_env #(.SEED(51)) u_env_l (
    .clk, .rst, .in0(a_in0), .in1(a_in1), .stall(a_stall), .sum(a_sum),
    .accept(a_acc), .overflow(a_ovf), .checks(c[0]), .failures(f[0]),
    .n_retire(ret[0]), .n_detect(det[0]), .n_hold(hold[0]), .n_bless(bl[0]), .n_carry(cry[0])
  );
  tb_sa_env #(.SEED(52)) u_env_f (
    .clk, .rst, .in0(b_in0), .in1(b_in1), .stall(b_stall), .sum(b_sum),
    .accept(b_acc), .overflow(b_ovf), .checks(c[1]), .failures(f[1]),
    .n_retire(ret[1]), .n_detect(det[1]), .n_hold(hold[1]), .n_bless(bl[1]), .n_carry(cry[1])
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
    repeat (CYCLES / 400) begin
      repeat (2) @(posedge clk);
      rst <= 1'b0;
      repeat (398) @(posedge clk);
      rst <= 1'b1;
    end
    @(negedge clk);
    #1;
    checks += c[0] + c[1];
    failures += f[0] + f[1];
    for (int n = 0; n < 2; n++) begin
      need("completed checks", ret[n]);
      need("wrong sum detected", det[n]);
      need("stall at v1", hold[n]);
    end
    need("token blessed at v0", bl[0] + bl[1]);
    need("condemned token carried round the loop", cry[0] + cry[1]);
    $display("checks done %0d/%0d, wrong sums %0d/%0d, carried %0d/%0d, blessed %0d/%0d",
             ret[0], ret[1], det[0], det[1], cry[0], cry[1], bl[0], bl[1]);
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
