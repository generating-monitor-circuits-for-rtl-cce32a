// tb_gste_monitor_top: end-to-end test of gste_monitor_top.
//
// Two copies of the top run side by side: one at its default sizes (3 ids for the
// pipelined-adder monitor, 4 for the two-tap-adder monitor, the stallable-adder
// monitor without instance manager), where no overflow may occur, and one with one id
// fewer for the first two monitors, where overflow must occur, and the stallable-adder
// monitor built with its one-id instance manager. Each
// monitor is driven by a model of the circuit it watches and checked every cycle
// against a reference (tb_pa_env, tb_ps_env, tb_sa_env), with wrong sums injected at random.
// A reset every 400 cycles checks that the monitors restart cleanly. The test fails
// if any mechanism never happened: a completed check, a detected wrong sum, an
// addition held by a stall, an overflow (small copy only), a second-value assignment,
// a token blessed by a failed antecedent, a condemned token carried round a loop.
module tb_gste_monitor_top;

  localparam int unsigned CYCLES = 4000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  // default-size copy
  logic [7:0] a_in0, a_in1;  logic a_stall;  logic [8:0] a_sum;  logic a_pacc, a_povf;
  logic [7:0] a_x;           logic [8:0] a_y; logic a_sacc, a_sovf;
  // reduced-id copy
  logic [7:0] b_in0, b_in1;  logic b_stall;  logic [8:0] b_sum;  logic b_pacc, b_povf;
  logic [7:0] b_x;           logic [8:0] b_y; logic b_sacc, b_sovf;
  // stallable adder, both copies
  logic [7:0] a_s0, a_s1, b_s0, b_s1;  logic a_sst, b_sst;  logic [8:0] a_ss, b_ss;
  logic a_aacc, a_aovf, b_aacc, b_aovf;

  gste_monitor_top u_full (
    .clk, .rst,
    .pa_in0(a_in0), .pa_in1(a_in1), .pa_stall(a_stall), .pa_sum(a_sum),
    .pa_accept(a_pacc), .pa_overflow(a_povf),
    .ps_x(a_x), .ps_y(a_y), .ps_accept(a_sacc), .ps_overflow(a_sovf),
    .sa_in0(a_s0), .sa_in1(a_s1), .sa_stall(a_sst), .sa_sum(a_ss),
    .sa_accept(a_aacc), .sa_overflow(a_aovf)
  );

  gste_monitor_top #(.PA_K(2), .PS_K(3), .SA_LIGHT(1'b0)) u_small (
    .clk, .rst,
    .pa_in0(b_in0), .pa_in1(b_in1), .pa_stall(b_stall), .pa_sum(b_sum),
    .pa_accept(b_pacc), .pa_overflow(b_povf),
    .ps_x(b_x), .ps_y(b_y), .ps_accept(b_sacc), .ps_overflow(b_sovf),
    .sa_in0(b_s0), .sa_in1(b_s1), .sa_stall(b_sst), .sa_sum(b_ss),
    .sa_accept(b_aacc), .sa_overflow(b_aovf)
  );

  int c[6], f[6], ret[6], det[6], hold[4], ovf[4], sec[2], bl[2], cry[2];

  tb_pa_env #(.K(3), .SEED(11)) u_pa_full (
    .clk, .rst, .in0(a_in0), .in1(a_in1), .stall(a_stall), .sum(a_sum),
    .accept(a_pacc), .overflow(a_povf), .checks(c[0]), .failures(f[0]),
    .n_retire(ret[0]), .n_detect(det[0]), .n_hold(hold[0]), .n_ovf(ovf[0])
  );
  tb_ps_env #(.K(4), .SEED(12)) u_ps_full (
    .clk, .rst, .x(a_x), .y(a_y), .accept(a_sacc), .overflow(a_sovf),
    .checks(c[1]), .failures(f[1]), .n_retire(ret[1]), .n_detect(det[1]),
    .n_ovf(ovf[1]), .n_second(sec[0])
  );
  tb_pa_env #(.K(2), .SEED(13)) u_pa_small (
    .clk, .rst, .in0(b_in0), .in1(b_in1), .stall(b_stall), .sum(b_sum),
    .accept(b_pacc), .overflow(b_povf), .checks(c[2]), .failures(f[2]),
    .n_retire(ret[2]), .n_detect(det[2]), .n_hold(hold[1]), .n_ovf(ovf[2])
  );
  tb_ps_env #(.K(3), .SEED(14)) u_ps_small (
    .clk, .rst, .x(b_x), .y(b_y), .accept(b_sacc), .overflow(b_sovf),
    .checks(c[3]), .failures(f[3]), .n_retire(ret[3]), .n_detect(det[3]),
    .n_ovf(ovf[3]), .n_second(sec[1])
  );

  tb_sa_env #(.ERR_PCT(3), .SEED(15)) u_sa_full (
    .clk, .rst, .in0(a_s0), .in1(a_s1), .stall(a_sst), .sum(a_ss),
    .accept(a_aacc), .overflow(a_aovf), .checks(c[4]), .failures(f[4]),
    .n_retire(ret[4]), .n_detect(det[4]), .n_hold(hold[2]), .n_bless(bl[0]), .n_carry(cry[0])
  );
  tb_sa_env #(.ERR_PCT(3), .SEED(16)) u_sa_small (
    .clk, .rst, .in0(b_s0), .in1(b_s1), .stall(b_sst), .sum(b_ss),
    .accept(b_aacc), .overflow(b_aovf), .checks(c[5]), .failures(f[5]),
    .n_retire(ret[5]), .n_detect(det[5]), .n_hold(hold[3]), .n_bless(bl[1]), .n_carry(cry[1])
  );

  int checks = 0, failures = 0;

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never seen: %s", what);
    end else begin
      $display("  %-36s %0d", what, n);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (CYCLES / 400) begin
      repeat (400) @(posedge clk);
      rst <= 1'b1;
      repeat (2) @(posedge clk);
      rst <= 1'b0;
    end
    @(negedge clk);
    #1;
    for (int n = 0; n < 6; n++) begin
      checks += c[n];
      failures += f[n];
    end
    $display("mechanism counts:");
    need("pipe adder: completed checks", ret[0]);
    need("pipe adder: wrong sum detected", det[0]);
    need("pipe adder: addition held by stall", hold[0]);
    need("pipe adder K-1: overflow", ovf[2]);
    need("two-tap: completed checks", ret[1]);
    need("two-tap: wrong sum detected", det[1]);
    need("two-tap: second value on instance edge", sec[0]);
    need("two-tap K-1: overflow", ovf[3]);
    need("stall adder light: completed checks", ret[4]);
    need("stall adder light: wrong sum detected", det[4]);
    need("stall adder light: addition held by stall", hold[2]);
    need("stall adder full: completed checks", ret[5]);
    need("stall adder full: wrong sum detected", det[5]);
    need("stall adder full: addition held by stall", hold[3]);
    need("stall adder: token blessed at v0", bl[0] + bl[1]);
    need("stall adder: condemned token carried", cry[0] + cry[1]);
    // at default sizes the bounds of the construction hold: no overflow
    checks++;
    if (ovf[0] != 0 || ovf[1] != 0) begin
      failures++;
      $display("overflow at default K: %0d %0d", ovf[0], ovf[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + CYCLES / 200 + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
