// tb_gste_monitor_top_full: gste_monitor_top at its default sizes, untouched
// parameters, through complete monitoring runs of both observed circuits.
//
// The pipelined adder, the two-tap adder and the stallable adder are modelled and driven with random data,
// stalls and occasional wrong sums (tb_pa_env, tb_ps_env); every cycle the monitors'
// accept and overflow are compared with the reference. At the default id counts
// (3 and 4) overflow must never occur. Resets every 2000 cycles restart the monitors.
module tb_gste_monitor_top_full;

  localparam int unsigned CYCLES = 20000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [7:0] in0, in1;  logic stall;  logic [8:0] sum;  logic pacc, povf;
  logic [7:0] x;         logic [8:0] y; logic sacc, sovf;
  logic [7:0] s0, s1;    logic sst;  logic [8:0] ss;  logic aacc, aovf;

  gste_monitor_top u_top (
    .clk, .rst,
    .pa_in0(in0), .pa_in1(in1), .pa_stall(stall), .pa_sum(sum),
    .pa_accept(pacc), .pa_overflow(povf),
    .ps_x(x), .ps_y(y), .ps_accept(sacc), .ps_overflow(sovf),
    .sa_in0(s0), .sa_in1(s1), .sa_stall(sst), .sa_sum(ss),
    .sa_accept(aacc), .sa_overflow(aovf)
  );

  int c[3], f[3], ret[3], det[3], hold, ovf[2], sec, shold, bl, cry;

  tb_pa_env #(.K(3), .SEED(21)) u_pa (
    .clk, .rst, .in0, .in1, .stall, .sum, .accept(pacc), .overflow(povf),
    .checks(c[0]), .failures(f[0]), .n_retire(ret[0]), .n_detect(det[0]),
    .n_hold(hold), .n_ovf(ovf[0])
  );
  tb_ps_env #(.K(4), .SEED(22)) u_ps (
    .clk, .rst, .x, .y, .accept(sacc), .overflow(sovf),
    .checks(c[1]), .failures(f[1]), .n_retire(ret[1]), .n_detect(det[1]),
    .n_ovf(ovf[1]), .n_second(sec)
  );

  tb_sa_env #(.SEED(23)) u_sa (
    .clk, .rst, .in0(s0), .in1(s1), .stall(sst), .sum(ss), .accept(aacc), .overflow(aovf),
    .checks(c[2]), .failures(f[2]), .n_retire(ret[2]), .n_detect(det[2]),
    .n_hold(shold), .n_bless(bl), .n_carry(cry)
  );

  int checks = 0, failures = 0;

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never seen: %s", what);
    end else begin
      $display("  %-40s %0d", what, n);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (CYCLES / 2000) begin
      repeat (2000) @(posedge clk);
      rst <= 1'b1;
      @(posedge clk);
      rst <= 1'b0;
    end
    @(negedge clk);
    #1;
    checks += c[0] + c[1] + c[2];
    failures += f[0] + f[1] + f[2];
    $display("mechanism counts:");
    need("pipe adder: completed checks", ret[0]);
    need("pipe adder: wrong sum detected", det[0]);
    need("pipe adder: addition held by stall", hold);
    need("two-tap: completed checks", ret[1]);
    need("two-tap: wrong sum detected", det[1]);
    need("two-tap: second value on instance edge", sec);
    need("stall adder: completed checks", ret[2]);
    need("stall adder: wrong sum detected", det[2]);
    need("stall adder: addition held by stall", shold);
    need("stall adder: token blessed at v0", bl);
    need("stall adder: condemned token carried", cry);
    checks++;
    if (ovf[0] != 0 || ovf[1] != 0) begin
      failures++;
      $display("overflow at default K: %0d %0d", ovf[0], ovf[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + CYCLES / 2000 + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
