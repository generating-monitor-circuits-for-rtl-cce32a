// tb_ps_env: stimulus, observed-circuit model and reference checker for a monitor of
// the two-tap adder (y two cycles after x(t) must be x(t) + x(t+1)).
//
// Each clock edge draws a new sample x. The model registers the previous sample and
// the sum x_prev + x; with probability ERR_PCT/100 a cycle's y is corrupted. The
// reference tracks the pairs in flight: a pair opens every cycle (its first id
// request), takes its second value one cycle later (a second id request, served after
// the first) and is checked against y the cycle after that. Ids free in a cycle are K
// minus the pairs already in flight; a request that finds none expects overflow and
// its pair is dropped. accept and overflow are compared with the monitor's at the
// falling edge. Counted mechanisms: completed checks, detected wrong sums, overflows,
// and second-value assignments on the instance edge.
module tb_ps_env #(
  parameter int unsigned K       = 4,
  parameter int unsigned W       = 8,
  parameter int unsigned ERR_PCT = 4,
  parameter int unsigned SEED    = 2
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] x,
  output logic [W:0]   y,
  input  logic         accept,
  input  logic         overflow,
  output int           checks,
  output int           failures,
  output int           n_retire,
  output int           n_detect,
  output int           n_ovf,
  output int           n_second
);

  typedef struct {
    logic [W-1:0] a;
    logic [W-1:0] b;
    bit           has_b;
  } pair_t;

  logic [W-1:0] xp;
  logic [W:0]   yr, err_mask;
  pair_t        pend[$];

  initial begin
    void'($urandom(SEED));
    x = '0; xp = '0; yr = '0; err_mask = '0;
    checks = 0; failures = 0; n_retire = 0; n_detect = 0; n_ovf = 0; n_second = 0;
  end

  assign y = yr ^ err_mask;

  always @(posedge clk) begin
    x        <= W'($urandom);
    xp       <= x;
    yr       <= {1'b0, xp} + {1'b0, x};
    err_mask <= ($urandom_range(99) < ERR_PCT) ? (W+1)'(1 << $urandom_range(W)) : '0;
  end

  always @(negedge clk) begin
    if (rst) begin
      pend.delete();
    end else begin
      bit exp_acc, exp_ovf;
      int free;
      pair_t nxt[$];
      nxt.delete();
      exp_acc = 1'b1;
      exp_ovf = 1'b0;
      foreach (pend[n])
        if (pend[n].has_b && ({1'b0, pend[n].a} + {1'b0, pend[n].b}) != y) exp_acc = 1'b0;
      free = int'(K) - pend.size();

      // new pair: first request, highest priority
      if (free > 0) begin
        free--;
        nxt.push_back('{a: x, b: '0, has_b: 1'b0});
      end else begin
        exp_ovf = 1'b1;
      end
      // second value for pairs that hold only their first
      foreach (pend[n]) begin
        if (pend[n].has_b) begin
          n_retire++;
        end else if (free > 0) begin
          pair_t p;
          free--;
          p = pend[n];
          p.b = x;
          p.has_b = 1'b1;
          nxt.push_back(p);
          n_second++;
        end else begin
          exp_ovf = 1'b1;
        end
      end

      checks++;
      if (accept !== exp_acc) begin
        failures++;
        $display("ps_env K=%0d t=%0t: accept=%b expected %b", K, $time, accept, exp_acc);
      end
      checks++;
      if (overflow !== exp_ovf) begin
        failures++;
        $display("ps_env K=%0d t=%0t: overflow=%b expected %b", K, $time, overflow, exp_ovf);
      end
      if (!exp_acc) n_detect++;
      if (exp_ovf) n_ovf++;
      pend = nxt;
    end
  end

endmodule
