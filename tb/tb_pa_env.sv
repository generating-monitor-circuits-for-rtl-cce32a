// tb_pa_env: stimulus, observed-circuit model and reference checker for a monitor of
// the 2-stage pipelined, stallable adder.
//
// Each clock edge it draws new operands and a stall bit (stalls come in bursts so that
// both long stalls and back-to-back issues happen). The adder model captures
// in0 + in1 into stage 1 on every non-stalled cycle and moves stage 1 to the output
// register on every non-stalled cycle; with probability ERR_PCT/100 a cycle's sum is
// corrupted. The reference keeps a list of outstanding additions: one is issued on
// each non-stalled cycle unless K are already outstanding (then overflow is expected
// and the addition is not tracked); an addition in stage 1 advances on a non-stalled
// cycle and is checked against sum on the cycle after. It predicts accept and overflow
// for every cycle and compares them, at the falling edge, with the monitor's outputs.
// It also counts how often each mechanism happened: completed checks, detected wrong
// sums, stall cycles that held an addition, and overflows.
module tb_pa_env #(
  parameter int unsigned K         = 3,
  parameter int unsigned W         = 8,
  parameter int unsigned ERR_PCT   = 4,
  parameter int unsigned SEED      = 1
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] in0,
  output logic [W-1:0] in1,
  output logic         stall,
  output logic [W:0]   sum,
  input  logic         accept,
  input  logic         overflow,
  output int           checks,
  output int           failures,
  output int           n_retire,
  output int           n_detect,
  output int           n_hold,
  output int           n_ovf
);

  typedef struct {
    logic [W:0] val;
    bit         stage2;
  } txn_t;

  logic [W:0] r1, r2;
  logic [W:0] err_mask;
  int         burst;
  bit         burst_stall;
  txn_t       pend[$];

  initial begin
    void'($urandom(SEED));
    in0 = '0; in1 = '0; stall = 1'b0; r1 = '0; r2 = '0; err_mask = '0;
    burst = 0; burst_stall = 1'b0;
    checks = 0; failures = 0; n_retire = 0; n_detect = 0; n_hold = 0; n_ovf = 0;
  end

  assign sum = r2 ^ err_mask;

  // stimulus and observed adder
  always @(posedge clk) begin
    if (burst == 0) begin
      burst       <= 1 + int'($urandom_range(5));
      burst_stall <= ($urandom_range(99) < 35);
    end else begin
      burst <= burst - 1;
    end
    stall <= burst_stall;
    in0   <= W'($urandom);
    in1   <= W'($urandom);
    if (!stall) begin
      r1 <= {1'b0, in0} + {1'b0, in1};
      r2 <= r1;
    end
    err_mask <= ($urandom_range(99) < ERR_PCT) ? (W+1)'(1 << $urandom_range(W)) : '0;
  end

  // reference model and comparison
  always @(negedge clk) begin
    if (rst) begin
      pend.delete();
    end else begin
      bit exp_acc, exp_ovf;
      txn_t nxt[$];
      nxt.delete();
      exp_acc = 1'b1;
      foreach (pend[n]) if (pend[n].stage2 && pend[n].val != sum) exp_acc = 1'b0;
      exp_ovf = !stall && (pend.size() >= int'(K));

      checks++;
      if (accept !== exp_acc) begin
        failures++;
        $display("pa_env K=%0d t=%0t: accept=%b expected %b", K, $time, accept, exp_acc);
      end
      checks++;
      if (overflow !== exp_ovf) begin
        failures++;
        $display("pa_env K=%0d t=%0t: overflow=%b expected %b", K, $time, overflow, exp_ovf);
      end
      if (!exp_acc) n_detect++;
      if (exp_ovf) n_ovf++;

      foreach (pend[n]) begin
        if (pend[n].stage2) begin
          n_retire++;
        end else begin
          txn_t t;
          t = pend[n];
          if (stall) n_hold++;
          else t.stage2 = 1'b1;
          nxt.push_back(t);
        end
      end
      if (!stall && !exp_ovf) nxt.push_back('{val: {1'b0, in0} + {1'b0, in1}, stage2: 1'b0});
      pend = nxt;
    end
  end

endmodule
