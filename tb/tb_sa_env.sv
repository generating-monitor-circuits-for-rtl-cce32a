// tb_sa_env: stimulus, observed-circuit model and reference checker for a monitor of
// the unpipelined, stallable adder (one cycle minimum latency, one addition at a time).
//
// The adder model loads in0 + in1 into its output register on every non-stalled cycle.
// Stalls are random; with probability ERR_PCT/100 a cycle's sum is corrupted. The
// reference walks the assertion graph with a single token: at v0 a non-stalled cycle
// takes A and B (a stall there ends checking until the next reset); at v1 a stall
// waits and a non-stalled cycle checks sum == A + B; from v2 the token returns to v0.
// Stalls while the token is at v0 are drawn only rarely, so that most of a run is
// checked. accept and overflow (always expected low) are compared at the falling edge.
// Counted: completed checks, detected wrong sums, stall cycles at v1, tokens blessed
// at v0, and checks rejected because the token was already condemned.
module tb_sa_env #(
  parameter int unsigned W       = 8,
  parameter int unsigned ERR_PCT = 1,
  parameter int unsigned SEED    = 3
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
  output int           n_bless,
  output int           n_carry
);

  typedef enum logic [1:0] {AT_V0, AT_V1, AT_V2, GONE} where_t;

  where_t     where;
  logic [W-1:0] a, b;
  logic [W:0] r, err_mask;
  bit         cond;     // the token is condemned: an earlier check on its path failed

  initial begin
    void'($urandom(SEED));
    in0 = '0; in1 = '0; stall = 1'b0; r = '0; err_mask = '0;
    where = AT_V0; a = '0; b = '0; cond = 1'b0;
    checks = 0; failures = 0; n_retire = 0; n_detect = 0; n_hold = 0; n_bless = 0;
    n_carry = 0;
  end

  assign sum = r ^ err_mask;

  always @(posedge clk) begin
    if (where == AT_V0 || rst) stall <= ($urandom_range(99) < 2);
    else                       stall <= ($urandom_range(99) < 30);
    in0 <= W'($urandom);
    in1 <= W'($urandom);
    if (!stall) r <= {1'b0, in0} + {1'b0, in1};
    err_mask <= ($urandom_range(99) < ERR_PCT) ? (W+1)'(1 << $urandom_range(W)) : '0;
  end

  always @(negedge clk) begin
    if (rst) begin
      where = AT_V0;
      cond  = 1'b0;
    end else begin
      bit exp_acc;
      exp_acc = 1'b1;
      case (where)
        AT_V0: begin
          if (stall) begin
            where = GONE;
            n_bless++;
          end else begin
            a = in0;
            b = in1;
            where = AT_V1;
          end
        end
        AT_V1: begin
          if (stall) begin
            n_hold++;
          end else begin
            if (cond) n_carry++;
            cond    = cond || (sum != {1'b0, a} + {1'b0, b});
            exp_acc = !cond;
            n_retire++;
            where = AT_V2;
          end
        end
        AT_V2: where = AT_V0;
        default: ;
      endcase
      checks++;
      if (accept !== exp_acc) begin
        failures++;
        $display("sa_env t=%0t: accept=%b expected %b", $time, accept, exp_acc);
      end
      checks++;
      if (overflow !== 1'b0) begin
        failures++;
        $display("sa_env t=%0t: unexpected overflow", $time);
      end
      if (!exp_acc) n_detect++;
    end
  end

endmodule
