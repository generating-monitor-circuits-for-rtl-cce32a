// gste_monitor_top: three monitor circuits side by side, each with its own ports.
//
//   pa_* : gste_pipe_adder_monitor, the monitor for the 2-stage pipelined, stallable
//          adder (K = 3 instance ids, 8-bit operands by default).
//   ps_* : gste_pair_sum_monitor, the monitor for a two-tap adder whose graph assigns
//          a second constant on an instance edge (K = 4 by default).
//   sa_* : gste_stall_adder_monitor, the monitor for the unpipelined, stallable adder,
//          which needs one instance; by default in its reduced form without instance
//          manager (SA_LIGHT = 1).
// The three share only clock and reset. Each monitor's accept and overflow outputs are
// combinational in the cycle they refer to; reset is synchronous and active high. The
// observed circuits themselves are not part of this design: their signals come in as
// ports.
module gste_monitor_top #(
  parameter int unsigned PA_K = 3,  // instance ids, pipelined-adder monitor
  parameter int unsigned PA_W = 8,  // operand width, pipelined-adder monitor
  parameter int unsigned PS_K = 4,  // instance ids, two-tap-adder monitor
  parameter int unsigned PS_W = 8,  // sample width, two-tap-adder monitor
  parameter int unsigned SA_W = 8,  // operand width, stallable-adder monitor
  parameter bit          SA_LIGHT = 1'b1  // stallable-adder monitor without instance manager
) (
  input  logic            clk,
  input  logic            rst,
  // pipelined adder under observation
  input  logic [PA_W-1:0] pa_in0,
  input  logic [PA_W-1:0] pa_in1,
  input  logic            pa_stall,
  input  logic [PA_W:0]   pa_sum,
  output logic            pa_accept,
  output logic            pa_overflow,
  // two-tap adder under observation
  input  logic [PS_W-1:0] ps_x,
  input  logic [PS_W:0]   ps_y,
  output logic            ps_accept,
  output logic            ps_overflow,
  // unpipelined stallable adder under observation
  input  logic [SA_W-1:0] sa_in0,
  input  logic [SA_W-1:0] sa_in1,
  input  logic            sa_stall,
  input  logic [SA_W:0]   sa_sum,
  output logic            sa_accept,
  output logic            sa_overflow
);

  gste_pipe_adder_monitor #(.K(PA_K), .W(PA_W)) u_pipe_adder (
    .clk, .rst, .in0(pa_in0), .in1(pa_in1), .stall(pa_stall), .sum(pa_sum),
    .accept(pa_accept), .overflow(pa_overflow)
  );

  gste_pair_sum_monitor #(.K(PS_K), .W(PS_W)) u_pair_sum (
    .clk, .rst, .x(ps_x), .y(ps_y), .accept(ps_accept), .overflow(ps_overflow)
  );

  gste_stall_adder_monitor #(.W(SA_W), .LIGHT(SA_LIGHT)) u_stall_adder (
    .clk, .rst, .in0(sa_in0), .in1(sa_in1), .stall(sa_stall), .sum(sa_sum),
    .accept(sa_accept), .overflow(sa_overflow)
  );

endmodule
