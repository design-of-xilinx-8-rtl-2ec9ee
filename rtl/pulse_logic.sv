// pulse_logic: pulse logic generator of the five-level PWM.
//
// Combines the two comparator outputs into the instantaneous output level
// and drives the six gate pulses S1..S6 from the switch table in mlpwm_pkg:
//   number of carriers the reference is above (0, 1 or 2) = level magnitude,
//   half cycle of the reference = sign.
// So in the positive half the bridge switches between 0 and +Vdc/2 while the
// reference is below Ac (operating mode 2) and between +Vdc/2 and +Vdc while
// it is above (mode 1); the negative half mirrors this (modes 3 and 4). With
// a modulation index of 0.5 or less the reference never passes the upper
// carrier and the output has three levels; above 0.5 it has five.
//
// It also reports the operating mode (1..4, or idle when disabled). The mode
// follows the reference against Ac rather than measuring angles, which is
// equivalent to the document's alpha1..alpha4 definitions.
//
// Interface: gt_hi / gt_lo are the registered comparator outputs (reference
// above the upper / lower carrier). pos_half, active and ref_i are taken at
// the same time as the comparator inputs; they are delayed one clock here to
// line up with the comparators. When active is low all gates are off.
// Timing: outputs are registered; they follow gt_hi/gt_lo by one clock.
module pulse_logic
  import mlpwm_pkg::*;
#(
  parameter int unsigned N_BITS = 5
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            active,
  input  logic            pos_half,
  input  logic [N_BITS:0] ref_i,
  input  logic            gt_hi,
  input  logic            gt_lo,
  output gates_t          gates,
  output level_t          level,
  output op_mode_t        op_mode
);
  localparam logic [N_BITS:0] AC = (N_BITS + 1)'((1 << N_BITS) - 1);

  logic   pos_d, act_d, above_d;
  level_t lvl_n;
  logic   [1:0] mag;

  always_ff @(posedge clk) begin
    if (rst) begin
      pos_d   <= 1'b1;
      act_d   <= 1'b0;
      above_d <= 1'b0;
    end else begin
      pos_d   <= pos_half;
      act_d   <= active;
      above_d <= ref_i > AC;
    end
  end

  always_comb begin
    mag   = gt_hi ? 2'd2 : (gt_lo ? 2'd1 : 2'd0);
    lvl_n = pos_d ? level_t'({1'b0, mag}) : -level_t'({1'b0, mag});
  end

  always_ff @(posedge clk) begin
    if (rst || !act_d) begin
      gates   <= GATES_OFF;
      level   <= LVL_ZERO;
      op_mode <= OP_IDLE;
    end else begin
      gates   <= level_to_gates(lvl_n, pos_d);
      level   <= lvl_n;
      op_mode <= pos_d ? (above_d ? OP_MODE1 : OP_MODE2)
                       : (above_d ? OP_MODE4 : OP_MODE3);
    end
  end

  // The upper carrier sits above the lower one, so the reference cannot be
  // above the upper carrier without being above the lower one.
  property p_cmp_order;
    @(posedge clk) disable iff (rst) gt_hi |-> gt_lo;
  endproperty
  a_cmp_order: assert property (p_cmp_order);

  // Exactly two switches are on whenever the generator is running.
  a_two_on: assert property (@(posedge clk) disable iff (rst)
                             op_mode != OP_IDLE |-> $countones(gates) == 2);
endmodule
