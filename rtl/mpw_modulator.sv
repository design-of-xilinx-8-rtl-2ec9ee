// mpw_modulator: FPGA PWM generator of the five-level single-phase inverter.
//
// Produces the six gate pulses S1..S6 by level-shifted carrier PWM: a
// rectified sine reference is compared with two stacked triangular carriers
// (0..Ac and Ac..2Ac), and the two comparison results, with the half cycle
// of the sine, pick one of five output levels and the switch pair for it.
//
// Data path (all in the system clock domain):
//   clock_divider  -> tick every PRESCALE clocks (4 MHz / 50 = 80 kHz)
//   sine_sampler   -> rectified sine sample, scaled by the modulation index
//   carrier_gen    -> lower carrier (up/down counter) and upper carrier (+Ac)
//   comparator x2  -> reference above upper / lower carrier
//   pulse_logic    -> output level, gate pulses, operating mode 1..4
// The chain and the 4 MHz clock, divider 50 and sample counts 500/1000/1500
// follow the document. Register stages, the encodings of mode and readmodind
// and the single-enable clocking are this design's choices.
//
// Controls: readmodind is the 4-pin modulation-index switch (Ma = value/10,
// clamped at 1.0); mode selects 500, 1000 or 1500 samples per sine cycle
// (mode 1, 2, 3), which sets the output frequency to
// 4 MHz / (PRESCALE * samples) = 160, 80 or 53.3 Hz; mode 0 turns all gates
// off. hardrst is a synchronous active-high reset.
//
// Timing: the reference and carriers change on a tick edge; comparators are
// registered one clock later and the gate pulses one clock after that, i.e.
// gates reflect the sample of a tick two clocks after it.
module mpw_modulator
  import mlpwm_pkg::*;
#(
  parameter int unsigned PRESCALE    = 50,
  parameter int unsigned N_BITS      = 5,
  parameter int unsigned SAMPLE_BASE = 500,
  parameter int unsigned MI_STEPS    = 10,
  parameter int unsigned FRAC        = 8
) (
  input  logic              clk,
  input  logic              hardrst,
  input  logic [1:0]        mode,
  input  logic [3:0]        readmodind,
  output gates_t            gatecntr,
  output level_t            level,
  output op_mode_t          op_mode,
  output logic [N_BITS-1:0] count,
  output logic              cycle_start
);
  logic            tick;
  logic [N_BITS:0] ref_s;
  logic            pos_half, active;
  logic [N_BITS:0] upper;
  logic            up;
  logic            gt_hi, gt_lo;

  clock_divider #(.DIV(PRESCALE)) u_div (
    .clk(clk), .rst(hardrst), .tick(tick)
  );

  sine_sampler #(
    .N_BITS(N_BITS), .SAMPLE_BASE(SAMPLE_BASE), .MI_STEPS(MI_STEPS), .FRAC(FRAC)
  ) u_sine (
    .clk(clk), .rst(hardrst), .tick(tick), .mode(mode), .mi(readmodind),
    .ref_o(ref_s), .pos_half(pos_half), .active(active), .cycle_start(cycle_start)
  );

  carrier_gen #(.N_BITS(N_BITS)) u_carrier (
    .clk(clk), .rst(hardrst), .enable(mode != 2'd0), .tick(tick),
    .lower(count), .upper(upper), .up(up)
  );

  comparator #(.W(N_BITS + 1)) u_cmp1 (
    .clk(clk), .rst(hardrst), .a(ref_s), .b(upper), .gt(gt_hi)
  );

  comparator #(.W(N_BITS + 1)) u_cmp2 (
    .clk(clk), .rst(hardrst), .a(ref_s), .b({1'b0, count}), .gt(gt_lo)
  );

  pulse_logic #(.N_BITS(N_BITS)) u_pulse (
    .clk(clk), .rst(hardrst), .active(active), .pos_half(pos_half), .ref_i(ref_s),
    .gt_hi(gt_hi), .gt_lo(gt_lo), .gates(gatecntr), .level(level), .op_mode(op_mode)
  );

  logic unused_up;
  assign unused_up = up;
endmodule
