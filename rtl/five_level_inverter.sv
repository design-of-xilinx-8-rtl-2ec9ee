// five_level_inverter: top level of the five-level PWM single-phase inverter.
//
// Joins the FPGA PWM generator (mpw_modulator) to a behavioural model of the
// power bridge (bridge_model). In the real system the six gate pulses pass
// through a buffer with optoisolators and a bridge driver IC before reaching
// the MOSFETs; those stages are analog and are not modelled, so the pulses
// are brought out on `gatecntr` at the point where they leave the FPGA and
// are fed to the bridge model directly (treated as ideal, non-inverting).
//
// Ports: clk (4 MHz system clock), hardrst (synchronous reset), mode (0 off,
// 1/2/3 = 500/1000/1500 sine samples per cycle), readmodind (modulation
// index switch, Ma = value/10). Outputs: gate pulses, the level the
// generator commands, its operating mode, the carrier count, a pulse at the
// start of each sine cycle, and the model's leg and load voltages in units of
// Vdc/2 with a flag for gate patterns the bridge does not allow.
module five_level_inverter
  import mlpwm_pkg::*;
#(
  parameter int unsigned PRESCALE    = 50,
  parameter int unsigned N_BITS      = 5,
  parameter int unsigned SAMPLE_BASE = 500
) (
  input  logic              clk,
  input  logic              hardrst,
  input  logic [1:0]        mode,
  input  logic [3:0]        readmodind,
  output gates_t            gatecntr,
  output level_t            level,
  output op_mode_t          op_mode,
  output logic [N_BITS-1:0] count,
  output logic              cycle_start,
  output logic [1:0]        va,
  output logic [1:0]        vb,
  output level_t            vo,
  output logic              bridge_valid,
  output logic              shoot_through
);
  mpw_modulator #(
    .PRESCALE(PRESCALE), .N_BITS(N_BITS), .SAMPLE_BASE(SAMPLE_BASE)
  ) u_pwm (
    .clk(clk), .hardrst(hardrst), .mode(mode), .readmodind(readmodind),
    .gatecntr(gatecntr), .level(level), .op_mode(op_mode), .count(count),
    .cycle_start(cycle_start)
  );

  bridge_model u_bridge (
    .gates(gatecntr), .va(va), .vb(vb), .vo(vo), .valid(bridge_valid),
    .shoot_through(shoot_through)
  );
endmodule
