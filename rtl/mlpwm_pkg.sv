// mlpwm_pkg: shared types, constants and the switch table of the five-level
// PWM single-phase inverter.
//
// The bridge has six switches. S1..S4 form a conventional full bridge; S5 and
// S6, with four diodes, tie the bridge legs to the half-bus point so that the
// load sees 0, +-Vdc/2 and +-Vdc. Output levels are carried as a signed count
// of half-bus steps (-2..+2, one step = Vdc/2).
//
// level_to_gates() is the published switch table: which two switches are on
// for each output level. Zero volts has two patterns; the one used depends on
// the half cycle (S4,S3 in the positive half, S2,S1 in the negative half), so
// S4 stays on for the whole positive half and S2 for the whole negative half.
// Choosing the zero pattern by half cycle is this design's choice.
package mlpwm_pkg;

  // Output level in units of Vdc/2.
  typedef logic signed [2:0] level_t;
  localparam level_t LVL_NEG_FULL = -3'sd2;
  localparam level_t LVL_NEG_HALF = -3'sd1;
  localparam level_t LVL_ZERO     =  3'sd0;
  localparam level_t LVL_POS_HALF =  3'sd1;
  localparam level_t LVL_POS_FULL =  3'sd2;

  // Gate pulses, one bit per switch (1 = switch on).
  typedef struct packed {
    logic s6;
    logic s5;
    logic s4;
    logic s3;
    logic s2;
    logic s1;
  } gates_t;

  localparam gates_t GATES_OFF = '0;

  // Operating modes of the inverter over one fundamental cycle:
  //   MODE1  positive half, reference above the lower carrier's peak Ac
  //   MODE2  positive half, reference at or below Ac
  //   MODE3  negative half, reference at or below Ac
  //   MODE4  negative half, reference above Ac
  // OP_IDLE is this design's own code for "outputs disabled".
  typedef enum logic [2:0] {
    OP_IDLE = 3'd0,
    OP_MODE1 = 3'd1,
    OP_MODE2 = 3'd2,
    OP_MODE3 = 3'd3,
    OP_MODE4 = 3'd4
  } op_mode_t;

  // Switch table. pos_half selects the zero-volt pattern.
  function automatic gates_t level_to_gates(level_t lvl, logic pos_half);
    gates_t g;
    g = GATES_OFF;
    unique case (lvl)
      LVL_POS_FULL: begin g.s4 = 1'b1; g.s1 = 1'b1; end   // +Vdc
      LVL_POS_HALF: begin g.s4 = 1'b1; g.s6 = 1'b1; end   // +Vdc/2
      LVL_NEG_HALF: begin g.s2 = 1'b1; g.s3 = 1'b1; end   // -Vdc/2
      LVL_NEG_FULL: begin g.s2 = 1'b1; g.s5 = 1'b1; end   // -Vdc
      LVL_ZERO: begin                                     // 0
        if (pos_half) begin g.s4 = 1'b1; g.s3 = 1'b1; end
        else          begin g.s2 = 1'b1; g.s1 = 1'b1; end
      end
      default: g = GATES_OFF;                             // codes -4, +3: none
    endcase
    return g;
  endfunction

endpackage
