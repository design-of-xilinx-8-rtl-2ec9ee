// bridge_model: behavioural model of the five-level power bridge (not
// synthesizable hardware in the real design: MOSFETs, diodes and the split
// DC bus). It exists so that the PWM generator can be checked end to end.
//
// The bridge is a full bridge S1..S4 with two extra switches S5, S6 and four
// diodes that reach the half-bus point. The model maps the six gate inputs to
// the leg voltages Va, Vb and the load voltage Vo = Va - Vb, all in units of
// Vdc/2, exactly as in the published switch table:
//   S4,S1 -> Va=2 Vb=0 Vo=+2      S2,S1 -> Va=1 Vb=1 Vo= 0
//   S4,S6 -> Va=1 Vb=0 Vo=+1      S2,S5 -> Va=0 Vb=2 Vo=-2
//   S4,S3 -> Va=0 Vb=0 Vo= 0      S2,S3 -> Va=0 Vb=1 Vo=-1
// Any other gate pattern (all off, one switch, three or more, or an unlisted
// pair) is reported with `valid` low and Vo = 0; `shoot_through` flags both
// switches of one full-bridge leg on together (S1 with S3, or S2 with S4),
// assuming S1/S3 and S2/S4 are the two legs as drawn in the schematic.
// The model is combinational: it has no dead time, ringing or device drops.
module bridge_model
  import mlpwm_pkg::*;
(
  input  gates_t     gates,
  output logic [1:0] va,
  output logic [1:0] vb,
  output level_t     vo,
  output logic       valid,
  output logic       shoot_through
);
  always_comb begin
    valid = 1'b1;
    unique case (gates)
      6'b001001: begin va = 2'd2; vb = 2'd0; end  // S4,S1
      6'b101000: begin va = 2'd1; vb = 2'd0; end  // S4,S6
      6'b001100: begin va = 2'd0; vb = 2'd0; end  // S4,S3
      6'b000011: begin va = 2'd1; vb = 2'd1; end  // S2,S1
      6'b010010: begin va = 2'd0; vb = 2'd2; end  // S2,S5
      6'b000110: begin va = 2'd0; vb = 2'd1; end  // S2,S3
      default:   begin va = 2'd0; vb = 2'd0; valid = 1'b0; end
    endcase
    vo = level_t'({1'b0, va}) - level_t'({1'b0, vb});
    shoot_through = (gates.s1 && gates.s3) || (gates.s2 && gates.s4);
  end
endmodule
