// comparator: registered magnitude comparator of the PWM generator.
//
// Puts out 1 when the sine reference is strictly above the carrier and 0
// otherwise, registered once so that the gate pulses leave the generator from
// flip-flops. The generator uses two: comparator 1 against the upper carrier
// (Ac..2Ac), comparator 2 against the lower carrier (0..Ac). Comparing sine
// with triangle is the document's; the strict "above" and the output
// register are this design's choices.
//
// Interface: clk, rst (synchronous, active high), a (reference), b (carrier),
// gt out. Timing: gt reflects a and b of the previous clock.
module comparator #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         gt
);
  always_ff @(posedge clk) begin
    if (rst) gt <= 1'b0;
    else     gt <= a > b;
  end
endmodule
