// clock_divider: divides the system clock into a one-cycle enable pulse.
//
// A down counter reloads with DIV-1 and pulses `tick` for one clock when it
// reaches zero, so `tick` is high one clock in every DIV. The rest of the PWM
// generator runs on the system clock and advances only on `tick`, which keeps
// the whole design in one clock domain instead of deriving a divided clock.
//
// The default DIV of 50 takes the 4 MHz system clock to an 80 kHz step rate
// for the sine samples and the triangular carrier; that ratio is the
// document's, using it as a single enable is this design's choice.
//
// Interface: clk, rst (synchronous, active high), tick out.
// Timing: first tick DIV clocks after rst is released, then every DIV clocks.
module clock_divider #(
  parameter int unsigned DIV = 50
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  localparam logic [CW-1:0] RELOAD = CW'(DIV - 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= RELOAD;
      tick <= 1'b0;
    end else if (cnt == '0) begin
      cnt  <= RELOAD;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt - 1'b1;
      tick <= 1'b0;
    end
  end

  initial assert (DIV >= 1) else $error("clock_divider: DIV must be at least 1");
endmodule
