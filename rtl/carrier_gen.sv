// carrier_gen: the two stacked triangular carriers of the five-level PWM.
//
// An N_BITS up/down counter sweeps 0 -> Ac -> 0 (Ac = 2**N_BITS - 1), one step
// per `tick`; that count is the lower carrier. An adder offsets it by Ac to
// give the upper carrier, which sweeps Ac -> 2*Ac -> Ac in phase with the
// lower one. The up/down counter and the addition unit follow the document;
// the counter width default of 5 bits is read from a 5-bit count shown in its
// simulation, and keeping the two carriers in phase is this design's choice.
//
// One carrier period is 2*Ac ticks (a full up and down sweep), so with the
// 80 kHz tick and N_BITS = 5 the carrier runs at 80 kHz / 62 = 1.29 kHz.
//
// Interface: clk, rst (synchronous, active high), tick in; lower (N_BITS
// bits), upper (N_BITS+1 bits), up (direction) out. enable low holds the
// counter at zero counting up.
// Timing: the outputs change on the clock edge where tick is high.
module carrier_gen #(
  parameter int unsigned N_BITS = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  logic              tick,
  output logic [N_BITS-1:0] lower,
  output logic [N_BITS:0]   upper,
  output logic              up
);
  localparam logic [N_BITS-1:0] AC = '1;

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      lower <= '0;
      up    <= 1'b1;
    end else if (tick) begin
      if (up) begin
        lower <= lower + 1'b1;
        if (lower == AC - 1'b1) up <= 1'b0;
      end else begin
        lower <= lower - 1'b1;
        if (lower == N_BITS'(1)) up <= 1'b1;
      end
    end
  end

  // Addition unit: upper carrier = lower carrier + Ac.
  assign upper = {1'b0, lower} + {1'b0, AC};

  initial assert (N_BITS >= 2) else $error("carrier_gen: N_BITS must be at least 2");
endmodule
