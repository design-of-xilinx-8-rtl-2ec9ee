// sine_sampler: rectified-sine reference for the five-level PWM generator.
//
// Each `tick` steps a phase counter through one fundamental cycle and puts
// out one sample of |sin|, scaled by the modulation index. The reference is
// compared (outside this block) against two stacked triangular carriers, the
// lower one spanning 0..Ac and the upper one Ac..2Ac, with Ac = 2**N_BITS - 1.
// With the modulation index Ma = Am / (2*Ac), the sample is
//     ref = round(2*Ac * Ma * |sin(2*pi*k/S)|),  k = 0 .. S-1,
// so the reference peaks at Ac when Ma = 0.5 and at 2*Ac when Ma = 1.
// `pos_half` is high for the first half of the cycle (positive output) and
// low for the second.
//
// Samples per cycle (S) and the modulation index come from the front panel:
//  * mode (2 bits): S = mode * SAMPLE_BASE, i.e. 500, 1000 or 1500 samples
//    for mode 1, 2, 3. Mode 0 disables the generator: the phase is held at
//    zero and `active` is low. The sample counts are the document's; tying
//    them to the 2-bit mode input, and mode 0 = off, is this design's choice.
//  * mi (4 bits, the read-mode-index switch): Ma = mi / MI_STEPS, with
//    MI_STEPS = 10 so that switch value 4 gives Ma = 0.4 and 8 gives 0.8.
//    Values above MI_STEPS are clamped. This scaling is this design's choice.
//
// How it works: the phase counts in units of 1/(6*SAMPLE_BASE) of a cycle, a
// common multiple of all three sample counts, and advances by 6/mode per
// tick. A quarter-wave table, filled at elaboration time, holds
// |sin| * 2*Ac*2**FRAC / MI_STEPS; the table word times mi, rounded and
// shifted right by FRAC, is the reference.
//
// The phase restarts at zero when it would pass the end of the cycle, so
// after a change of mode in mid-cycle the next cycle still starts at the zero
// crossing (that one cycle is slightly shortened).
//
// Timing: on a clock with tick high, ref/pos_half are loaded from the current
// phase (one clock later they are valid) and the phase advances.
module sine_sampler #(
  parameter int unsigned N_BITS      = 5,    // carrier counter width (Ac = 2**N_BITS - 1)
  parameter int unsigned SAMPLE_BASE = 500,  // samples per cycle in mode 1 (must be even)
  parameter int unsigned MI_STEPS    = 10,   // switch value that means Ma = 1
  parameter int unsigned FRAC        = 8     // fraction bits of the table words
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              tick,
  input  logic [1:0]        mode,
  input  logic [3:0]        mi,
  output logic [N_BITS:0]   ref_o,
  output logic              pos_half,
  output logic              active,
  output logic              cycle_start  // pulses with the first sample of a cycle
);
  localparam int unsigned AC      = (1 << N_BITS) - 1;
  localparam int unsigned PH_TOT  = 6 * SAMPLE_BASE;
  localparam int unsigned HALF    = PH_TOT / 2;
  localparam int unsigned QUARTER = PH_TOT / 4;
  localparam int unsigned PW      = $clog2(PH_TOT);
  localparam int unsigned QW      = $clog2(QUARTER + 1);
  localparam real         AMP     = 2.0 * AC * (2.0 ** FRAC) / MI_STEPS;
  localparam int unsigned TW      = $clog2(int'(AMP) + 2);
  localparam int unsigned PRODW   = TW + 4;

  typedef logic [TW-1:0] qtab_t [QUARTER + 1];

  function automatic qtab_t make_table();
    qtab_t t;
    for (int p = 0; p <= QUARTER; p++)
      t[p] = TW'(int'($floor(AMP * $sin(1.5707963267948966 * p / QUARTER) + 0.5)));
    return t;
  endfunction

  localparam qtab_t QTAB = make_table();

  logic [PW-1:0]    phase;
  logic [PW-1:0]    ph_half;
  logic [QW-1:0]    qaddr;
  logic [2:0]       step;
  logic [3:0]       mi_c;
  logic [PRODW-1:0] prod;
  logic [PRODW-1:0] scaled;
  logic [PW:0]      ph_next;

  always_comb begin
    unique case (mode)
      2'd1:    step = 3'd6;
      2'd2:    step = 3'd3;
      2'd3:    step = 3'd2;
      default: step = 3'd0;
    endcase
    mi_c    = (mi > 4'(MI_STEPS)) ? 4'(MI_STEPS) : mi;
    ph_half = (phase < PW'(HALF)) ? phase : phase - PW'(HALF);
    qaddr   = QW'((ph_half <= PW'(QUARTER)) ? ph_half : PW'(HALF) - ph_half);
    prod    = PRODW'(QTAB[qaddr]) * PRODW'(mi_c);
    scaled  = (prod + PRODW'(1 << (FRAC - 1))) >> FRAC;
    ph_next = {1'b0, phase} + (PW + 1)'(step);
  end

  always_ff @(posedge clk) begin
    if (rst || mode == 2'd0) begin
      phase       <= '0;
      ref_o       <= '0;
      pos_half    <= 1'b1;
      active      <= 1'b0;
      cycle_start <= 1'b0;
    end else if (tick) begin
      ref_o       <= (scaled > PRODW'(2 * AC)) ? (N_BITS + 1)'(2 * AC) : (N_BITS + 1)'(scaled);
      pos_half    <= phase < PW'(HALF);
      active      <= 1'b1;
      cycle_start <= phase == '0;
      phase       <= (ph_next >= (PW + 1)'(PH_TOT)) ? '0 : PW'(ph_next);
    end else begin
      cycle_start <= 1'b0;
    end
  end

  initial assert (SAMPLE_BASE % 2 == 0 && FRAC >= 1)
    else $error("sine_sampler: SAMPLE_BASE must be even and FRAC at least 1");
endmodule
