// mlpwm_ref_pkg: reference model used by the testbenches of the five-level
// PWM generator. Written independently of the RTL: ideal real-valued sine
// reference, ideal triangular carrier and the published switch table.
package mlpwm_ref_pkg;

  localparam real PI = 3.141592653589793;

  // Ideal reference: 2*Ac * Ma * |sin(2*pi*k/S)|, Ma = min(mi,10)/10.
  function automatic real ideal_ref(int ac, int mi, int k, int s);
    real ma;
    ma = ((mi > 10) ? 10 : mi) / 10.0;
    return 2.0 * ac * ma * ((k < s / 2) ? $sin(2.0 * PI * k / s) : -$sin(2.0 * PI * k / s));
  endfunction

  // Lower carrier after j steps of a 0..ac..0 triangle.
  function automatic int tri_carrier(int ac, longint j);
    int t;
    t = int'(j % (2 * ac));
    return (t <= ac) ? t : 2 * ac - t;
  endfunction

  // Expected level (units of Vdc/2) from the ideal reference; sets decisive
  // to 0 when the reference is too close to a carrier for the fixed-point
  // rounding in the hardware to be predicted.
  function automatic int expected_level(real r, int c, int ac, bit pos, output bit decisive);
    int mag;
    decisive = !((r - c < 0.6 && c - r < 0.6) || (r - (c + ac) < 0.6 && (c + ac) - r < 0.6));
    if (r == 0.0) decisive = 1'b1;
    mag = (r > c + ac) ? 2 : ((r > c) ? 1 : 0);
    return pos ? mag : -mag;
  endfunction

  // Gates {S6,S5,S4,S3,S2,S1} per the switch table.
  function automatic bit [5:0] expected_gates(int lvl, bit pos);
    case (lvl)
       2: return 6'b001001;             // S4 S1
       1: return 6'b101000;             // S4 S6
      -1: return 6'b000110;             // S2 S3
      -2: return 6'b010010;             // S2 S5
      default: return pos ? 6'b001100   // S4 S3
                          : 6'b000011;  // S2 S1
    endcase
  endfunction

endpackage
