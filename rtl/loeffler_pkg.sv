// loeffler_pkg: constants and types shared by the Loeffler DCT/IDCT datapath.
//
// The modified Loeffler 8-point DCT uses three rotator blocks, all with gain
// k = sqrt(2) and angles n*pi/16 for n = 6 (even part), 3 and 1 (odd part),
// plus two multiplications by 1/sqrt(2). The transposed graph (the IDCT)
// uses the same rotators with the angle negated. Each rotator is evaluated
// with three multiplications (the 3-multiply/3-add form):
//   O0 = a*I0 + b*I1  = (b-a)*I1 + a*(I0+I1)
//   O1 = -b*I0 + a*I1 = -(b+a)*I0 + a*(I0+I1)
// with a = k*cos(n*pi/16) and b = k*sin(n*pi/16).
//
// Coefficients are signed fixed point with COEF_FRAC fractional bits:
//   C_A    = round(2^13 * sqrt(2) * cos(n*pi/16))
//   C_BMA  = round(2^13 * (sqrt(2)*sin(n*pi/16) - sqrt(2)*cos(n*pi/16)))
//   C_NBPA = round(2^13 * -(sqrt(2)*sin(n*pi/16) + sqrt(2)*cos(n*pi/16)))
//   ISQRT2 = round(2^13 / sqrt(2))
// The largest magnitude is 16069 (< 2^14), so a 16-bit signed coefficient
// fits one 18x18 DSP-block multiplier input. The fraction width (13 bits) and
// the guard bits carried through the datapath are this design's choice.
package loeffler_pkg;

  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 13;
  localparam int unsigned N_POINTS  = 8;

  typedef logic signed [COEF_W-1:0] coef_t;

  // The three multiplier constants of one rotator.
  typedef struct packed {
    coef_t a;     // k*cos
    coef_t bma;   // k*sin - k*cos
    coef_t nbpa;  // -(k*sin + k*cos)
  } rot_coef_t;

  localparam coef_t ISQRT2 = coef_t'(5793);

  // Rotator constants for k = sqrt(2) and angle n*pi/16, n in {+-1,+-3,+-6}.
  // Negating n swaps bma and nbpa and leaves a unchanged.
  function automatic rot_coef_t rot_coef(input int n);
    rot_coef_t c;
    case (n)
       1: c = '{a: 16'sd11363, bma: -16'sd9102,  nbpa: -16'sd13623};
       3: c = '{a: 16'sd9633,  bma: -16'sd3196,  nbpa: -16'sd16069};
       6: c = '{a: 16'sd4433,  bma:  16'sd6270,  nbpa: -16'sd15137};
      -1: c = '{a: 16'sd11363, bma: -16'sd13623, nbpa: -16'sd9102};
      -3: c = '{a: 16'sd9633,  bma: -16'sd16069, nbpa: -16'sd3196};
      -6: c = '{a: 16'sd4433,  bma: -16'sd15137, nbpa:  16'sd6270};
      // any other angle: identity with gain 1 (not used by the transforms)
      default: c = '{a: 16'sd8192, bma: -16'sd8192, nbpa: -16'sd8192};
    endcase
    return c;
  endfunction

endpackage
