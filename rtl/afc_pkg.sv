// afc_pkg: constants, types and the pattern arithmetic shared by the
// divider-less automatic frequency calibration (AFC) of a sub-sampling PLL.
//
// When the PLL is locked (truly or falsely) its output runs at an integer
// multiple m of the reference frequency. The auxiliary sampler looks at the
// oscillator at P = N_AUX+1 equidistant points of one reference period,
// k = 1..N_AUX. With the main sampler locked to the falling zero crossing,
// the oscillator is -sin(2*pi*m*k/P) at point k, so the sign of the sample
// depends only on r = (m*k) mod P:
//   r == 0 or 2r == P  -> zero (inside the comparator window)
//   0 < 2r < P         -> low
//   2r > P             -> high
// For a PLL that locks to the rising edge the high and low results swap.
// exp_pattern() evaluates this rule; the decoder compares the measured
// pattern with it for every harmonic the oscillator can reach, which is the
// look-up table of the decoder, computed here from the PLL numbers rather
// than typed in.
package afc_pkg;

  // Ternary result of the window comparator for one sample.
  typedef enum logic [1:0] {
    SAMP_ZERO = 2'b00,
    SAMP_LOW  = 2'b01,
    SAMP_HIGH = 2'b10
  } samp_e;

  // States of the AFC controller.
  typedef enum logic [1:0] {
    ST_IDLE    = 2'd0,   // waiting for the lock detector
    ST_MEASURE = 2'd1,   // stepping through the sampling points
    ST_DECODE  = 2'd2,   // one cycle: decoder updates the tuning word
    ST_HOLD    = 2'd3    // waiting for lock loss or the next periodic test
  } afc_state_e;

  // Expected comparator result at sampling point k for lock harmonic m.
  // p is the number of sampling points per reference period (N_AUX+1).
  // rising = 1 selects a PLL that locks to the rising zero crossing.
  function automatic samp_e exp_sample(input int unsigned m,
                                       input int unsigned k,
                                       input int unsigned p,
                                       input logic        rising);
    int unsigned r;
    samp_e       s;
    r = (m * k) % p;
    if (r == 0 || 2 * r == p) s = SAMP_ZERO;
    else if (2 * r < p)       s = SAMP_LOW;
    else                      s = SAMP_HIGH;
    if (rising && s == SAMP_LOW)       s = SAMP_HIGH;
    else if (rising && s == SAMP_HIGH) s = SAMP_LOW;
    return s;
  endfunction

endpackage
