// npll_pkg: word formats and constants shared by the ADC non-linearity
// estimator and corrector.
//
// Number formats (all two's complement unless noted):
//   y      ADC code, ADC_W integer bits.
//   z, x^  corrected output and synthesised tone, ADC_W integer bits plus
//          X_FRAC fractional bits (12+3 in the reference configuration).
//   w_f    frequency control word, CW_W bits, signed, CW_FRAC fractional
//          bits: the cosine of the oscillator's angular step.
//   w_a    amplitude control word, CW_W bits, unsigned, CW_FRAC fractional
//          bits, so unity is 2**CW_FRAC.
//   psi    loop-filter phase-error accumulator, PSI_W bits.
//   r      residue, R_W bits, in ADC LSBs.
//   theta  correction coefficient, THETA_W bits with THETA_FRAC fractional
//          bits, applied to powers of y normalised to full scale.
// The 12-bit ADC, the 12+3-bit tone and corrected output, the 16-bit control
// words and accumulator and the 6-bit residue are the reference sizes; the
// coefficient format and the guard bits are this design's choice.
// Each module takes only the constants it needs, so a lint run over the
// package together with a single module reports the others as unused.
package npll_pkg;

  localparam int ADC_W      = 12;
  localparam int X_FRAC     = 3;
  localparam int X_W        = ADC_W + X_FRAC;
  localparam int CW_W       = 16;
  localparam int CW_FRAC    = 15;
  localparam int PSI_W      = 16;
  localparam int R_W        = 6;
  localparam int THETA_W    = 16;
  localparam int THETA_FRAC = 15;

  // Unity amplitude control word.
  localparam logic [CW_W-1:0] WA_ONE = CW_W'(1) << CW_FRAC;

  // Phase detector output: -1, 0 or +1.
  typedef logic signed [1:0] pd_err_t;

  // Direction of the sign-sign LMS update of theta_k, applied to
  // sign(r) * sign(reference word).  The reference word is the in-phase
  // oscillator output sin(k wt) for odd k and the quadrature output for
  // even k; the waveguide oscillator's quadrature output is -cos(k wt).
  // The k-th harmonic of sin^k(wt) carries the sign (-1)**floor(k/2),
  // so raising theta_k moves that harmonic of z the opposite way.
  function automatic int lms_dir(input int k);
    int c;
    c = ((k / 2) % 2 == 0) ? 1 : -1;
    return (k % 2 == 1) ? -c : c;
  endfunction

  // Saturate a wide signed value to W bits.
  function automatic logic signed [63:0] sat_s(input logic signed [63:0] v, input int w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
