// a_npll: numerical PLL with amplitude tracking (A-NPLL).  It synthesises a
// clean replica x^ = x_I of the sinusoidal test tone contained in its input
// y (the corrected ADC output), locked in frequency, phase and amplitude.
//
// Phase/frequency loop: the sign bits of y and of x_I form two square waves
// (ref and osc) for the phase-frequency detector; its +1/0/-1 output goes
// through the PI loop filter, whose output is the oscillator's frequency
// control word w_f.
// Amplitude loop: w_a = 1 + gamma_a*(|y| - |x_I|) with gamma_a =
// 2**-GA_SH.  A w_a above one makes the oscillator grow for that sample and
// below one makes it shrink, so the oscillator state integrates the
// amplitude error and the loop settles where |y| and |x_I| have the same
// mean, that is, where the replica has the amplitude of the tone in y.
//
// Structure (sign slicers, PFD, PI filter, NCO, |.| difference scaled by
// gamma_a onto w_a) follows the reference A-NPLL.  The text speaks of the
// amplitude difference being accumulated; here the accumulation is done by
// the oscillator itself, with no separate accumulator, as the reference
// block diagram draws it.  Gains, the free-running word w_f0 and the reset
// amplitude are this design's choices.
//
// Timing: one sample per clock.  x_i and x_q are registers; w_f and w_a are
// combinational from registers and the input y.
module a_npll #(
  parameter int X_W      = npll_pkg::X_W,
  parameter int Q_EXT    = 5,
  parameter int CW_W     = npll_pkg::CW_W,
  parameter int PSI_W    = npll_pkg::PSI_W,
  parameter int BETA_SH  = 6,
  parameter int ALPHA_SH = 5,
  parameter int GA_SH    = 7,       // gamma_a = 2**-GA_SH
  parameter int INIT_AMP = 4096
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [X_W-1:0]       y,      // signal carrying the tone
  input  logic signed [CW_W-1:0]      w_f0,   // free-running frequency word
  output logic signed [X_W-1:0]       x_i,    // replica of the tone
  output logic signed [X_W+Q_EXT-1:0] x_q,    // quadrature replica
  output logic signed [CW_W-1:0]      w_f,    // frequency control word
  output logic        [CW_W-1:0]      w_a,    // amplitude control word
  output logic signed [PSI_W-1:0]     psi,    // loop filter accumulator
  output npll_pkg::pd_err_t           e       // phase detector output
);

  logic ref_sq, osc_sq;
  logic signed [X_W+1:0] amp_err;
  logic signed [X_W+CW_W:0] wa_full;

  assign ref_sq = ~y[X_W-1];
  assign osc_sq = ~x_i[X_W-1];

  npll_pfd u_pfd (
    .clk, .rst_n, .ref_sq, .osc_sq, .e
  );

  npll_dlf #(
    .CW_W(CW_W), .PSI_W(PSI_W), .BETA_SH(BETA_SH), .ALPHA_SH(ALPHA_SH)
  ) u_dlf (
    .clk, .rst_n, .e, .w_f0, .psi, .w_f
  );

  always_comb begin
    amp_err = (y[X_W-1] ? -(X_W+2)'(y) : (X_W+2)'(y))
            - (x_i[X_W-1] ? -(X_W+2)'(x_i) : (X_W+2)'(x_i));
    // rounded, so that small errors do not bias the word downwards
    wa_full = $signed((X_W+CW_W+1)'(npll_pkg::WA_ONE))
            + (((X_W+CW_W+1)'(amp_err) + (X_W+CW_W+1)'(2 ** (GA_SH - 1))) >>> GA_SH);
    if (wa_full < 0)                         w_a = '0;
    else if (wa_full > (2 ** CW_W) - 1)      w_a = '1;
    else                                     w_a = CW_W'(wa_full);
  end

  dwo_nco #(
    .X_W(X_W), .Q_EXT(Q_EXT), .CW_W(CW_W), .INIT_AMP(INIT_AMP)
  ) u_nco (
    .clk, .rst_n, .w_f, .w_a, .x_i, .x_q
  );

endmodule
