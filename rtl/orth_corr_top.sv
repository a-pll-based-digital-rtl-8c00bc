// orth_corr_top: self-calibrating polynomial post-correction of an ADC's
// static non-linearity.
//
// In the test phase the ADC digitises a pure sine.  The ADC code y passes
// through the polynomial corrector, z = y + sum theta_k*y^k.  The A-NPLL
// locks a digital oscillator to the tone in z and matches its amplitude,
// giving a distortion-free replica x^; the residue r = z - x^ then holds
// only the harmonics that the ADC (and the present correction) create.
// For each order k = 2..N_ORDER an M-NPLL produces a tone at k times the
// test frequency, in phase with the input, and a sign-sign LMS loop mixes
// the sign of r with the sign of that tone (sin for odd k, cos for even k)
// and integrates the product into theta_k until the k-th harmonic of z
// vanishes.  Lowering est freezes the coefficients; the corrector then
// keeps applying them to whatever the ADC converts (foreground
// calibration).
//
// Ports: y is the ADC code; w_f0[k] is the free-running frequency word of
// the k-th loop, cos(2*pi*k*f0/f_s) in Q1.15 for a test tone near f0
// (index 1 is the A-NPLL).  z is the corrected output with three
// fractional bits and z12 the same rounded to an ADC code.  The loop
// states (theta, psi, w_f, w_a) are brought out for monitoring.
//
// The system structure, the orders, the 12-bit ADC, the 12+3-bit tone and
// corrected output, the 16-bit control words and the 6-bit residue follow
// the reference design.  The gains, the hold input, the free-running
// frequency words and the coefficient format are this design's choices.
//
// Timing: one sample per clock.  z lags y by one clock; the loops run
// continuously while est is high.
//
// The replica's quadrature output, its detector output and the divided
// square waves of the M-NPLLs are needed inside the loops but not here;
// they are connected to local nets that nothing reads, and lint reports
// those nets as unused.
module orth_corr_top #(
  parameter int N_ORDER  = 3,    // highest harmonic cancelled
  parameter int GAMMA_SH = 5,    // gamma_k = 2**-GAMMA_SH for every k
  parameter int GA_SH    = 7,    // gamma_a of the amplitude loop
  parameter int BETA_SH  = 6,    // proportional gain of the PLL filters
  parameter int ALPHA_SH = 5     // integral gain of the PLL filters
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   est,     // 1: estimate, 0: hold theta
  input  logic signed [npll_pkg::ADC_W-1:0]      y,       // ADC code
  input  logic signed [N_ORDER:1][npll_pkg::CW_W-1:0] w_f0, // free-running words
  output logic signed [npll_pkg::X_W-1:0]        z,       // corrected, 12+3
  output logic signed [npll_pkg::ADC_W-1:0]      z12,     // corrected, 12
  output logic signed [npll_pkg::X_W-1:0]        x_hat,   // replica of the tone
  output logic signed [npll_pkg::R_W-1:0]        r,       // residue
  output logic signed [N_ORDER:2][npll_pkg::THETA_W-1:0] theta,
  output logic signed [N_ORDER:1][npll_pkg::PSI_W-1:0]   psi,
  output logic signed [N_ORDER:1][npll_pkg::CW_W-1:0]    w_f,
  output logic        [npll_pkg::CW_W-1:0]       w_a
);

  import npll_pkg::*;

  localparam int QW = X_W + 5;

  logic signed [QW-1:0] x_q1;
  pd_err_t              e1;

  poly_corrector #(.N_ORDER(N_ORDER)) u_corr (
    .clk, .rst_n, .y, .theta, .z, .z12
  );

  a_npll #(
    .GA_SH(GA_SH), .BETA_SH(BETA_SH), .ALPHA_SH(ALPHA_SH)
  ) u_anpll (
    .clk, .rst_n, .y(z), .w_f0(w_f0[1]), .x_i(x_hat), .x_q(x_q1),
    .w_f(w_f[1]), .w_a, .psi(psi[1]), .e(e1)
  );

  residue_cmp u_res (.z, .x_hat, .r);

  for (genvar k = 2; k <= N_ORDER; k++) begin : g_harm
    logic signed [X_W-1:0] x_ik;
    logic signed [QW-1:0]  x_qk;
    logic                  div_k;
    logic                  ref_neg;

    m_npll #(
      .BETA_SH(BETA_SH), .ALPHA_SH(ALPHA_SH)
    ) u_mnpll (
      .clk, .rst_n, .y(z), .w_f0(w_f0[k]), .m(4'(k)),
      .x_i(x_ik), .x_q(x_qk), .w_f(w_f[k]), .psi(psi[k]), .div(div_k)
    );

    // sin(k w n) for odd k, cos(k w n) (here -cos) for even k
    assign ref_neg = (k % 2 == 1) ? x_ik[X_W-1] : x_qk[QW-1];

    lms_coef #(.GAMMA_SH(GAMMA_SH), .DIR(lms_dir(k))) u_lms (
      .clk, .rst_n, .est, .r_neg(r[R_W-1]), .ref_neg, .theta(theta[k])
    );
  end

endmodule
