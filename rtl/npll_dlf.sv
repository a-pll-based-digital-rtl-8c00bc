// npll_dlf: proportional-integral digital loop filter of a numerical PLL.
//
// The phase-error accumulator psi sums the detector output e every sample
// and saturates at PSI_W bits.  The frequency control word is
//   w_f = w_f0 - beta*e - alpha*psi
// with beta = 2**BETA_SH and alpha = 2**-ALPHA_SH control-word LSBs.  The
// minus signs come from the control word being cos(w): a larger word means
// a lower frequency, so a leading reference (e = +1) must lower w_f.  w_f0
// is the free-running word, cos(2*pi*f0/f_s) of the expected tone.
//
// The PI structure (proportional gain beta, accumulator psi, integral gain
// alpha) and the 16-bit accumulator and control word are the reference
// design; power-of-two gains, the free-running offset w_f0 and saturation
// are this design's choices.
//
// Timing: psi is a register; w_f is combinational from e and psi.
module npll_dlf #(
  parameter int CW_W     = npll_pkg::CW_W,
  parameter int PSI_W    = npll_pkg::PSI_W,
  parameter int BETA_SH  = 6,   // proportional gain 2**BETA_SH LSB
  parameter int ALPHA_SH = 5    // integral gain 2**-ALPHA_SH LSB per count
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  npll_pkg::pd_err_t        e,     // phase detector output
  input  logic signed [CW_W-1:0]   w_f0,  // free-running frequency word
  output logic signed [PSI_W-1:0]  psi,   // phase-error accumulator
  output logic signed [CW_W-1:0]   w_f    // frequency control word
);

  logic signed [PSI_W+1:0] psi_nx;
  logic signed [CW_W+PSI_W+2:0] wf_full;

  always_comb begin
    psi_nx  = (PSI_W+2)'(psi) + (PSI_W+2)'(e);
    wf_full = (CW_W+PSI_W+3)'(w_f0)
            - ((CW_W+PSI_W+3)'(e) <<< BETA_SH)
            - ((CW_W+PSI_W+3)'(psi) >>> ALPHA_SH);
    w_f     = CW_W'(npll_pkg::sat_s(64'(wf_full), CW_W));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) psi <= '0;
    else        psi <= PSI_W'(npll_pkg::sat_s(64'(psi_nx), PSI_W));
  end

endmodule
