// m_npll: synchronous frequency multiplier (M-NPLL).  It produces a clean
// tone at m times the frequency of the test tone in y, phase-aligned to it,
// for the square-wave mixer of the k-th coefficient loop (m = k).
//
// The sign bit of y, delayed one clock to match the divider, is the
// reference square wave.  The oscillator's x_I is
// sliced to a square wave and divided by m in an edge counter; the
// phase-frequency detector compares the divided wave with the reference
// and the PI loop filter sets the oscillator's frequency word.  In lock
// every reference edge coincides with an oscillator edge, so x_I follows
// sin(k w n) and x_Q follows -cos(k w n).  Only the sign of the output is
// used, so the amplitude word is held at one and the oscillator needs a
// single multiplier for w_f in a dedicated implementation.
//
// The loop structure, the divider in the feedback path and w_a = 1 follow
// the reference M-NPLL; gains, w_f0 and reset amplitude are this design's
// choices.
//
// Timing: one sample per clock; x_i, x_q and div are registers.
module m_npll #(
  parameter int X_W      = npll_pkg::X_W,
  parameter int Q_EXT    = 5,
  parameter int CW_W     = npll_pkg::CW_W,
  parameter int PSI_W    = npll_pkg::PSI_W,
  parameter int M_W      = 4,
  parameter int BETA_SH  = 6,
  parameter int ALPHA_SH = 5,
  parameter int INIT_AMP = 4096
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [X_W-1:0]       y,      // signal carrying the tone
  input  logic signed [CW_W-1:0]      w_f0,   // free-running word, cos(m*w0)
  input  logic        [M_W-1:0]       m,      // multiplication factor k
  output logic signed [X_W-1:0]       x_i,    // ~ sin(k w n)
  output logic signed [X_W+Q_EXT-1:0] x_q,    // ~ -cos(k w n)
  output logic signed [CW_W-1:0]      w_f,
  output logic signed [PSI_W-1:0]     psi,
  output logic                        div     // divided oscillator square wave
);

  logic ref_sq, nco_sq;
  npll_pkg::pd_err_t e;

  // The divider output changes one clock after the oscillator edge that
  // triggers it; the reference is delayed by the same clock so that, in
  // lock, oscillator and reference edges fall on the same sample.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ref_sq <= 1'b0;
    else        ref_sq <= ~y[X_W-1];
  end
  assign nco_sq = ~x_i[X_W-1];

  edge_div #(.M_W(M_W)) u_div (
    .clk, .rst_n, .sq(nco_sq), .m, .div
  );

  npll_pfd u_pfd (
    .clk, .rst_n, .ref_sq, .osc_sq(div), .e
  );

  npll_dlf #(
    .CW_W(CW_W), .PSI_W(PSI_W), .BETA_SH(BETA_SH), .ALPHA_SH(ALPHA_SH)
  ) u_dlf (
    .clk, .rst_n, .e, .w_f0, .psi, .w_f
  );

  dwo_nco #(
    .X_W(X_W), .Q_EXT(Q_EXT), .CW_W(CW_W), .INIT_AMP(INIT_AMP)
  ) u_nco (
    .clk, .rst_n, .w_f, .w_a(npll_pkg::WA_ONE), .x_i, .x_q
  );

endmodule
