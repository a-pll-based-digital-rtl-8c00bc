// lms_coef: estimator of one correction coefficient theta_k.
//
// The residue r is mixed with a two-level square wave at k times the tone
// frequency (sin(k w n) for odd k, cos(k w n) for even k) by an XOR of the
// two sign bits, giving +1 or -1.  An accumulator sums that product, which
// averages out everything except the k-th harmonic of r, and
// theta_k = gamma_k * accumulator with gamma_k = 2**-GAMMA_SH.  The loop is
// a sign-sign LMS: its accumulator has unbounded DC gain, so theta_k
// settles where the k-th harmonic of the corrected output vanishes.
// DIR (+1 or -1) turns the mixer product into the direction that lowers
// that harmonic (see npll_pkg::lms_dir).  While est is low the accumulator
// holds, so the coefficient found in the test phase is kept.
//
// Square-wave mixing on the sign of r, the accumulator and the gamma
// scaling follow the reference design; the power-of-two gamma, the hold
// input, the widths and the saturation are this design's choices.
//
// Timing: the accumulator updates on each clock with est high; theta is a
// slice of that register.
module lms_coef #(
  parameter int THETA_W  = npll_pkg::THETA_W,
  parameter int GAMMA_SH = 5,     // gamma_k = 2**-GAMMA_SH
  parameter int DIR      = 1      // +1 or -1, see npll_pkg::lms_dir
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      est,      // 1: estimate, 0: hold
  input  logic                      r_neg,    // sign bit of the residue
  input  logic                      ref_neg,  // sign bit of the k-th harmonic tone
  output logic signed [THETA_W-1:0] theta
);

  localparam int AW = THETA_W + GAMMA_SH;

  logic signed [AW-1:0] acc;
  logic signed [AW:0]   acc_nx;
  logic                 up;

  // +1 when the residue and the tone have the same sign, then DIR applied.
  assign up = (r_neg == ref_neg) ^ (DIR < 0);

  always_comb begin
    acc_nx = up ? (AW+1)'(acc) + (AW+1)'(1) : (AW+1)'(acc) - (AW+1)'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (est) acc <= AW'(npll_pkg::sat_s(64'(acc_nx), AW));
  end

  assign theta = THETA_W'(acc >>> GAMMA_SH);

  initial assert (DIR == 1 || DIR == -1) else $error("DIR must be +1 or -1");

endmodule
