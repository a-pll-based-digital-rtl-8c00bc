// dwo_nco: digital waveguide oscillator used as the numerically controlled
// oscillator (NCO) of every numerical PLL.
//
// Two state registers x_I and x_Q hold the quadrature outputs.  Each sample
//   a      = w_a * x_I
//   t      = w_f * (a + x_Q)
//   x_I'   = t - x_Q
//   x_Q'   = t + a
// With w_a = 1 this is a lossless rotation whose angular step w satisfies
// w_f = cos(w); w_a < 1 makes the tone decay and w_a > 1 makes it grow,
// which is how the amplitude loop steers it.  Only two multipliers are used.
// x_I is a sine; x_Q is the matching -cos, scaled by cot(w/2) relative to
// x_I, so x_Q is kept Q_EXT bits wider than x_I (enough down to a tone of
// about f_s/100 with the default).  Products are rounded to nearest and the
// states saturate rather than wrap.
//
// The signal flow is the reference waveguide structure.  The Q_EXT guard bits,
// the rounding, the saturation and the reset state (x_I = INIT_AMP,
// x_Q = 0) are this design's choices.
//
// Timing: x_i and x_q are registers; a new w_f or w_a acts on the next
// sample.  One sample per clock.
module dwo_nco

#(
  parameter int X_W      = npll_pkg::X_W,   // width of x_I (integer+fraction)
  parameter int Q_EXT    = 5,               // extra bits for x_Q
  parameter int CW_W     = npll_pkg::CW_W,
  parameter int CW_FRAC  = npll_pkg::CW_FRAC,
  parameter int INIT_AMP = 4096              // x_I after reset, in x_I LSBs
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [CW_W-1:0]      w_f,   // frequency control word, cos(w)
  input  logic        [CW_W-1:0]      w_a,   // amplitude control word, unsigned
  output logic signed [X_W-1:0]       x_i,   // in-phase output
  output logic signed [X_W+Q_EXT-1:0] x_q    // quadrature output
);

  localparam int QW = X_W + Q_EXT;
  localparam int PW = QW + CW_W + 2;   // product width

  logic signed [QW+1:0]  a_s, sum_s, t_s;
  logic signed [PW-1:0]  pa, pt;
  logic signed [QW+2:0]  xi_nx, xq_nx;

  always_comb begin
    pa    = PW'(x_i) * PW'($signed({1'b0, w_a}));
    a_s   = (QW+2)'((pa + (PW'(1) <<< (CW_FRAC - 1))) >>> CW_FRAC);
    sum_s = a_s + (QW+2)'(x_q);
    pt    = PW'(sum_s) * PW'(w_f);
    t_s   = (QW+2)'((pt + (PW'(1) <<< (CW_FRAC - 1))) >>> CW_FRAC);
    xi_nx = (QW+3)'(t_s) - (QW+3)'(x_q);
    xq_nx = (QW+3)'(t_s) + (QW+3)'(a_s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_i <= X_W'(INIT_AMP);
      x_q <= '0;
    end else begin
      x_i <= X_W'(npll_pkg::sat_s(64'(xi_nx), X_W));
      x_q <= QW'(npll_pkg::sat_s(64'(xq_nx), QW));
    end
  end

endmodule
