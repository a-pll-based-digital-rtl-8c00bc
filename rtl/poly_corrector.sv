// poly_corrector: polynomial post-correction of the ADC output,
//   z = y + theta_2*y^2 + theta_3*y^3 + ... + theta_N*y^N,
// with the powers of y normalised to full scale (y/2**(ADC_W-1)) and scaled
// back, so theta_k is dimensionless and a coefficient of 1/2**(ADC_W-1)
// adds at most one LSB.
//
// The monomials are formed one after another, p_k = p_(k-1)*y/2**(ADC_W-1),
// with P_FRAC guard bits below the ADC LSB, each is weighted by its
// coefficient and all are added to y.  z is rounded to ADC_W integer and
// X_FRAC fractional bits and saturated; z12 is the same value rounded to an
// ADC code.  Forming the monomials from y and summing them is the reference
// structure; the normalisation, guard bits, rounding and the single output
// register are this design's choices.
//
// Timing: one sample per clock, outputs registered, latency one clock.
module poly_corrector #(
  parameter int N_ORDER = 3,                 // highest power corrected
  parameter int ADC_W   = npll_pkg::ADC_W,
  parameter int X_FRAC  = npll_pkg::X_FRAC,
  parameter int THETA_W = npll_pkg::THETA_W,
  parameter int THETA_FRAC = npll_pkg::THETA_FRAC,
  parameter int P_FRAC  = 12                 // guard bits of the monomials
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic signed [ADC_W-1:0]           y,       // ADC code
  input  logic signed [N_ORDER:2][THETA_W-1:0] theta, // theta_2..theta_N
  output logic signed [ADC_W+X_FRAC-1:0]    z,       // corrected, 12+3
  output logic signed [ADC_W-1:0]           z12      // corrected, ADC code
);

  localparam int ZW = ADC_W + X_FRAC;
  localparam int PW = ADC_W + P_FRAC + 1;     // a monomial
  localparam int MW = PW + ADC_W + THETA_W + 2;

  logic signed [PW-1:0] pk;
  logic signed [MW-1:0] acc, prod;
  logic signed [MW-1:0] z_r, z12_r;

  always_comb begin
    pk   = PW'(y) <<< P_FRAC;
    acc  = MW'(pk);
    for (int k = 2; k <= N_ORDER; k++) begin
      prod = (MW'(pk) * MW'(y)) >>> (ADC_W - 1);   // next monomial
      pk   = PW'(prod);
      prod = (MW'(pk) * MW'($signed(theta[k]))) >>> THETA_FRAC;
      acc  = acc + prod;
    end
    z_r   = (acc + (MW'(1) <<< (P_FRAC - X_FRAC - 1))) >>> (P_FRAC - X_FRAC);
    z12_r = (acc + (MW'(1) <<< (P_FRAC - 1))) >>> P_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z   <= '0;
      z12 <= '0;
    end else begin
      z   <= ZW'(npll_pkg::sat_s(64'(z_r), ZW));
      z12 <= ADC_W'(npll_pkg::sat_s(64'(z12_r), ADC_W));
    end
  end

endmodule
