// residue_cmp: comparison of the corrected output with the synthesised
// replica of the test tone.
//
// r = z - x^ is the distortion still left in z.  It is taken to whole ADC
// LSBs (floor, which keeps the sign of the exact difference) and saturated
// to R_W bits: only its sign drives the coefficient loops, so saturation
// loses nothing they use.  The 6-bit residue is the reference size; the LSB
// weight and the saturation are this design's choices.
//
// Timing: combinational.
module residue_cmp #(
  parameter int X_W    = npll_pkg::X_W,
  parameter int X_FRAC = npll_pkg::X_FRAC,
  parameter int R_W    = npll_pkg::R_W
) (
  input  logic signed [X_W-1:0] z,      // corrected output, 12+3
  input  logic signed [X_W-1:0] x_hat,  // replica of the tone, 12+3
  output logic signed [R_W-1:0] r       // residue in ADC LSBs
);

  logic signed [X_W:0] d;

  always_comb begin
    d = (X_W+1)'(z) - (X_W+1)'(x_hat);
    r = R_W'(npll_pkg::sat_s(64'(d >>> X_FRAC), R_W));
  end

endmodule
