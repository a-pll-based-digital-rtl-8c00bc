// adc_model: behavioural model of the ADC under test (not synthesizable).
//
// A 12-bit converter with the static transfer
//   y(x) = x + BETA_E*|x| + BETA_O*x*|x|      (x normalised to full scale)
// followed by rounding to an integer code and clipping.  With the default
// coefficients the error at the two ends of the range is -10 and +12 LSB.
// A uniform dither of +-DITHER/2 LSB stands in for the converter's noise.
// The input is a real number; the code is registered on each rising clock.
module adc_model #(
  parameter int  ADC_W  = 12,
  parameter real BETA_E = 1.0 / 2048.0,
  parameter real BETA_O = 11.0 / 2048.0,
  parameter real DITHER = 1.0
) (
  input  logic                    clk,
  input  real                     vin,   // input, full scale = +-1.0
  output logic signed [ADC_W-1:0] code
);

  localparam real FS = real'(2 ** (ADC_W - 1));

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real v, n;
  int  c;

  always_ff @(posedge clk) begin
    v = vin + BETA_E * absr(vin) + BETA_O * vin * absr(vin);
    n = DITHER * (real'($urandom % 65536) / 65536.0 - 0.5);
    c = int'($floor(v * FS + n + 0.5));
    if (c > int'(FS) - 1) c = int'(FS) - 1;
    if (c < -int'(FS))    c = -int'(FS);
    code <= ADC_W'(c);
  end

endmodule
