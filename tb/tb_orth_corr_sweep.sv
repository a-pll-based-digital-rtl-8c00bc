// tb_orth_corr_sweep: single-tone amplitude sweep with stored coefficients.
//
// The third-order design estimates its coefficients on a tone at AMP0 =
// 0.9 of full scale (f0 = 211/4096 of the sample rate, 1 ms of
// estimation), then holds them.  The tone amplitude is then swept from a
// decade below AMP0 up to AMP0 (the model converter clips above full
// scale, so no larger amplitude is applied); at each step a 4096-sample
// coherent record of the raw code y and of the corrected code z12 is taken
// and the spurious-free dynamic range (fundamental over the largest of
// harmonics 2 to 5) is computed by a direct DFT.  Checks: at AMP0 the
// correction gains at least 10 dB of SFDR; it never loses more than 3 dB
// at any step; and the largest amplitude at which the SFDR reaches
// SFDR_REQ (67 dB) is at least twice as high with the correction as
// without it.
module tb_orth_corr_sweep;
  import npll_pkg::*;

  localparam int  EST_CYC = 200_000;
  localparam int  NREC    = 4096;
  localparam int  BIN     = 211;
  localparam real AMP0    = 0.9;
  localparam real SFDR_REQ = 67.0;
  localparam real PI      = 3.14159265358979;
  localparam int  NSTEP   = 7;
  localparam int  WATCHDOG = EST_CYC + NSTEP * (NREC + 64) + 1000;

  logic clk = 1'b0, rst_n = 1'b0, est = 1'b0;
  real  vin = 0.0, amp = AMP0;
  logic signed [ADC_W-1:0] y, z12;
  logic signed [3:1][CW_W-1:0] w_f0;
  logic signed [X_W-1:0] z, x_hat;
  logic signed [R_W-1:0] r;
  logic signed [3:2][THETA_W-1:0] theta;
  logic signed [3:1][PSI_W-1:0] psi;
  logic signed [3:1][CW_W-1:0] w_f;
  logic [CW_W-1:0] w_a;
  int checks = 0, failures = 0, cyc = 0;
  real rec_y[NREC], rec_z[NREC];
  real steps[NSTEP] = '{0.09, 0.18, 0.36, 0.45, 0.6, 0.75, 0.9};

  adc_model u_adc (.clk, .vin, .code(y));

  orth_corr_top dut (
    .clk, .rst_n, .est, .y, .w_f0, .z, .z12, .x_hat, .r, .theta, .psi,
    .w_f, .w_a
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    vin <= amp * $sin(2.0 * PI * real'(BIN) * real'(cyc + 1) / real'(NREC));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real dft_amp(input real x[NREC], input int b);
    real re, im;
    re = 0.0; im = 0.0;
    for (int n = 0; n < NREC; n++) begin
      re += x[n] * $cos(2.0 * PI * real'(b) * real'(n) / real'(NREC));
      im -= x[n] * $sin(2.0 * PI * real'(b) * real'(n) / real'(NREC));
    end
    return 2.0 * $sqrt(re * re + im * im) / real'(NREC);
  endfunction

  function automatic real sfdr(input real x[NREC]);
    real f, h, hmax;
    f = dft_amp(x, BIN);
    hmax = 1.0e-9;
    for (int k = 2; k <= 5; k++) begin
      h = dft_amp(x, k * BIN);
      if (h > hmax) hmax = h;
    end
    return 20.0 * $log10(f / hmax);
  endfunction

  initial begin
    real f0n, sy, sz, top_y, top_z;
    f0n = real'(BIN) / real'(NREC);
    for (int k = 1; k <= 3; k++)
      w_f0[k] = CW_W'(int'($floor($cos(2.0 * PI * real'(k) * f0n * 1.01) * 32768.0 + 0.5)));
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    est   = 1'b1;
    repeat (EST_CYC) @(posedge clk);
    @(negedge clk);
    est = 1'b0;
    top_y = 0.0; top_z = 0.0;
    for (int s = 0; s < NSTEP; s++) begin
      amp = steps[s];
      repeat (64) @(posedge clk);
      for (int n = 0; n < NREC; n++) begin
        @(posedge clk);
        #1;
        rec_y[n] = real'(y);
        rec_z[n] = real'(z12);
      end
      sy = sfdr(rec_y);
      sz = sfdr(rec_z);
      $display("amplitude %0.3f FS: SFDR raw %0.1f dB, corrected %0.1f dB", amp, sy, sz);
      check(sz >= sy - 3.0, $sformatf("correction does not hurt at %0.3f FS", amp));
      if (amp == AMP0) check(sz >= sy + 10.0, "SFDR gain at the estimation amplitude");
      if (sy >= SFDR_REQ) top_y = amp;
      if (sz >= SFDR_REQ) top_z = amp;
    end
    $display("largest amplitude with SFDR >= %0.0f dB: raw %0.3f, corrected %0.3f", SFDR_REQ, top_y, top_z);
    check(top_z >= 2.0 * top_y && top_z > 0.0, "input range at least doubled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
