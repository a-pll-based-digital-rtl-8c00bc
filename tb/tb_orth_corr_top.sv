// tb_orth_corr_top: end-to-end test of the ADC non-linearity estimator and
// corrector at its default parameters (third-order correction).
//
// A distorted 12-bit ADC model digitises a sine at f0 = 211/4096 of the
// sample rate (10.3 MHz at 200 MHz), 0.9 of full scale.  The loops start
// with free-running frequency words 1 % off the tone.  After EST_CYC
// samples of estimation (1 ms at 200 MHz) the coefficients are frozen and
// a 4096-sample coherent record of y and of the corrected code z12 is
// taken.  The testbench computes the harmonic amplitudes by a direct DFT
// and checks that the third harmonic drops by at least MIN_GAIN_DB and the
// (already small) second by at least MIN_GAIN2_DB, that the
// fundamental is kept, that the A-NPLL replica has the tone's frequency
// and amplitude, that each M-NPLL runs at k times the tone and that the
// coefficients hold while estimation is off.  It reports the SINAD and
// effective number of bits of both records and checks that the SINAD
// improves by at least MIN_SINAD_DB.  It also counts how often
// each loop mechanism acted (detector up/down pulses, amplitude word above
// and below one, divider toggles, LMS steps, residue saturation, hold).
module tb_orth_corr_top;
  import npll_pkg::*;

  localparam int    N_ORDER  = 3;
  localparam int    EST_CYC  = 200_000;
  localparam int    NREC     = 4096;
  localparam int    BIN      = 211;
  localparam real   AMP      = 0.9;
  localparam real   F_OFF    = 1.01;
  localparam real   MIN_GAIN_DB  = 15.0;
  localparam real   MIN_GAIN2_DB = 6.0;
  localparam real   MIN_SINAD_DB = 6.0;
  localparam real   PI       = 3.14159265358979;
  localparam int    WATCHDOG = EST_CYC + 3 * NREC + 1000;

  logic clk = 1'b0, rst_n = 1'b0, est = 1'b0;
  real  vin = 0.0;
  logic signed [ADC_W-1:0] y;
  logic signed [N_ORDER:1][CW_W-1:0] w_f0;
  logic signed [X_W-1:0] z, x_hat;
  logic signed [ADC_W-1:0] z12;
  logic signed [R_W-1:0] r;
  logic signed [N_ORDER:2][THETA_W-1:0] theta;
  logic signed [N_ORDER:1][PSI_W-1:0] psi;
  logic signed [N_ORDER:1][CW_W-1:0] w_f;
  logic [CW_W-1:0] w_a;

  int checks = 0, failures = 0, cyc = 0;

  adc_model u_adc (.clk, .vin, .code(y));

  orth_corr_top dut (
    .clk, .rst_n, .est, .y, .w_f0, .z, .z12, .x_hat, .r, .theta, .psi,
    .w_f, .w_a
  );

  always #5 clk = ~clk;

  // sine input, phase advances one sample per clock
  always @(posedge clk) begin
    cyc <= cyc + 1;
    vin <= AMP * $sin(2.0 * PI * real'(BIN) * real'(cyc + 1) / real'(NREC));
  end

  // mechanism counters
  int n_a_up, n_a_dn, n_m_up, n_m_dn, n_wa_hi, n_wa_lo, n_div, n_lms_up,
      n_lms_dn, n_rsat, n_hold;
  logic div2_d;
  logic signed [THETA_W-1:0] th2_d;
  initial begin
    n_a_up = 0; n_a_dn = 0; n_m_up = 0; n_m_dn = 0; n_wa_hi = 0; n_wa_lo = 0;
    n_div = 0; n_lms_up = 0; n_lms_dn = 0; n_rsat = 0; n_hold = 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.u_anpll.e == 2'sd1)  n_a_up++;
    if (dut.u_anpll.e == -2'sd1) n_a_dn++;
    if (dut.g_harm[3].u_mnpll.u_pfd.e == 2'sd1)  n_m_up++;
    if (dut.g_harm[3].u_mnpll.u_pfd.e == -2'sd1) n_m_dn++;
    if (w_a > WA_ONE) n_wa_hi++;
    if (w_a < WA_ONE) n_wa_lo++;
    div2_d <= dut.g_harm[2].div_k;
    if (dut.g_harm[2].div_k != div2_d) n_div++;
    th2_d <= theta[2];
    if (est && theta[2] > th2_d) n_lms_up++;
    if (est && theta[2] < th2_d) n_lms_dn++;
    if (r == R_W'(2 ** (R_W - 1) - 1) || r == R_W'(-(2 ** (R_W - 1)))) n_rsat++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // DFT magnitude of a record at bin b, as amplitude in LSB
  real rec_y[NREC], rec_z[NREC];
  function automatic real dft_amp(input real x[NREC], input int b);
    real re, im;
    re = 0.0; im = 0.0;
    for (int n = 0; n < NREC; n++) begin
      re += x[n] * $cos(2.0 * PI * real'(b) * real'(n) / real'(NREC));
      im -= x[n] * $sin(2.0 * PI * real'(b) * real'(n) / real'(NREC));
    end
    return 2.0 * $sqrt(re * re + im * im) / real'(NREC);
  endfunction

  // signal-to-noise-and-distortion ratio of a record, in dB: fundamental
  // power against everything else except DC
  function automatic real sinad_db(input real x[NREC], input real a1);
    real m, p;
    m = 0.0; p = 0.0;
    for (int n = 0; n < NREC; n++) m += x[n];
    m /= real'(NREC);
    for (int n = 0; n < NREC; n++) p += (x[n] - m) * (x[n] - m);
    p /= real'(NREC);
    return 10.0 * $log10((a1 * a1 / 2.0) / (p - a1 * a1 / 2.0));
  endfunction

  function automatic real db(input real a);
    return 20.0 * $log10(a + 1.0e-9);
  endfunction

  real f0n, wf_exp, amp_y, amp_z, hy, hz, amp_xh, sin_y, sin_z, spur_y, spur_z;
  logic signed [N_ORDER:2][THETA_W-1:0] theta_1ms;
  int  xi_max, cross_ref, cross_m[N_ORDER:2];
  logic signed [N_ORDER:2][THETA_W-1:0] theta_hold;
  logic z_neg_d;
  logic [N_ORDER:2] m_neg_d;

  initial begin
    f0n = real'(BIN) / real'(NREC);
    for (int k = 1; k <= N_ORDER; k++)
      w_f0[k] = CW_W'(int'($floor($cos(2.0 * PI * real'(k) * f0n * F_OFF) * 32768.0 + 0.5)));
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    est   = 1'b1;
    repeat (EST_CYC / 2) @(posedge clk);
    theta_1ms = theta;
    repeat (EST_CYC - EST_CYC / 2) @(posedge clk);
    $display("theta at half the estimation time: theta2=%0d theta3=%0d",
             $signed(theta_1ms[2]), $signed(theta_1ms[3]));

    // A-NPLL: frequency word and amplitude of the replica
    wf_exp = $cos(2.0 * PI * f0n) * 32768.0;
    xi_max = 0;
    cross_ref = 0;
    for (int k = 2; k <= N_ORDER; k++) cross_m[k] = 0;
    z_neg_d = z[X_W-1];
    m_neg_d[2] = dut.g_harm[2].x_ik[X_W-1];
    m_neg_d[3] = dut.g_harm[3].x_ik[X_W-1];
    for (int n = 0; n < NREC; n++) begin
      @(posedge clk);
      if (x_hat > xi_max) xi_max = x_hat;
      if (z[X_W-1] != z_neg_d) cross_ref++;
      z_neg_d = z[X_W-1];
      if (dut.g_harm[2].x_ik[X_W-1] != m_neg_d[2]) cross_m[2]++;
      if (dut.g_harm[3].x_ik[X_W-1] != m_neg_d[3]) cross_m[3]++;
      m_neg_d[2] = dut.g_harm[2].x_ik[X_W-1];
      m_neg_d[3] = dut.g_harm[3].x_ik[X_W-1];
    end
    $display("theta2=%0d theta3=%0d psi=%0d/%0d/%0d w_f1=%0d (exp %0.1f) w_a=%0d x_hat_max=%0d",
             $signed(theta[2]), $signed(theta[3]), $signed(psi[1]), $signed(psi[2]),
             $signed(psi[3]), $signed(w_f[1]), wf_exp, w_a, xi_max);
    check(real'($signed(w_f[1])) > wf_exp - 8.0 && real'($signed(w_f[1])) < wf_exp + 8.0,
          "A-NPLL frequency word matches the tone");
    $display("zero crossings: ref %0d, x_I2 %0d, x_I3 %0d", cross_ref, cross_m[2], cross_m[3]);
    check(cross_ref == 2 * BIN, "tone zero crossings in a record");
    for (int k = 2; k <= N_ORDER; k++)
      check(cross_m[k] >= 2 * BIN * k - 2 && cross_m[k] <= 2 * BIN * k + 2,
            $sformatf("M-NPLL %0d runs at %0d times the tone", k, k));
    check(real'(xi_max) > 0.97 * AMP * 2048.0 * 8.0 && real'(xi_max) < 1.05 * AMP * 2048.0 * 8.0,
          "replica amplitude matches the tone");

    // freeze coefficients and record
    @(negedge clk);
    est = 1'b0;
    theta_hold = theta;
    for (int n = 0; n < NREC; n++) begin
      @(posedge clk);
      #1;
      rec_y[n] = real'(y);
      rec_z[n] = real'(z12);
      if (theta == theta_hold) n_hold++;
    end
    check(n_hold == NREC, "coefficients hold while estimation is off");

    amp_y = dft_amp(rec_y, BIN);
    amp_z = dft_amp(rec_z, BIN);
    $display("fundamental: y %0.1f LSB, z %0.1f LSB", amp_y, amp_z);
    check(amp_z > 0.97 * amp_y && amp_z < 1.03 * amp_y, "fundamental kept");
    spur_y = 0.0; spur_z = 0.0;
    for (int k = 2; k <= 5; k++) begin
      hy = dft_amp(rec_y, (k * BIN) % NREC);
      hz = dft_amp(rec_z, (k * BIN) % NREC);
      if (hy > spur_y) spur_y = hy;
      if (hz > spur_z) spur_z = hz;
      $display("HD%0d: before %0.1f dBc, after %0.1f dBc", k, db(hy / amp_y), db(hz / amp_z));
      if (k <= N_ORDER)
        check(db(hy / amp_y) - db(hz / amp_z) >= ((k == 2) ? MIN_GAIN2_DB : MIN_GAIN_DB),
              $sformatf("HD%0d reduced", k));
    end

    sin_y = sinad_db(rec_y, amp_y);
    sin_z = sinad_db(rec_z, amp_z);
    $display("SINAD: before %0.1f dB (ENOB %0.2f), after %0.1f dB (ENOB %0.2f)",
             sin_y, (sin_y - 1.76) / 6.02, sin_z, (sin_z - 1.76) / 6.02);
    $display("largest harmonic HD2..HD5: before %0.1f dBc, after %0.1f dBc",
             db(spur_y / amp_y), db(spur_z / amp_z));
    check(sin_z - sin_y >= MIN_SINAD_DB, "SINAD improved");
    $display("mechanisms: A-PFD up %0d dn %0d, M-PFD up %0d dn %0d, w_a>1 %0d w_a<1 %0d, div toggles %0d, theta2 steps up %0d dn %0d, r saturated %0d, hold %0d",
             n_a_up, n_a_dn, n_m_up, n_m_dn, n_wa_hi, n_wa_lo, n_div, n_lms_up, n_lms_dn, n_rsat, n_hold);
    check(n_a_up > 0 && n_a_dn > 0, "A-NPLL detector pulses both ways");
    check(n_m_up > 0 && n_m_dn > 0, "M-NPLL detector pulses both ways");
    check(n_wa_hi > 0 && n_wa_lo > 0, "amplitude word moves both ways");
    check(n_div > 0, "divider toggles");
    check(n_lms_up > 0 && n_lms_dn > 0, "coefficient steps both ways");
    check(n_rsat > 0, "residue saturates");

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
