// tb_a_npll: self-checking test of the amplitude-tracking NPLL.
//
// A clean sine at 211/4096 of the sample rate, 1500 LSB (12000 in 12+3
// units), is applied with the free-running word 1 % off.  After the lock
// time the testbench checks over a 4096-sample window that the mean
// frequency word equals cos(2*pi*f) within 8 LSB, that the replica's peak
// is within 3 % of the input's, and that every rising zero crossing of the
// replica is within one sample after one of the input (all but a few
// crossings, the loop dithers by a sample).  The input amplitude
// is then stepped to 8000 and the replica must follow.  The detector must
// have pulsed both ways and w_a must have moved both ways.
module tb_a_npll;
  localparam real PI   = 3.14159265358979;
  localparam real FN   = 211.0 / 4096.0;
  localparam int  LOCK = 100000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [14:0] y = '0, x_i;
  logic signed [19:0] x_q;
  logic signed [15:0] w_f0, w_f, psi;
  logic [15:0] w_a;
  npll_pkg::pd_err_t e;
  real amp = 12000.0;
  int checks = 0, failures = 0, cyc = 0, n_up = 0, n_dn = 0, n_hi = 0, n_lo = 0;

  a_npll dut (.clk, .rst_n, .y, .w_f0, .x_i, .x_q, .w_f, .w_a, .psi, .e);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    y <= 15'(int'($floor(amp * $sin(2.0 * PI * FN * real'(cyc + 1)) + 0.5)));
    if (rst_n) begin
      if (e == 2'sd1) n_up++;
      if (e == -2'sd1) n_dn++;
      if (w_a > 16'd32768) n_hi++;
      if (w_a < 16'd32768) n_lo++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(input real a_exp);
    real wf_sum;
    int pk, rises, aligned, last_y_rise;
    logic yn_d, xn_d;
    wf_sum = 0.0; pk = 0; rises = 0; aligned = 0; last_y_rise = -100;
    yn_d = y[14]; xn_d = x_i[14];
    for (int n = 0; n < 4096; n++) begin
      @(posedge clk);
      #1;
      wf_sum += real'(w_f);
      if (x_i > pk) pk = x_i;
      if (yn_d && !y[14]) last_y_rise = n;
      if (xn_d && !x_i[14]) begin
        rises++;
        if (n - last_y_rise <= 1) aligned++;
      end
      yn_d = y[14]; xn_d = x_i[14];
    end
    $display("mean w_f %0.1f (exp %0.1f), peak %0d (exp %0.0f), rises %0d aligned %0d",
             wf_sum / 4096.0, $cos(2.0 * PI * FN) * 32768.0, pk, a_exp, rises, aligned);
    check(wf_sum / 4096.0 > $cos(2.0 * PI * FN) * 32768.0 - 8.0 &&
          wf_sum / 4096.0 < $cos(2.0 * PI * FN) * 32768.0 + 8.0, "frequency word locked");
    check(real'(pk) > 0.97 * a_exp && real'(pk) < 1.03 * a_exp, "replica amplitude");
    check(rises >= 210 && aligned >= rises - 8, "replica in phase with the input");
  endtask

  initial begin
    w_f0 = 16'(int'($floor($cos(2.0 * PI * FN * 1.01) * 32768.0 + 0.5)));
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (LOCK) @(posedge clk);
    measure(12000.0);
    amp = 8000.0;
    repeat (40000) @(posedge clk);
    measure(8000.0);
    check(n_up > 0 && n_dn > 0, "detector pulses both ways");
    check(n_hi > 0 && n_lo > 0, "amplitude word both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (LOCK + 60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
