// tb_m_npll: self-checking test of the frequency-multiplying NPLL.
//
// Two instances, m = 2 and m = 3, track a clean sine at 211/4096 of the
// sample rate, starting with free-running words 1 % off.  After the lock
// time the testbench checks over a 4096-sample window that each oscillator
// makes m times the input's zero crossings, that each rising crossing of
// the input coincides within one sample with a rising crossing of the
// oscillator (so x_I follows sin(m w n)), and that the mean frequency
// word equals cos(2*pi*m*f) within 8 LSB.
module tb_m_npll;
  localparam real PI   = 3.14159265358979;
  localparam real FN   = 211.0 / 4096.0;
  localparam int  LOCK = 150000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [14:0] y = '0;
  logic signed [3:2][14:0] x_i;
  logic signed [3:2][19:0] x_q;
  logic signed [3:2][15:0] w_f0, w_f, psi;
  logic [3:2] div;
  int checks = 0, failures = 0, cyc = 0;

  for (genvar k = 2; k <= 3; k++) begin : g
    m_npll dut (.clk, .rst_n, .y, .w_f0(w_f0[k]), .m(4'(k)), .x_i(x_i[k]),
                .x_q(x_q[k]), .w_f(w_f[k]), .psi(psi[k]), .div(div[k]));
  end

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    y <= 15'(int'($floor(12000.0 * $sin(2.0 * PI * FN * real'(cyc + 1)) + 0.5)));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real wf_sum[3:2];
    int  ncr[3:2], yr, aligned[3:2], last_x_rise[3:2], pend[3:2];
    logic yn_d;
    logic [3:2] xn_d;
    for (int k = 2; k <= 3; k++)
      w_f0[k] = 16'(int'($floor($cos(2.0 * PI * FN * real'(k) * 1.01) * 32768.0 + 0.5)));
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (LOCK) @(posedge clk);
    #1;
    yr = 0;
    yn_d = y[14];
    for (int k = 2; k <= 3; k++) begin
      wf_sum[k] = 0.0; ncr[k] = 0; aligned[k] = 0; last_x_rise[k] = -100; pend[k] = -100;
      xn_d[k] = x_i[k][14];
    end
    for (int n = 0; n < 4096; n++) begin
      @(posedge clk);
      #1;
      if (yn_d && !y[14]) yr++;
      for (int k = 2; k <= 3; k++) begin
        wf_sum[k] += real'(w_f[k]);
        if (x_i[k][14] != xn_d[k]) ncr[k]++;
        if (xn_d[k] && !x_i[k][14]) begin
          last_x_rise[k] = n;
          if (n - pend[k] <= 1) begin aligned[k]++; pend[k] = -100; end
        end
        if (yn_d && !y[14]) begin
          if (n - last_x_rise[k] <= 1) aligned[k]++;
          else pend[k] = n;
        end
        xn_d[k] = x_i[k][14];
      end
      yn_d = y[14];
    end
    for (int k = 2; k <= 3; k++) begin
      $display("m=%0d: crossings %0d (input rises %0d), aligned %0d, mean w_f %0.1f (exp %0.1f)",
               k, ncr[k], yr, aligned[k], wf_sum[k] / 4096.0, $cos(2.0 * PI * FN * real'(k)) * 32768.0);
      check(ncr[k] >= 2 * k * yr - 2 && ncr[k] <= 2 * k * yr + 2, $sformatf("m=%0d frequency", k));
      check(aligned[k] >= yr - 2, $sformatf("m=%0d phase", k));
      check(wf_sum[k] / 4096.0 > $cos(2.0 * PI * FN * real'(k)) * 32768.0 - 8.0 &&
            wf_sum[k] / 4096.0 < $cos(2.0 * PI * FN * real'(k)) * 32768.0 + 8.0,
            $sformatf("m=%0d frequency word", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (LOCK + 10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
