// tb_dwo_nco: self-checking test of the waveguide oscillator.
//
// With w_a = 1 and w_f = cos(2*pi*0.05) the outputs are compared sample
// by sample with the ideal tone x_I = A*cos(w n), x_Q = A*cot(w/2)*sin(w n)
// (A the reset amplitude, w the angle of the quantised w_f) over 3000
// samples; the zero-crossing count gives the frequency.  Then w_a slightly
// above and below one must make the tone grow and decay.
module tb_dwo_nco;
  localparam real PI = 3.14159265358979;
  localparam int  A  = 4096;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] w_f;
  logic [15:0] w_a = 16'd32768;
  logic signed [14:0] x_i;
  logic signed [19:0] x_q;
  int checks = 0, failures = 0;

  dwo_nco dut (.clk, .rst_n, .w_f, .w_a, .x_i, .x_q);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic peak(input int n, output int p);
    p = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      #1;
      if (x_i > p) p = x_i;
      if (-x_i > p) p = -x_i;
    end
  endtask

  initial begin
    real w, k, ei, eq;
    int ncross, p0, p1, p2, pd;
    logic neg_d;
    w_f = 16'(int'($floor($cos(2.0 * PI * 0.05) * 32768.0 + 0.5)));
    w = $acos(real'(w_f) / 32768.0);
    k = $sin(w) / (1.0 - $cos(w));
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    ncross = 0;
    neg_d = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      ei = real'(A) * $cos(w * real'(n));
      eq = real'(A) * k * $sin(w * real'(n));
      check(real'(x_i) > ei - 0.01 * A - 2.0 && real'(x_i) < ei + 0.01 * A + 2.0,
            $sformatf("x_i[%0d] = %0d, expected %0.1f", n, x_i, ei));
      check(real'(x_q) > eq - 0.01 * A * k - 2.0 && real'(x_q) < eq + 0.01 * A * k + 2.0,
            $sformatf("x_q[%0d] = %0d, expected %0.1f", n, x_q, eq));
      if (x_i[14] != neg_d) ncross++;
      neg_d = x_i[14];
      @(posedge clk);
      #1;
    end
    // 3000 samples at 0.05 cycles per sample: 150 cycles, 300 crossings
    check(ncross >= 299 && ncross <= 301, $sformatf("zero crossings %0d", ncross));
    peak(40, p0);
    w_a = 16'd32768 + 16'd160;   // about +0.5 %
    peak(400, pd);
    peak(40, p1);
    check(p1 > p0 + p0 / 4, $sformatf("w_a > 1 grows the tone: %0d -> %0d", p0, p1));
    w_a = 16'd32768 - 16'd160;
    peak(400, pd);
    peak(40, p2);
    check(p2 < p1 - p1 / 4, $sformatf("w_a < 1 shrinks the tone: %0d -> %0d", p1, p2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
