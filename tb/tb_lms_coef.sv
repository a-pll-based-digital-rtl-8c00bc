// tb_lms_coef: self-checking test of the coefficient estimator.
//
// Two instances, DIR = +1 and DIR = -1, see the same random residue and
// tone signs, with a bias so that the signs agree 70 % of the time.  The
// testbench keeps its own count (+1 for agreeing signs, -1 otherwise,
// times DIR), checks theta = floor(count/2**GAMMA_SH) each clock, that the two
// instances move in opposite directions, and that theta holds while est
// is low.
module tb_lms_coef;
  localparam int GAMMA_SH = 5;
  localparam int STEP = 2 ** GAMMA_SH;
  logic clk = 1'b0, rst_n = 1'b0, est = 1'b0, r_neg = 1'b0, ref_neg = 1'b0;
  logic signed [15:0] th_p, th_n;
  int checks = 0, failures = 0, acc;

  lms_coef #(.GAMMA_SH(GAMMA_SH), .DIR(1))  dut_p (.clk, .rst_n, .est, .r_neg, .ref_neg, .theta(th_p));
  lms_coef #(.GAMMA_SH(GAMMA_SH), .DIR(-1)) dut_n (.clk, .rst_n, .est, .r_neg, .ref_neg, .theta(th_n));

  always #5 clk = ~clk;

  function automatic int floordiv(input int a, input int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic signed [15:0] hold_p;
    acc = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    est = 1'b1;
    for (int i = 0; i < 40000; i++) begin
      r_neg   = 1'($urandom);
      ref_neg = ($urandom % 10 < 7) ? r_neg : ~r_neg;
      if (i >= 20000 && i < 24000) est = 1'b0;
      else                         est = 1'b1;
      @(posedge clk);
      if (est) acc += (r_neg == ref_neg) ? 1 : -1;
      #1;
      check(int'(th_p) == floordiv(acc, STEP), $sformatf("theta %0d expected %0d", th_p, floordiv(acc, STEP)));
      check(int'(th_n) == floordiv(-acc, STEP), $sformatf("theta(DIR=-1) %0d expected %0d", th_n, floordiv(-acc, STEP)));
    end
    check(th_p > 50 && th_n < -50, "opposite directions, both moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
