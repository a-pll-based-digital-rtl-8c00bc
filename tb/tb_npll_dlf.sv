// tb_npll_dlf: self-checking test of the PI loop filter.
//
// Random detector outputs (with runs long enough to drive the accumulator
// into saturation) are applied; the expected accumulator is a plain integer
// sum clipped to 16 bits, and the expected frequency word
// w_f0 - 64*e - floor(psi/32), clipped to 16 bits, is checked every clock.
module tb_npll_dlf;
  logic clk = 1'b0, rst_n = 1'b0;
  npll_pkg::pd_err_t e = '0;
  logic signed [15:0] w_f0 = 16'sd30000, psi, w_f;
  int checks = 0, failures = 0, psi_m, wf_m, n_sat_hi, n_sat_lo;

  npll_dlf dut (.clk, .rst_n, .e, .w_f0, .psi, .w_f);

  always #5 clk = ~clk;

  function automatic int clip16(input int v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

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
    psi_m = 0; n_sat_hi = 0; n_sat_lo = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 200000; i++) begin
      // long biased runs reach both saturation limits
      if (i < 60000)       e = ($urandom % 3 == 0) ? 2'sd0 : 2'sd1;
      else if (i < 170000) e = ($urandom % 3 == 0) ? 2'sd0 : -2'sd1;
      else                 e = 2'($signed(int'($urandom % 3) - 1));
      w_f0 = 16'($urandom % 65536);
      #1;
      wf_m = clip16(int'(w_f0) - 64 * int'(e) - floordiv(psi_m, 32));
      check(psi == 16'(psi_m), $sformatf("psi %0d expected %0d", psi, psi_m));
      check(int'(w_f) == wf_m, $sformatf("w_f %0d expected %0d", w_f, wf_m));
      @(posedge clk);
      psi_m = clip16(psi_m + int'(e));
      if (psi_m == 32767)  n_sat_hi++;
      if (psi_m == -32768) n_sat_lo++;
      #1;
    end
    check(n_sat_hi > 0 && n_sat_lo > 0, "accumulator reached both limits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (250000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
