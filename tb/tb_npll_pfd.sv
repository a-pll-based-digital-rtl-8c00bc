// tb_npll_pfd: self-checking test of the phase-frequency detector.
//
// The reference model treats the detector as a counter of rising edges,
// +1 for ref and -1 for osc, held within -1..+1; its value one clock later
// is the expected output.  Directed phases (ref leading by 3 samples, osc
// leading by 2), a frequency offset and random square waves are applied.
module tb_npll_pfd;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ref_sq = 1'b0, osc_sq = 1'b0;
  npll_pkg::pd_err_t e;
  int checks = 0, failures = 0;
  int cnt, cyc, n_up, n_dn;
  logic ref_d, osc_d;

  npll_pfd dut (.clk, .rst_n, .ref_sq, .osc_sq, .e);

  always #5 clk = ~clk;

  // reference model: saturating edge counter
  always @(posedge clk) begin
    if (!rst_n) begin
      cnt = 0; ref_d = 1'b0; osc_d = 1'b0;
    end else begin
      if (ref_sq && !ref_d) cnt = cnt + 1;
      if (osc_sq && !osc_d) cnt = cnt - 1;
      if (cnt > 1)  cnt = 1;
      if (cnt < -1) cnt = -1;
      ref_d = ref_sq; osc_d = osc_sq;
    end
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (int'(e) != cnt) begin
      failures++;
      if (failures < 10) $display("FAIL cyc %0d: e=%0d expected %0d", cyc, e, cnt);
    end
    if (e == 2'sd1)  n_up++;
    if (e == -2'sd1) n_dn++;
  end

  task automatic run_sq(input int p_ref, input int p_osc, input int off, input int n);
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      #1;
      ref_sq = ((i % p_ref) < p_ref / 2);
      osc_sq = (((i + p_ref - off) % p_osc) < p_osc / 2);
      cyc++;
    end
  endtask

  initial begin
    cyc = 0; n_up = 0; n_dn = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run_sq(20, 20, 3, 200);      // osc lags by 3: e = +1 pulses
    check_count(n_up > 0 && n_dn == 0, "ref leading gives only +1");
    n_up = 0; n_dn = 0;
    run_sq(20, 20, -2, 200);     // osc leads by 2
    n_up = 0; n_dn = 0;
    run_sq(20, 20, -2, 200);
    check_count(n_dn > 0 && n_up == 0, "osc leading gives only -1");
    n_up = 0; n_dn = 0;
    run_sq(20, 16, 0, 400);      // osc faster
    check_count(n_dn > n_up, "faster osc gives mostly -1");
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      #1;
      ref_sq = $urandom % 4 == 0 ? ~ref_sq : ref_sq;
      osc_sq = $urandom % 4 == 0 ? ~osc_sq : osc_sq;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_count(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
