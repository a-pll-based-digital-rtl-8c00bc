// tb_residue_cmp: self-checking test of the residue subtractor.
//
// Random 12+3-bit pairs, half of them close together, are applied; the
// expected residue is floor((z - x^)/8) clipped to -32..31.
module tb_residue_cmp;
  logic signed [14:0] z, x_hat;
  logic signed [5:0] r;
  int checks = 0, failures = 0, n_sat = 0, ex, d;

  residue_cmp dut (.z, .x_hat, .r);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      z = 15'($urandom);
      if (i % 2 == 0) x_hat = 15'($urandom);
      else            x_hat = 15'(int'(z) + int'($urandom % 601) - 300);
      #1;
      d = int'(z) - int'(x_hat);
      ex = (d >= 0) ? d / 8 : -((-d + 7) / 8);
      if (ex > 31)  begin ex = 31;  n_sat++; end
      if (ex < -32) begin ex = -32; n_sat++; end
      checks++;
      if (int'(r) != ex) begin
        failures++;
        if (failures < 10) $display("FAIL: z=%0d x=%0d r=%0d expected %0d", z, x_hat, r, ex);
      end
      #1;
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
