// tb_poly_corrector: self-checking test of the polynomial corrector.
//
// Random codes and coefficients (including the extreme codes and
// coefficients large enough to saturate) are applied; the expected output
// is computed in floating point as y + sum theta_k/2^15 * y^k / 2048^(k-1),
// saturated, and must match z to within one 12+3 LSB and z12 to within one
// code.  The output must appear one clock after the input.
module tb_poly_corrector;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [11:0] y = '0;
  logic signed [3:2][15:0] theta = '0;
  logic signed [14:0] z;
  logic signed [11:0] z12;
  int checks = 0, failures = 0, n_sat = 0;

  poly_corrector dut (.clk, .rst_n, .y, .theta, .z, .z12);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real yn, ex, ex12;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      case (i % 8)
        0: y = 12'sh7FF;
        1: y = 12'sh800;
        default: y = 12'($urandom);
      endcase
      if (i < 10000) begin
        theta[2] = 16'(int'($urandom % 2001) - 1000);
        theta[3] = 16'(int'($urandom % 2001) - 1000);
      end else begin
        theta[2] = 16'($urandom);
        theta[3] = 16'($urandom);
      end
      yn = real'(y) / 2048.0;
      ex = real'(y) + real'($signed(theta[2])) / 32768.0 * yn * yn * 2048.0
                    + real'($signed(theta[3])) / 32768.0 * yn * yn * yn * 2048.0;
      ex12 = ex;
      ex = ex * 8.0;
      if (ex > 16383.0)  begin ex = 16383.0;  n_sat++; end
      if (ex < -16384.0) begin ex = -16384.0; n_sat++; end
      if (ex12 > 2047.0)  ex12 = 2047.0;
      if (ex12 < -2048.0) ex12 = -2048.0;
      @(posedge clk);
      #1;
      check(real'(z) >= ex - 1.01 && real'(z) <= ex + 1.01,
            $sformatf("y=%0d th=%0d,%0d: z=%0d expected %0.2f", y, $signed(theta[2]), $signed(theta[3]), z, ex));
      check(real'(z12) >= ex12 - 1.01 && real'(z12) <= ex12 + 1.01,
            $sformatf("z12=%0d expected %0.2f", z12, ex12));
    end
    check(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
