// tb_edge_div: self-checking test of the edge-counting divider.
//
// For m = 1..6 a square wave of random period is applied; the testbench
// checks that the divided wave's period is m times the input's and that
// every rising edge of div comes on the clock that samples a rising edge
// of the input.
module tb_edge_div;
  logic clk = 1'b0, rst_n = 1'b0, sq = 1'b0, div;
  logic [3:0] m = 4'd1;
  int checks = 0, failures = 0;

  edge_div dut (.clk, .rst_n, .sq, .m, .div);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int per, last_rise, nrise;
    logic div_d, sq_d;
    for (int mm = 1; mm <= 6; mm++) begin
      rst_n = 1'b0;
      m = 4'(mm);
      per = 6 + 2 * int'($urandom % 5);
      sq = 1'b0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      last_rise = -1; nrise = 0; div_d = 1'b0; sq_d = 1'b0;
      for (int i = 0; i < per * mm * 8; i++) begin
        sq = ((i % per) < per / 2);
        @(posedge clk);
        #1;
        if (div && !div_d) begin
          // div toggles on the clock that samples the input edge
          check(sq && !sq_d, $sformatf("m=%0d: div rises on a rising input edge", mm));
          if (last_rise >= 0)
            check(i - last_rise == per * mm, $sformatf("m=%0d: period %0d expected %0d", mm, i - last_rise, per * mm));
          last_rise = i;
          nrise++;
        end
        div_d = div;
        sq_d = sq;
      end
      check(nrise >= 6, $sformatf("m=%0d: divided wave runs", mm));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
