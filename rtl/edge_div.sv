// edge_div: frequency divider (DIV) of the frequency-multiplying PLL.
//
// It counts the edges, rising and falling, of the oscillator's square wave
// and toggles its own output every m edges, so the output has 1/m of the
// input frequency and a 50 % duty cycle for odd m as well.  The first edge
// after reset toggles the output, and the first edge is a rising one (the
// input is taken as low before reset ends), so every rising edge of div
// falls on a rising edge of the input whatever m is.  A PLL that locks the
// rising edges of div to those of its reference therefore puts its
// oscillator in phase with sin(m w t) for even m as well as for odd m.
// The divider is built as an edge counter as the reference design states;
// counting both edges, the phase rule, the run-time ratio input and the
// reset state are this design's choices.  m = 0 is treated as 1.
//
// Timing: div is a register and toggles on the clock after the input edge
// that completes the count.
module edge_div #(
  parameter int M_W = 4          // width of the division ratio
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sq,     // oscillator square wave
  input  logic [M_W-1:0] m,      // division ratio (harmonic number k)
  output logic           div     // divided square wave
);

  logic           sq_d;
  logic [M_W-1:0] cnt;   // edges still to count before the next toggle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq_d <= 1'b0;
      cnt  <= '0;
      div  <= 1'b0;
    end else begin
      sq_d <= sq;
      if (sq != sq_d) begin
        if (cnt == '0) begin
          cnt <= (m == '0) ? '0 : m - M_W'(1);
          div <= ~div;
        end else begin
          cnt <= cnt - M_W'(1);
        end
      end
    end
  end

endmodule
