// npll_pfd: synchronous phase-frequency detector for two-level square waves.
//
// ref and osc are the sign bits (1 = positive half-wave) of the signal being
// tracked and of the oscillator (or of the divided oscillator).  A rising
// edge of ref sets UP, a rising edge of osc sets DN, and whichever edge
// arrives while the other flag is set clears that flag instead; edges on
// both inputs in the same sample cancel.  The output e is +1 while ref
// leads (UP), -1 while osc leads (DN), 0 otherwise.  Because it remembers
// which input switched first, it also drives the loop towards the right
// frequency when the two square waves differ in frequency.
//
// The tri-state +1/0/-1 behaviour is the reference behaviour; the
// rising-edge-only sensing and the reset to the neutral state are this
// design's choices.
// The assertion below is switched off during reset; that use of rst_n in
// a clocked expression is why lint reports rst_n as both synchronous and
// asynchronous.  The flip-flops themselves use it only as an asynchronous
// reset.
//
// Timing: inputs are sampled each clock; e is a register output and follows
// an input edge by one clock.
module npll_pfd (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ref_sq,  // square wave of the tracked signal
  input  logic                  osc_sq,  // square wave of the oscillator
  output npll_pkg::pd_err_t     e        // +1 ref leads, -1 osc leads, 0
);

  logic ref_d, osc_d, up, dn;
  logic ref_rise, osc_rise;

  assign ref_rise = ref_sq & ~ref_d;
  assign osc_rise = osc_sq & ~osc_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_d <= 1'b0;
      osc_d <= 1'b0;
      up    <= 1'b0;
      dn    <= 1'b0;
    end else begin
      ref_d <= ref_sq;
      osc_d <= osc_sq;
      if (ref_rise && !osc_rise) begin
        if (dn) dn <= 1'b0;
        else    up <= 1'b1;
      end else if (osc_rise && !ref_rise) begin
        if (up) up <= 1'b0;
        else    dn <= 1'b1;
      end
    end
  end

  assign e = up ? 2'sd1 : (dn ? -2'sd1 : 2'sd0);

  // UP and DN are never set together.
  a_excl : assert property (@(posedge clk) disable iff (!rst_n) !(up && dn));

endmodule
