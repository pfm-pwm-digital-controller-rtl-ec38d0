`timescale 1ps/1ps
// dl_ring_osc: behavioural model (not synthesizable) of the delay-line ring
// oscillator that clocks the modulator and supplies its delayed replicas.
//
// The real part is a ring of standard-cell delay elements closed by an
// inverter; its nodes are the taps.  This model produces the base clock
// clk_base with a period of 2**P delay elements and 2**P taps, tap i being
// clk_base delayed by (i + 1/2) elements, so the taps cover one full clock
// period in steps of one element.  The half-element offset is this model's
// choice: it keeps every tap edge strictly inside a base-clock cycle, so a
// flip-flop clocked by any tap samples a signal launched by clk_base a
// whole cycle earlier without a race.  A physical ring of 2**(P-1) elements
// gives the second half of the taps from the inverted nodes.
//
// Interface: en stops the oscillator (clk_base held low) when low.
// Timing: clk_base period = 2**P * TDE_PS ps (49.92 ns, ~20 MHz, at the
// defaults).
module dl_ring_osc #(
  parameter int unsigned P      = 7,
  parameter int unsigned TDE_PS = 390
) (
  input  logic            en,
  output logic            clk_base,
  output logic [2**P-1:0] taps
);
  localparam int unsigned HALF_PS = (2**P) * TDE_PS / 2;

  initial clk_base = 1'b0;

  always begin
    #(HALF_PS);
    clk_base = en ? ~clk_base : 1'b0;
  end

  // first element: half a delay, then one element per tap
  // Each element also evaluates once at time zero, so the line holds its
  // input's value from the start instead of an arbitrary power-up state.
  always begin
    taps[0] <= #(TDE_PS / 2) clk_base;
    @(clk_base);
  end
  for (genvar i = 1; i < 2**P; i++) begin : g_el
    always begin
      taps[i] <= #(TDE_PS) taps[i-1];
      @(taps[i-1]);
    end
  end
endmodule
