`timescale 1ps/1ps
// delay_chain: behavioural model (not synthesizable) of a chain of 2**N
// standard-cell delay elements of TDE_PS each.  taps[0] is the input
// itself and taps[i] the input delayed by i elements (transport delay).
// Used by the dead-time generator.  Synthesis drops the # delays, so a
// synthesised netlist of this model has no cells and its taps carry no
// useful signal; in silicon or on an FPGA it is replaced by placed delay
// cells (the same element as the modulator's delay line).  Its length and
// element delay are this design's choices.
module delay_chain #(
  parameter int unsigned N      = 6,
  parameter int unsigned TDE_PS = 390
) (
  input  logic            in,
  output logic [2**N-1:0] taps
);
  always_comb taps[0] = in;
  for (genvar i = 1; i < 2**N; i++) begin : g_el
    // evaluates once at time zero, then on every input change
    always begin
      taps[i] <= #(TDE_PS) taps[i-1];
      @(taps[i-1]);
    end
  end
endmodule
