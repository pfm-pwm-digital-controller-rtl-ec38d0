`timescale 1ps/1ps
// tap_mux: the 2**P:1 multiplexer that picks one node of a delay line.
//
// Four of these select the replicas p1..p4 of the base clock in the
// modulator (pointers s1..s4), and two pick the delayed copies of the gate
// signals in the dead-time block.  Purely combinational: out = taps[sel].
module tap_mux #(
  parameter int unsigned P = 7
) (
  input  logic [2**P-1:0] taps,
  input  logic [P-1:0]    sel,
  output logic            out
);
  always_comb out = taps[sel];
endmodule
