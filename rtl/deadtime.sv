`timescale 1ps/1ps
// deadtime: programmable dead-time generator.
//
// Delays the rising edge of each gate signal by dt_sel delay elements while
// passing its falling edge at once:  c1 = hs & hs_delayed,
// c2 = ls & ls_delayed.  Because hs and ls are complementary, both switches
// are off for dt_sel elements around every transition, which leaves the
// resonant current time to swing the half-bridge node (zero-voltage
// switching).  The delays come from a delay chain of the same elements as
// the modulator and a tap multiplexer.  en low forces both gates off.
// Only the block's purpose is given by the controller description; this
// rising-edge-delay structure is this design's.
module deadtime #(
  parameter int unsigned DT_W   = llc_pkg::DT_W,
  parameter int unsigned TDE_PS = llc_pkg::TDE_PS
) (
  input  logic            en,
  input  logic            hs,
  input  logic            ls,
  input  logic [DT_W-1:0] dt_sel,
  output logic            c1,
  output logic            c2
);
  logic [2**DT_W-1:0] hs_taps, ls_taps;
  logic               hs_d, ls_d;

  delay_chain #(.N(DT_W), .TDE_PS(TDE_PS)) u_hs_dl (.in(hs), .taps(hs_taps));
  delay_chain #(.N(DT_W), .TDE_PS(TDE_PS)) u_ls_dl (.in(ls), .taps(ls_taps));
  tap_mux     #(.P(DT_W)) u_hs_mux (.taps(hs_taps), .sel(dt_sel), .out(hs_d));
  tap_mux     #(.P(DT_W)) u_ls_mux (.taps(ls_taps), .sel(dt_sel), .out(ls_d));

  always_comb begin
    c1 = en & hs & hs_d;
    c2 = en & ls & ls_d;
  end
endmodule
