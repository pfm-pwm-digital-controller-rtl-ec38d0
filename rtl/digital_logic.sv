`timescale 1ps/1ps
// digital_logic: converts the switching-period command t_sw and the duty
// command d into the two on-time commands of the modulator:
//   hs = round(t_sw * d / 2**D_W),  ls = t_sw - hs
// (all times in delay elements).  The function is the controller's; the
// rounding multiply is this design's.
// Timing: one register stage; hs_on/ls_on follow t_sw/d by one clk.
module digital_logic #(
  parameter int unsigned T_W = llc_pkg::ON_W,
  parameter int unsigned D_W = llc_pkg::D_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [T_W-1:0] t_sw,
  input  logic [D_W-1:0] d,
  output logic [T_W-1:0] hs_on,
  output logic [T_W-1:0] ls_on
);
  logic [T_W+D_W-1:0] prod;
  logic [T_W-1:0]     hs_n;

  always_comb begin
    prod = (T_W+D_W)'(t_sw) * (T_W+D_W)'(d) + (T_W+D_W)'(2**(D_W-1));
    hs_n = T_W'(prod >> D_W);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs_on <= '0;
      ls_on <= '0;
    end else begin
      hs_on <= hs_n;
      ls_on <= t_sw - hs_n;
    end
  end
endmodule
