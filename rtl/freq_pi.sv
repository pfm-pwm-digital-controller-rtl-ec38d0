`timescale 1ps/1ps
// freq_pi: PI compensator of the frequency loop.
//
// Produces the switching-period command t_sw (delay elements; the period
// is this design's digital representation of the switching frequency).
// Incremental PI law, run once per enabled sample:
//   acc <- sat( acc - KP*(e[n] - e[n-1]) - KI*e[n] ),  t_sw = acc / 2**FRAC
// A positive error (output too high) shortens the period, i.e. raises the
// switching frequency, which lowers the LLC gain.  acc saturates at the
// period limits T_LO (f_max) and T_HI (f_min); at_fmax flags the f_max
// limit for the override logic.  preset (start-up, open loop) loads T_INIT
// and clears the error history.  The gains are this design's choice; the
// compensator type (PI) and the limits are the converter's.
// Timing: t_sw is a register, updated in the cycle after en.
module freq_pi #(
  parameter int unsigned E_W    = llc_pkg::M_W + 1,
  parameter int unsigned T_W    = llc_pkg::ON_W,
  parameter int unsigned FRAC   = 4,
  parameter int          KP     = 16,
  parameter int          KI     = 8,
  parameter int unsigned T_INIT = llc_pkg::T_R,
  parameter int unsigned T_LO   = llc_pkg::T_SW_MIN,
  parameter int unsigned T_HI   = llc_pkg::T_SW_MAX
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  preset,
  input  logic                  en,
  input  logic signed [E_W-1:0] err,
  output logic [T_W-1:0]        t_sw,
  output logic                  at_fmax,
  output logic                  at_fmin
);
  localparam int unsigned A_W = T_W + FRAC + 2;
  localparam logic signed [A_W-1:0] A_LO   = A_W'(T_LO * 2**FRAC);
  localparam logic signed [A_W-1:0] A_HI   = A_W'(T_HI * 2**FRAC);
  localparam logic signed [A_W-1:0] A_INIT = A_W'(T_INIT * 2**FRAC);

  logic signed [A_W-1:0] acc, acc_n;
  logic signed [E_W-1:0] e_prev;
  logic signed [E_W:0]   de;

  always_comb begin
    de    = (E_W+1)'(err) - (E_W+1)'(e_prev);
    acc_n = acc - A_W'(KP) * A_W'(de) - A_W'(KI) * A_W'(err);
    if (acc_n < A_LO) acc_n = A_LO;
    if (acc_n > A_HI) acc_n = A_HI;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= A_INIT;
      e_prev <= '0;
    end else if (preset) begin
      acc    <= A_INIT;
      e_prev <= '0;
    end else if (en) begin
      acc    <= acc_n;
      e_prev <= err;
    end
  end

  always_comb begin
    t_sw    = T_W'(acc >>> FRAC);
    at_fmax = (acc <= A_LO);
    at_fmin = (acc >= A_HI);
  end
endmodule
