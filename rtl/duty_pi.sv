`timescale 1ps/1ps
// duty_pi: PI compensator of the duty-cycle loop.
//
// Produces the high-side duty-cycle command d (D = d / 2**D_W).
// Incremental PI law, run once per enabled sample:
//   acc <- sat( acc + KP*(e[n] - e[n-1]) + KI*e[n] ),  d = acc / 2**FRAC
// A positive residual error (output slightly high) raises D, which lowers
// the gain of the asymmetrically driven converter while its load is heavier
// than the critical load.  acc saturates at D_LO (D_min) and D_HI (D_max);
// at_dmin / at_dmax flag the limits.  preset loads D_INIT (50 %) and clears
// the error history.  Gains and limits are this design's choices; the
// duty loop is kept slower than the frequency loop by a small KI and by the
// governor enabling it only every few samples.
// Timing: d is a register, updated in the cycle after en.
module duty_pi #(
  parameter int unsigned E_W    = llc_pkg::L_W + 1,
  parameter int unsigned D_W    = llc_pkg::D_W,
  parameter int unsigned FRAC   = 4,
  parameter int          KP     = 8,
  parameter int          KI     = 16,
  parameter int unsigned D_INIT = llc_pkg::D_HALF,
  parameter int unsigned D_LO   = llc_pkg::D_MIN,
  parameter int unsigned D_HI   = llc_pkg::D_MAX
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  preset,
  input  logic                  en,
  input  logic signed [E_W-1:0] err,
  output logic [D_W-1:0]        d,
  output logic                  at_dmin,
  output logic                  at_dmax
);
  localparam int unsigned A_W = D_W + FRAC + 2;
  localparam logic signed [A_W-1:0] A_LO   = A_W'(D_LO * 2**FRAC);
  localparam logic signed [A_W-1:0] A_HI   = A_W'(D_HI * 2**FRAC);
  localparam logic signed [A_W-1:0] A_INIT = A_W'(D_INIT * 2**FRAC);

  logic signed [A_W-1:0] acc, acc_n;
  logic signed [E_W-1:0] e_prev;
  logic signed [E_W:0]   de;

  always_comb begin
    de    = (E_W+1)'(err) - (E_W+1)'(e_prev);
    acc_n = acc + A_W'(KP) * A_W'(de) + A_W'(KI) * A_W'(err);
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
    d       = D_W'(acc >>> FRAC);
    at_dmin = (acc <= A_LO);
    at_dmax = (acc >= A_HI);
  end
endmodule
