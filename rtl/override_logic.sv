`timescale 1ps/1ps
// override_logic: override and optimisation routines of the controller.
//
// The PI compensators assume a monotonic plant; this block watches the
// error signals and the limit flags of both control variables and, when
// needed, replaces a compensator input by a predetermined value of known
// sign (err_or for the frequency loop, res_or for the duty loop):
//   OR_OPT  optimisation: a nonzero coarse error starts it; res_or is
//           negative so the duty cycle walks down to 50 %; it ends when D
//           reaches D_min (50 %).
//   OR_DMIN D at D_min while the residual error is negative (light load,
//           where the gain is not monotonic in D): err_or is negative so the
//           frequency slowly falls and the output rises; ends when the
//           residual error turns positive.
//   OR_DMAX D at D_max with a positive residual error: err_or positive
//           (frequency slowly rises) until the residual error turns negative.
//   OR_FMAX f at f_max with a positive coarse error: res_or positive (duty
//           slowly rises) until the coarse error is gone or D hits D_max.
// OPT and DMIN follow the control description; the description states that
// D_max and f_max routines exist but not what they do, so DMAX and FMAX are
// this design's mirror images of DMIN.  The magnitudes ERR_OR and RES_OR
// are this design's choice.  At most one routine is in force.
// Timing: the state changes on the clock after an enabled sample strobe;
// en low (not in closed loop) clears it.  mux_f / mux_d request that the
// frequency / duty compensator take the override value.
module override_logic #(
  parameter int unsigned M_E    = llc_pkg::M_W + 1,
  parameter int unsigned L_E    = llc_pkg::L_W + 1,
  parameter int unsigned ERR_OR = 1,
  parameter int unsigned RES_OR = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  smp,
  input  logic signed [M_E-1:0] v_err,
  input  logic signed [L_E-1:0] v_err_res,
  input  logic                  d_at_min,
  input  logic                  d_at_max,
  input  logic                  f_at_max,
  output llc_pkg::or_mode_e     mode,
  output logic                  mux_f,
  output logic                  mux_d,
  output logic signed [M_E-1:0] err_or,
  output logic signed [L_E-1:0] res_or
);
  import llc_pkg::*;

  or_mode_e mode_n;

  always_comb begin
    mode_n = mode;
    unique case (mode)
      OR_NONE: begin
        if (v_err > 0 && f_at_max)                        mode_n = OR_FMAX;
        else if (v_err != 0 && !d_at_min)                 mode_n = OR_OPT;
        else if (v_err == 0 && v_err_res < 0 && d_at_min) mode_n = OR_DMIN;
        else if (v_err == 0 && v_err_res > 0 && d_at_max) mode_n = OR_DMAX;
      end
      OR_OPT: begin
        if (v_err > 0 && f_at_max) mode_n = OR_FMAX;
        else if (d_at_min)         mode_n = OR_NONE;
      end
      OR_DMIN:
        if (v_err != 0 || v_err_res > 0) mode_n = OR_NONE;
      OR_DMAX:
        if (v_err != 0 || v_err_res < 0) mode_n = OR_NONE;
      OR_FMAX:
        if (v_err <= 0 || d_at_max) mode_n = OR_NONE;
      default: mode_n = OR_NONE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      mode <= OR_NONE;
    else if (!en)    mode <= OR_NONE;
    else if (smp)    mode <= mode_n;
  end

  always_comb begin
    mux_f  = (mode == OR_DMIN) || (mode == OR_DMAX);
    mux_d  = (mode == OR_OPT)  || (mode == OR_FMAX);
    err_or = '0;
    res_or = '0;
    unique case (mode)
      OR_DMIN: err_or = -$signed(M_E'(ERR_OR));
      OR_DMAX: err_or =  $signed(M_E'(ERR_OR));
      OR_OPT:  res_or = -$signed(L_E'(RES_OR));
      OR_FMAX: res_or =  $signed(L_E'(RES_OR));
      default: ;
    endcase
  end
endmodule
