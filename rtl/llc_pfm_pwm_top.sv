`timescale 1ps/1ps
// llc_pfm_pwm_top: hybrid PFM-PWM digital controller for a half-bridge LLC
// resonant converter.
//
// One sampled output voltage drives two loops at once.  The coarse (MSB)
// part of the voltage error moves the switching frequency (PFM, fast loop);
// the fine (LSB) residual error moves the duty cycle of the asymmetric
// half-bridge drive (PWM, slow fine-tuning loop).  Because the gain of an
// asymmetrically driven LLC stage is not monotonic in the duty cycle at
// light load, an override block can replace either compensator's input by
// a fixed value of known sign, and an optimisation routine walks the duty
// cycle back to 50 % after every coarse disturbance.  A governor runs a
// soft start (frequency down from 1.8 f_r, duty up from zero) before the
// loops close.  The gate signals come from a delay-line modulator that sets
// period and duty with the resolution of one delay element, followed by a
// programmable dead time.
//
// Data path per switching cycle (clk = clk_base, ~20 MHz):
//   rise of hs (cyc) -> ADC word registered (adc_smp marks the instant)
//   -> error_split -> freq_pi / duty_pi (+ override_logic, sys_governor)
//   -> digital_logic -> on-time commands, taken by the modulator at the
//   next rise of hs.  The control law therefore updates once per switching
//   cycle.
// The block partitioning and signal names follow the controller's block
// diagram; the single clock taken from the modulator's ring oscillator and
// the once-per-cycle sampling are this design's choices.
//
// Ports: rst_n (async, active low; also starts the ring oscillator),
// cntrl (start / loop_en / duty_en), ref_m / ref_l (MSB and LSB references),
// adc_data (10-bit output-voltage sample, latched in the clk_base cycle in
// which adc_smp is high), ss_cycles (switching cycles per soft-start step),
// dt_sel (dead time in delay elements), c1 / c2 (high- and low-side gate
// drives); the rest are status outputs.
module llc_pfm_pwm_top #(
  parameter int unsigned SS_LOG   = 6,
  parameter int unsigned DUTY_DIV = 4
) (
  input  logic                         rst_n,
  input  llc_pkg::cntrl_t              cntrl,
  input  logic [llc_pkg::M_W-1:0]      ref_m,
  input  logic [llc_pkg::L_W-1:0]      ref_l,
  input  logic [llc_pkg::ADC_W-1:0]    adc_data,
  input  logic [7:0]                   ss_cycles,
  input  logic [llc_pkg::DT_W-1:0]     dt_sel,
  output logic                         clk_base,
  output logic                         adc_smp,
  output logic                         c1,
  output logic                         c2,
  output logic [llc_pkg::ON_W-1:0]     t_sw,
  output logic [llc_pkg::D_W-1:0]      duty,
  output logic                         err_m,
  output logic                         err_l,
  output llc_pkg::gov_state_e          gov_state,
  output llc_pkg::or_mode_e            or_mode
);
  import llc_pkg::*;

  logic               hs, ls, cyc, mod_mode;
  logic [VF_P-1:0]    s1, s2, s3, s4;
  logic [ADC_W-1:0]   v_smp;
  logic               smp;
  logic signed [M_W:0] v_err, err_or, f_err;
  logic signed [L_W:0] v_err_res, res_or, d_err;
  logic               mux_f_req, mux_d_req, mux_f, mux_d;
  logic               mod_en, ss, preset, or_en, fupd, dupd;
  logic [ON_W-1:0]    ss_hs, ss_ls, hs_dl, ls_dl, hs_cmd, ls_cmd;
  logic               at_fmax, at_fmin, at_dmin, at_dmax;

  // ---------------- modulator ----------------
  vfvdm u_vfvdm (
    .rst_n(rst_n), .run(mod_en), .hs_in(hs_cmd), .ls_in(ls_cmd),
    .clk_base(clk_base), .hs(hs), .ls(ls), .cyc(cyc), .mode(mod_mode),
    .s1(s1), .s2(s2), .s3(s3), .s4(s4)
  );

  // ---------------- sampling ----------------
  always_comb adc_smp = cyc;

  always_ff @(posedge clk_base or negedge rst_n) begin
    if (!rst_n) begin
      v_smp <= '0;
      smp   <= 1'b0;
    end else begin
      smp <= cyc;
      if (cyc) v_smp <= adc_data;
    end
  end

  error_split u_err (
    .v_smp(v_smp), .ref_m(ref_m), .ref_l(ref_l),
    .v_err(v_err), .v_err_res(v_err_res), .err_m(err_m), .err_l(err_l)
  );

  // ---------------- mode control ----------------
  override_logic u_or (
    .clk(clk_base), .rst_n(rst_n), .en(or_en), .smp(smp),
    .v_err(v_err), .v_err_res(v_err_res),
    .d_at_min(at_dmin), .d_at_max(at_dmax), .f_at_max(at_fmax),
    .mode(or_mode), .mux_f(mux_f_req), .mux_d(mux_d_req),
    .err_or(err_or), .res_or(res_or)
  );

  sys_governor #(.SS_LOG(SS_LOG), .DUTY_DIV(DUTY_DIV)) u_gov (
    .clk(clk_base), .rst_n(rst_n), .smp(smp), .cntrl(cntrl), .ss_cycles(ss_cycles),
    .v_err(v_err), .mux_f_req(mux_f_req), .mux_d_req(mux_d_req),
    .state(gov_state), .mod_en(mod_en), .ss(ss), .preset(preset), .or_en(or_en),
    .fupd(fupd), .dupd(dupd), .mux_f(mux_f), .mux_d(mux_d),
    .ss_hs(ss_hs), .ss_ls(ss_ls)
  );

  // ---------------- compensators ----------------
  always_comb begin
    f_err = mux_f ? err_or : v_err;
    d_err = mux_d ? res_or : v_err_res;
  end

  freq_pi u_fpi (
    .clk(clk_base), .rst_n(rst_n), .preset(preset), .en(fupd), .err(f_err),
    .t_sw(t_sw), .at_fmax(at_fmax), .at_fmin(at_fmin)
  );

  duty_pi u_dpi (
    .clk(clk_base), .rst_n(rst_n), .preset(preset), .en(dupd), .err(d_err),
    .d(duty), .at_dmin(at_dmin), .at_dmax(at_dmax)
  );

  digital_logic u_dl (
    .clk(clk_base), .rst_n(rst_n), .t_sw(t_sw), .d(duty),
    .hs_on(hs_dl), .ls_on(ls_dl)
  );

  always_comb begin
    hs_cmd = ss ? ss_hs : hs_dl;
    ls_cmd = ss ? ss_ls : ls_dl;
  end

  // ---------------- gate drive ----------------
  deadtime u_dt (
    .en(mod_en), .hs(hs), .ls(ls), .dt_sel(dt_sel), .c1(c1), .c2(c2)
  );
endmodule
