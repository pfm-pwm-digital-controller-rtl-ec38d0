`timescale 1ps/1ps
// tb_llc_pfm_pwm_top: end-to-end test of the PFM-PWM controller, all
// parameters at their defaults, closed around an averaged model of the
// half-bridge LLC power stage and its ADC.
//
// Plant model (evaluated once per switching cycle, at each rising edge of
// the high-side gate c1; frequency and duty are measured from the gate
// waveforms, not read from the controller):
//   v_target = Vin * 0.45 * gf(f) * gd(D) * load
//   gf(f)    = 1 / (1 + 1.5 (f/f_r - 1))                 (f_r = 1 MHz)
//   gd(D)    = sin(pi D)            for D < 0.5
//            = 1 - 0.8 (D - 0.5)    heavy load (R_L < R_crit)
//            = 1 + 0.005 (D - 0.5)  light load (R_L > R_crit, gain rises with D)
//   v_out   += (v_target - v_out) / 20,   ADC code = round(256 * v_out)
// Sequence: soft start -> closed loop regulation at 1.8 V -> heavy load
// step (frequency loop, optimisation, fine tuning) -> duty loop disabled
// and re-enabled -> small step to force the D_min override -> light load
// (D_max override) -> reference drop at high Vin (f_max override) -> loop
// opened and closed again -> stop.  Checks: soft-start ramp and duration,
// exact dead time, no gate overlap, recovery into the zero-error bin after
// each disturbance, the direction of the frequency move, and that every
// mechanism happened at least once.
module tb_llc_pfm_pwm_top;
  import llc_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real FR = 1.0e12 / (real'(T_R) * real'(TDE_PS));

  logic            rst_n = 1'b1;
  cntrl_t          cntrl = '0;
  logic [M_W-1:0]  ref_m;
  logic [L_W-1:0]  ref_l;
  logic [ADC_W-1:0] adc_data = '0;
  logic [7:0]      ss_cycles = 8'd2;
  logic [DT_W-1:0] dt_sel = 6'd20;
  logic            clk_base, adc_smp, c1, c2, err_m, err_l;
  logic [ON_W-1:0] t_sw;
  logic [D_W-1:0]  duty;
  gov_state_e      gov_state;
  or_mode_e        or_mode;

  llc_pfm_pwm_top dut (
    .rst_n(rst_n), .cntrl(cntrl), .ref_m(ref_m), .ref_l(ref_l), .adc_data(adc_data),
    .ss_cycles(ss_cycles), .dt_sel(dt_sel), .clk_base(clk_base), .adc_smp(adc_smp),
    .c1(c1), .c2(c2), .t_sw(t_sw), .duty(duty), .err_m(err_m), .err_l(err_l),
    .gov_state(gov_state), .or_mode(or_mode)
  );

  int checks = 0, failures = 0;
  initial #1 rst_n = 1'b0;   // falling edge so that asynchronous resets act
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------- power-stage model ----------------
  real vin = 3.9, load = 1.0, vout = 0.0, lslope = 0.005;
  bit  light = 0;
  real f_meas = 0.0, d_meas = 0.0;
  longint t_c1r = -1, t_c1f = -1, t_c2f = -1, per_ps = 0, on_ps = 0;
  int  ncyc = 0;

  function automatic real gd(input real dd, input bit lt);
    if (dd < 0.5) return $sin(PI * dd);
    return lt ? 1.0 + lslope * (dd - 0.5) : 1.0 - 0.8 * (dd - 0.5);
  endfunction

  always @(posedge c1) begin
    if (t_c1r >= 0) begin
      per_ps = longint'($time) - t_c1r;
      f_meas = 1.0e12 / real'(per_ps);
      d_meas = real'(on_ps + longint'(dt_sel) * TDE_PS) / real'(per_ps);
      vout   = vout + (vin * 0.45 * load * gd(d_meas, light)
                       / (1.0 + 1.5 * (f_meas / FR - 1.0)) - vout) / 20.0;
      if (vout < 0.0) vout = 0.0;
      adc_data = (vout * 256.0 > 1023.0) ? 10'd1023 : ADC_W'(int'(vout * 256.0 + 0.5));
      ncyc++;
    end
    t_c1r = longint'($time);
    // dead time: low-side gate fell exactly dt_sel elements before
    if (t_c2f >= 0) begin
      check(longint'($time) - t_c2f == longint'(dt_sel) * TDE_PS,
            $sformatf("dead time %0d ps", longint'($time) - t_c2f));
    end
  end
  always @(negedge c1) begin
    t_c1f = longint'($time);
    if (t_c1r >= 0) on_ps = t_c1f - t_c1r;
  end
  always @(negedge c2) t_c2f = longint'($time);
  always @(c1 or c2) #1 if (c1 && c2) check(0, "c1 and c2 both on");

  // ---------------- mechanism counters ----------------
  int n_ss = 0, n_open = 0, n_closed = 0, n_ferr = 0, n_duty = 0, n_idle = 0;
  int n_opt = 0, n_dmin = 0, n_dmax = 0, n_fmax = 0, n_dhold = 0;
  gov_state_e gs_q = GOV_IDLE;
  or_mode_e   om_q = OR_NONE;
  logic [D_W-1:0] duty_q = '0;
  always @(posedge clk_base) begin
    if (gov_state != gs_q) begin
      case (gov_state)
        GOV_STARTUP: n_ss++;
        GOV_OPEN:    n_open++;
        GOV_CLOSED:  n_closed++;
        GOV_IDLE:    n_idle++;
        default: ;
      endcase
    end
    if (or_mode != om_q) begin
      case (or_mode)
        OR_OPT:  n_opt++;
        OR_DMIN: n_dmin++;
        OR_DMAX: n_dmax++;
        OR_FMAX: n_fmax++;
        default: ;
      endcase
    end
    if (dut.smp && gov_state == GOV_CLOSED && err_m) n_ferr++;
    if (duty != duty_q && or_mode == OR_NONE && gov_state == GOV_CLOSED) n_duty++;
    if (dut.smp && gov_state == GOV_CLOSED && !cntrl.duty_en && !err_m && err_l) n_dhold++;
    gs_q   <= gov_state;
    om_q   <= or_mode;
    duty_q <= duty;
  end

  // ---------------- helpers ----------------
  task automatic wait_cycles(input int n);
    int c0;
    c0 = ncyc;
    wait (ncyc >= c0 + n);
  endtask

  // wait until both error sections stay zero for 'hold' consecutive cycles
  task automatic wait_regulated(input int limit, input string what);
    int c0, good;
    c0 = ncyc; good = 0;
    while (good < 16 && ncyc < c0 + limit) begin
      @(posedge c1);
      if (!err_m && !err_l && gov_state == GOV_CLOSED) good++;
      else good = 0;
    end
    check(good >= 16, $sformatf("%s: not regulated within %0d cycles (v=%f)", what, limit, vout));
    $display("%0t %s: regulated after %0d cycles, v=%f f=%f kHz D=%f",
             $time, what, ncyc - c0, vout, f_meas / 1.0e3, d_meas);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #(64'd60_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  real f_ss_first, f_before, d_prev;
  int  c_ss0, ss_len;
  initial begin
    ref_m = M_W'(461 >> L_W);
    ref_l = L_W'(461 & 7);
    #200_000;
    rst_n = 1'b1;
    #200_000;
    cntrl = '{start: 1'b1, loop_en: 1'b1, duty_en: 1'b1};

    // ---- soft start ----
    wait (gov_state == GOV_STARTUP);
    c_ss0 = ncyc;
    wait_cycles(3);
    f_ss_first = f_meas;
    check(f_ss_first > 1.78e6 && f_ss_first < 1.82e6,
          $sformatf("first soft-start frequency %f (1.8 f_r)", f_ss_first));
    d_prev = d_meas;
    while (gov_state == GOV_STARTUP) begin
      @(posedge c1);
      if (gov_state == GOV_STARTUP && ncyc > c_ss0 + 3) begin
        check(d_meas >= d_prev - 1.0e-3, $sformatf("duty fell during soft start %f -> %f", d_prev, d_meas));
        d_prev = d_meas;
      end
    end
    ss_len = ncyc - c_ss0;
    check(ss_len >= 128 - 2 && ss_len <= 128 + 3, $sformatf("soft start lasted %0d cycles, expected 128", ss_len));
    wait_cycles(3);
    check(per_ps == longint'(T_R) * TDE_PS, $sformatf("period %0d ps at end of soft start", per_ps));
    check(d_meas > 0.49 && d_meas < 0.51, $sformatf("duty %f at end of soft start", d_meas));
    $display("%0t soft start done in %0d cycles, v=%f", $time, ss_len, vout);
    wait_regulated(3000, "after soft start");
    check(vout > 1.785 && vout < 1.815, $sformatf("regulated vout %f", vout));

    // ---- heavy load step ----
    f_before = f_meas;
    load = 0.93;
    wait_cycles(60);
    check(f_meas < f_before, $sformatf("frequency did not fall after load step: %f -> %f", f_before, f_meas));
    wait_regulated(6000, "after load step");
    check(vout > 1.785 && vout < 1.815, $sformatf("regulated vout %f", vout));

    // ---- duty loop off: residual error stays, then removed when enabled ----
    cntrl.duty_en = 1'b0;
    load = 0.935;
    wait_cycles(400);
    cntrl.duty_en = 1'b1;
    wait_regulated(6000, "after duty loop enable");

    // ---- small step down inside the coarse bin: D_min override ----
    load = 0.925;
    wait_regulated(6000, "after small step");

    // ---- light load: gain rises with D ----
    light = 1'b1;
    load = 0.922;
    begin
      automatic int c0 = ncyc;
      while (n_dmax == 0 && ncyc < c0 + 12000) wait_cycles(1);
      $display("%0t D_max routine after %0d light-load cycles", $time, ncyc - c0);
      wait_cycles(300);
    end
    $display("%0t light load: v=%f f=%f kHz D=%f", $time, vout, f_meas / 1.0e3, d_meas);

    // ---- reference drop at high input voltage: f_max override ----
    light = 1'b0;
    vin = 7.0;
    ref_m = M_W'(300 >> L_W);
    ref_l = L_W'(300 & 7);
    wait_cycles(1500);
    $display("%0t reference drop: v=%f f=%f kHz D=%f", $time, vout, f_meas / 1.0e3, d_meas);

    // ---- back to nominal, open the loop, close it again ----
    vin = 3.9; load = 1.0;
    ref_m = M_W'(461 >> L_W);
    ref_l = L_W'(461 & 7);
    cntrl.loop_en = 1'b0;
    wait_cycles(50);
    check(gov_state == GOV_OPEN, "loop not open");
    check(per_ps == longint'(T_R) * TDE_PS, $sformatf("open-loop period %0d ps", per_ps));
    cntrl.loop_en = 1'b1;
    wait_regulated(6000, "after loop closed again");

    // ---- stop ----
    cntrl.start = 1'b0;
    #(10_000_000);
    check(gov_state == GOV_IDLE && !c1 && !c2, "gates not off after stop");

    // ---- every mechanism must have happened ----
    $display("mechanisms: startup=%0d open=%0d closed=%0d coarse_err_samples=%0d duty_moves=%0d",
             n_ss, n_open, n_closed, n_ferr, n_duty);
    $display("            opt=%0d dmin=%0d dmax=%0d fmax=%0d duty_held=%0d idle=%0d",
             n_opt, n_dmin, n_dmax, n_fmax, n_dhold, n_idle);
    check(n_ss >= 1,     "soft start never ran");
    check(n_open >= 1,   "open loop never entered");
    check(n_closed >= 2, "closed loop entered less than twice");
    check(n_ferr >= 1,   "frequency loop never saw a coarse error");
    check(n_duty >= 1,   "duty loop never moved");
    check(n_opt >= 1,    "optimisation never ran");
    check(n_dmin >= 1,   "D_min override never ran");
    check(n_dmax >= 1,   "D_max override never ran");
    check(n_fmax >= 1,   "f_max override never ran");
    check(n_dhold >= 1,  "duty loop never held while disabled");
    check(n_idle >= 1,   "never stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
