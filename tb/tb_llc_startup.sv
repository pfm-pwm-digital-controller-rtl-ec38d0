`timescale 1ps/1ps
// tb_llc_startup: the soft-start sequence of the full controller at the
// lengths used for the converter: 5 ms and 2.5 ms.
//
// The top runs with all parameters at their defaults, zero dead time (so
// c1 is the modulator's high-side signal) and an ADC word equal to the
// reference.  For each length the testbench chooses ss_cycles from the mean
// switching period of the linear on-time ramp,
//   mean period = (T_SS0 + T_R) / 2 delay elements,
//   ss_cycles   = round(t_ss / (64 * mean period * 390 ps)),
// then measures every switching period and high time of c1 from the first
// pulse until the governor reaches closed loop.  It checks that
//   * the first period is the 1.8 x f_r period (1424 elements) and the first
//     high time is the shortest phase the modulator makes (129 elements),
//   * the period never shrinks and the high time never shrinks,
//   * the sequence ends at f_r (2564 elements) and 50 % duty,
//   * its duration is within 2 % of the target,
//   * c2 is the complement of c1 outside the switching instants.
module tb_llc_startup;
  import llc_pkg::*;

  logic            rst_n = 1'b1;
  cntrl_t          cntrl = '0;
  logic [ADC_W-1:0] ref_code = 10'd461;
  logic [7:0]      ss_cycles = '0;
  logic [DT_W-1:0] dt_sel = '0;
  logic            clk_base, adc_smp, c1, c2, err_m, err_l;
  logic [ON_W-1:0] t_sw;
  logic [D_W-1:0]  duty;
  gov_state_e      gov_state;
  or_mode_e        or_mode;

  llc_pfm_pwm_top dut (
    .rst_n(rst_n), .cntrl(cntrl), .ref_m(ref_code[ADC_W-1:L_W]), .ref_l(ref_code[L_W-1:0]),
    .adc_data(ref_code), .ss_cycles(ss_cycles), .dt_sel(dt_sel), .clk_base(clk_base),
    .adc_smp(adc_smp), .c1(c1), .c2(c2), .t_sw(t_sw), .duty(duty), .err_m(err_m),
    .err_l(err_l), .gov_state(gov_state), .or_mode(or_mode)
  );

  int checks = 0, failures = 0;
  initial #1 rst_n = 1'b0;   // falling edge so that asynchronous resets act

  initial begin
    #(64'd20_000_000_000);   // 20 ms
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // c1/c2 complementary (sampled away from the edges)
  always @(negedge clk_base) if (rst_n && gov_state != GOV_IDLE) begin
    if (c1 == c2 && $time > 0) begin
      // both equal is allowed only while stopped
      check(!c1 && !c2 && gov_state == GOV_IDLE, "c1 and c2 not complementary");
    end
  end

  // one soft-start run
  task automatic run_ss(input real t_target_ps);
    longint t_first, t_prev_r, t_f, t_end, per, hi, per_prev, hi_prev, per_last, hi_last;
    int n, ssc;
    real mean_per_ps;
    mean_per_ps = real'(T_SS0 + T_R) / 2.0 * real'(TDE_PS);
    ssc = int'(t_target_ps / (64.0 * mean_per_ps) + 0.5);
    ss_cycles = 8'(ssc);
    $display("soft start %0.2f ms: ss_cycles = %0d", t_target_ps * 1e-9, ssc);
    cntrl = '{start: 1'b1, loop_en: 1'b1, duty_en: 1'b1};
    @(posedge c1);
    t_first = longint'($time);
    t_prev_r = t_first;
    n = 0; per_prev = 0; hi_prev = 0;
    while (gov_state != GOV_CLOSED) begin
      @(negedge c1);
      t_f = longint'($time);
      @(posedge c1);
      per = longint'($time) - t_prev_r;
      hi  = t_f - t_prev_r;
      if (n == 0) begin
        check(per == longint'(T_SS0) * TDE_PS, $sformatf("first period %0d ps", per));
        check(hi == longint'(2**VF_P + 1) * TDE_PS, $sformatf("first high time %0d ps", hi));
      end else begin
        check(per >= per_prev, $sformatf("period shrank %0d -> %0d", per_prev, per));
        check(hi >= hi_prev, $sformatf("high time shrank %0d -> %0d", hi_prev, hi));
      end
      per_prev = per; hi_prev = hi;
      t_prev_r = longint'($time);
      n++;
    end
    t_end = t_prev_r;
    // closed loop at the preset: f_r and 50 %
    repeat (3) begin
      @(negedge c1); t_f = longint'($time);
      @(posedge c1);
      per_last = longint'($time) - t_prev_r;
      hi_last = t_f - t_prev_r;
      t_prev_r = longint'($time);
    end
    check(per_last == longint'(T_R) * TDE_PS, $sformatf("final period %0d ps", per_last));
    check(hi_last == longint'(T_R / 2) * TDE_PS, $sformatf("final high time %0d ps", hi_last));
    $display("  %0d cycles, duration %0.3f ms", n, real'(t_end - t_first) * 1e-9);
    check(real'(t_end - t_first) > 0.98 * t_target_ps && real'(t_end - t_first) < 1.02 * t_target_ps,
          $sformatf("duration %0.3f ms", real'(t_end - t_first) * 1e-9));
    cntrl.start = 1'b0;
    repeat (200) @(posedge clk_base);
    check(!c1 && !c2, "gates not off after stop");
  endtask

  initial begin
    #100_000;
    rst_n = 1'b1;
    #200_000;
    run_ss(5.0e9);     // 5 ms
    run_ss(2.5e9);     // 2.5 ms
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
