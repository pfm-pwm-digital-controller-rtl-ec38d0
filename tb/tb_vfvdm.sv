`timescale 1ps/1ps
// tb_vfvdm: self-checking test of the delay-line modulator.
//
// Runs the modulator with the on-time pair 664/644 delay elements, then
// switches to 5664/1644 (D = 50.8 % and 77.5 %), measures every high and
// low phase of hs in picoseconds and requires it to equal the command times
// the 390 ps element exactly.  After the change the new pair must appear
// within two switching cycles and the old one never again (single-cycle
// convergence).  Every pointer update is checked against
// s1 = s4 + hs_f, s2 = s4 + hs_f + ls_f (and the Mode1 pair likewise),
// ls must always be the complement of hs, and stopping the modulator must
// leave hs low.
module tb_vfvdm;
  import llc_pkg::*;
  localparam int unsigned W = VF_K + VF_P;

  logic         rst_n = 1'b1;
  logic         run   = 1'b0;
  logic [W-1:0] hs_in = 13'd664;
  logic [W-1:0] ls_in = 13'd644;
  logic         clk_base, hs, ls, cyc, mode;
  logic [VF_P-1:0] s1, s2, s3, s4;

  int checks = 0, failures = 0;
  initial #1 rst_n = 1'b0;   // falling edge so that asynchronous resets act

  vfvdm dut (
    .rst_n(rst_n), .run(run), .hs_in(hs_in), .ls_in(ls_in),
    .clk_base(clk_base), .hs(hs), .ls(ls), .cyc(cyc), .mode(mode),
    .s1(s1), .s2(s2), .s3(s3), .s4(s4)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------- phase measurement ----------------
  longint t_rise = -1, t_fall = -1;
  longint hi_ps, lo_ps;
  int     n_hi = 0, n_lo = 0;
  int     exp_hi_old = 664, exp_lo_old = 644, exp_hi_new = 5664, exp_lo_new = 1644;
  bit     changed = 0, seen_new = 0;
  int     cyc_after_change = 0;
  real    duty_old = 0.0, duty_new = 0.0;

  always @(posedge hs) begin
    if (t_fall >= 0 && t_rise >= 0) begin
      lo_ps = longint'($time) - t_fall;
      n_lo++;
      if (!changed || !seen_new)
        check(lo_ps == exp_lo_old * TDE_PS || (changed && lo_ps == exp_lo_new * TDE_PS),
              $sformatf("low phase %0d ps", lo_ps));
      else
        check(lo_ps == exp_lo_new * TDE_PS, $sformatf("low phase %0d ps after change", lo_ps));
    end
    t_rise = longint'($time);
    if (changed) cyc_after_change++;
  end

  always @(negedge hs) begin
    if (t_rise >= 0) begin
      hi_ps = longint'($time) - t_rise;
      n_hi++;
      if (changed && hi_ps == exp_hi_new * TDE_PS) seen_new = 1;
      if (!seen_new)
        check(hi_ps == exp_hi_old * TDE_PS, $sformatf("high phase %0d ps", hi_ps));
      else
        check(hi_ps == exp_hi_new * TDE_PS, $sformatf("high phase %0d ps after change", hi_ps));
    end
    t_fall = longint'($time);
  end

  // ls is the complement of hs
  always @(hs or ls) #1 if (rst_n) check(ls == ~hs, "ls != ~hs");

  // ---------------- pointer relation (eq. 9) ----------------
  logic [VF_P-1:0] s1_p, s3_p;
  int n_ptr = 0;
  always @(posedge clk_base) begin
    s1_p <= s1;
    s3_p <= s3;
    #1;
    if (rst_n && run) begin
      if (s1 != s1_p) begin
        n_ptr++;
        check(s1 == VF_P'(s4 + dut.u_ptr.hs_q[VF_P-1:0]), "s1 != s4 + hs_f");
        check(s2 == VF_P'(s4 + dut.u_ptr.hs_q[VF_P-1:0] + dut.u_ptr.ls_q[VF_P-1:0]),
              "s2 != s4 + hs_f + ls_f");
      end
      if (s3 != s3_p) begin
        n_ptr++;
        check(s3 == VF_P'(s2 + dut.u_ptr.hs_q[VF_P-1:0]), "s3 != s2 + hs_f");
        check(s4 == VF_P'(s2 + dut.u_ptr.hs_q[VF_P-1:0] + dut.u_ptr.ls_q[VF_P-1:0]),
              "s4 != s2 + hs_f + ls_f");
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    #(2_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    rst_n = 1'b1;
    #100_000;
    run = 1'b1;
    wait (n_hi >= 12);
    duty_old = real'(hi_ps) / real'(hi_ps + lo_ps);
    check(duty_old > 0.506 && duty_old < 0.508, $sformatf("duty %f, expected 50.8 %%", duty_old));
    // abrupt change of both commands (single-cycle convergence)
    @(posedge hs);
    #3000;
    hs_in = 13'd5664;
    ls_in = 13'd1644;
    changed = 1;
    wait (seen_new);
    check(cyc_after_change <= 2, $sformatf("new commands after %0d cycles", cyc_after_change));
    wait (n_hi >= 24);
    duty_new = real'(hi_ps) / real'(hi_ps + lo_ps);
    check(duty_new > 0.774 && duty_new < 0.776, $sformatf("duty %f, expected 77.5 %%", duty_new));
    check(n_ptr >= 20, $sformatf("only %0d pointer updates", n_ptr));
    // stop: hs must end low and stay low
    run = 1'b0;
    #(80 * 50_000);
    check(hs == 1'b0, "hs not low after stop");
    begin
      automatic int n0 = n_hi;
      #(20 * 50_000);
      check(n_hi == n0 && hs == 1'b0, "modulator still switching after stop");
    end
    // restart with minimum-length phases clamped to 2**P + 1
    exp_hi_old = 2**VF_P + 1; exp_lo_old = 2**VF_P + 1;
    changed = 0; seen_new = 0;
    hs_in = 13'd5; ls_in = 13'd100;
    t_rise = -1; t_fall = -1;
    run = 1'b1;
    begin
      automatic int n0 = n_hi;
      wait (n_hi >= n0 + 6);
    end
    $display("duty %f -> %f, pointer updates %0d", duty_old, duty_new, n_ptr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
