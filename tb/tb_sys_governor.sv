`timescale 1ps/1ps
// tb_sys_governor: soft-start ramp and state sequencing.  With ss_cycles = 3
// the ramp must take 64 steps of 3 samples, start at ss_hs = 129 (the
// shortest phase) / ss_ls = 1295 (period 1424: 1.8 x f_r), follow
//   hs = (129*64 + 1153 k) / 64,  ls = (1295*64 - 13 k) / 64
// after step k and end at 1282 / 1282 (f_r, 50 %).  Then closed loop: the
// frequency update on every sample, the duty update on every 4th sample and
// only with a zero coarse error or a duty override, override muxes passed
// only in closed loop; loop_en low gives the open loop, start low the idle
// state.
module tb_sys_governor;
  import llc_pkg::*;
  logic clk = 0, rst_n = 1'b1, smp = 0;
  cntrl_t cntrl = '0;
  logic [7:0] ss_cycles = 8'd3;
  logic signed [M_W:0] v_err = '0;
  logic mux_f_req = 0, mux_d_req = 0;
  gov_state_e state;
  logic mod_en, ss, preset, or_en, fupd, dupd, mux_f, mux_d;
  logic [ON_W-1:0] ss_hs, ss_ls;
  int checks = 0, failures = 0;
  initial #1 rst_n = 1'b0;   // falling edge so that asynchronous resets act
  int nsmp = 0, nf = 0, nd = 0;

  sys_governor dut (.clk, .rst_n, .smp, .cntrl, .ss_cycles, .v_err, .mux_f_req, .mux_d_req,
                    .state, .mod_en, .ss, .preset, .or_en, .fupd, .dupd, .mux_f, .mux_d,
                    .ss_hs, .ss_ls);
  always #5000 clk = ~clk;

  initial begin
    #(64'd2_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // one sample strobe every 5 clocks
  task automatic pulse;
    repeat (4) @(negedge clk);
    smp = 1;
    @(negedge clk);
    smp = 0;
  endtask

  always @(posedge clk) if (smp) begin
    nsmp++;
    if (fupd) nf++;
    if (dupd) nd++;
  end

  initial begin
    int steps;
    #12000 rst_n = 1;
    @(negedge clk);
    check(state == GOV_IDLE && !mod_en, "idle after reset");
    cntrl = '{start: 1'b1, loop_en: 1'b1, duty_en: 1'b1};
    @(negedge clk); @(negedge clk);
    check(state == GOV_STARTUP && ss && mod_en && preset, "soft start entered");
    check(ss_hs == 129 && ss_ls == 1295, $sformatf("ramp start %0d/%0d", ss_hs, ss_ls));
    steps = 0;
    while (state == GOV_STARTUP) begin
      logic [ON_W-1:0] h0;
      h0 = ss_hs;
      repeat (3) pulse();
      @(negedge clk);
      steps++;
      if (state == GOV_STARTUP || steps == 64) begin
        automatic int hs_exp = (129 * 64 + 1153 * steps) / 64;
        check(int'(ss_hs) == hs_exp,
              $sformatf("step %0d: ss_hs %0d want %0d", steps, ss_hs, hs_exp));
        check(int'(ss_ls) == (1295 * 64 - 13 * steps) / 64,
              $sformatf("step %0d: ss_ls %0d", steps, ss_ls));
        check(ss_hs >= h0, "ramp not monotonic");
      end
      if (steps > 70) break;
    end
    check(steps == 64, $sformatf("soft start took %0d steps", steps));
    check(ss_hs == 1282 && ss_ls == 1282, "ramp end at f_r / 50 %");
    check(state == GOV_CLOSED && !preset && or_en, "closed loop after soft start");
    // closed loop: update enables
    nsmp = 0; nf = 0; nd = 0;
    v_err = '0;
    repeat (40) pulse();
    check(nf == 40, $sformatf("frequency updates %0d of 40", nf));
    check(nd == 10, $sformatf("duty updates %0d of 40 (every 4th)", nd));
    nsmp = 0; nf = 0; nd = 0;
    v_err = 8'sd2;
    repeat (40) pulse();
    check(nd == 0, "duty updated with coarse error");
    mux_d_req = 1;
    repeat (40) pulse();
    check(nd == 10, "duty not updated under duty override");
    check(mux_d, "mux_d not passed in closed loop");
    mux_f_req = 1; @(negedge clk);
    check(mux_f, "mux_f not passed in closed loop");
    cntrl.duty_en = 0; nd = 0;
    repeat (40) pulse();
    check(nd == 0, "duty updated while disabled");
    // open loop
    cntrl.loop_en = 0;
    @(negedge clk); @(negedge clk);
    check(state == GOV_OPEN && preset && !mux_f && !mux_d && mod_en, "open loop");
    nf = 0;
    repeat (5) pulse();
    check(nf == 0, "frequency updated in open loop");
    cntrl.loop_en = 1;
    @(negedge clk); @(negedge clk);
    check(state == GOV_CLOSED, "closed again");
    cntrl.start = 0;
    @(negedge clk); @(negedge clk);
    check(state == GOV_IDLE && !mod_en, "idle after stop");
    // soft start into open loop
    cntrl = '{start: 1'b1, loop_en: 1'b0, duty_en: 1'b1};
    ss_cycles = 8'd1;
    repeat (70) pulse();
    check(state == GOV_OPEN, "open loop after soft start with loop_en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
