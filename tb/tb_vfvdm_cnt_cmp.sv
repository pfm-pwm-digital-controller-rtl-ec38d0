`timescale 1ps/1ps
// tb_vfvdm_cnt_cmp: one mode's counter and comparators.  A 40 ns base clock
// and two tap clocks delayed by 7.5 ns and 31.5 ns.  After a start strobe
// the falling-edge flag must come exactly thr_off cycles and the rising-edge
// flag exactly thr_on cycles later, each for one cycle; the trigger outputs
// must rise on the tap clock inside the flagged cycle and last one period;
// with run low the rising edge is withheld and the mode still ends.
module tb_vfvdm_cnt_cmp;
  localparam int TH_W = 8;
  logic clk = 0, rst_n = 1'b1, run = 1, start = 0;
  logic [TH_W-1:0] thr_off = 8'd3, thr_on = 8'd7;
  logic p_off, p_on;
  logic active, fire_off, fire_on, trg_off, trg_on;
  int checks = 0, failures = 0;
  initial #1 rst_n = 1'b0;   // falling edge so that asynchronous resets act
  longint t_start_edge, t_off_r, t_on_r, t_off_f;

  vfvdm_cnt_cmp #(.TH_W(TH_W)) dut (.clk, .rst_n, .run, .start, .thr_off, .thr_on, .p_off, .p_on,
    .active, .fire_off, .fire_on, .trg_off, .trg_on);

  always #20000 clk = ~clk;
  always @(clk) p_off <= #7500 clk;
  logic p_mid;                       // two stages: each delay under half a period
  always @(clk)   p_mid <= #15750 clk;
  always @(p_mid) p_on  <= #15750 p_mid;

  always @(posedge trg_off) t_off_r = longint'($time);
  always @(negedge trg_off) t_off_f = longint'($time);
  always @(posedge trg_on)  t_on_r  = longint'($time);

  initial begin
    #(64'd1_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic run_mode(input int toff, input int ton, input bit r);
    int c_off, c_on, c;
    thr_off = TH_W'(toff); thr_on = TH_W'(ton); run = r;
    @(negedge clk); start = 1;
    @(posedge clk); t_start_edge = longint'($time);
    c_off = -1; c_on = -1; c = 1;
    t_off_r = -1; t_on_r = -1;
    // cycle c begins at t_start_edge + (c-1)*40 ns; flags sampled mid-cycle
    while (c < ton + 3) begin
      @(negedge clk);
      start = 0;
      if (fire_off) begin check(c_off < 0, "second fire_off"); c_off = c; end
      if (fire_on)  begin check(c_on < 0, "second fire_on");  c_on = c; end
      c++;
    end
    check(c_off == toff, $sformatf("fire_off in cycle %0d, want %0d", c_off, toff));
    check(r ? c_on == ton : c_on < 0, $sformatf("fire_on in cycle %0d, want %0d", c_on, r ? ton : -1));
    check(!active, "mode still active");
    check(t_off_r == t_start_edge + longint'(toff - 1) * 40000 + 7500,
          $sformatf("trg_off at %0d", t_off_r - t_start_edge));
    check(t_off_f - t_off_r == 40000, "trigger pulse not one period");
    if (r) check(t_on_r == t_start_edge + longint'(ton - 1) * 40000 + 31500,
                 $sformatf("trg_on at %0d", t_on_r - t_start_edge));
  endtask

  initial begin
    #50000 rst_n = 1;
    repeat (3) @(negedge clk);
    run_mode(3, 7, 1);
    run_mode(1, 2, 1);
    run_mode(10, 25, 1);
    run_mode(4, 9, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
