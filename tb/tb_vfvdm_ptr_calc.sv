`timescale 1ps/1ps
// tb_vfvdm_ptr_calc: pointer and threshold arithmetic of the modulator.
// Uses the on-time pair 664/644 (fine parts 24 and 4) and then 5664/1644
// (fine parts 32 and 108).  After each falling-edge strobe the pointers of
// the other mode must satisfy s_fall = s_rise_prev + hs_f and
// s_rise = s_rise_prev + hs_f + ls_f (mod 128), the thresholds must be
// coarse part + wrap carry, and in steady state a pointer must advance by
// 2 (hs_f + ls_f) = 56 per two cycles, as in the 13-bit example run of the
// modulator (s1: 68, 124, 52, 108, 36, 92, 20).  Commands are taken only
// on the rise strobe and are raised to the minimum phase of 129 elements.
module tb_vfvdm_ptr_calc;
  localparam int unsigned P = 7, K = 6, W = 13;
  logic clk = 0, rst_n = 1'b1, idle = 1, rise = 0, fall0 = 0, fall1 = 0;
  logic [W-1:0] hs_in = 13'd664, ls_in = 13'd644, hs_q, ls_q;
  logic [P-1:0] s1, s2, s3, s4;
  logic [K+1:0] thr_off0, thr_on0, thr_off1, thr_on1;
  int checks = 0, failures = 0;
  initial #1 rst_n = 1'b0;   // falling edge so that asynchronous resets act

  vfvdm_ptr_calc #(.P(P), .K(K)) dut (.clk, .rst_n, .idle, .rise, .fall0, .fall1, .hs_in, .ls_in,
    .s1, .s2, .s3, .s4, .thr_off0, .thr_on0, .thr_off1, .thr_on1, .hs_q, .ls_q);
  always #5000 clk = ~clk;

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

  task automatic expect_set(input int r, input int hs, input int ls, input int sf, input int sr,
                            input int toff, input int ton, input string what);
    int f, q;
    f = r + hs % 128;
    q = f % 128 + ls % 128;
    check(sf == f % 128 && sr == q % 128,
          $sformatf("%s pointers %0d/%0d want %0d/%0d", what, sf, sr, f % 128, q % 128));
    check(toff == hs / 128 + f / 128 && ton == toff + ls / 128 + q / 128,
          $sformatf("%s thresholds %0d/%0d", what, toff, ton));
  endtask

  task automatic strobe(input int which);   // 0: rise, 1: fall0, 2: fall1
    @(negedge clk);
    rise = (which == 0); fall0 = (which == 1); fall1 = (which == 2);
    @(negedge clk);
    rise = 0; fall0 = 0; fall1 = 0;
  endtask

  initial begin
    int s1_hist[$];
    #12000 rst_n = 1;
    repeat (2) @(negedge clk);
    // idle: Mode0 from pointer 0, Mode1 only issues the first rising edge
    expect_set(0, 664, 644, int'(s1), int'(s2), int'(thr_off0), int'(thr_on0), "idle mode0");
    check(s3 == 0 && s4 == 0 && thr_on1 == 2, "idle mode1");
    idle = 0;
    strobe(0);                                      // first rising edge (Mode1)
    for (int n = 0; n < 14; n++) begin
      int r;
      if (n == 7) begin hs_in = 13'd5664; ls_in = 13'd1644; end
      // Mode0 cycle: falls, Mode1 pointers computed from s2
      r = int'(s2);
      strobe(1);
      expect_set(r, int'(hs_q), int'(ls_q), int'(s3), int'(s4), int'(thr_off1), int'(thr_on1), "mode1");
      strobe(0);
      // Mode1 cycle: falls, Mode0 pointers computed from s4
      r = int'(s4);
      strobe(2);
      expect_set(r, int'(hs_q), int'(ls_q), int'(s1), int'(s2), int'(thr_off0), int'(thr_on0), "mode0");
      s1_hist.push_back(int'(s1));
      strobe(0);
    end
    // steady 664/644: s1 advances by 56 per switching-cycle pair
    for (int i = 1; i < 6; i++)
      check((s1_hist[i] - s1_hist[i-1] + 128) % 128 == 56, $sformatf("s1 step %0d", i));
    // after the change: 2 (32 + 108) mod 128 = 24
    for (int i = 9; i < 14; i++)
      check((s1_hist[i] - s1_hist[i-1] + 128) % 128 == 24, $sformatf("s1 step %0d after change", i));
    // commands held between rise strobes
    hs_in = 13'd300;
    @(negedge clk); @(negedge clk);
    check(hs_q == 13'd5664, "command taken without rise strobe");
    // minimum phase
    hs_in = 13'd5; ls_in = 13'd128;
    strobe(0);
    check(hs_q == 13'd129 && ls_q == 13'd129, "minimum phase clamp");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
