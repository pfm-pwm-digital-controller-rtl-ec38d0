`timescale 1ps/1ps
// tb_freq_pi: checks the frequency compensator against a reference model
// of the incremental PI law acc -= KP*(e - e_prev) + KI*e with saturation,
// for random errors, including preset, hold (en low) and both limits.
module tb_freq_pi;
  import llc_pkg::*;
  logic clk = 0, rst_n = 1'b1, preset = 0, en = 0;
  logic signed [M_W:0] err = '0;
  logic [ON_W-1:0] t_sw;
  logic at_fmax, at_fmin;
  int checks = 0, failures = 0;
  initial #1 rst_n = 1'b0;   // falling edge so that asynchronous resets act
  longint acc_m = T_R * 16;
  int e_prev = 0;
  bit seen_max = 0, seen_min = 0;

  freq_pi dut (.clk, .rst_n, .preset, .en, .err, .t_sw, .at_fmax, .at_fmin);
  always #5000 clk = ~clk;

  initial begin
    #(64'd1_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk;
    checks++;
    if (longint'(t_sw) != (acc_m >>> 4) || at_fmax != (acc_m <= T_SW_MIN * 16) ||
        at_fmin != (acc_m >= T_SW_MAX * 16)) begin
      failures++;
      if (failures < 10) $display("FAIL t_sw=%0d model=%0d", t_sw, acc_m >>> 4);
    end
  endtask

  initial begin
    #12000 rst_n = 1;
    @(negedge clk);
    chk();
    for (int i = 0; i < 3000; i++) begin
      int e;
      // bias the error so the accumulator visits both limits
      e = (i < 1000) ? $urandom_range(0, 20) : (i < 2000) ? -int'($urandom_range(0, 20)) :
          int'($urandom_range(0, 40)) - 20;
      err = (M_W+1)'(e);
      en  = ($urandom_range(0, 3) != 0);
      preset = (i == 2500);
      @(posedge clk); #1;
      if (preset) begin
        acc_m = T_R * 16; e_prev = 0;
      end else if (en) begin
        acc_m = acc_m - 16 * (e - e_prev) - 8 * e;
        if (acc_m < T_SW_MIN * 16) acc_m = T_SW_MIN * 16;
        if (acc_m > T_SW_MAX * 16) acc_m = T_SW_MAX * 16;
        e_prev = e;
      end
      chk();
      if (at_fmax) seen_max = 1;
      if (at_fmin) seen_min = 1;
    end
    checks++;
    if (!(seen_max && seen_min)) begin failures++; $display("FAIL limits not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
