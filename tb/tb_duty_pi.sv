`timescale 1ps/1ps
// tb_duty_pi: checks the duty compensator against a reference model of
// acc += KP*(e - e_prev) + KI*e with saturation at D_min / D_max, for
// random residual errors, including preset and hold.
module tb_duty_pi;
  import llc_pkg::*;
  logic clk = 0, rst_n = 1'b1, preset = 0, en = 0;
  logic signed [L_W:0] err = '0;
  logic [D_W-1:0] d;
  logic at_dmin, at_dmax;
  int checks = 0, failures = 0;
  initial #1 rst_n = 1'b0;   // falling edge so that asynchronous resets act
  longint acc_m = D_HALF * 16;
  int e_prev = 0;
  bit seen_max = 0, seen_min = 0;

  duty_pi dut (.clk, .rst_n, .preset, .en, .err, .d, .at_dmin, .at_dmax);
  always #5000 clk = ~clk;

  initial begin
    #(64'd1_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk;
    checks++;
    if (longint'(d) != (acc_m >>> 4) || at_dmin != (acc_m <= D_MIN * 16) ||
        at_dmax != (acc_m >= D_MAX * 16)) begin
      failures++;
      if (failures < 10) $display("FAIL d=%0d model=%0d", d, acc_m >>> 4);
    end
  endtask

  initial begin
    #12000 rst_n = 1;
    @(negedge clk);
    chk();
    for (int i = 0; i < 3000; i++) begin
      int e;
      e = (i < 1500) ? $urandom_range(0, 7) : int'($urandom_range(0, 10)) - 7;
      err = (L_W+1)'(e);
      en  = ($urandom_range(0, 3) != 0);
      preset = (i == 2900);
      @(posedge clk); #1;
      if (preset) begin
        acc_m = D_HALF * 16; e_prev = 0;
      end else if (en) begin
        acc_m = acc_m + 8 * (e - e_prev) + 16 * e;
        if (acc_m < D_MIN * 16) acc_m = D_MIN * 16;
        if (acc_m > D_MAX * 16) acc_m = D_MAX * 16;
        e_prev = e;
      end
      chk();
      if (at_dmax) seen_max = 1;
      if (at_dmin) seen_min = 1;
    end
    checks++;
    if (!(seen_max && seen_min)) begin failures++; $display("FAIL limits not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
