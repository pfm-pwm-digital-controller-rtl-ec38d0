`timescale 1ps/1ps
// tb_digital_logic: random periods and duty words; the on-time pair must
// be hs = round(T*d/4096), ls = T - hs, one clock after the inputs.
module tb_digital_logic;
  import llc_pkg::*;
  logic clk = 0, rst_n = 1'b1;
  logic [ON_W-1:0] t_sw = '0, hs_on, ls_on;
  logic [D_W-1:0]  d = '0;
  int checks = 0, failures = 0;
  initial #1 rst_n = 1'b0;   // falling edge so that asynchronous resets act

  digital_logic dut (.clk, .rst_n, .t_sw, .d, .hs_on, .ls_on);
  always #5000 clk = ~clk;

  initial begin
    #(64'd1_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12000 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      longint t, dd, h;
      t  = (i == 0) ? 2564 : $urandom_range(T_SW_MIN, T_SW_MAX);
      dd = (i == 0) ? 2048 : $urandom_range(0, 4095);
      @(negedge clk);
      t_sw = ON_W'(t); d = D_W'(dd);
      @(posedge clk); #1;
      h = (t * dd + 2048) / 4096;
      checks++;
      if (longint'(hs_on) != h || longint'(ls_on) != t - h) begin
        failures++;
        if (failures < 10) $display("FAIL T=%0d d=%0d got %0d/%0d want %0d", t, dd, hs_on, ls_on, h);
      end
      if (i == 0) begin
        checks++;
        if (hs_on != 13'd1282 || ls_on != 13'd1282) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
