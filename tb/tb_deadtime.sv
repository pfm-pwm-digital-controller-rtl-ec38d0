`timescale 1ps/1ps
// tb_deadtime: complementary hs/ls with random phase lengths and dead-time
// codes.  c1 must rise exactly dt_sel elements after hs rises and fall with
// hs; c2 likewise with ls; c1 and c2 never both high; en low turns both
// gates off.
module tb_deadtime;
  localparam int unsigned DT_W = 6, TDE = 390;
  logic en = 1, hs = 0, ls = 1, c1, c2;
  logic [DT_W-1:0] dt_sel = '0;
  int checks = 0, failures = 0;
  longint t_hs_r, t_ls_r;

  deadtime #(.DT_W(DT_W), .TDE_PS(TDE)) dut (.en, .hs, .ls, .dt_sel, .c1, .c2);

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

  always @(posedge hs) t_hs_r = longint'($time);
  always @(posedge ls) t_ls_r = longint'($time);
  always @(posedge c1) check(longint'($time) - t_hs_r == longint'(dt_sel) * TDE, "c1 rising delay");
  always @(posedge c2) check(longint'($time) - t_ls_r == longint'(dt_sel) * TDE, "c2 rising delay");
  always @(negedge hs) #1 check(!c1, "c1 did not fall with hs");
  always @(negedge ls) #1 check(!c2, "c2 did not fall with ls");
  always @(c1 or c2) #1 check(!(c1 && c2), "c1 and c2 overlap");

  int n_c1 = 0;
  always @(posedge c1) n_c1++;

  initial begin
    #(40_000);
    for (int i = 0; i < 100; i++) begin
      dt_sel = DT_W'($urandom_range(1, 2**DT_W - 1));
      #(30_000);
      hs = 1; ls = 0;
      #(longint'(dt_sel) * TDE + $urandom_range(1000, 20000));
      hs = 0; ls = 1;
      #(longint'(dt_sel) * TDE + $urandom_range(1000, 20000));
    end
    check(n_c1 == 100, $sformatf("c1 pulses %0d", n_c1));
    en = 0;
    #1;
    check(!c1 && !c2, "gates not off with en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
