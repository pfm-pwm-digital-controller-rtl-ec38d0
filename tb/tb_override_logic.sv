`timescale 1ps/1ps
// tb_override_logic: directed walk through every override / optimisation
// routine: entry condition, override values and mux requests while it is
// in force, exit condition, priority of the f_max routine over the
// optimisation, no change without a sample strobe, and clearing by en.
module tb_override_logic;
  import llc_pkg::*;
  logic clk = 0, rst_n = 1'b1, en = 0, smp = 0;
  logic signed [M_W:0] v_err = '0, err_or;
  logic signed [L_W:0] v_err_res = '0, res_or;
  logic d_at_min = 0, d_at_max = 0, f_at_max = 0;
  or_mode_e mode;
  logic mux_f, mux_d;
  int checks = 0, failures = 0;
  initial #1 rst_n = 1'b0;   // falling edge so that asynchronous resets act

  override_logic dut (.clk, .rst_n, .en, .smp, .v_err, .v_err_res, .d_at_min, .d_at_max,
                      .f_at_max, .mode, .mux_f, .mux_d, .err_or, .res_or);
  always #5000 clk = ~clk;

  initial begin
    #(64'd1_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sample(input int e, input int er, input bit dmin, input bit dmax, input bit fmax);
    @(negedge clk);
    v_err = (M_W+1)'(e); v_err_res = (L_W+1)'(er);
    d_at_min = dmin; d_at_max = dmax; f_at_max = fmax;
    smp = 1;
    @(negedge clk);
    smp = 0;
  endtask

  task automatic expect_mode(input or_mode_e m, input string what);
    int eo, ro;
    bit mf, md;
    eo = 0; ro = 0; mf = 0; md = 0;
    case (m)
      OR_OPT:  begin ro = -2; md = 1; end
      OR_FMAX: begin ro =  2; md = 1; end
      OR_DMIN: begin eo = -1; mf = 1; end
      OR_DMAX: begin eo =  1; mf = 1; end
      default: ;
    endcase
    checks++;
    if (mode != m || int'(err_or) != eo || int'(res_or) != ro || mux_f != mf || mux_d != md) begin
      failures++;
      $display("FAIL %s: mode %0d (want %0d) err_or %0d res_or %0d mux %b%b", what, mode, m,
               err_or, res_or, mux_f, mux_d);
    end
  endtask

  initial begin
    #12000 rst_n = 1;
    // disabled: nothing happens
    sample(-3, 0, 0, 0, 0);                 expect_mode(OR_NONE, "disabled");
    en = 1;
    // optimisation: coarse error with D above 50 %
    sample(-3, 0, 0, 0, 0);                 expect_mode(OR_OPT,  "opt entry");
    sample(0, -2, 0, 0, 0);                 expect_mode(OR_OPT,  "opt holds until D_min");
    // no strobe: no change
    @(negedge clk); d_at_min = 1; @(negedge clk); @(negedge clk);
                                            expect_mode(OR_OPT,  "no strobe");
    sample(0, 0, 1, 0, 0);                  expect_mode(OR_NONE, "opt exit at D_min");
    // D_min override
    sample(0, -2, 1, 0, 0);                 expect_mode(OR_DMIN, "dmin entry");
    sample(0, -1, 1, 0, 0);                 expect_mode(OR_DMIN, "dmin holds");
    sample(0, 0, 1, 0, 0);                  expect_mode(OR_DMIN, "dmin holds at zero");
    sample(0, 1, 1, 0, 0);                  expect_mode(OR_NONE, "dmin exit on positive residual");
    sample(0, -2, 1, 0, 0);                 expect_mode(OR_DMIN, "dmin again");
    sample(2, -2, 1, 0, 0);                 expect_mode(OR_NONE, "dmin exit on coarse error");
    // residual negative but D not at the limit: nothing
    sample(0, -2, 0, 0, 0);                 expect_mode(OR_NONE, "no override inside window");
    // D_max override
    sample(0, 2, 0, 1, 0);                  expect_mode(OR_DMAX, "dmax entry");
    sample(0, 1, 0, 1, 0);                  expect_mode(OR_DMAX, "dmax holds");
    sample(0, -1, 0, 1, 0);                 expect_mode(OR_NONE, "dmax exit");
    // f_max override, and its priority over the optimisation
    sample(3, 0, 0, 0, 1);                  expect_mode(OR_FMAX, "fmax entry");
    sample(1, 0, 0, 0, 1);                  expect_mode(OR_FMAX, "fmax holds");
    sample(1, 0, 0, 1, 1);                  expect_mode(OR_NONE, "fmax exit at D_max");
    sample(3, 0, 0, 0, 0);                  expect_mode(OR_OPT,  "opt");
    sample(3, 0, 0, 0, 1);                  expect_mode(OR_FMAX, "fmax preempts opt");
    sample(0, 0, 0, 0, 1);                  expect_mode(OR_NONE, "fmax exit on zero error");
    // en low clears
    sample(-3, 0, 0, 0, 0);                 expect_mode(OR_OPT,  "opt before disable");
    @(negedge clk); en = 0; @(negedge clk);  expect_mode(OR_NONE, "cleared by en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
