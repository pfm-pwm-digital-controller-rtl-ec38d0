`timescale 1ps/1ps
// tb_error_split: exhaustive test of the MSB/LSB error split.  For every
// ADC word and a set of references, v_err must be (word >> 3) - ref_m,
// v_err_res must be (word & 7) - ref_l, and the flags must mark nonzero
// errors.
module tb_error_split;
  import llc_pkg::*;
  logic [ADC_W-1:0] v_smp;
  logic [M_W-1:0]   ref_m;
  logic [L_W-1:0]   ref_l;
  logic signed [M_W:0] v_err;
  logic signed [L_W:0] v_err_res;
  logic err_m, err_l;
  int checks = 0, failures = 0;

  error_split dut (.v_smp, .ref_m, .ref_l, .v_err, .v_err_res, .err_m, .err_l);

  initial begin
    #(64'd1_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      ref_m = M_W'((r * 37 + 5) % 128);
      ref_l = L_W'(r);
      for (int v = 0; v < 1024; v++) begin
        int em, el;
        v_smp = ADC_W'(v);
        #1;
        em = (v / 8) - int'(ref_m);
        el = (v % 8) - int'(ref_l);
        checks++;
        if (int'(v_err) != em || int'(v_err_res) != el || err_m != (em != 0) || err_l != (el != 0)) begin
          failures++;
          if (failures < 10) $display("FAIL v=%0d ref=%0d/%0d got %0d/%0d", v, ref_m, ref_l, v_err, v_err_res);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
