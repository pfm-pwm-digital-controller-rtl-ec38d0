`timescale 1ps/1ps
// tb_dl_ring_osc: the base-clock period must be 2**P elements and tap i
// must follow clk_base by (i + 1/2) elements on both edges; disabling stops
// the clock low.
module tb_dl_ring_osc;
  localparam int unsigned P = 7, TDE = 390;
  logic en = 1, clk_base;
  logic [2**P-1:0] taps;
  int checks = 0, failures = 0;
  longint t_clk_r = -1, per = 0;

  dl_ring_osc #(.P(P), .TDE_PS(TDE)) dut (.en, .clk_base, .taps);

  initial begin
    #(64'd1_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_base) begin
    if (t_clk_r >= 0) begin
      per = longint'($time) - t_clk_r;
      checks++;
      if (per != longint'(2**P) * TDE) begin failures++; $display("FAIL period %0d", per); end
    end
    t_clk_r = longint'($time);
  end

  for (genvar i = 0; i < 2**P; i += 9) begin : g_chk
    logic prev = 1'b0;
    always @(taps) if (taps[i] !== prev) begin
      longint d;
      prev = taps[i];
      if ($time > 3 * 2**P * TDE && en) begin   // after the line has settled
      d = (longint'($time) - t_clk_r) % (longint'(2**P) * TDE / 2);
      checks++;
      if (d != (longint'(i) * TDE + TDE / 2) % (longint'(2**P) * TDE / 2)) begin
        failures++;
        $display("FAIL tap %0d offset %0d", i, d);
      end
      end
    end
  end

  initial begin
    #(2_000_000);
    en = 0;
    #(200_000);
    checks++;
    if (clk_base != 0) failures++;
    begin
      longint t0;
      t0 = t_clk_r;
      #(500_000);
      checks++;
      if (t_clk_r != t0) begin failures++; $display("FAIL clock still running"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
