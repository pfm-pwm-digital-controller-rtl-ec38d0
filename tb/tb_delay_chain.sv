`timescale 1ps/1ps
// tb_delay_chain: every tap must repeat the input, rising and falling
// edges alike, exactly i elements later.
module tb_delay_chain;
  localparam int unsigned N = 6, TDE = 390;
  logic in = 0;
  logic [2**N-1:0] taps;
  int checks = 0, failures = 0;
  longint t_in;
  bit armed = 0;            // the chain settles from its power-up state first

  delay_chain #(.N(N), .TDE_PS(TDE)) dut (.in, .taps);

  initial begin
    #(64'd1_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 1; i < 2**N; i++) begin : g_chk
    logic prev = 1'b0;
    always @(taps) if (taps[i] !== prev) begin
      prev = taps[i];
      if (armed) checks++;
      if (armed && (longint'($time) - t_in != longint'(i) * TDE || taps[i] != in)) begin
        failures++;
        $display("FAIL tap %0d at %0d", i, longint'($time) - t_in);
      end
    end
  end

  initial begin
    #(2**N * TDE + 1000);
    armed = 1;
    repeat (4) begin
      in = ~in;
      t_in = longint'($time);
      #(2**N * TDE + 1000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
