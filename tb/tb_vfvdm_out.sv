`timescale 1ps/1ps
// tb_vfvdm_out: output set/reset stage.  Random sequences of Mode0/Mode1
// rising- and falling-edge trigger pulses: hs must rise on every on-trigger
// and fall on every off-trigger at the trigger edge, ls must be its
// complement, and reset must clear hs.
module tb_vfvdm_out;
  logic rst_n = 1'b1, on0 = 0, on1 = 0, off0 = 0, off1 = 0;
  logic on_trg, off_trg, hs, ls;
  int checks = 0, failures = 0;
  initial #1 rst_n = 1'b0;   // falling edge so that asynchronous resets act

  vfvdm_out dut (.rst_n, .on0, .on1, .off0, .off1, .on_trg, .off_trg, .hs, .ls);

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

  initial begin
    #1000;
    check(hs == 0 && ls == 1, "reset");
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      bit m;
      m = $urandom_range(0, 1);
      #($urandom_range(500, 3000));
      if (m) on1 = 1; else on0 = 1;
      #1;
      check(hs == 1 && ls == 0, "hs not set");
      #($urandom_range(100, 400));
      on0 = 0; on1 = 0;
      #($urandom_range(100, 2000));
      check(hs == 1, "hs lost");
      if (m) off1 = 1; else off0 = 1;
      #1;
      check(hs == 0 && ls == 1, "hs not reset");
      #($urandom_range(100, 400));
      off0 = 0; off1 = 0;
    end
    on0 = 1; #10; on0 = 0; #10;
    rst_n = 0; #1;
    check(hs == 0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
