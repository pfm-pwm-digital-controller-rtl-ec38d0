`timescale 1ps/1ps
// tb_tap_mux: every select value must route exactly that tap, checked with
// one-hot and random tap patterns.
module tb_tap_mux;
  localparam int unsigned P = 7;
  logic [2**P-1:0] taps;
  logic [P-1:0]    sel;
  logic            out;
  int checks = 0, failures = 0;

  tap_mux #(.P(P)) dut (.taps, .sel, .out);

  initial begin
    #(64'd1_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2**P; s++) begin
      sel = P'(s);
      taps = '0; taps[s] = 1'b1; #1;
      checks++; if (out !== 1'b1) failures++;
      taps = ~taps; #1;
      checks++; if (out !== 1'b0) failures++;
      for (int k = 0; k < 4; k++) begin
        taps = {$urandom, $urandom, $urandom, $urandom}; #1;
        checks++; if (out !== taps[s]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
