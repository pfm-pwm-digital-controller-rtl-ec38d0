`timescale 1ps/1ps
// vfvdm_out: output stage of the modulator.
//
// The trigger pulses of both modes are merged into on_trg (rising edge of
// hs) and off_trg (falling edge of hs), and a set/reset flip-flop clocked by
// either trigger holds the outputs: hs = Q, ls = not Q.  Merging with OR and
// clocking the flip-flop from the merged triggers is how this design reads
// the output stage; the set/reset element with hs on Q and ls on the
// inverted output is the modulator's own.  The triggers of one switching
// cycle never overlap because each output phase lasts longer than one
// base-clock period (see vfvdm_ptr_calc).
// Timing: hs changes on the delay-line tap that raised the trigger.
module vfvdm_out (
  input  logic rst_n,
  input  logic on0, on1,     // rising-edge triggers, Mode0 / Mode1
  input  logic off0, off1,   // falling-edge triggers, Mode0 / Mode1
  output logic on_trg,
  output logic off_trg,
  output logic hs,
  output logic ls
);
  logic trg_clk;

  always_comb begin
    on_trg  = on0 | on1;
    off_trg = off0 | off1;
    trg_clk = on_trg | off_trg;
    ls      = ~hs;
  end

  always_ff @(posedge trg_clk or negedge rst_n)
    if (!rst_n) hs <= 1'b0;
    else        hs <= on_trg;
endmodule
