`timescale 1ps/1ps
// vfvdm_cnt_cmp: counter array and comparison logic of one modulator mode
// (Mode0 or Mode1).
//
// The counter runs on clk_base from the cycle after the previous rising
// edge of hs (start strobe, one cycle long) and counts base-clock cycles.
// When it equals thr_off the falling-edge flag fire_off is raised for one
// cycle, when it equals thr_on the rising-edge flag fire_on; the mode then
// ends, and fire_on starts the other mode.  The flags are registered, so
// they are stable for the whole base-clock cycle.  Two trigger flip-flops,
// clocked by the delay-line replicas p_off and p_on that the multiplexers
// pick for this mode, sample the flags: each trigger therefore rises on the
// selected tap inside the flagged cycle, with the time resolution of one
// delay element, and falls one base-clock period later.
// With run low the rising edge is withheld, so the modulator stops after a
// falling edge with hs low.
// The per-mode counter pair and the tap-clocked comparators follow the
// modulator description; counting in clk_base and re-timing the flags on
// the taps is this design's way of doing the comparison.
module vfvdm_cnt_cmp #(
  parameter int unsigned TH_W = 8
) (
  input  logic            clk,        // clk_base
  input  logic            rst_n,
  input  logic            run,
  input  logic            start,      // previous mode's rising-edge cycle
  input  logic [TH_W-1:0] thr_off,
  input  logic [TH_W-1:0] thr_on,
  input  logic            p_off,      // tap replica for the falling edge
  input  logic            p_on,       // tap replica for the rising edge
  output logic            active,
  output logic            fire_off,   // clk_base domain, cycle of the falling edge
  output logic            fire_on,    // clk_base domain, cycle of the rising edge
  output logic            trg_off,    // p_off domain trigger pulse
  output logic            trg_on      // p_on domain trigger pulse
);
  logic [TH_W-1:0] cnt, cnt_n;
  logic            act_n;

  always_comb begin
    act_n = active;
    cnt_n = cnt + 1'b1;
    if (start) begin
      act_n = 1'b1;
      cnt_n = TH_W'(1);
    end else if (active && cnt == thr_on) begin
      act_n = 1'b0;          // the cycle just ending held the rising edge
      cnt_n = '0;
    end else if (!active) begin
      cnt_n = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      cnt      <= '0;
      fire_off <= 1'b0;
      fire_on  <= 1'b0;
    end else begin
      active   <= act_n;
      cnt      <= cnt_n;
      fire_off <= act_n && (cnt_n == thr_off);
      fire_on  <= act_n && (cnt_n == thr_on) && run;
    end
  end

  always_ff @(posedge p_off or negedge rst_n)
    if (!rst_n) trg_off <= 1'b0;
    else        trg_off <= fire_off;

  always_ff @(posedge p_on or negedge rst_n)
    if (!rst_n) trg_on <= 1'b0;
    else        trg_on <= fire_on;
endmodule
