`timescale 1ps/1ps
// vfvdm: high-resolution variable-frequency variable-duty modulator.
//
// It turns two on-time commands, hs_in for the high-side switch and ls_in
// for the low-side switch (K+P bits each, unit = one delay element), into
// the complementary gate pair hs/ls.  The switching period is hs_in + ls_in
// and both edges of hs are placed with the resolution of one delay element
// while the only clock is the ~20 MHz base clock of a delay-line ring
// oscillator:
//   * dl_ring_osc makes clk_base and 2**P delayed replicas of it;
//   * vfvdm_ptr_calc splits each command into K coarse bits (base-clock
//     cycles) and P fine bits (delay elements) and computes the tap
//     pointers s1..s4 and the counter thresholds;
//   * four tap_mux instances pick the replicas p1..p4 named by s1..s4;
//   * two vfvdm_cnt_cmp counters (Mode0: falls on p1, rises on p2; Mode1:
//     falls on p3, rises on p4) take turns, one switching cycle each, so the
//     pointers of one mode are updated while the other one runs and every
//     cycle can take new commands;
//   * vfvdm_out merges the triggers and holds hs (Q) and ls (not Q).
// This structure is the one of the modulator description.  Counting in the
// clk_base domain, the 1/2-element tap offset and the minimum phase length
// of 2**P + 1 elements are this design's choices.
//
// Interface and timing: run starts the modulator (first rising edge of hs
// about START_DLY base cycles later) and, when dropped, stops it after the
// next falling edge.  Commands are sampled in the base-clock cycle of each
// rising edge of hs and take effect from the following switching cycle
// (pointers of a mode are computed at the falling edge of the mode before).
// cyc is a one-cycle clk_base strobe in the cycle of each rising edge of hs.
module vfvdm #(
  parameter int unsigned P      = llc_pkg::VF_P,
  parameter int unsigned K      = llc_pkg::VF_K,
  parameter int unsigned TDE_PS = llc_pkg::TDE_PS
) (
  input  logic           rst_n,
  input  logic           run,
  input  logic [K+P-1:0] hs_in,
  input  logic [K+P-1:0] ls_in,
  output logic           clk_base,
  output logic           hs,
  output logic           ls,
  output logic           cyc,
  output logic           mode,      // 1 while Mode1 runs
  output logic [P-1:0]   s1, s2, s3, s4
);
  logic [2**P-1:0] taps;
  logic [K+1:0]    thr_off0, thr_on0, thr_off1, thr_on1;
  logic [K+P-1:0]  hs_q, ls_q;
  logic            p1, p2, p3, p4;
  logic            act0, act1, fire_off0, fire_on0, fire_off1, fire_on1;
  logic            trg_off0, trg_on0, trg_off1, trg_on1;
  logic            on_trg, off_trg;
  logic            idle, kick;

  dl_ring_osc #(.P(P), .TDE_PS(TDE_PS)) u_ring (
    .en(rst_n), .clk_base(clk_base), .taps(taps)
  );

  always_comb begin
    idle = !act0 && !act1;
    kick = run && idle;
    cyc  = fire_on0 | fire_on1;
    mode = act1;
  end

  vfvdm_ptr_calc #(.P(P), .K(K)) u_ptr (
    .clk(clk_base), .rst_n(rst_n), .idle(idle), .rise(cyc),
    .fall0(fire_off0), .fall1(fire_off1), .hs_in(hs_in), .ls_in(ls_in),
    .s1(s1), .s2(s2), .s3(s3), .s4(s4),
    .thr_off0(thr_off0), .thr_on0(thr_on0),
    .thr_off1(thr_off1), .thr_on1(thr_on1),
    .hs_q(hs_q), .ls_q(ls_q)
  );

  tap_mux #(.P(P)) u_mux1 (.taps(taps), .sel(s1), .out(p1));
  tap_mux #(.P(P)) u_mux2 (.taps(taps), .sel(s2), .out(p2));
  tap_mux #(.P(P)) u_mux3 (.taps(taps), .sel(s3), .out(p3));
  tap_mux #(.P(P)) u_mux4 (.taps(taps), .sel(s4), .out(p4));

  vfvdm_cnt_cmp #(.TH_W(K+2)) u_mode0 (
    .clk(clk_base), .rst_n(rst_n), .run(run), .start(fire_on1),
    .thr_off(thr_off0), .thr_on(thr_on0), .p_off(p1), .p_on(p2),
    .active(act0), .fire_off(fire_off0), .fire_on(fire_on0),
    .trg_off(trg_off0), .trg_on(trg_on0)
  );

  vfvdm_cnt_cmp #(.TH_W(K+2)) u_mode1 (
    .clk(clk_base), .rst_n(rst_n), .run(run), .start(fire_on0 | kick),
    .thr_off(thr_off1), .thr_on(thr_on1), .p_off(p3), .p_on(p4),
    .active(act1), .fire_off(fire_off1), .fire_on(fire_on1),
    .trg_off(trg_off1), .trg_on(trg_on1)
  );

  vfvdm_out u_out (
    .rst_n(rst_n), .on0(trg_on0), .on1(trg_on1), .off0(trg_off0), .off1(trg_off1),
    .on_trg(on_trg), .off_trg(off_trg), .hs(hs), .ls(ls)
  );
endmodule
