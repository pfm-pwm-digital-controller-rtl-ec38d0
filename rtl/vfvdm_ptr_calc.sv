`timescale 1ps/1ps
// vfvdm_ptr_calc: "pointer and comparators' threshold calculations" of the
// high-resolution variable-frequency variable-duty modulator.
//
// Each on-time command (hs, ls; K+P bits, unit = one delay element) is split
// into a coarse part (K MSBs, base-clock cycles) and a fine part (P LSBs,
// delay elements).  The switching cycles alternate between Mode0 and Mode1.
// In Mode0 the high-side output falls on tap s1 and rises on tap s2; in
// Mode1 it falls on s3 and rises on s4.  The pointers move every cycle by
//   s1 = s4 + hs_f          s2 = s4 + hs_f + ls_f
//   s3 = s2 + hs_f          s4 = s2 + hs_f + ls_f      (all modulo 2**P)
// and the wrap-around carries are added to the coarse counts, giving for a
// mode the base-clock cycle, counted from the cycle of the previous rising
// edge, in which each edge falls:
//   thr_off = hs_c + carry(R + hs_f)
//   thr_on  = thr_off + ls_c + carry(s_fall + ls_f)
// with R the pointer of the previous rising edge.
//
// Timing (clk = clk_base): the commands are registered in the cycle of every
// rising edge of hs (start of a switching cycle, fire_on strobe); the
// pointers and thresholds of the other mode are recomputed in the cycle of
// the falling edge of the current mode (fire_off strobe), as in the
// modulator description, so the mode that is running is never disturbed.
// Commands below 2**P + 1 elements are raised to that value: a trigger
// pulse of this modulator lasts one base-clock period, so each output phase
// must be longer than that (a limit of this design).
// While idle the Mode1 pointers are zero and Mode1 only issues the first
// rising edge, START_DLY cycles after the start.
module vfvdm_ptr_calc #(
  parameter int unsigned P         = 7,
  parameter int unsigned K         = 6,
  parameter int unsigned START_DLY = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           idle,      // modulator stopped
  input  logic           rise,      // this cycle holds a rising edge of hs
  input  logic           fall0,     // this cycle holds the Mode0 falling edge
  input  logic           fall1,     // this cycle holds the Mode1 falling edge
  input  logic [K+P-1:0] hs_in,
  input  logic [K+P-1:0] ls_in,
  output logic [P-1:0]   s1, s2, s3, s4,
  output logic [K+1:0]   thr_off0, thr_on0, thr_off1, thr_on1,
  output logic [K+P-1:0] hs_q, ls_q
);
  localparam int unsigned W = K + P;
  localparam logic [W-1:0] MIN_ON = W'(2**P + 1);

  typedef struct packed {
    logic [P-1:0] s_fall;
    logic [P-1:0] s_rise;
    logic [K+1:0] t_off;
    logic [K+1:0] t_on;
  } mode_set_t;

  function automatic logic [W-1:0] clamp_on(input logic [W-1:0] v);
    return (v < MIN_ON) ? MIN_ON : v;
  endfunction

  // pointers and thresholds of one mode, from the previous rising pointer r
  function automatic mode_set_t calc(input logic [P-1:0] r,
                                     input logic [W-1:0] hs_v,
                                     input logic [W-1:0] ls_v);
    mode_set_t m;
    logic [P:0] f_sum, r_sum;
    f_sum    = {1'b0, r} + {1'b0, hs_v[P-1:0]};
    m.s_fall = f_sum[P-1:0];
    r_sum    = {1'b0, m.s_fall} + {1'b0, ls_v[P-1:0]};
    m.s_rise = r_sum[P-1:0];
    m.t_off  = (K+2)'(hs_v[W-1:P]) + (K+2)'(f_sum[P]);
    m.t_on   = m.t_off + (K+2)'(ls_v[W-1:P]) + (K+2)'(r_sum[P]);
    return m;
  endfunction

  mode_set_t idle0, next0, next1;
  always_comb begin
    idle0 = calc('0, clamp_on(hs_in), clamp_on(ls_in));
    next0 = calc(s4, hs_q, ls_q);
    next1 = calc(s2, hs_q, ls_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs_q <= MIN_ON;  ls_q <= MIN_ON;
      s1 <= '0;  s2 <= '0;  s3 <= '0;  s4 <= '0;
      thr_off0 <= '0;  thr_on0 <= '0;
      thr_off1 <= '0;  thr_on1 <= (K+2)'(START_DLY);
    end else if (idle) begin
      hs_q <= clamp_on(hs_in);
      ls_q <= clamp_on(ls_in);
      {s1, s2, thr_off0, thr_on0} <= idle0;
      s3 <= '0;  s4 <= '0;
      thr_off1 <= '0;                       // never reached: no falling edge
      thr_on1  <= (K+2)'(START_DLY);        // first rising edge on tap 0
    end else begin
      if (rise) begin
        hs_q <= clamp_on(hs_in);
        ls_q <= clamp_on(ls_in);
      end
      if (fall0) {s3, s4, thr_off1, thr_on1} <= next1;
      if (fall1) {s1, s2, thr_off0, thr_on0} <= next0;
    end
  end
endmodule
