`timescale 1ps/1ps
// sys_governor: operating-mode controller of the PFM-PWM controller.
//
// States: IDLE (modulator off, compensators preset), STARTUP (soft start),
// OPEN (fixed f_r and 50 % duty, loop open) and CLOSED (both loops run).
// Soft start: the on-time commands ss_hs / ss_ls are ramped linearly in
// 2**SS_LOG steps, ss_hs from HS_MIN to T_R/2 and ss_ls from T_SS0 - HS_MIN
// to T_R/2, so
// the switching frequency falls from 1.8 x f_r to f_r while the duty cycle
// rises to 50 %.  The modulator's shortest phase is HS_MIN elements, so the
// high-side ramp starts at HS_MIN instead of zero and the low-side ramp at
// T_SS0 - HS_MIN: the period starts exactly at 1.8 x f_r, the duty at
// HS_MIN / T_SS0 (about 9 %), and both move monotonically to the end
// point.  Each step lasts ss_cycles switching cycles, so
// the duration is programmable (2**SS_LOG * ss_cycles cycles).  The end
// point equals the compensators' preset (T_R, 50 %), so the hand-over to
// closed loop is seamless.  Ramping the two on-times instead of frequency
// and duty (no multiplier) is this design's choice.
// In CLOSED the governor passes the override block's mux requests on as
// mux_f / mux_d, runs the frequency compensator every sample and the duty
// compensator every DUTY_DIV-th sample, and then only while the duty loop
// is enabled and either the coarse error is zero or an override drives it
// (flow chart: duty corrections are fine tuning inside the coarse bin).
// Timing: smp is one clk cycle per switching cycle; all outputs are
// registers or decoded from the state register.
module sys_governor #(
  parameter int unsigned ON_W     = llc_pkg::ON_W,
  parameter int unsigned M_E      = llc_pkg::M_W + 1,
  parameter int unsigned SS_LOG   = 6,
  parameter int unsigned T_END    = llc_pkg::T_R,
  parameter int unsigned T_START  = llc_pkg::T_SS0,
  parameter int unsigned DUTY_DIV = 4,
  parameter int unsigned HS_MIN   = 2**llc_pkg::VF_P + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  smp,
  input  llc_pkg::cntrl_t       cntrl,
  input  logic [7:0]            ss_cycles,
  input  logic signed [M_E-1:0] v_err,
  input  logic                  mux_f_req,
  input  logic                  mux_d_req,
  output llc_pkg::gov_state_e   state,
  output logic                  mod_en,     // modulator runs
  output logic                  ss,         // soft start in progress
  output logic                  preset,     // hold compensators at f_r, 50 %
  output logic                  or_en,      // override logic active
  output logic                  fupd,       // frequency compensator update
  output logic                  dupd,       // duty compensator update
  output logic                  mux_f,
  output logic                  mux_d,
  output logic [ON_W-1:0]       ss_hs,
  output logic [ON_W-1:0]       ss_ls
);
  import llc_pkg::*;

  localparam int unsigned A_W = ON_W + SS_LOG + 2;
  localparam int          HS_STEP = int'(T_END / 2) - int'(HS_MIN);
  localparam int          LS_STEP = int'(T_END / 2) - int'(T_START - HS_MIN);

  logic signed [A_W-1:0] hs_acc, ls_acc;
  logic [7:0]            cyc_cnt;
  logic [SS_LOG-1:0]     step_cnt;
  logic [$clog2(DUTY_DIV+1)-1:0] div_cnt;
  logic                  step;

  always_comb step = smp && (cyc_cnt + 8'd1 >= ss_cycles);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= GOV_IDLE;
      hs_acc   <= '0;
      ls_acc   <= '0;
      cyc_cnt  <= '0;
      step_cnt <= '0;
      div_cnt  <= '0;
    end else if (!cntrl.start) begin
      state <= GOV_IDLE;
    end else begin
      unique case (state)
        GOV_IDLE: begin
          state    <= GOV_STARTUP;
          hs_acc   <= A_W'(HS_MIN * 2**SS_LOG);
          ls_acc   <= A_W'((T_START - HS_MIN) * 2**SS_LOG);
          cyc_cnt  <= '0;
          step_cnt <= '0;
        end
        GOV_STARTUP: if (smp) begin
          cyc_cnt <= step ? 8'd0 : cyc_cnt + 8'd1;
          if (step) begin
            hs_acc   <= hs_acc + A_W'(HS_STEP);
            ls_acc   <= ls_acc + A_W'(LS_STEP);
            step_cnt <= step_cnt + 1'b1;
            if (&step_cnt) state <= cntrl.loop_en ? GOV_CLOSED : GOV_OPEN;
          end
        end
        GOV_OPEN:
          if (cntrl.loop_en) state <= GOV_CLOSED;
        GOV_CLOSED: begin
          if (!cntrl.loop_en) state <= GOV_OPEN;
          if (smp) div_cnt <= (32'(div_cnt) == DUTY_DIV - 1) ? '0 : div_cnt + 1'b1;
        end
        default: state <= GOV_IDLE;
      endcase
    end
  end

  always_comb begin
    mod_en = (state != GOV_IDLE);
    ss     = (state == GOV_STARTUP);
    preset = (state != GOV_CLOSED);
    or_en  = (state == GOV_CLOSED);
    mux_f  = or_en && mux_f_req;
    mux_d  = or_en && mux_d_req;
    fupd   = or_en && smp;
    dupd   = or_en && smp && (div_cnt == '0) && cntrl.duty_en && (mux_d || v_err == 0);
    ss_hs  = ON_W'(hs_acc >>> SS_LOG);
    ss_ls  = ON_W'(ls_acc >>> SS_LOG);
  end
endmodule
