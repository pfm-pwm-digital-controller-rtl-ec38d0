`timescale 1ps/1ps
// llc_pkg: constants and types shared by the PFM-PWM controller of a
// half-bridge LLC converter and its delay-line modulator.
//
// Numbers that come from the converter description: 10-bit ADC, 13-bit
// on-time commands split into k = 6 coarse and p = 7 fine bits (128-element
// delay line), resonant frequency 1 MHz, switching range 700 kHz - 1.8 MHz,
// soft-start from 1.8 x f_r to f_r at 50 % duty (the description starts at
// zero duty; this design starts at the modulator's shortest phase).
// Choices of this design: a delay element of 390 ps (so the 128-element
// line gives a base clock of about 20 MHz), an MSB/LSB split of 7/3 bits,
// a 12-bit duty word, a duty window of 50 % - 80 %.  All periods and on-times
// are counted in delay elements (DE).
package llc_pkg;

  // ADC word and its split into the coarse (M) and residual (L) sections
  localparam int unsigned ADC_W = 10;
  localparam int unsigned L_W   = 3;
  localparam int unsigned M_W   = ADC_W - L_W;

  // delay-line modulator
  localparam int unsigned VF_P   = 7;            // fine bits = log2(delay elements)
  localparam int unsigned VF_K   = 6;            // coarse bits (base-clock cycles)
  localparam int unsigned ON_W   = VF_K + VF_P;  // on-time command width (13)
  localparam int unsigned TDE_PS = 390;          // delay of one element, ps

  // switching period, in delay elements: T = 1 / (f * 390 ps)
  localparam int unsigned T_R      = 2564;  // 1.0 MHz, resonance
  localparam int unsigned T_SW_MIN = 1424;  // 1.8 MHz, f_max
  localparam int unsigned T_SW_MAX = 3663;  // 700 kHz, f_min
  localparam int unsigned T_SS0    = 1424;  // soft-start begins at 1.8 x f_r

  // duty cycle of the high-side switch, D = d / 2**D_W
  localparam int unsigned D_W    = 12;
  localparam int unsigned D_HALF = 2048;   // 50 %
  localparam int unsigned D_MIN  = 2048;   // 50 %
  localparam int unsigned D_MAX  = 3277;   // 80 %

  // dead time: delay elements selectable by the dead-time code
  localparam int unsigned DT_W = 6;

  // top-level command bits
  typedef struct packed {
    logic start;    // run the soft-start, then keep switching
    logic loop_en;  // close the voltage loop after the soft-start
    logic duty_en;  // let the duty-cycle loop act
  } cntrl_t;

  // operating state chosen by the system governor
  typedef enum logic [1:0] {
    GOV_IDLE    = 2'd0,
    GOV_STARTUP = 2'd1,
    GOV_OPEN    = 2'd2,
    GOV_CLOSED  = 2'd3
  } gov_state_e;

  // override / optimisation routine in force
  typedef enum logic [2:0] {
    OR_NONE = 3'd0,
    OR_OPT  = 3'd1,   // duty cycle walked down to 50 % (optimisation)
    OR_DMIN = 3'd2,   // D at D_min, residual error negative: lower f
    OR_DMAX = 3'd3,   // D at D_max, residual error positive: raise f
    OR_FMAX = 3'd4    // f at f_max, coarse error positive: raise D
  } or_mode_e;

endpackage
