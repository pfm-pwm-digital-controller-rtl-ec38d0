`timescale 1ps/1ps
// error_split: forms the two error signals of the dual-loop controller from
// one ADC word.
//
// The sampled output voltage v_smp is cut into its M most significant bits
// and its L least significant bits.  The MSB section is compared with the
// M-bit reference ref_m, giving the coarse error v_err that drives the
// frequency loop; the LSB section is compared with the L-bit reference
// ref_l, giving the residual error v_err_res that drives the duty-cycle
// loop.  The residual error only has a meaning while v_err is zero.
// Sign convention (this design's reading of the text): error = measured -
// reference, so a positive error means the output is too high.
// err_m / err_l are the "MSB error" and "LSB error" flags.
// Purely combinational.
module error_split #(
  parameter int unsigned ADC_W = llc_pkg::ADC_W,
  parameter int unsigned L_W   = llc_pkg::L_W,
  localparam int unsigned M_W  = ADC_W - L_W
) (
  input  logic [ADC_W-1:0]      v_smp,
  input  logic [M_W-1:0]        ref_m,
  input  logic [L_W-1:0]        ref_l,
  output logic signed [M_W:0]   v_err,
  output logic signed [L_W:0]   v_err_res,
  output logic                  err_m,
  output logic                  err_l
);
  always_comb begin
    v_err     = $signed({1'b0, v_smp[ADC_W-1:L_W]}) - $signed({1'b0, ref_m});
    v_err_res = $signed({1'b0, v_smp[L_W-1:0]})     - $signed({1'b0, ref_l});
    err_m     = (v_err != '0);
    err_l     = (v_err_res != '0);
  end
endmodule
