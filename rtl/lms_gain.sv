// lms_gain: one LMS step for the inter-stage gain g.
//
// With the same calibration level V_cal on both the input path and the
// sub-DAC path of the stage, the digitized residue obeys
//     (g - a1)*D_cal - D_res - a3*D_res^3 ~ 0 ,
// using the a1 and a3 already estimated. The error and update are
//     e2 = (g - a1)*D_cal - D_res - a3*D_res^3
//     g' = g - mu_g * e2 * D_cal .
// Combinational; the caller stores g' when the sample is valid. The step
// size is mu_g = 2^-MUG_SHIFT, a choice of this design. Q11.20 throughout.
module lms_gain
  import calib_pkg::*;
#(
  parameter int unsigned MUG_SHIFT = 4
) (
  input  fx_t d_res,
  input  fx_t d_cal,
  input  fx_t g,
  input  fx_t a1,
  input  fx_t a3,
  output fx_t e2,
  output fx_t g_next
);

  always_comb begin
    e2     = fx_mul(g - a1, d_cal) - d_res - fx_mul(a3, fx_cube(d_res));
    g_next = g - (fx_mul(e2, d_cal) >>> MUG_SHIFT);
  end

endmodule
