// lms_alpha: one LMS step for the sub-DAC-path coefficients a1 and a3.
//
// With the stage input held at zero and the calibration level V_cal put on
// the sub-DAC path, the digitized residue obeys
//     D_res + a3*D_res^3 + a1*D_cal ~ 0 .
// The error of the current estimate and the LMS update are
//     e1     = D_res + a3*D_res^3 + a1*D_cal
//     a1'    = a1 - mu1 * e1 * D_cal
//     a3'    = a3 - mu3 * e1 * D_res^3 .
// The block computes e1 and the updated coefficients combinationally; the
// caller stores them when the sample is valid. The step sizes are powers of
// two, mu = 2^-MU1_SHIFT and 2^-MU3_SHIFT, so that each update is a shift
// (a choice of this design: no step size is given for the update). All
// values are Q11.20 (calib_pkg).
module lms_alpha
  import calib_pkg::*;
#(
  parameter int unsigned MU1_SHIFT = 4,
  parameter int unsigned MU3_SHIFT = 0
) (
  input  fx_t d_res,     // digitized residue of the stage under calibration
  input  fx_t d_cal,     // digitized calibration level
  input  fx_t a1,
  input  fx_t a3,
  output fx_t e1,
  output fx_t a1_next,
  output fx_t a3_next
);

  fx_t cube;

  always_comb begin
    cube    = fx_cube(d_res);
    e1      = d_res + fx_mul(a3, cube) + fx_mul(a1, d_cal);
    a1_next = a1 - (fx_mul(e1, d_cal) >>> MU1_SHIFT);
    a3_next = a3 - (fx_mul(e1, cube) >>> MU3_SHIFT);
  end

endmodule
