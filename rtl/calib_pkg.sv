// calib_pkg: types and arithmetic shared by the digital calibration logic
// of a pipelined ADC built from 1.5-bit stages.
//
// All digital quantities (digitized residues D_res, calibration levels
// D_cal, reconstructed stage inputs D_in and the calibration coefficients
// g, a1, a3) are signed fixed-point numbers in units of Vref, FX_W bits wide
// with FX_FRAC fractional bits. The chosen Q11.20 format covers the largest
// intermediate value (about +-3 Vref) with ample headroom and resolves a3,
// which is only a few thousandths, to better than 1e-6. The word size and
// the phase encoding are design choices; the arithmetic is that of the
// stage model D_in = (D_res + a3*D_res^3 + a1*D) / g.
package calib_pkg;

  localparam int unsigned FX_W    = 32;
  localparam int unsigned FX_FRAC = 20;

  typedef logic signed [FX_W-1:0] fx_t;

  // Sub-ADC decision of a 1.5-bit stage: -1, 0 or +1.
  typedef logic signed [1:0] dec_t;

  localparam fx_t FX_ONE = fx_t'(1) <<< FX_FRAC;

  // Operating phase of one stage, following the switch phases of the
  // calibrated MDAC: normal conversion, backend digitizes V_cal (PHI_BE),
  // V_cal on the sub-DAC path with zero input (PHI_C1), V_cal on both the
  // input and the sub-DAC path (PHI_C2).
  typedef enum logic [1:0] {
    PH_NORMAL = 2'd0,
    PH_BE     = 2'd1,
    PH_C1     = 2'd2,
    PH_C2     = 2'd3
  } phase_e;

  // Coefficient set of one stage.
  typedef struct packed {
    fx_t g;
    fx_t a1;
    fx_t a3;
  } coef_t;

  // Fixed-point product, truncated toward minus infinity.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = 64'(a) * 64'(b);
    return fx_t'(p >>> FX_FRAC);
  endfunction

  // x^3 in fixed point.
  function automatic fx_t fx_cube(fx_t x);
    return fx_mul(fx_mul(x, x), x);
  endfunction

  // Multiply by a 1.5-bit decision (a select, not a multiplier).
  function automatic fx_t fx_by_dec(fx_t a, dec_t d);
    if (d == 2'sd1)       return a;
    else if (d == -2'sd1) return -a;
    else                  return '0;
  endfunction

  // Offset-binary code of a CODE_BITS-bit converter spanning [-1, 1) Vref
  // to fixed point, taking the centre of the code bin:
  //   x = (code + 1/2) / 2^(CODE_BITS-1) - 1 .
  function automatic fx_t fx_from_code(logic [31:0] code, int unsigned code_bits);
    fx_t c;
    c = (fx_t'(code) <<< 1) + fx_t'(1) - (fx_t'(1) <<< code_bits);
    return c <<< (FX_FRAC - code_bits);
  endfunction

endpackage
