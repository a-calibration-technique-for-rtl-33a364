// stage_corrector: digital reconstruction of the input of one 1.5-bit stage.
//
// A 1.5-bit stage amplifies its input by (2+eps), subtracts (1+eps)*D*Vref
// and passes the result through an amplifier with gain gamma1 and cubic
// term gamma3. Inverting that model gives the stage input in terms of the
// digitized residue D_res (produced by the already calibrated stages behind
// it) and the sub-ADC decision D:
//
//     D_in = (D_res + a3 * D_res^3 + a1 * D) / g
//
// with g = gamma1*(2+eps), a1 = gamma1*(1+eps), a3 = -gamma3/gamma1^3. The
// stages are chained from the last to the first, each stage's D_in being
// the D_res of the stage in front of it.
//
// The block is purely combinational: a cube, one multiplier, a select for
// a1*D (D is -1, 0 or +1) and a divider. The formula is the one derived for
// the 1.5-bit stage; the fixed-point format (calib_pkg) and the handling of
// g = 0 (output 0, which never occurs after start-up because g is
// initialised to 2) are this design's choices.
//
// Ports: d_res and coef in Q11.20, d the stage decision, d_in in Q11.20.
module stage_corrector
  import calib_pkg::*;
(
  input  fx_t   d_res,
  input  dec_t  d,
  input  coef_t coef,
  output fx_t   d_in
);

  fx_t num;
  logic signed [2*FX_W-1:0] dividend;
  logic signed [2*FX_W-1:0] quotient;

  always_comb begin
    num      = d_res + fx_mul(coef.a3, fx_cube(d_res)) + fx_by_dec(coef.a1, d);
    dividend = 64'(num) <<< FX_FRAC;
    if (coef.g == '0) quotient = '0;
    else              quotient = dividend / 64'(coef.g);
    d_in = fx_t'(quotient);
  end

endmodule
