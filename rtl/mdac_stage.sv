// mdac_stage: behavioural model (not synthesizable) of one 1.5-bit
// pipeline stage with its calibration multiplexers.
//
// The stage quantizes its input to D in {-1, 0, +1} with two comparators
// at +-Vref/4 (plus offsets), converts D back with the sub-DAC, and the
// MDAC forms the residue
//     V_r   = (2 + eps) * V_in - (1 + eps) * V_DAC
//     V_res = gamma1 * V_r + gamma3 * V_r^3
// modelling capacitor mismatch eps, finite amplifier gain and amplifier
// nonlinearity. Voltages are reals in units of Vref (Vref = 1).
//
// Three analog multiplexers serve the self-measurement calibration:
//   Mux 1 (input path)  : V_in normally, V_cal in PHI_C2, zero in PHI_C1
//   Mux 2 (sub-DAC path): D*Vref normally, V_cal in PHI_C1 and PHI_C2
//   Mux 3 (output)      : V_res normally, V_cal in PHI_BE, so that the
//                         backend digitizes the calibration level itself
// The input is taken as zero in PHI_BE too (the stage output is not used).
//
// The error terms are variables initialised from the parameters, so a
// testbench can change them at run time to mimic temperature or supply
// drift. The model is combinational; sampling is done by the caller.
module mdac_stage
  import calib_pkg::*;
#(
  parameter real EPS      = -0.002,
  parameter real GAMMA1   = 0.99,
  parameter real GAMMA3   = -0.005,
  parameter real OFFSET_P = 0.0,    // offset of the +Vref/4 comparator
  parameter real OFFSET_N = 0.0     // offset of the -Vref/4 comparator
) (
  input  real    vin,
  input  real    vcal,
  input  phase_e ph,
  output dec_t   d,
  output real    vres,
  output real    vout
);

  real eps    = EPS;
  real gamma1 = GAMMA1;
  real gamma3 = GAMMA3;

  real vi, vdac, vr;

  always_comb begin
    // Mux 1
    if (ph == PH_NORMAL)  vi = vin;
    else if (ph == PH_C2) vi = vcal;
    else                  vi = 0.0;
    // sub-ADC
    if (vi > 0.25 + OFFSET_P)       d = 2'sd1;
    else if (vi < -0.25 + OFFSET_N) d = -2'sd1;
    else                            d = 2'sd0;
    // Mux 2 and sub-DAC
    if (ph == PH_C1 || ph == PH_C2) vdac = vcal;
    else                            vdac = real'(int'(d));
    // MDAC
    vr   = (2.0 + eps) * vi - (1.0 + eps) * vdac;
    vres = gamma1 * vr + gamma3 * vr * vr * vr;
    // Mux 3
    vout = (ph == PH_BE) ? vcal : vres;
  end

endmodule
