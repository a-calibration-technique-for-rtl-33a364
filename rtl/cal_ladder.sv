// cal_ladder: behavioural model (not synthesizable) of the resistive ladder
// and switch array that generate the calibration levels.
//
// The switch array connects one of five ladder taps, selected by 'sel'
// (values 0..4; larger values select the top tap), to V_cal. The nominal
// levels are 1, 4, 8, 12 and 15 sixteenths of Vref. The ladder is only
// 7-bit accurate: each tap carries a fixed error of less than 2^-7 Vref
// (values below are this model's choice). The calibration does not need
// accurate levels, only levels that stay constant while one iteration
// measures them. Combinational.
//
// 'noise' is added to every level. It is 0 unless a testbench drives it,
// standing in for the sampling noise that a real switch array adds.
module cal_ladder #(
  parameter real ERR0 =  0.0049,
  parameter real ERR1 = -0.0061,
  parameter real ERR2 =  0.0032,
  parameter real ERR3 = -0.0044,
  parameter real ERR4 =  0.0057
) (
  input  logic [2:0] sel,
  output real        vcal
);

  real noise = 0.0;

  always_comb begin
    unique case (sel)
      3'd0:    vcal =  1.0 / 16.0 + ERR0 + noise;
      3'd1:    vcal =  4.0 / 16.0 + ERR1 + noise;
      3'd2:    vcal =  8.0 / 16.0 + ERR2 + noise;
      3'd3:    vcal = 12.0 / 16.0 + ERR3 + noise;
      default: vcal = 15.0 / 16.0 + ERR4 + noise;
    endcase
  end

endmodule
