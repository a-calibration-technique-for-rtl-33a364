// tb_mdac_stage: checks the stage model against its equations in every
// phase: the sub-ADC thresholds (with offsets), the residue
// gamma1*V_r + gamma3*V_r^3 with V_r = (2+eps)*V_in - (1+eps)*V_DAC, the
// input multiplexer (V_in, zero, V_cal), the sub-DAC multiplexer
// (D*Vref or V_cal) and the output multiplexer (V_cal in PHI_BE).
module tb_mdac_stage;
  import calib_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  localparam real EPS = -0.003, G1 = 0.98, G3 = -0.01, OP = 0.02, ON = -0.03;
  real vin, vcal, vres, vout;
  phase_e ph;
  dec_t d;
  mdac_stage #(.EPS(EPS), .GAMMA1(G1), .GAMMA3(G3), .OFFSET_P(OP), .OFFSET_N(ON)) dut (
    .vin, .vcal, .ph, .d, .vres, .vout);

  function automatic real f(real vi, real vdac);
    real vr;
    vr = (2.0 + EPS) * vi - (1.0 + EPS) * vdac;
    return G1 * vr + G3 * vr * vr * vr;
  endfunction

  initial begin
    int de;
    for (int i = 0; i < 500; i++) begin
      vin  = (real'($urandom_range(2000, 0)) - 1000.0) / 1000.0;
      vcal = real'($urandom_range(1000, 0)) / 1000.0;
      ph = PH_NORMAL; #1;
      de = (vin > 0.25 + OP) ? 1 : (vin < -0.25 + ON) ? -1 : 0;
      check(int'(d) == de, "sub-ADC decision");
      check(rabs(vres - f(vin, real'(de))) < 1e-12 && rabs(vout - vres) < 1e-12, "normal residue");
      ph = PH_C1; #1;
      check(rabs(vres - f(0.0, vcal)) < 1e-12 && rabs(vout - vres) < 1e-12, "PHI_C1 residue");
      ph = PH_C2; #1;
      check(rabs(vres - f(vcal, vcal)) < 1e-12 && rabs(vout - vres) < 1e-12, "PHI_C2 residue");
      ph = PH_BE; #1;
      check(rabs(vout - vcal) < 1e-12, "PHI_BE routes V_cal to the backend");
    end
    // run-time drift of the error terms
    dut.gamma1 = 0.9; vin = 0.1; ph = PH_NORMAL; #1;
    check(rabs(vres - (0.9 * (2.0 + EPS) * 0.1 + G3 * ((2.0 + EPS) * 0.1)**3)) < 1e-12, "drifted gain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
