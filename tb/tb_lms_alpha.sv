// tb_lms_alpha: checks one LMS step of lms_alpha against a real-valued
// reference, then closes the loop around an exact model of a stage in the
// PHI_C1 configuration (zero input, V_cal on the sub-DAC path):
//     D_res = gamma1 * V_r + gamma3 * V_r^3,  V_r = -(1 + eps) * D_cal
// and checks that a1 and a3 settle at gamma1*(1+eps) and near
// -gamma3/gamma1^3 within 4096 iterations.
module tb_lms_alpha;
  import calib_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic fx_t r2fx(real v); return fx_t'($rtoi(v * 1048576.0)); endfunction
  function automatic real fx2r(fx_t v); return real'(v) / 1048576.0; endfunction
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  fx_t d_res, d_cal, a1, a3, e1, a1_next, a3_next;
  lms_alpha dut (.d_res, .d_cal, .a1, .a3, .e1, .a1_next, .a3_next);

  localparam real LEVELS [5] = '{1.0/16, 4.0/16, 8.0/16, 12.0/16, 15.0/16};

  initial begin
    real r_res, r_cal, r_a1, r_a3, r_e1, r_a1n, r_a3n;
    real eps, g1, g3, vr;
    // single steps against a real-valued reference
    for (int i = 0; i < 200; i++) begin
      r_res = (real'($urandom_range(2000, 0)) - 1000.0) / 1000.0;
      r_cal = real'($urandom_range(1000, 0)) / 1000.0;
      r_a1  = 0.9 + real'($urandom_range(200, 0)) / 1000.0;
      r_a3  = (real'($urandom_range(200, 0)) - 100.0) / 10000.0;
      d_res = r2fx(r_res); d_cal = r2fx(r_cal); a1 = r2fx(r_a1); a3 = r2fx(r_a3);
      #1;
      r_res = fx2r(d_res); r_cal = fx2r(d_cal); r_a1 = fx2r(a1); r_a3 = fx2r(a3);
      r_e1  = r_res + r_a3 * r_res**3 + r_a1 * r_cal;
      r_a1n = r_a1 - r_e1 * r_cal / 16.0;
      r_a3n = r_a3 - r_e1 * r_res**3 / 1.0;
      check(rabs(fx2r(e1) - r_e1) < 1e-5, "e1");
      check(rabs(fx2r(a1_next) - r_a1n) < 1e-5, "a1 step");
      check(rabs(fx2r(a3_next) - r_a3n) < 1e-5, "a3 step");
    end
    // closed loop
    eps = -0.002; g1 = 0.99; g3 = -0.005;
    a1 = r2fx(1.0); a3 = '0;
    for (int it = 0; it < 4096; it++) begin
      r_cal = LEVELS[$urandom_range(4, 0)];
      vr    = -(1.0 + eps) * r_cal;
      d_cal = r2fx(r_cal);
      d_res = r2fx(g1 * vr + g3 * vr**3);
      #1;
      a1 = a1_next; a3 = a3_next;
      #1;
    end
    $display("a1=%f (%f) a3=%f (%f)", fx2r(a1), g1*(1+eps), fx2r(a3), -g3/(g1**3));
    check(rabs(fx2r(a1) - g1*(1+eps)) < 0.0005, "a1 converged");
    check(rabs(fx2r(a3) + g3/(g1**3)) < 0.0008, "a3 converged");
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
