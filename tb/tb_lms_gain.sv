// tb_lms_gain: checks one LMS step of lms_gain against a real-valued
// reference, then closes the loop around an exact stage in the PHI_C2
// configuration (V_cal on input and sub-DAC paths, so V_r = D_cal):
//     D_res = gamma1 * D_cal + gamma3 * D_cal^3
// with a1 and a3 at their analytic values, and checks that g settles at
// gamma1*(2+eps) within 2048 iterations.
module tb_lms_gain;
  import calib_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic fx_t r2fx(real v); return fx_t'($rtoi(v * 1048576.0)); endfunction
  function automatic real fx2r(fx_t v); return real'(v) / 1048576.0; endfunction
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  fx_t d_res, d_cal, g, a1, a3, e2, g_next;
  lms_gain dut (.d_res, .d_cal, .g, .a1, .a3, .e2, .g_next);

  localparam real LEVELS [5] = '{1.0/16, 4.0/16, 8.0/16, 12.0/16, 15.0/16};

  initial begin
    real r_res, r_cal, r_g, r_a1, r_a3, r_e2, r_gn;
    real eps, g1, g3;
    for (int i = 0; i < 200; i++) begin
      d_res = r2fx((real'($urandom_range(2000, 0)) - 1000.0) / 1000.0);
      d_cal = r2fx(real'($urandom_range(1000, 0)) / 1000.0);
      g     = r2fx(1.9 + real'($urandom_range(200, 0)) / 1000.0);
      a1    = r2fx(0.9 + real'($urandom_range(200, 0)) / 1000.0);
      a3    = r2fx((real'($urandom_range(200, 0)) - 100.0) / 10000.0);
      #1;
      r_res = fx2r(d_res); r_cal = fx2r(d_cal); r_g = fx2r(g); r_a1 = fx2r(a1); r_a3 = fx2r(a3);
      r_e2 = (r_g - r_a1) * r_cal - r_res - r_a3 * r_res**3;
      r_gn = r_g - r_e2 * r_cal / 16.0;
      check(rabs(fx2r(e2) - r_e2) < 1e-5, "e2");
      check(rabs(fx2r(g_next) - r_gn) < 1e-5, "g step");
    end
    eps = -0.002; g1 = 0.99; g3 = -0.005;
    g  = r2fx(2.0);
    a1 = r2fx(g1 * (1.0 + eps));
    a3 = r2fx(-g3 / g1**3);
    for (int it = 0; it < 2048; it++) begin
      r_cal = LEVELS[$urandom_range(4, 0)];
      d_cal = r2fx(r_cal);
      d_res = r2fx(g1 * r_cal + g3 * r_cal**3);
      #1;
      g = g_next;
      #1;
    end
    $display("g=%f (%f)", fx2r(g), g1 * (2.0 + eps));
    check(rabs(fx2r(g) - g1 * (2.0 + eps)) < 0.0005, "g converged");
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
