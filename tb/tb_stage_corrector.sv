// tb_stage_corrector: compares the corrected stage input with the
// real-valued formula D_in = (D_res + a3*D_res^3 + a1*D)/g for random
// residues, decisions and coefficients, and checks g = 0 gives zero.
module tb_stage_corrector;
  import calib_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic fx_t r2fx(real v); return fx_t'($rtoi(v * 1048576.0)); endfunction
  function automatic real fx2r(fx_t v); return real'(v) / 1048576.0; endfunction
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  fx_t d_res, d_in;
  dec_t d;
  coef_t coef;
  stage_corrector dut (.d_res, .d, .coef, .d_in);

  initial begin
    real r, g, a1, a3, expct;
    int dd;
    for (int i = 0; i < 1000; i++) begin
      r  = (real'($urandom_range(20000, 0)) - 10000.0) / 10000.0;
      g  = 1.8 + real'($urandom_range(4000, 0)) / 10000.0;
      a1 = 0.9 + real'($urandom_range(2000, 0)) / 10000.0;
      a3 = (real'($urandom_range(200, 0)) - 100.0) / 5000.0;
      dd = int'($urandom_range(2, 0)) - 1;
      d_res = r2fx(r); coef.g = r2fx(g); coef.a1 = r2fx(a1); coef.a3 = r2fx(a3);
      d = dec_t'(dd);
      #1;
      expct = (fx2r(d_res) + fx2r(coef.a3) * fx2r(d_res)**3 + fx2r(coef.a1) * real'(dd)) / fx2r(coef.g);
      check(rabs(fx2r(d_in) - expct) < 4e-6, $sformatf("D_in %f vs %f", fx2r(d_in), expct));
    end
    coef.g = '0; #1;
    check(d_in == '0, "g = 0 gives 0");
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
