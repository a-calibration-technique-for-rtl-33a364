// tb_pipelined_adc_top: end-to-end test of the calibrated pipelined ADC.
//
// A full-scale sine with Gaussian-like noise (sum of four uniforms, sigma
// 1.4e-4 Vref, which alone limits a 12-bit converter to about 11.5
// effective bits) drives the converter. Independent noise of 5e-4 Vref is
// put on the calibration levels; it dithers the backend's quantization of
// the levels, which the LMS loops then average away. The test
//   1. measures the effective number of bits (ENOB) before calibration,
//   2. runs foreground calibration and checks the phase sequence, the
//      cycle count, the use of all five calibration levels and the
//      coefficients against their analytic values,
//   3. measures ENOB after calibration (must improve by >= 3 bits and
//      reach 10.5 bits),
//   4. lets the first tracking round record its references, then changes
//      the first stage's errors (eps -0.2 % -> -0.4 %, gamma1 0.99 -> 0.95),
//      measures the degraded ENOB, waits for the tracking update and
//      checks that ENOB recovers and that g and a1 follow the new values.
// ENOB is computed from the residual of a least-squares line fit of the
// output code against the input, so a gain or offset error is not counted
// (as in an SNDR measurement). Every mechanism (each phase, the three
// sliding cases, discarding a noisy bin, a tracking update) must occur.
module tb_pipelined_adc_top;
  import calib_pkg::*;

  // defaults of the top: 4096 iterations per stage, 2,000,000-sample rounds
  localparam int unsigned FG_ITERS     = 4096;
  localparam int unsigned NS = 2;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  real  vin = 0.0;
  fx_t  dout;
  logic signed [11:0] dout_code;
  logic dout_valid, calibrating, tracking;
  coef_t coef [NS];
  logic [15:0] track_updates;

  pipelined_adc_top dut (
    .clk, .rst_n, .start, .vin, .dout, .dout_code, .dout_valid,
    .calibrating, .tracking, .coef, .track_updates);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // --------------------------------------------------------------- stimulus
  real vhist [3];
  longint unsigned n = 0;
  real noise_sigma = 1.4e-4;
  real cal_noise_sigma = 5.0e-4;
  function automatic real unoise();
    real s = 0.0;
    for (int i = 0; i < 4; i++) s += (real'($urandom) / 4294967296.0) - 0.5;
    // four uniforms of variance 1/12 -> variance 1/3
    return s * 1.7320508;
  endfunction

  always @(negedge clk) begin
    n++;
    vin = 0.998 * $sin(2.0 * 3.14159265358979 * 0.0161803398875 * real'(n)) + noise_sigma * unoise();
    dut.u_ladder.noise = cal_noise_sigma * unoise();
  end
  // input seen at the clock edge, and its history
  real vclean;
  always @(posedge clk) begin
    vhist[2] <= vhist[1];
    vhist[1] <= vhist[0];
    vhist[0] <= vin;
  end

  // ------------------------------------------------------- ENOB measurement
  real sx, sy, sxx, sxy, syy; int sn;
  task automatic measure(input int samples, output real enob);
    real mx, my, cxx, cxy, cyy, res;
    sx = 0; sy = 0; sxx = 0; sxy = 0; syy = 0; sn = 0;
    while (sn < samples) begin
      @(posedge clk);
      #1;
      if (dout_valid) begin
        real x, y;
        x = vhist[1];                          // input sampled two edges ago
        y = real'(dout_code) / 2048.0;
        sx += x; sy += y; sxx += x*x; sxy += x*y; syy += y*y; sn++;
      end
    end
    mx = sx / sn; my = sy / sn;
    cxx = sxx / sn - mx*mx; cxy = sxy / sn - mx*my; cyy = syy / sn - my*my;
    res = cyy - cxy*cxy/cxx;                    // residual variance of y
    // full scale 2 Vref, scaled by the fitted gain
    enob = $ln(2.0 * (cxy/cxx) / $sqrt(12.0 * res)) / $ln(2.0);
  endtask

  // ------------------------------------------------------ mechanism counters
  int n_be [NS], n_c1 [NS], n_c2 [NS];
  int lvl_seen [5];
  int n_case1 = 0, n_case2 = 0, n_case3 = 0, n_noisy = 0, n_upd = 0;
  int cal_cycles = 0;

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NS; s++) begin
      if (dut.stage_phase[s] == PH_BE) begin n_be[s]++; lvl_seen[dut.cal_sel]++; end
      if (dut.stage_phase[s] == PH_C1) n_c1[s]++;
      if (dut.stage_phase[s] == PH_C2) n_c2[s]++;
    end
    if (calibrating) cal_cycles++;
    if (dut.u_core.g_trk[0].u_trk.u_h1.hit_case1 || dut.u_core.g_trk[0].u_trk.u_h2.hit_case1) n_case1++;
    if (dut.u_core.g_trk[0].u_trk.u_h1.hit_case2 || dut.u_core.g_trk[0].u_trk.u_h2.hit_case2) n_case2++;
    if (dut.u_core.g_trk[0].u_trk.u_h1.hit_case3 || dut.u_core.g_trk[0].u_trk.u_h2.hit_case3) n_case3++;
    if (dut.u_core.g_trk[0].u_trk.upd) n_upd++;
    // a noisy bin: a non-empty bin above the extracted maximum
    if (dut.u_core.g_trk[0].u_trk.state == 2'd2) begin   // S_APPLY
      for (int i = 0; i < 8; i++)
        if (dut.u_core.g_trk[0].u_trk.u_h1.counts[i] != 0 &&
            dut.u_core.g_trk[0].u_trk.u_h1.win_lo + 12'(i) > dut.u_core.g_trk[0].u_trk.u_h1.max_code)
          begin n_noisy++; break; end
    end
  end

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (7_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real fx2r(fx_t v);
    return real'(v) / real'(1 << FX_FRAC);
  endfunction

  real enob_raw, enob_fg, enob_drift, enob_trk;
  real g_th, a1_th, a3_th, tol;
  coef_t c_fg [NS];
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    measure(16384, enob_raw);
    $display("ENOB before calibration: %f", enob_raw);

    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (tracking);
    check(cal_cycles == 3 * FG_ITERS * NS, $sformatf("foreground takes %0d cycles", cal_cycles));
    for (int s = 0; s < NS; s++) begin
      check(n_be[s] == FG_ITERS && n_c1[s] == FG_ITERS && n_c2[s] == FG_ITERS,
            $sformatf("stage %0d phase counts %0d %0d %0d", s, n_be[s], n_c1[s], n_c2[s]));
      g_th  = 0.99 * (2.0 - 0.002);
      a1_th = 0.99 * (1.0 - 0.002);
      a3_th = 0.005 / (0.99 * 0.99 * 0.99);
      $display("stage %0d: g=%f (%f) a1=%f (%f) a3=%f (%f)", s,
               fx2r(coef[s].g), g_th, fx2r(coef[s].a1), a1_th, fx2r(coef[s].a3), a3_th);
      // The last stage is measured by the 10-bit backend alone, which
      // digitizes the five fixed levels with up to half an LSB (1e-3 Vref)
      // of error, only partly dithered by the level noise; the first stage
      // sees an 11-bit backend.
      tol = (s == NS - 1) ? 4.0 : 1.0;
      check(rabs(fx2r(coef[s].g)  - g_th)  < 0.0025 * tol, "g converged");
      check(rabs(fx2r(coef[s].a1) - a1_th) < 0.0015 * tol, "a1 converged");
      check(rabs(fx2r(coef[s].a3) - a3_th) < 0.0015 * tol, "a3 converged");
      c_fg[s] = coef[s];
    end
    for (int l = 0; l < 5; l++) check(lvl_seen[l] > 0, $sformatf("level %0d used", l));

    measure(16384, enob_fg);
    $display("ENOB after foreground calibration: %f", enob_fg);
    check(enob_fg > 10.5, "ENOB after calibration above 10.5");
    check(enob_fg - enob_raw > 3.0, "calibration gains at least 3 bits");

    // first tracking round records the references; drift just after it
    wait (dut.u_core.g_trk[0].u_trk.ref_valid);
    dut.g_stage[0].u_stage.eps    = -0.004;
    dut.g_stage[0].u_stage.gamma1 = 0.95;
    measure(16384, enob_drift);
    $display("ENOB after drift, before tracking: %f", enob_drift);

    wait (track_updates != 0);
    repeat (4) @(posedge clk);
    measure(16384, enob_trk);
    g_th  = 0.95 * (2.0 - 0.004);
    a1_th = 0.95 * (1.0 - 0.004);
    $display("ENOB after tracking: %f  g=%f (%f) a1=%f (%f)", enob_trk,
             fx2r(coef[0].g), g_th, fx2r(coef[0].a1), a1_th);
    // the second stage did not drift: its tracker must leave it near the
    // foreground values
    $display("second stage after tracking: g=%f a1=%f", fx2r(coef[1].g), fx2r(coef[1].a1));
    check(rabs(fx2r(coef[1].g)  - fx2r(c_fg[1].g))  < 0.004, "untouched stage keeps g");
    check(rabs(fx2r(coef[1].a1) - fx2r(c_fg[1].a1)) < 0.004, "untouched stage keeps a1");
    check(enob_trk > enob_drift + 1.0, "tracking recovers at least 1 bit");
    check(enob_trk > enob_fg - 0.7, "tracking returns near the foreground result");
    check(rabs(fx2r(coef[0].g)  - g_th)  < 0.006, "tracked g");
    check(rabs(fx2r(coef[0].a1) - a1_th) < 0.006, "tracked a1");

    check(n_case1 > 0, "sliding case 1 occurred");
    check(n_case2 > 0, "sliding case 2 occurred");
    check(n_case3 > 0, "sliding case 3 occurred");
    check(n_noisy > 0, "a noisy bin was discarded");
    check(n_upd > 0, "tracking update occurred");
    $display("mechanisms: case1=%0d case2=%0d case3=%0d noisy=%0d updates=%0d",
             n_case1, n_case2, n_case3, n_noisy, n_upd);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
