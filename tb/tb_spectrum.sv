// tb_spectrum: output spectrum of the calibrated pipelined ADC, before and
// after calibration and around a drift of the first stage.
//
// The converter runs at its default sizes. For each measurement the input
// switches to a coherent full-scale sine (383 cycles in 4096 samples, so no
// window is needed) with the same Gaussian-like input noise as the other
// end-to-end test, 4096 consecutive output codes are captured, and a
// radix-2 FFT computed here gives
//   SNDR = signal power / power of every other bin except DC,
//   SFDR = signal power / largest other bin.
// Between captures the input is a sine of incommensurate frequency, so the
// sliding histograms of the tracker see a smooth distribution. The noise on
// the calibration levels is the same as in tb_pipelined_adc_top.
//
// The FFT is first checked on an ideally quantized 12-bit tone (about
// 74 dB SNDR expected). Then the test measures the spectrum
//   1. without calibration (ideal coefficients),
//   2. after foreground calibration: SNDR must rise by more than 20 dB and
//      SFDR by more than 25 dB. A second converter on the same input runs
//      the conventional calibration with g fixed at 2 (MEASURE_G = 0); its
//      SNDR must improve by less than 12 dB and end more than 10 dB below,
//   3. after the first stage drifts (eps -0.2 % -> -0.4 %, gamma1 0.99 ->
//      0.95) but before the tracker has reacted,
//   4. after one tracking round: SNDR must come back to within 6 dB of
//      step 2 and SFDR must gain more than 20 dB over step 3. SFDR does not
//      return fully: the drift of gamma1 also moves a3 (= -gamma3/gamma1^3)
//      from 0.0052 to 0.0058, and tracking updates only g and a1.
module tb_spectrum;
  import calib_pkg::*;

  localparam int unsigned NS   = 2;
  localparam int          NFFT = 4096;
  localparam int          LOGN = 12;
  localparam int          J    = 383;    // signal bin, odd so every code phase differs

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

  // The same converter with the conventional calibration (g fixed at 2),
  // on the same input.
  logic signed [11:0] conv_code;
  logic conv_valid;
  pipelined_adc_top #(.MEASURE_G(1'b0)) dut_conv (
    .clk, .rst_n, .start, .vin, .dout(), .dout_code(conv_code),
    .dout_valid(conv_valid), .calibrating(), .tracking(), .coef(),
    .track_updates());

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam real PI = 3.14159265358979;

  // --------------------------------------------------------------- stimulus
  longint unsigned n = 0;
  int  cap_k = -1;            // >= 0 while the coherent tone is applied
  real noise_sigma = 1.4e-4;
  real cal_noise_sigma = 5.0e-4;
  function automatic real unoise();
    real s = 0.0;
    for (int i = 0; i < 4; i++) s += (real'($urandom) / 4294967296.0) - 0.5;
    return s * 1.7320508;     // unit variance
  endfunction

  always @(negedge clk) begin
    n++;
    if (cap_k >= 0) begin
      vin = 0.998 * $sin(2.0 * PI * real'(J) * real'(cap_k) / real'(NFFT));
      cap_k = (cap_k + 1) % NFFT;
    end else begin
      vin = 0.998 * $sin(2.0 * PI * 0.0161803398875 * real'(n));
    end
    vin = vin + noise_sigma * unoise();
    dut.u_ladder.noise = cal_noise_sigma * unoise();
    dut_conv.u_ladder.noise = cal_noise_sigma * unoise();
  end

  // -------------------------------------------------------------------- FFT
  real re [NFFT], im [NFFT];

  function automatic int bitrev(int v);
    int r = 0;
    for (int b = 0; b < LOGN; b++) r |= ((v >> b) & 1) << (LOGN - 1 - b);
    return r;
  endfunction

  // In-place iterative radix-2 decimation-in-time FFT of re/im.
  task automatic fft();
    real tr, ti, wr, wi, ur, ui;
    for (int i = 0; i < NFFT; i++) begin
      int r = bitrev(i);
      if (r > i) begin
        tr = re[i]; re[i] = re[r]; re[r] = tr;
        ti = im[i]; im[i] = im[r]; im[r] = ti;
      end
    end
    for (int len = 2; len <= NFFT; len *= 2) begin
      for (int i = 0; i < NFFT; i += len) begin
        for (int k = 0; k < len / 2; k++) begin
          wr =  $cos(2.0 * PI * real'(k) / real'(len));
          wi = -$sin(2.0 * PI * real'(k) / real'(len));
          ur = re[i + k];
          ui = im[i + k];
          tr = re[i + k + len/2] * wr - im[i + k + len/2] * wi;
          ti = re[i + k + len/2] * wi + im[i + k + len/2] * wr;
          re[i + k]         = ur + tr;
          im[i + k]         = ui + ti;
          re[i + k + len/2] = ur - tr;
          im[i + k + len/2] = ui - ti;
        end
      end
    end
  endtask

  // SNDR and SFDR in dB from the samples in re[] (im[] is cleared here).
  task automatic analyse(output real sndr, output real sfdr);
    real p, psig, pnd, pmax;
    for (int i = 0; i < NFFT; i++) im[i] = 0.0;
    fft();
    psig = 0.0; pnd = 0.0; pmax = 0.0;
    for (int k = 1; k < NFFT / 2; k++) begin
      p = re[k] * re[k] + im[k] * im[k];
      if (k == J) psig = p;
      else begin
        pnd += p;
        if (p > pmax) pmax = p;
      end
    end
    sndr = 10.0 * $log10(psig / pnd);
    sfdr = 10.0 * $log10(psig / pmax);
  endtask

  // Capture NFFT consecutive output codes of the coherent tone from both
  // converters; the first pair of results is for 'dut', the second for
  // 'dut_conv'.
  real rc [NFFT];
  task automatic capture(input string what, output real sndr, output real sfdr,
                         output real sndr_c, output real sfdr_c);
    cap_k = 0;
    repeat (16) @(posedge clk);         // let the pipeline fill with the tone
    for (int i = 0; i < NFFT; ) begin
      @(posedge clk);
      #1;
      if (dout_valid && conv_valid) begin
        re[i] = real'(dout_code) / 2048.0;
        rc[i] = real'(conv_code) / 2048.0;
        i++;
      end
    end
    cap_k = -1;
    analyse(sndr, sfdr);
    $display("%s: SNDR %6.2f dB  SFDR %6.2f dB  (ENOB %5.2f)", what, sndr, sfdr,
             (sndr - 1.76) / 6.02);
    for (int i = 0; i < NFFT; i++) re[i] = rc[i];
    analyse(sndr_c, sfdr_c);
    $display("%s  with g fixed at 2: SNDR %6.2f dB  SFDR %6.2f dB", what, sndr_c, sfdr_c);
  endtask

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (7_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real s_ideal, f_ideal, s_raw, f_raw, s_fg, f_fg, s_dr, f_dr, s_trk, f_trk;
  real sc_raw, fc_raw, sc_fg, fc_fg, sc_x, fc_x;
  initial begin
    // measurement self-test: ideal 12-bit quantization of the same tone
    for (int i = 0; i < NFFT; i++)
      re[i] = real'($floor(0.998 * $sin(2.0 * PI * real'(J) * real'(i) / real'(NFFT)) * 2048.0))
              / 2048.0;
    analyse(s_ideal, f_ideal);
    $display("ideal 12-bit tone: SNDR %6.2f dB  SFDR %6.2f dB", s_ideal, f_ideal);
    check(s_ideal > 72.5 && s_ideal < 75.5, "FFT gives the 12-bit quantization SNDR");

    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    capture("before calibration      ", s_raw, f_raw, sc_raw, fc_raw);
    check(sc_raw == s_raw, "both converters agree before calibration");

    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (tracking);
    capture("after foreground        ", s_fg, f_fg, sc_fg, fc_fg);
    check(s_fg - s_raw > 20.0, "foreground calibration raises SNDR by more than 20 dB");
    check(f_fg - f_raw > 25.0, "foreground calibration raises SFDR by more than 25 dB");
    check(sc_fg - s_raw < 12.0, "with g fixed at 2, SNDR improves by less than 12 dB");
    check(s_fg - sc_fg > 10.0, "measuring g wins by more than 10 dB SNDR");

    // first tracking round records the references; drift just after it
    wait (dut.u_core.g_trk[0].u_trk.ref_valid);
    dut.g_stage[0].u_stage.eps    = -0.004;
    dut.g_stage[0].u_stage.gamma1 = 0.95;
    capture("after drift             ", s_dr, f_dr, sc_x, fc_x);
    check(s_dr < s_fg - 15.0, "drift degrades SNDR");

    wait (track_updates != 0);
    repeat (4) @(posedge clk);
    capture("after one tracking round", s_trk, f_trk, sc_x, fc_x);
    check(s_trk > s_fg - 6.0, "tracking restores SNDR");
    check(f_trk > f_dr + 20.0, "tracking raises SFDR by more than 20 dB");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
