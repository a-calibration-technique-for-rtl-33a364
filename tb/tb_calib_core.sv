// tb_calib_core: the calibration processor against an independent
// analog model written here (two linear 1.5-bit stages with gain errors,
// calibration levels near 1, 4, 8, 12 and 15 sixteenths, ideal 10-bit backend, one cycle latency).
// Checks: only the stage under calibration leaves normal phase, last stage
// first; the coefficients reach g = gamma1*(2+eps), a1 = gamma1*(1+eps),
// a3 = 0 within the backend's quantization; in normal operation the 12-bit
// output equals the input rounded to 12 bits (within two LSBs, the
// residual gain error of the quantized level measurements) two cycles
// after sampling; tracking runs rounds and keeps the coefficients.
module tb_calib_core;
  import calib_pkg::*;

  localparam int NS = 2, IT = 512, HS = 100000;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic real fx2r(fx_t v); return real'(v) / 1048576.0; endfunction
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  phase_e stage_phase [NS];
  logic [2:0] cal_sel;
  dec_t d [NS];
  logic [9:0] be_code;
  fx_t dout;
  logic signed [11:0] dout_code;
  logic dout_valid, calibrating, tracking;
  coef_t coef [NS];
  logic [15:0] track_updates;

  calib_core #(.NUM_STAGES(NS), .BE_BITS(10), .FG_ITERS(IT), .HIST_SAMPLES(HS)) dut (
    .clk, .rst_n, .start, .stage_phase, .cal_sel, .d, .be_code,
    .dout, .dout_code, .dout_valid, .calibrating, .tracking, .coef, .track_updates);

  always #5 clk = ~clk;

  // ideal analog model
  real vin = 0.0, vh [3];
  // levels placed off the backend's code edges (an ideal level exactly on
  // an edge is digitized with a full half-LSB bias)
  localparam real LEV [5] = '{1.0/16 + 0.0011, 4.0/16 - 0.0013, 8.0/16 + 0.0009,
                              12.0/16 - 0.0008, 15.0/16 + 0.0012};
  localparam real G1 [NS] = '{0.993, 0.997};
  localparam real EP [NS] = '{0.002, -0.001};
  always @(posedge clk) begin
    real v, vi, vc, vdac;
    int  dd;
    vc = LEV[cal_sel > 4 ? 4 : cal_sel];
    v  = vin;
    for (int s = 0; s < NS; s++) begin
      vi = (stage_phase[s] == PH_NORMAL) ? v : (stage_phase[s] == PH_C2) ? vc : 0.0;
      dd = (vi > 0.25) ? 1 : (vi < -0.25) ? -1 : 0;
      vdac = (stage_phase[s] == PH_C1 || stage_phase[s] == PH_C2) ? vc : real'(dd);
      d[s] <= dec_t'(dd);
      v = (stage_phase[s] == PH_BE) ? vc : G1[s] * ((2.0 + EP[s]) * vi - (1.0 + EP[s]) * vdac);
    end
    v = (v + 1.0) * 512.0;
    be_code <= (v < 0.0) ? 10'd0 : (v >= 1024.0) ? 10'd1023 : 10'($rtoi(v));
    vh[2] <= vh[1]; vh[1] <= vh[0]; vh[0] <= vin;
  end
  always @(negedge clk) vin = (real'($urandom) / 4294967296.0) * 1.99 - 0.995;

  int bad_phase = 0, order_ok = 1, seen_stage0 = 0;
  always @(posedge clk) if (rst_n) begin
    if (stage_phase[0] != PH_NORMAL && stage_phase[1] != PH_NORMAL) bad_phase++;
    if (stage_phase[0] != PH_NORMAL) seen_stage0 = 1;
    if (seen_stage0 && stage_phase[1] != PH_NORMAL) order_ok = 0;
  end

  initial begin
    int e, cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!tracking) begin @(negedge clk); cyc++; end
    check(cyc == 3 * IT * NS + 1, $sformatf("foreground length %0d cycles", cyc));
    check(bad_phase == 0, "one stage calibrated at a time");
    check(order_ok == 1 && seen_stage0 == 1, "last stage first");
    for (int s = 0; s < NS; s++) begin
      $display("stage %0d: g=%f a1=%f a3=%f", s, fx2r(coef[s].g), fx2r(coef[s].a1), fx2r(coef[s].a3));
      check(rabs(fx2r(coef[s].g) - G1[s] * (2.0 + EP[s])) < 0.004, "g");
      check(rabs(fx2r(coef[s].a1) - G1[s] * (1.0 + EP[s])) < 0.003, "a1");
      check(rabs(fx2r(coef[s].a3)) < 0.004, "a3");
    end
    repeat (3) @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk); #1;
      if (dout_valid) begin
        e = int'($floor(vh[1] * 2048.0 + 0.5));
        check(dout_code - e <= 2 && e - dout_code <= 2,
              $sformatf("output %0d expected %0d", dout_code, e));
      end
    end
    wait (track_updates >= 2);
    for (int s = 0; s < NS; s++) begin
      $display("stage %0d after tracking: g=%f a1=%f", s, fx2r(coef[s].g), fx2r(coef[s].a1));
      check(rabs(fx2r(coef[s].g) - G1[s] * (2.0 + EP[s])) < 0.006, "g kept by tracking");
      check(rabs(fx2r(coef[s].a1) - G1[s] * (1.0 + EP[s])) < 0.006, "a1 kept by tracking");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
