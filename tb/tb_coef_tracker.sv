// tb_coef_tracker: drives the tracker with the backend codes of a linear
// 1.5-bit stage (D_res = g*V_in - a1*D, comparator offsets +0.02/-0.01,
// uniformly distributed input, 11-bit backend). The first round after
// 'restart' must only record references; after the stage's g and a1 drift
// (gamma1 0.99 -> 0.95, eps -0.2 % -> -0.4 %) the next round must produce
// g_new and a1_new close to the drifted values, one round plus the divider
// time after the round started. A later 'restart' must drop the references.
module tb_coef_tracker;
  import calib_pkg::*;

  localparam int unsigned HS = 100_000;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic fx_t r2fx(real v); return fx_t'($rtoi(v * 1048576.0)); endfunction
  function automatic real fx2r(fx_t v); return real'(v) / 1048576.0; endfunction
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, restart = 1'b0, valid = 1'b0;
  dec_t d;
  logic [10:0] code;
  fx_t g_cur, a1_cur, g_new, a1_new, dmax1, dmax2;
  logic upd, ref_valid, round_done;

  coef_tracker #(.CODE_W(11), .N_BINS(4), .HIST_SAMPLES(HS)) dut (
    .clk, .rst_n, .enable, .restart, .valid, .d, .code, .g_cur, .a1_cur,
    .upd, .g_new, .a1_new, .ref_valid, .dmax1, .dmax2, .round_done);

  always #5 clk = ~clk;

  real g_true, a1_true;
  // stage model, one sample per cycle
  always @(negedge clk) begin
    real vi, vr;
    int  dd;
    vi = (real'($urandom) / 4294967296.0) * 2.0 - 1.0;
    dd = (vi > 0.27) ? 1 : (vi < -0.26) ? -1 : 0;
    vr = g_true * vi - a1_true * real'(dd);
    d  = dec_t'(dd);
    vr = (vr + 1.0) * 1024.0;
    code = (vr < 0.0) ? 11'd0 : (vr >= 2048.0) ? 11'd2047 : 11'($rtoi(vr));
  end

  int n_upd = 0;
  always @(posedge clk) if (upd) n_upd++;

  longint t_start, t_upd;
  initial begin
    g_true = 0.99 * 1.998; a1_true = 0.99 * 0.998;
    g_cur = r2fx(g_true); a1_cur = r2fx(a1_true);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) begin enable = 1'b1; valid = 1'b1; restart = 1'b1; end
    @(negedge clk) restart = 1'b0;
    t_start = $time / 10;
    wait (ref_valid);
    $display("references: max1=%f max2=%f", fx2r(dut.ref1), fx2r(dut.ref2));
    check(n_upd == 0, "no update from the reference round");
    check(rabs(fx2r(dut.ref1) - g_true * 0.27) < 0.004, "reference max1 = g*0.27");
    check(rabs(fx2r(dut.ref2) - (g_true * -0.26 + a1_true)) < 0.004, "reference max2 = a1 - g*0.26");
    // drift; the coefficients in use stay at the old values
    g_true = 0.95 * 1.996; a1_true = 0.95 * 0.996;
    wait (upd);
    t_upd = $time / 10;
    $display("update after %0d cycles: g=%f (%f) a1=%f (%f)", t_upd - t_start,
             fx2r(g_new), g_true, fx2r(a1_new), a1_true);
    check(t_upd - t_start >= 2 * HS && t_upd - t_start <= 2 * HS + 80, "update timing");
    check(rabs(fx2r(g_new) - g_true) < 0.006, "g_new");
    check(rabs(fx2r(a1_new) - a1_true) < 0.006, "a1_new");
    // next round: same drifted stage, same answer
    @(posedge clk);
    wait (upd);
    check(rabs(fx2r(g_new) - g_true) < 0.006, "g_new second round");
    check(rabs(fx2r(a1_new) - a1_true) < 0.006, "a1_new second round");
    @(negedge clk) restart = 1'b1;
    @(negedge clk) restart = 1'b0;
    check(!ref_valid, "restart drops the references");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * HS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
