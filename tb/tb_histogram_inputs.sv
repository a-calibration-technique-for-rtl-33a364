// tb_histogram_inputs: the sliding histogram under three input statistics.
// The converter, at its default sizes (two four-bin sliding histograms per
// stage, 2,000,000-sample rounds), is calibrated and then observes a full-
// scale sine, a slow ramp (sawtooth) and uniformly distributed random
// input, one after the other with a reset in between. For each input the
// first stage's histograms at the end of the reference round are printed,
// and the maximum residue codes found next to the +Vref/4 and -Vref/4
// decision points must agree between the three inputs to within one code:
// the sliding histogram finds the largest residue whatever the input
// distribution, as long as codes near the decision points occur.
module tb_histogram_inputs;
  import calib_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  real  vin = 0.0;
  fx_t  dout;
  logic signed [11:0] dout_code;
  logic dout_valid, calibrating, tracking;
  coef_t coef [2];
  logic [15:0] track_updates;

  pipelined_adc_top dut (
    .clk, .rst_n, .start, .vin, .dout, .dout_code, .dout_valid,
    .calibrating, .tracking, .coef, .track_updates);

  always #5 clk = ~clk;

  int kind = 0;
  longint unsigned n = 0;
  always @(negedge clk) begin
    n++;
    case (kind)
      0: vin = 0.998 * $sin(2.0 * 3.14159265358979 * 0.0161803398875 * real'(n));
      1: vin = -0.998 + 1.996 * (real'(n % 65521) / 65521.0);
      default: vin = (real'($urandom) / 4294967296.0) * 1.996 - 0.998;
    endcase
  end

  localparam string NAME [3] = '{"sine", "ramp", "random"};
  int mx1 [3], mx2 [3];

  initial begin
    for (int k = 0; k < 3; k++) begin
      kind = k;
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      wait (tracking);
      // the reference round ends in S_APPLY; look at the histograms then
      wait (dut.u_core.g_trk[0].u_trk.state == 2'd2);
      #1;
      mx1[k] = int'(dut.u_core.g_trk[0].u_trk.u_h1.max_code);
      mx2[k] = int'(dut.u_core.g_trk[0].u_trk.u_h2.max_code);
      $write("%s: D=0 window from %0d:", NAME[k], dut.u_core.g_trk[0].u_trk.u_h1.win_lo);
      for (int i = 0; i < 8; i++) $write(" %0d", dut.u_core.g_trk[0].u_trk.u_h1.counts[i]);
      $write("  max %0d | D=-1 window from %0d:", mx1[k], dut.u_core.g_trk[0].u_trk.u_h2.win_lo);
      for (int i = 0; i < 8; i++) $write(" %0d", dut.u_core.g_trk[0].u_trk.u_h2.counts[i]);
      $display("  max %0d", mx2[k]);
      check(dut.u_core.g_trk[0].u_trk.u_h1.max_found && dut.u_core.g_trk[0].u_trk.u_h2.max_found,
            "maxima found");
      @(posedge clk);
    end
    for (int k = 1; k < 3; k++) begin
      check(mx1[k] - mx1[0] <= 1 && mx1[0] - mx1[k] <= 1, $sformatf("%s max1 agrees with sine", NAME[k]));
      check(mx2[k] - mx2[0] <= 1 && mx2[0] - mx2[k] <= 1, $sformatf("%s max2 agrees with sine", NAME[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
