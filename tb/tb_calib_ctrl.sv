// tb_calib_ctrl: with three stages and five iterations per stage, checks
// cycle by cycle that a start pulse yields PHI_BE, PHI_C1, PHI_C2 five
// times for stage 2, then stage 1, then stage 0, with 'sel_next' before
// every PHI_BE, then normal operation with one 'fg_done' pulse and
// 'tracking' high; a second start repeats the sequence.
module tb_calib_ctrl;
  import calib_pkg::*;

  localparam int NS = 3, IT = 5;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  phase_e phase;
  logic [1:0] cal_stage;
  logic calibrating, tracking, sel_next, fg_done;

  calib_ctrl #(.NUM_STAGES(NS), .FG_ITERS(IT)) dut (
    .clk, .rst_n, .start, .phase, .cal_stage, .calibrating, .tracking, .sel_next, .fg_done);

  always #5 clk = ~clk;

  task automatic run_once();
    phase_e exp_ph [3] = '{PH_BE, PH_C1, PH_C2};
    @(negedge clk) start = 1'b1;
    #1 check(sel_next, "sel_next with start");
    @(negedge clk) start = 1'b0;
    for (int s = NS - 1; s >= 0; s--)
      for (int it = 0; it < IT; it++)
        for (int p = 0; p < 3; p++) begin
          check(calibrating && !tracking, "calibrating");
          check(phase == exp_ph[p], $sformatf("stage %0d iter %0d phase %0d got %s", s, it, p, phase.name()));
          check(int'(cal_stage) == s, "stage index");
          check(sel_next == (p == 2 && !(s == 0 && it == IT - 1)), "sel_next before each PHI_BE");
          check(!fg_done, "no fg_done while calibrating");
          @(negedge clk);
        end
    check(!calibrating && tracking && phase == PH_NORMAL && fg_done, "normal operation, fg_done");
    @(negedge clk);
    check(!fg_done && tracking, "fg_done is one pulse");
    repeat (5) @(negedge clk);
    check(tracking && phase == PH_NORMAL && !sel_next, "stays in normal operation");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!calibrating && !tracking && phase == PH_NORMAL, "idle after reset");
    run_once();
    run_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
