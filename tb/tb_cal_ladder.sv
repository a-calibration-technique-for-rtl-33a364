// tb_cal_ladder: checks that the five taps give 1, 4, 8, 12 and 15
// sixteenths of Vref within the 7-bit accuracy of the ladder (2^-7), that
// they are distinct and increasing, and that out-of-range indices select
// the top tap.
module tb_cal_ladder;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  logic [2:0] sel;
  real vcal, prev;
  cal_ladder dut (.sel, .vcal);
  localparam real NOM [5] = '{1.0/16, 4.0/16, 8.0/16, 12.0/16, 15.0/16};

  initial begin
    real top;
    prev = -1.0;
    for (int i = 0; i < 5; i++) begin
      sel = 3'(i); #1;
      check(rabs(vcal - NOM[i]) < 1.0/128.0, $sformatf("tap %0d = %f", i, vcal));
      check(vcal > prev + 0.05, "taps increase");
      prev = vcal;
    end
    top = vcal;
    for (int i = 5; i < 8; i++) begin
      sel = 3'(i); #1;
      check(vcal == top, "out-of-range index selects the top tap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
