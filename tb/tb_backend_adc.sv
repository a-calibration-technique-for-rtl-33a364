// tb_backend_adc: checks the ideal backend converter's code
// floor((v+1)/2 * 2^BITS), its clipping at both ends and its one cycle of
// latency.
module tb_backend_adc;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 1'b0;
  real v = 0.0;
  logic [9:0] code;
  backend_adc #(.BITS(10)) dut (.clk, .v, .code);
  always #5 clk = ~clk;

  initial begin
    int e;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk) v = (real'($urandom_range(24000, 0)) - 12000.0) / 10000.0;
      e = int'($floor((v + 1.0) * 512.0));
      if (e < 0) e = 0;
      if (e > 1023) e = 1023;
      @(posedge clk); #1;
      check(int'(code) == e, $sformatf("v=%f code %0d expected %0d", v, code, e));
    end
    @(negedge clk) v = 0.0;
    #1 check(code != 10'd512 || e == 512, "code changes only at the clock edge");
    @(posedge clk); #1 check(code == 10'd512, "mid-scale");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
