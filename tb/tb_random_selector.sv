// tb_random_selector: checks the level index against an independent model
// of the 16-bit LFSR (x^16 + x^14 + x^13 + x^11 + 1) reduced modulo 5,
// that the index holds while 'next' is low, stays below 5, and that all
// five levels appear with roughly equal frequency.
module tb_random_selector;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 1'b0, rst_n = 1'b0, next = 1'b0;
  logic [2:0] sel;
  random_selector dut (.clk, .rst_n, .next, .sel);
  always #5 clk = ~clk;

  int hist [5];
  initial begin
    logic [15:0] model;
    logic [2:0]  held;
    model = 16'hACE1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk) next = 1'b1;
      @(negedge clk) next = 1'b0;
      model = {model[14:0], model[15] ^ model[13] ^ model[12] ^ model[10]};
      check(sel == 3'(model[7:0] % 5), $sformatf("index %0d expected %0d", sel, model[7:0] % 5));
      check(sel < 5, "index in range");
      if (sel < 5) hist[sel]++;
      held = sel;
      repeat (2) @(negedge clk);
      check(sel == held, "index holds without next");
    end
    for (int l = 0; l < 5; l++)
      check(hist[l] > 850 && hist[l] < 1150, $sformatf("level %0d drawn %0d times", l, hist[l]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
