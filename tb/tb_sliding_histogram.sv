// tb_sliding_histogram: three instances of the sliding histogram.
//  A (4-bit codes, one bin per histogram) replays the three-sample example
//    of the method: windows {1000,1001} -> A=1000 counted -> B=1010 moves
//    the window to {1001,1010} (case 2) -> C=1110 moves it to {1110,1111}
//    (case 3).
//  B (8-bit codes, two bins) is driven with random codes and compared every
//    cycle with an independent behavioural model of the sliding rules.
//  C (11-bit codes, four bins) receives, in random order, a population
//    shaped like a measured histogram near the decision point (bins
//    1317..1321 holding 377, 345, 250, 370, 113 samples, plus lower codes):
//    the maximum must be 1320, the thin bin 1321 being discarded as noise.
module tb_sliding_histogram;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------ instance A
  logic        va = 1'b0, cla = 1'b0;
  logic [3:0]  ca;
  logic [4:0]  loa, mxa;
  logic [7:0]  cnta [2];
  logic        fa, a1, a2, a3;
  sliding_histogram #(.CODE_W(4), .N_BINS(1), .CNT_W(8)) dut_a (
    .clk, .rst_n, .clear(cla), .valid(va), .code(ca), .win_lo(loa), .counts(cnta),
    .max_code(mxa), .max_found(fa), .hit_case1(a1), .hit_case2(a2), .hit_case3(a3));

  // ------------------------------------------------------------ instance B
  logic        vb = 1'b0, clb = 1'b0;
  logic [7:0]  cb;
  logic [8:0]  lob, mxb;
  logic [11:0] cntb [4];
  logic        fb, b1, b2, b3;
  sliding_histogram #(.CODE_W(8), .N_BINS(2), .CNT_W(12)) dut_b (
    .clk, .rst_n, .clear(clb), .valid(vb), .code(cb), .win_lo(lob), .counts(cntb),
    .max_code(mxb), .max_found(fb), .hit_case1(b1), .hit_case2(b2), .hit_case3(b3));

  // ------------------------------------------------------------ instance C
  logic        vc = 1'b0, clc = 1'b0;
  logic [10:0] cc;
  logic [11:0] loc, mxc;
  logic [15:0] cntc [8];
  logic        fc, c1, c2, c3;
  sliding_histogram #(.CODE_W(11), .N_BINS(4), .CNT_W(16)) dut_c (
    .clk, .rst_n, .clear(clc), .valid(vc), .code(cc), .win_lo(loc), .counts(cntc),
    .max_code(mxc), .max_found(fc), .hit_case1(c1), .hit_case2(c2), .hit_case3(c3));

  task automatic send_a(input logic [3:0] code);
    @(negedge clk) begin va = 1'b1; ca = code; end
    @(negedge clk) va = 1'b0;
  endtask

  // behavioural model for B
  int m_lo, m_cnt [4];
  task automatic model_b(input int code);
    int off;
    if (code < m_lo) return;
    off = code - m_lo;
    if (off < 4) m_cnt[off]++;
    else if (off < 6) begin
      m_lo += 2; m_cnt[0] = m_cnt[2]; m_cnt[1] = m_cnt[3]; m_cnt[2] = 0; m_cnt[3] = 0;
      m_cnt[off - 2] = 1;
    end else begin
      m_lo = code - 1; m_cnt = '{0, 1, 0, 0};
    end
  endtask

  int n1 = 0, n2 = 0, n3 = 0;
  always @(posedge clk) begin
    if (b1 || c1) n1++;
    if (b2 || c2) n2++;
    if (b3 || c3) n3++;
  end

  initial begin
    int pop [$];
    int tmp, j;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // A: the example
    check(loa == 5'd8, "A starts at 1000");
    send_a(4'b1000);
    check(loa == 5'd8 && cnta[0] == 1 && cnta[1] == 0 && a1, "A: sample A counted (case 1)");
    send_a(4'b1010);
    check(loa == 5'd9 && cnta[0] == 0 && cnta[1] == 1 && a2, "A: sample B slides to 1001/1010 (case 2)");
    send_a(4'b1110);
    check(loa == 5'd14 && cnta[0] == 1 && cnta[1] == 0 && a3, "A: sample C slides to 1110/1111 (case 3)");
    send_a(4'b0011);
    check(loa == 5'd14 && cnta[0] == 1 && cnta[1] == 0, "A: code below window ignored");
    check(fa && mxa == 5'd14, "A: maximum 1110");

    // B: random codes against the model
    m_lo = 128; m_cnt = '{0, 0, 0, 0};
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      vb = 1'b1;
      // mostly near the current window, sometimes far above or below
      case ($urandom_range(9, 0))
        0:       cb = 8'($urandom_range(255, 0));
        1, 2:    cb = 8'((m_lo + 4 + $urandom_range(1, 0)) > 255 ? 255 : m_lo + 4 + $urandom_range(1, 0));
        default: cb = 8'((m_lo + $urandom_range(3, 0)) > 255 ? 255 : m_lo + $urandom_range(3, 0));
      endcase
      model_b(int'(cb));
      @(posedge clk); #1;
      check(int'(lob) == m_lo, $sformatf("B window %0d vs %0d", lob, m_lo));
      for (int k = 0; k < 4; k++) check(int'(cntb[k]) == m_cnt[k], "B count");
      if (i % 500 == 499) begin
        @(negedge clk) begin vb = 1'b0; clb = 1'b1; end
        @(negedge clk) clb = 1'b0;
        m_lo = 128; m_cnt = '{0, 0, 0, 0};
        check(lob == 9'd128 && cntb[0] == 0, "B cleared");
      end
    end
    @(negedge clk) vb = 1'b0;

    // C: population shaped like the histogram next to a decision point
    for (int i = 0; i < 3000; i++) pop.push_back(1024 + $urandom_range(292, 0));
    repeat (377) pop.push_back(1317);
    repeat (345) pop.push_back(1318);
    repeat (250) pop.push_back(1319);
    repeat (370) pop.push_back(1320);
    repeat (113) pop.push_back(1321);
    for (int i = pop.size() - 1; i > 0; i--) begin
      j = $urandom_range(i, 0); tmp = pop[i]; pop[i] = pop[j]; pop[j] = tmp;
    end
    foreach (pop[i]) begin
      @(negedge clk) begin vc = 1'b1; cc = 11'(pop[i]); end
    end
    @(negedge clk) vc = 1'b0;
    @(posedge clk); #1;
    $display("C window from %0d, maximum %0d", loc, mxc);
    check(fc && mxc == 12'd1320, "C: maximum code 1320, noisy 1321 discarded");
    check(loc <= 12'd1320 && loc + 7 >= 12'd1321, "C: window around the maximum");

    check(n1 > 0 && n2 > 0 && n3 > 0, "all three cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
