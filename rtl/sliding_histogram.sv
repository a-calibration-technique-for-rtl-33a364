// sliding_histogram: short histogram that slides up to the largest code.
//
// The largest residue of a 1.5-bit stage (just below a comparator decision
// point) appears as the largest backend code of the samples with a given
// sub-ADC decision. Instead of a histogram over the whole upper half of
// the code range (2^(CODE_W-1) bins), two n-bin histograms H1 and H2 (here
// the lower and upper half of a 2n-bin window starting at code win_lo) move
// toward that maximum as codes arrive:
//   case 1: code in [win_lo, win_lo+2n-1]      -> its bin is counted
//   case 2: code in [win_lo+2n, win_lo+3n-1]   -> window moves up by n: the
//           upper half keeps its counts and becomes the lower half, the new
//           upper half starts from zero, then the code is counted
//   case 3: code k > win_lo+3n-1               -> window becomes
//           [k-n+1, k+n], all counters cleared, k counted
//   codes below win_lo are ignored.
// The window starts at code L = 2^(CODE_W-1) (residue 0) on 'clear'.
//
// At the end of an observation the largest code is read from the window:
// bins near a decision point that collect only noisy samples are much
// lower than their neighbours and are discarded. Here a bin counts when it
// holds at least peak >> NOISE_SHIFT samples (half the tallest bin by
// default, a choice of this design), and max_code is the highest such bin.
// The count of the new sample is not included in max_code until the next
// cycle. Counters saturate at 2^CNT_W-1.
//
// Timing: one sample per cycle when 'valid'; counts update at the clock edge.
// The case strobes are registered for observation.
module sliding_histogram #(
  parameter int unsigned CODE_W      = 11,
  parameter int unsigned N_BINS      = 4,
  parameter int unsigned CNT_W       = 22,
  parameter int unsigned NOISE_SHIFT = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              valid,
  input  logic [CODE_W-1:0] code,
  output logic [CODE_W:0]   win_lo,
  output logic [CNT_W-1:0]  counts [2*N_BINS],
  output logic [CODE_W:0]   max_code,
  output logic              max_found,
  output logic              hit_case1,
  output logic              hit_case2,
  output logic              hit_case3
);

  localparam int unsigned WIN = 2 * N_BINS;
  localparam logic [CODE_W:0] L_START = (CODE_W+1)'(1) << (CODE_W - 1);

  logic [CODE_W+1:0] off;
  logic              below;

  always_comb begin
    below = ({1'b0, code} < win_lo);
    off   = {2'b0, code} - {1'b0, win_lo};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_lo    <= L_START;
      counts    <= '{default: '0};
      hit_case1 <= 1'b0;
      hit_case2 <= 1'b0;
      hit_case3 <= 1'b0;
    end else begin
      hit_case1 <= 1'b0;
      hit_case2 <= 1'b0;
      hit_case3 <= 1'b0;
      if (clear) begin
        win_lo <= L_START;
        counts <= '{default: '0};
      end else if (valid && !below) begin
        if (off < (CODE_W+2)'(WIN)) begin
          hit_case1 <= 1'b1;
          if (counts[off[$clog2(WIN)-1:0]] != '1)
            counts[off[$clog2(WIN)-1:0]] <= counts[off[$clog2(WIN)-1:0]] + 1'b1;
        end else if (off < (CODE_W+2)'(WIN + N_BINS)) begin
          hit_case2 <= 1'b1;
          win_lo <= win_lo + (CODE_W+1)'(N_BINS);
          for (int i = 0; i < WIN; i++) begin
            if (i < N_BINS)                       counts[i] <= counts[i + N_BINS];
            else if (i == int'(off) - N_BINS)     counts[i] <= CNT_W'(1);
            else                                  counts[i] <= '0;
          end
        end else begin
          hit_case3 <= 1'b1;
          win_lo <= {1'b0, code} - (CODE_W+1)'(N_BINS - 1);
          for (int i = 0; i < WIN; i++)
            counts[i] <= (i == N_BINS - 1) ? CNT_W'(1) : '0;
        end
      end
    end
  end

  // Largest non-noisy code of the window.
  logic [CNT_W-1:0] peak;
  always_comb begin
    peak = '0;
    for (int i = 0; i < WIN; i++)
      if (counts[i] > peak) peak = counts[i];
    max_found = 1'b0;
    max_code  = win_lo;
    for (int i = 0; i < WIN; i++) begin
      if (counts[i] != '0 && counts[i] >= (peak >> NOISE_SHIFT)) begin
        max_found = 1'b1;
        max_code  = win_lo + (CODE_W+1)'(i);
      end
    end
  end

  initial assert (N_BINS >= 1 && 3 * N_BINS < (1 << (CODE_W - 1)))
    else $error("N_BINS must be at least 1 and much shorter than the code range");

endmodule
