// coef_tracker: background tracking of a stage's g and a1.
//
// After foreground calibration the amplifier's gain may drift with
// temperature and supply. Ignoring the (small) drift of the cubic term and
// of comparator offsets, a stage obeys D_in = (D_res + a1*D)/g, so the
// largest residue just below each comparator threshold moves with g and a1:
//   D = 0  : D_res,max1 = g * D_in1           (threshold +Vref/4)
//   D = -1 : D_res,max2 = g * D_in2 + a1      (threshold -Vref/4)
// With the threshold inputs unchanged, the coefficients follow from the
// ratio of the new maxima to reference maxima:
//   R      = D_res,max1,new / D_res,max1,ref
//   g_new  = g_ref * R
//   a1_new = D_res,max2,new - R * (D_res,max2,ref - a1_ref)
//
// Two sliding histograms watch the backend code of this stage, one on the
// samples with D = 0 and one on those with D = -1. An observation round
// lasts HIST_SAMPLES valid samples (of all decisions). The first round
// after 'restart' (issued when foreground calibration ends) only records
// the reference maxima together with the coefficients then in use. Every
// later round divides with a 64-cycle iterative divider and then pulses
// 'upd' for one cycle with g_new and a1_new, which the caller loads. A
// round in which either histogram saw no sample makes no update. The
// references are kept from the first round on (they are not replaced by
// later estimates); that, the round length and the code-to-value mapping
// D_res = code/2^(CODE_W-1) - 1 are choices of this design.
module coef_tracker
  import calib_pkg::*;
#(
  parameter int unsigned CODE_W       = 11,
  parameter int unsigned N_BINS       = 4,
  parameter int unsigned HIST_SAMPLES = 2_000_000,
  parameter int unsigned CNT_W        = 22
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,      // normal operation: track
  input  logic              restart,     // drop references, start a round
  input  logic              valid,
  input  dec_t              d,
  input  logic [CODE_W-1:0] code,
  input  fx_t               g_cur,
  input  fx_t               a1_cur,
  output logic              upd,
  output fx_t               g_new,
  output fx_t               a1_new,
  output logic              ref_valid,
  output fx_t               dmax1,       // last measured maxima
  output fx_t               dmax2,
  output logic              round_done
);

  typedef enum logic [1:0] {S_COLLECT, S_DIV, S_APPLY} state_e;
  state_e state;

  logic              hclear;
  logic [CODE_W:0]   lo1, lo2, mx1, mx2;
  logic              f1, f2;
  logic [CNT_W-1:0]  cnt1 [2*N_BINS];
  logic [CNT_W-1:0]  cnt2 [2*N_BINS];
  logic              c11, c12, c13, c21, c22, c23;
  logic [31:0]       nsamp;

  sliding_histogram #(.CODE_W(CODE_W), .N_BINS(N_BINS), .CNT_W(CNT_W)) u_h1 (
    .clk, .rst_n, .clear(hclear), .valid(valid && enable && state == S_COLLECT && d == 2'sd0),
    .code, .win_lo(lo1), .counts(cnt1), .max_code(mx1), .max_found(f1),
    .hit_case1(c11), .hit_case2(c12), .hit_case3(c13));

  sliding_histogram #(.CODE_W(CODE_W), .N_BINS(N_BINS), .CNT_W(CNT_W)) u_h2 (
    .clk, .rst_n, .clear(hclear), .valid(valid && enable && state == S_COLLECT && d == -2'sd1),
    .code, .win_lo(lo2), .counts(cnt2), .max_code(mx2), .max_found(f2),
    .hit_case1(c21), .hit_case2(c22), .hit_case3(c23));

  fx_t ref1, ref2, g_ref, a1_ref;
  fx_t m1, m2, ratio;

  always_comb begin
    m1 = fx_from_code(32'(mx1), CODE_W);
    m2 = fx_from_code(32'(mx2), CODE_W);
  end

  logic                       div_start, div_busy, div_done;
  logic signed [2*FX_W-1:0]   div_q;

  seq_divider #(.W(2*FX_W)) u_div (
    .clk, .rst_n, .start(div_start),
    .dividend(64'(dmax1) <<< FX_FRAC), .divisor(64'(ref1)),
    .busy(div_busy), .done(div_done), .quotient(div_q));

  always_comb ratio = fx_t'(div_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_COLLECT; hclear <= 1'b1; nsamp <= '0;
      ref_valid <= 1'b0; ref1 <= '0; ref2 <= '0; g_ref <= '0; a1_ref <= '0;
      dmax1 <= '0; dmax2 <= '0; upd <= 1'b0; g_new <= '0; a1_new <= '0;
      div_start <= 1'b0; round_done <= 1'b0;
    end else begin
      upd <= 1'b0; div_start <= 1'b0; hclear <= 1'b0; round_done <= 1'b0;
      if (restart || !enable) begin
        state <= S_COLLECT; hclear <= 1'b1; nsamp <= '0;
        if (restart) ref_valid <= 1'b0;
      end else begin
        unique case (state)
          S_COLLECT: if (valid) begin
            if (nsamp == HIST_SAMPLES - 1) begin
              nsamp <= '0;
              round_done <= 1'b1;
              // the last sample is still being counted this cycle; the
              // maxima are read in the cycle after, from S_APPLY
              state <= S_APPLY;
            end else begin
              nsamp <= nsamp + 1'b1;
            end
          end
          S_APPLY: begin
            hclear <= 1'b1;
            dmax1 <= m1; dmax2 <= m2;
            if (f1 && f2) begin
              if (!ref_valid) begin
                ref1 <= m1; ref2 <= m2; g_ref <= g_cur; a1_ref <= a1_cur;
                ref_valid <= 1'b1;
                state <= S_COLLECT;
              end else begin
                div_start <= 1'b1;
                state <= S_DIV;
              end
            end else begin
              state <= S_COLLECT;
            end
          end
          S_DIV: if (div_done) begin
            upd    <= 1'b1;
            g_new  <= fx_mul(g_ref, ratio);
            a1_new <= dmax2 - fx_mul(ratio, ref2 - a1_ref);
            state  <= S_COLLECT;
          end
          default: state <= S_COLLECT;
        endcase
      end
    end
  end

endmodule
