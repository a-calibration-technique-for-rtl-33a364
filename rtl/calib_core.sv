// calib_core: digital calibration processor of a pipelined ADC made of
// NUM_STAGES 1.5-bit stages and a BE_BITS-bit backend converter.
//
// Correction chain. The backend code is turned into the residue of the
// last stage, and each stage_corrector, from the last stage to the first,
// reconstructs its stage input D_in = (D_res + a3*D_res^3 + a1*D)/g, which
// is the residue of the stage in front. The first stage's D_in is the
// converter output (dout, Q11.20 in units of Vref) and is also rounded to
// a NUM_STAGES+BE_BITS bit two's-complement code (dout_code).
//
// Foreground calibration (calib_ctrl) works on one stage at a time, last
// stage first. The digitized value seen by the stage under calibration is
// the corrected output of the stages behind it. PHI_BE stores it as D_cal;
// PHI_C1 feeds it as D_res to lms_alpha and loads a1 and a3; PHI_C2 feeds
// it to lms_gain and loads g. All coefficients are reset to their ideal
// values g = 2, a1 = 1, a3 = 0 at reset and on 'start'.
//
// Background tracking. During normal operation one coef_tracker per stage
// watches that stage's backend code (the corrected output of the stages
// behind it, quantized to that backend's resolution, BE_BITS plus one bit
// per later stage) and, after each observation round, reloads g and a1.
//
// MEASURE_G = 0 turns the core into the conventional self-measurement
// calibration, kept only for comparison: g stays at its ideal value 2 in
// every stage, the PHI_C2 result is discarded and tracking is off (it
// rescales the measured g). With g fixed, the gain error of the later stages
// leaks into the coefficients of the earlier ones, which is what measuring
// g avoids.
//
// Interface and timing. The analog side receives the phase of every stage
// (stage_phase) and the calibration-level index (cal_sel). It returns the
// sub-ADC decisions and the backend code ADC_LATENCY cycles later; the core
// delays its own phase tags by ADC_LATENCY to match. Correction is
// combinational from the returned sample to the registered outputs, so
// dout lags the returned sample by one cycle. dout_valid marks samples
// taken in normal operation.
module calib_core
  import calib_pkg::*;
#(
  parameter int unsigned NUM_STAGES   = 2,
  parameter int unsigned BE_BITS      = 10,
  parameter int unsigned FG_ITERS     = 4096,
  parameter int unsigned HIST_BINS    = 4,
  parameter int unsigned HIST_SAMPLES = 2_000_000,
  parameter int unsigned ADC_LATENCY  = 1,
  parameter int unsigned MU1_SHIFT    = 4,
  parameter int unsigned MU3_SHIFT    = 0,
  parameter int unsigned MUG_SHIFT    = 4,
  parameter bit          MEASURE_G    = 1'b1,
  localparam int unsigned OUT_BITS    = NUM_STAGES + BE_BITS,
  localparam int unsigned SW          = $clog2(NUM_STAGES+1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  // to the analog stages
  output phase_e              stage_phase [NUM_STAGES],
  output logic [2:0]          cal_sel,
  // from the analog stages
  input  dec_t                d [NUM_STAGES],
  input  logic [BE_BITS-1:0]  be_code,
  // converter output
  output fx_t                 dout,
  output logic signed [OUT_BITS-1:0] dout_code,
  output logic                dout_valid,
  // status
  output logic                calibrating,
  output logic                tracking,
  output coef_t               coef [NUM_STAGES],
  output logic [15:0]         track_updates
);

  // ---------------------------------------------------------------- control
  phase_e        phase;
  logic [SW-1:0] cal_stage;
  logic          sel_next, fg_done;

  calib_ctrl #(.NUM_STAGES(NUM_STAGES), .FG_ITERS(FG_ITERS)) u_ctrl (
    .clk, .rst_n, .start, .phase, .cal_stage, .calibrating, .tracking,
    .sel_next, .fg_done);

  random_selector #(.NUM_LEVELS(5)) u_sel (
    .clk, .rst_n, .next(sel_next), .sel(cal_sel));

  always_comb begin
    for (int s = 0; s < NUM_STAGES; s++)
      stage_phase[s] = (calibrating && cal_stage == SW'(s)) ? phase : PH_NORMAL;
  end

  // Phase tags delayed to line up with the returned samples.
  phase_e        tag_ph [ADC_LATENCY+1];
  logic [SW-1:0] tag_st [ADC_LATENCY+1];
  logic          tag_nm [ADC_LATENCY+1];   // sample from normal operation
  always_comb begin
    tag_ph[0] = phase;
    tag_st[0] = cal_stage;
    tag_nm[0] = !calibrating;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= ADC_LATENCY; i++) begin
        tag_ph[i] <= PH_NORMAL; tag_st[i] <= '0; tag_nm[i] <= 1'b0;
      end
    end else begin
      for (int i = 1; i <= ADC_LATENCY; i++) begin
        tag_ph[i] <= tag_ph[i-1]; tag_st[i] <= tag_st[i-1]; tag_nm[i] <= tag_nm[i-1];
      end
    end
  end
  phase_e        s_ph;
  logic [SW-1:0] s_st;
  always_comb begin
    s_ph = tag_ph[ADC_LATENCY];
    s_st = tag_st[ADC_LATENCY];
  end

  // -------------------------------------------------------- correction chain
  fx_t x [NUM_STAGES+1];   // x[s] = input of stage s, x[NUM_STAGES] = backend residue

  always_comb x[NUM_STAGES] = fx_from_code(32'(be_code), BE_BITS);

  for (genvar s = 0; s < NUM_STAGES; s++) begin : g_corr
    stage_corrector u_corr (.d_res(x[s+1]), .d(d[s]), .coef(coef[s]), .d_in(x[s]));
  end

  // ------------------------------------------------------------ LMS engines
  fx_t d_cal, d_res_cal;
  fx_t e1, e2, a1_nx, a3_nx, g_nx;
  coef_t cc;

  always_comb begin
    d_res_cal = x[1];
    cc        = coef[0];
    for (int s = 0; s < NUM_STAGES; s++) begin
      if (s_st == SW'(s)) begin
        d_res_cal = x[s+1];
        cc        = coef[s];
      end
    end
  end

  lms_alpha #(.MU1_SHIFT(MU1_SHIFT), .MU3_SHIFT(MU3_SHIFT)) u_lms_a (
    .d_res(d_res_cal), .d_cal, .a1(cc.a1), .a3(cc.a3),
    .e1, .a1_next(a1_nx), .a3_next(a3_nx));

  lms_gain #(.MUG_SHIFT(MUG_SHIFT)) u_lms_g (
    .d_res(d_res_cal), .d_cal, .g(cc.g), .a1(cc.a1), .a3(cc.a3),
    .e2, .g_next(g_nx));

  // ------------------------------------------------------ background trackers
  logic tupd [NUM_STAGES];
  fx_t  tg   [NUM_STAGES];
  fx_t  ta1  [NUM_STAGES];

  for (genvar s = 0; s < NUM_STAGES; s++) begin : g_trk
    localparam int unsigned CW = BE_BITS + NUM_STAGES - 1 - s;
    logic [CW-1:0] code;
    logic signed [FX_W:0] scaled;
    always_comb begin
      // code = floor((x + 1) * 2^(CW-1)), clipped to the code range
      scaled = ((FX_W+1)'(x[s+1]) + (FX_W+1)'(FX_ONE)) >>> (FX_FRAC - (CW - 1));
      if (scaled < 0)                              code = '0;
      else if (scaled > (FX_W+1)'((1 << CW) - 1))  code = '1;
      else                                         code = CW'(scaled);
    end
    fx_t dm1, dm2;
    logic rv, rd;
    coef_tracker #(.CODE_W(CW), .N_BINS(HIST_BINS), .HIST_SAMPLES(HIST_SAMPLES)) u_trk (
      .clk, .rst_n, .enable(tracking), .restart(fg_done || start),
      .valid(tag_nm[ADC_LATENCY]), .d(d[s]), .code,
      .g_cur(coef[s].g), .a1_cur(coef[s].a1),
      .upd(tupd[s]), .g_new(tg[s]), .a1_new(ta1[s]),
      .ref_valid(rv), .dmax1(dm1), .dmax2(dm2), .round_done(rd));
  end

  // ------------------------------------------------------ coefficient store
  logic any_upd;
  always_comb begin
    any_upd = 1'b0;
    for (int s = 0; s < NUM_STAGES; s++) any_upd |= tupd[s] & MEASURE_G;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_STAGES; s++)
        coef[s] <= '{g: FX_ONE <<< 1, a1: FX_ONE, a3: '0};
      d_cal         <= '0;
      track_updates <= '0;
    end else if (start && !calibrating) begin
      for (int s = 0; s < NUM_STAGES; s++)
        coef[s] <= '{g: FX_ONE <<< 1, a1: FX_ONE, a3: '0};
    end else begin
      if (s_ph == PH_BE) d_cal <= d_res_cal;
      for (int s = 0; s < NUM_STAGES; s++) begin
        if (s_st == SW'(s) && s_ph == PH_C1) begin
          coef[s].a1 <= a1_nx;
          coef[s].a3 <= a3_nx;
        end
        if (MEASURE_G && s_st == SW'(s) && s_ph == PH_C2) coef[s].g <= g_nx;
        if (MEASURE_G && tupd[s]) begin
          coef[s].g  <= tg[s];
          coef[s].a1 <= ta1[s];
        end
      end
      if (any_upd) track_updates <= track_updates + 1'b1;
    end
  end

  // ----------------------------------------------------------------- output
  logic signed [FX_W:0] q;
  always_comb begin
    // round x[0] to OUT_BITS bits: code = round(x * 2^(OUT_BITS-1))
    q = ((FX_W+1)'(x[0]) + ((FX_W+1)'(1) <<< (FX_FRAC - OUT_BITS))) >>> (FX_FRAC - (OUT_BITS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0; dout_code <= '0; dout_valid <= 1'b0;
    end else begin
      dout       <= x[0];
      dout_valid <= tag_nm[ADC_LATENCY];
      if (q > (FX_W+1)'((1 << (OUT_BITS-1)) - 1))   dout_code <= {1'b0, {(OUT_BITS-1){1'b1}}};
      else if (q < -(FX_W+1)'(1 << (OUT_BITS-1)))   dout_code <= {1'b1, {(OUT_BITS-1){1'b0}}};
      else                                          dout_code <= OUT_BITS'(q);
    end
  end

endmodule
