// pipelined_adc_top: a 12-bit pipelined ADC with start-up self-measurement
// calibration and sliding-histogram background tracking.
//
// The converter is NUM_STAGES 1.5-bit stages followed by an ideal BE_BITS-
// bit backend converter (two stages and a 10-bit backend by default, for
// NUM_STAGES + BE_BITS = 12 output bits). The analog part is behavioural:
// mdac_stage models each stage with its capacitor mismatch, finite gain,
// amplifier nonlinearity and comparator offsets, cal_ladder the
// calibration levels and backend_adc the ideal backend. The stages are
// evaluated at once on the analog input and the sub-ADC decisions are
// sampled at the same clock edge as the backend code, so the returned
// sample is time aligned with one cycle of latency (in silicon the decision
// delay line of the pipeline does this). The digital part, calib_core, is
// synthesizable and drives the stage multiplexers, picks the calibration
// level, corrects every sample and keeps the coefficients up to date.
//
// Default error values: eps = -0.2 %, gamma1 = 0.99, gamma3 = -0.5 % in
// every stage, and comparator offsets within 3 sigma = Vref/8; the
// individual offset values are this design's choice. MEASURE_G = 0 selects
// the conventional calibration with g fixed at 2, for comparison only (see
// calib_core).
//
// Interface: 'vin' is the analog input (real, Vref = 1, range [-1, 1));
// 'start' starts foreground calibration; 'dout_code' is the corrected
// 12-bit two's-complement output, valid two cycles after the input is
// sampled when 'dout_valid' is high (normal operation).
module pipelined_adc_top
  import calib_pkg::*;
#(
  parameter int unsigned NUM_STAGES   = 2,
  parameter int unsigned BE_BITS      = 10,
  parameter int unsigned FG_ITERS     = 4096,
  parameter int unsigned HIST_BINS    = 4,
  parameter int unsigned HIST_SAMPLES = 2_000_000,
  parameter real EPS          = -0.002,
  parameter real GAMMA1       = 0.99,
  parameter real GAMMA3       = -0.005,
  parameter real OFFSET_P1    = 0.030,
  parameter real OFFSET_N1    = -0.020,
  parameter real OFFSET_P2    = -0.025,
  parameter real OFFSET_N2    = 0.015,
  parameter bit  MEASURE_G    = 1'b1,
  localparam int unsigned OUT_BITS = NUM_STAGES + BE_BITS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  real                        vin,
  output fx_t                        dout,
  output logic signed [OUT_BITS-1:0] dout_code,
  output logic                       dout_valid,
  output logic                       calibrating,
  output logic                       tracking,
  output coef_t                      coef [NUM_STAGES],
  output logic [15:0]                track_updates
);

  phase_e             stage_phase [NUM_STAGES];
  logic [2:0]         cal_sel;
  real                vcal;
  real                vres   [NUM_STAGES];
  dec_t               d_raw  [NUM_STAGES];
  dec_t               d_q    [NUM_STAGES];
  logic [BE_BITS-1:0] be_code;

  cal_ladder u_ladder (.sel(cal_sel), .vcal);

  for (genvar s = 0; s < NUM_STAGES; s++) begin : g_stage
    real vi, vo;
    if (s == 0) begin : g_first
      always_comb vi = vin;
    end else begin : g_next
      always_comb vi = g_stage[s-1].vo;
    end
    mdac_stage #(
      .EPS(EPS), .GAMMA1(GAMMA1), .GAMMA3(GAMMA3),
      .OFFSET_P(s == 0 ? OFFSET_P1 : OFFSET_P2),
      .OFFSET_N(s == 0 ? OFFSET_N1 : OFFSET_N2)
    ) u_stage (
      .vin(vi), .vcal, .ph(stage_phase[s]),
      .d(d_raw[s]), .vres(vres[s]), .vout(vo));
  end

  backend_adc #(.BITS(BE_BITS)) u_be (.clk, .v(g_stage[NUM_STAGES-1].vo), .code(be_code));

  // Sub-ADC decisions sampled with the backend code.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int s = 0; s < NUM_STAGES; s++) d_q[s] <= '0;
    else        for (int s = 0; s < NUM_STAGES; s++) d_q[s] <= d_raw[s];
  end

  calib_core #(
    .NUM_STAGES(NUM_STAGES), .BE_BITS(BE_BITS), .FG_ITERS(FG_ITERS),
    .HIST_BINS(HIST_BINS), .HIST_SAMPLES(HIST_SAMPLES), .ADC_LATENCY(1),
    .MEASURE_G(MEASURE_G)
  ) u_core (
    .clk, .rst_n, .start, .stage_phase, .cal_sel,
    .d(d_q), .be_code,
    .dout, .dout_code, .dout_valid,
    .calibrating, .tracking, .coef, .track_updates);

endmodule
