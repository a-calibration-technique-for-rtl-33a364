// calib_ctrl: sequencer of the calibration.
//
// Foreground calibration runs at start-up (on 'start') from the last stage
// to the first, so that the stages behind the stage under calibration are
// already calibrated and act as its backend converter. For each stage it
// runs FG_ITERS iterations of three conversion cycles, the phases of the
// calibrated MDAC:
//   PHI_BE : the calibration level V_cal is routed to the backend, which
//            digitizes it as D_cal
//   PHI_C1 : V_cal on the sub-DAC path with zero input; a1, a3 are updated
//   PHI_C2 : V_cal on input and sub-DAC paths; g is updated
// A new random level is requested ('sel_next') in the cycle before every
// PHI_BE, so the level is constant over one iteration. After the first
// stage the controller enters normal operation ('tracking'), pulses
// 'fg_done' once, and stays there (background tracking) until the next
// 'start'. Before the first 'start' the converter runs uncalibrated.
//
// The order of phases and the one-cycle length of each phase follow the
// MDAC switch timing; the iteration count per stage (default 4096,
// enough for the coefficients to settle within about 3000 conversions)
// is this design's choice.
module calib_ctrl
  import calib_pkg::*;
#(
  parameter int unsigned NUM_STAGES = 2,
  parameter int unsigned FG_ITERS   = 4096
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output phase_e                        phase,      // phase of the stage under calibration
  output logic [$clog2(NUM_STAGES+1)-1:0] cal_stage,  // index 0 = first stage
  output logic                          calibrating,
  output logic                          tracking,
  output logic                          sel_next,
  output logic                          fg_done
);

  localparam int unsigned SW = $clog2(NUM_STAGES+1);
  logic [$clog2(FG_ITERS+1)-1:0] iter;
  logic last_iter;

  always_comb begin
    last_iter = (iter == ($clog2(FG_ITERS+1))'(FG_ITERS - 1));
    // request the next level on start and at the end of every iteration
    // that is followed by another one
    sel_next  = (start && !calibrating) ||
                (calibrating && phase == PH_C2 && !(last_iter && cal_stage == '0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= PH_NORMAL;
      cal_stage   <= '0;
      calibrating <= 1'b0;
      tracking    <= 1'b0;
      fg_done     <= 1'b0;
      iter        <= '0;
    end else begin
      fg_done <= 1'b0;
      if (start && !calibrating) begin
        calibrating <= 1'b1;
        tracking    <= 1'b0;
        cal_stage   <= SW'(NUM_STAGES - 1);
        phase       <= PH_BE;
        iter        <= '0;
      end else if (calibrating) begin
        unique case (phase)
          PH_BE: phase <= PH_C1;
          PH_C1: phase <= PH_C2;
          PH_C2: begin
            if (!last_iter) begin
              iter  <= iter + 1'b1;
              phase <= PH_BE;
            end else if (cal_stage != '0) begin
              iter      <= '0;
              cal_stage <= cal_stage - 1'b1;
              phase     <= PH_BE;
            end else begin
              phase       <= PH_NORMAL;
              calibrating <= 1'b0;
              tracking    <= 1'b1;
              fg_done     <= 1'b1;
            end
          end
          default: phase <= PH_BE;
        endcase
      end
    end
  end

  // A calibration phase only occurs while calibrating.
  assert property (@(posedge clk) disable iff (!rst_n) (phase != PH_NORMAL) |-> calibrating);
  assert property (@(posedge clk) disable iff (!rst_n) !(calibrating && tracking));

endmodule
