// random_selector: picks which calibration level the switch array connects.
//
// During foreground calibration every iteration (the three phases PHI_BE,
// PHI_C1, PHI_C2) uses one calibration level, chosen at random among
// NUM_LEVELS taps of the resistive ladder. The index is 3 bits wide, as the
// calibration uses a 3-bit random selector for five levels.
//
// A 16-bit Fibonacci LFSR (taps 16, 14, 13, 11; maximal length) advances
// once per 'next' pulse; the index is the low byte of the LFSR reduced
// modulo NUM_LEVELS, which is uniform to within 1/51 for five levels. The
// index changes in the cycle after 'next' and is held otherwise. The LFSR
// type, seed and reduction are choices of this design.
module random_selector #(
  parameter int unsigned NUM_LEVELS = 5,
  parameter logic [15:0] SEED       = 16'hACE1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       next,
  output logic [2:0] sel
);

  logic [15:0] lfsr;
  logic [15:0] lfsr_adv;

  always_comb begin
    lfsr_adv = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= (SEED == '0) ? 16'h0001 : SEED;
      sel  <= '0;
    end else if (next) begin
      lfsr <= lfsr_adv;
      sel  <= 3'(lfsr_adv[7:0] % 8'(NUM_LEVELS));
    end
  end

  initial assert (NUM_LEVELS >= 1 && NUM_LEVELS <= 8);

endmodule
