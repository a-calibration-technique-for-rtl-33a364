// backend_adc: behavioural model (not synthesizable) of the ideal BITS-bit
// backend converter behind the last 1.5-bit stage.
//
// It samples its input v (a real in units of Vref, full scale [-1, 1)) at
// the rising clock edge and outputs the offset-binary code
//     code = floor((v + 1) / 2 * 2^BITS), clipped to [0, 2^BITS - 1],
// one cycle of latency. Ideal: no noise, offset or nonlinearity.
module backend_adc #(
  parameter int unsigned BITS = 10
) (
  input  logic            clk,
  input  real             v,
  output logic [BITS-1:0] code
);

  real scaled;
  always_comb scaled = (v + 1.0) / 2.0 * real'(1 << BITS);

  always_ff @(posedge clk) begin
    if (scaled < 0.0)                     code <= '0;
    else if (scaled >= real'(1 << BITS))  code <= '1;
    else                                  code <= BITS'($rtoi(scaled));
  end

endmodule
