// seq_divider: signed restoring divider, one quotient bit per cycle.
//
// Computes quotient = dividend / divisor (truncated toward zero) for signed
// operands. A 'start' pulse loads the operands; 'done' pulses for one cycle
// W cycles later with the result held on 'quotient' until the next start.
// Division by zero returns zero. It serves the rare coefficient updates of
// background tracking, where one result per round is needed and a small
// iterative divider is enough.
module seq_divider #(
  parameter int unsigned W = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] dividend,
  input  logic signed [W-1:0] divisor,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] quotient
);

  logic [W-1:0]         dvd;      // remaining dividend bits (shifted out at MSB)
  logic [W-1:0]         dsr;      // |divisor|
  logic [W:0]           rem;
  logic [W-1:0]         quo;
  logic                 neg;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0]           rem_sh;
  logic [W:0]           rem_sub;

  always_comb begin
    rem_sh  = {rem[W-1:0], dvd[W-1]};
    rem_sub = rem_sh - {1'b0, dsr};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvd <= '0; dsr <= '0; rem <= '0; quo <= '0; neg <= 1'b0;
      cnt <= '0; busy <= 1'b0; done <= 1'b0; quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        dvd  <= dividend[W-1] ? W'(-dividend) : W'(dividend);
        dsr  <= divisor[W-1]  ? W'(-divisor)  : W'(divisor);
        neg  <= dividend[W-1] ^ divisor[W-1];
        rem  <= '0;
        quo  <= '0;
        cnt  <= ($clog2(W+1))'(W);
        busy <= 1'b1;
      end else if (busy) begin
        dvd <= dvd << 1;
        if (!rem_sub[W]) begin
          rem <= rem_sub;
          quo <= {quo[W-2:0], 1'b1};
        end else begin
          rem <= rem_sh;
          quo <= {quo[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (dsr == '0) quotient <= '0;
          else begin
            logic [W-1:0] q;
            q = {quo[W-2:0], !rem_sub[W]};
            quotient <= neg ? -$signed(q) : $signed(q);
          end
        end
      end
    end
  end

endmodule
