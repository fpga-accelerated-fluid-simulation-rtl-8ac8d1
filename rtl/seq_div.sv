// seq_div: sequential signed divider, one quotient bit per clock.
//
// Computes quotient = dividend / divisor (truncated toward zero) with a
// restoring shift-subtract loop on the magnitudes, then fixes the sign.
// A division by zero returns the largest magnitude with the dividend's sign.
// Interface: pulse start with the operands; done pulses W+1 cycles later with
// quotient valid (held until the next start); busy is high in between.
//
// Used for the per-particle divisions of the solver: the Lagrange multiplier
// and the normalisations of the collision response and vorticity direction.
// The one-bit-per-cycle structure is this design's choice: those divisions
// happen once per particle, not once per neighbour, so a small divider does.
module seq_div #(
  parameter int W = 64
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

  localparam int CNTW = $clog2(W + 1);

  logic [W-1:0]    num, den, quo;
  logic [W:0]      rem;
  logic [CNTW-1:0] cnt;
  logic            neg, dz;

  logic [W:0] trial;
  assign trial = {rem[W-1:0], num[W-1]} - {1'b0, den};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; quotient <= '0;
      num <= '0; den <= '0; quo <= '0; rem <= '0; cnt <= '0; neg <= 1'b0; dz <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        num  <= dividend[W-1] ? W'(-dividend) : W'(dividend);
        den  <= divisor[W-1]  ? W'(-divisor)  : W'(divisor);
        neg  <= dividend[W-1] ^ divisor[W-1];
        dz   <= (divisor == '0);
        rem  <= '0;
        quo  <= '0;
        cnt  <= CNTW'(W);
        busy <= 1'b1;
      end else if (busy) begin
        if (cnt != '0) begin
          if (!trial[W]) begin
            rem <= trial;
            quo <= {quo[W-2:0], 1'b1};
          end else begin
            rem <= {rem[W-1:0], num[W-1]};
            quo <= {quo[W-2:0], 1'b0};
          end
          num <= {num[W-2:0], 1'b0};
          cnt <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          if (dz)       quotient <= neg ? {1'b1, {(W-1){1'b0}}} + 1'b1 : {1'b0, {(W-1){1'b1}}};
          else if (neg) quotient <= -$signed(quo);
          else          quotient <= $signed(quo);
        end
      end
    end
  end

endmodule
