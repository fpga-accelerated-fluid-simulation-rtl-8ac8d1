// seq_sqrt: sequential integer square root, one result bit per clock.
//
// root = floor(sqrt(radicand)) for an unsigned W-bit radicand, using the
// digit-by-digit (non-restoring) method: two radicand bits are brought down
// per cycle and one root bit is decided.  A Q32 radicand gives a Q16 root.
// Interface: pulse start; done pulses W/2+1 cycles later with root valid
// (held until the next start); busy is high in between.
//
// Used for particle distances in the collision response and for vorticity
// magnitudes.  The method is this design's choice.
module seq_sqrt #(
  parameter int W = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [W-1:0]     radicand,
  output logic             busy,
  output logic             done,
  output logic [W/2-1:0]   root
);

  localparam int CNTW = $clog2(W / 2 + 1);

  logic [W-1:0]   x;
  logic [W/2-1:0] q;
  logic [W/2+2:0] r;
  logic [CNTW-1:0] cnt;

  logic [W/2+2:0] r_in, trial;
  always_comb begin
    r_in  = {r[W/2:0], x[W-1:W-2]};
    trial = r_in - {1'b0, q, 2'b01};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; q <= '0; r <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0; root <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        x    <= radicand;
        q    <= '0;
        r    <= '0;
        cnt  <= CNTW'(W / 2);
        busy <= 1'b1;
      end else if (busy) begin
        if (cnt != '0) begin
          if (!trial[W/2+2]) begin
            r <= trial;
            q <= {q[W/2-2:0], 1'b1};
          end else begin
            r <= r_in;
            q <= {q[W/2-2:0], 1'b0};
          end
          x   <= {x[W-3:0], 2'b00};
          cnt <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= q;
        end
      end
    end
  end

endmodule
