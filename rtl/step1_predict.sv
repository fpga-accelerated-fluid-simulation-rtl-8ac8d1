// step1_predict: step 1 of the simulation loop, force application and
// position prediction.
//
// For every live particle i:
//   v_i  <- v_i + dt * g          (g: external acceleration, e.g. gravity)
//   p_i  <- x_i + dt * v_i        (predicted position x*)
// The products are formed in Q16 and rounded back to 12.6 with saturation.
// Particles that were dropped (alive = 0) are left untouched.
//
// Interface: pulse start; the unit reads each particle on port A of the
// particle store and writes v and p back; done pulses after the last one.
// Timing: 2 cycles per particle (read, then compute and write).
//
// The two update equations are those of the position-based fluid loop; the
// arithmetic widths and the two-cycle schedule are this design's choice.
module step1_predict
  import pbf_pkg::*;
#(
  parameter int N  = N_PART_DEF,
  parameter int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   n_part,
  input  acc_t          dt,
  input  avec_t         grav,
  output logic [AW-1:0] a_addr,
  input  prec_t         a_data,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output pmask_t        wr_mask,
  output prec_t         wr_data,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {S_IDLE, S_RD, S_WR} state_t;
  state_t state;
  logic [AW:0] i_q;

  // v' = v + dt*g ; p = x + dt*v'
  wide_t vx, vy, vz;
  prec_t upd;
  always_comb begin
    vx = fx2q(a_data.v.x) + qmul(wide_t'(dt), wide_t'(grav.x));
    vy = fx2q(a_data.v.y) + qmul(wide_t'(dt), wide_t'(grav.y));
    vz = fx2q(a_data.v.z) + qmul(wide_t'(dt), wide_t'(grav.z));
    upd     = a_data;
    upd.v.x = q2fx(vx);
    upd.v.y = q2fx(vy);
    upd.v.z = q2fx(vz);
    upd.p.x = q2fx(fx2q(a_data.x.x) + qmul(wide_t'(dt), fx2q(upd.v.x)));
    upd.p.y = q2fx(fx2q(a_data.x.y) + qmul(wide_t'(dt), fx2q(upd.v.y)));
    upd.p.z = q2fx(fx2q(a_data.x.z) + qmul(wide_t'(dt), fx2q(upd.v.z)));
  end

  assign a_addr  = i_q[AW-1:0];
  assign wr_addr = i_q[AW-1:0];
  assign wr_data = upd;
  assign wr_en   = (state == S_WR) && a_data.alive;
  always_comb begin
    wr_mask   = MASK_NONE;
    wr_mask.v = 1'b1;
    wr_mask.p = 1'b1;
  end
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i_q   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          i_q <= '0;
          if (n_part == 16'd0) done <= 1'b1;
          else                 state <= S_RD;
        end
        S_RD: state <= S_WR;
        S_WR: begin
          if ((i_q + 1 >= (AW+1)'(n_part)) || (i_q + 1 >= (AW+1)'(N))) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            i_q   <= i_q + 1'b1;
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
