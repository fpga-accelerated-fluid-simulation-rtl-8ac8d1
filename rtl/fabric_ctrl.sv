// fabric_ctrl: the fabric controller that runs one simulation time step.
//
// On start it walks the units through the time step in order and hands the
// particle store to one unit at a time (phase):
//   LOAD   (only if load_en) burst-read particles from DRAM into block RAM
//   STEP1  apply forces, predict positions
//   STEP5  rebuild the voxel space from the predicted positions
//   SOLVE  steps 2 and 3, repeated iters times
//   STEP4  velocity, vorticity confinement, XSPH viscosity, x <- p
//   STORE  burst-write the updated particles back to DRAM
// then pulses done.  Each unit gets a one-cycle start and answers with a
// one-cycle done.  solve_runs counts the solver iterations of the last step.
//
// The controller started by the host, the order of the steps and the solver
// loop follow the simulation loop.  Running the voxel rebuild (step 5)
// between the prediction and the solver, so that neighbours are found around
// the predicted positions, and the optional load are this design's choices.
module fabric_ctrl
  import pbf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       load_en,
  input  logic [7:0] iters,
  output phase_t     phase,
  output logic       load_start,
  input  logic       load_done,
  output logic       s1_start,
  input  logic       s1_done,
  output logic       s5_start,
  input  logic       s5_done,
  output logic       s23_start,
  input  logic       s23_done,
  output logic       s4_start,
  input  logic       s4_done,
  output logic       store_start,
  input  logic       store_done,
  output logic [7:0] solve_runs,
  output logic       idle,
  output logic       done
);

  assign idle = (phase == PH_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= PH_IDLE;
      load_start  <= 1'b0;
      s1_start    <= 1'b0;
      s5_start    <= 1'b0;
      s23_start   <= 1'b0;
      s4_start    <= 1'b0;
      store_start <= 1'b0;
      solve_runs  <= '0;
      done        <= 1'b0;
    end else begin
      load_start  <= 1'b0;
      s1_start    <= 1'b0;
      s5_start    <= 1'b0;
      s23_start   <= 1'b0;
      s4_start    <= 1'b0;
      store_start <= 1'b0;
      done        <= 1'b0;
      unique case (phase)
        PH_IDLE: if (start) begin
          solve_runs <= '0;
          if (load_en) begin phase <= PH_LOAD;  load_start <= 1'b1; end
          else         begin phase <= PH_STEP1; s1_start   <= 1'b1; end
        end
        PH_LOAD:  if (load_done) begin phase <= PH_STEP1; s1_start <= 1'b1; end
        PH_STEP1: if (s1_done)   begin phase <= PH_STEP5; s5_start <= 1'b1; end
        PH_STEP5: if (s5_done) begin
          if (iters != '0) begin phase <= PH_SOLVE; s23_start <= 1'b1; end
          else             begin phase <= PH_STEP4; s4_start  <= 1'b1; end
        end
        PH_SOLVE: if (s23_done) begin
          solve_runs <= solve_runs + 1'b1;
          if (solve_runs + 1'b1 < iters) s23_start <= 1'b1;
          else begin phase <= PH_STEP4; s4_start <= 1'b1; end
        end
        PH_STEP4: if (s4_done)    begin phase <= PH_STORE; store_start <= 1'b1; end
        PH_STORE: if (store_done) begin phase <= PH_IDLE;  done <= 1'b1; end
        default: phase <= PH_IDLE;
      endcase
    end
  end

endmodule
