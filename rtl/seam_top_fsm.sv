// seam_top_fsm: the top-level stage controller of the seam-carving accelerator.
//
// After reset the design is in Stage 1 (energy maps).  Each stage runs its own
// controller while `stage` names it and pulses `done` when its work is over;
// the controller then moves to the next stage: Stage 1 -> Stage 2
// (accumulation) -> Stage 3 (pick and travel) -> Finish.  Finish holds until
// reset; in it the HPS reads the seam pixel indices.  States, the done input,
// the stage outputs and the finish output follow the document's top-module
// state diagram.  The 3-bit encoding of `stage` and an active-low asynchronous
// reset are this design's choice.
//
// Timing: `stage` changes on the clock edge at which `done` is high.
module seam_top_fsm
  import seam_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   done,    // done pulse of the stage now running
  output stage_e stage,
  output logic   finish
);
  stage_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_STAGE1: if (done) state_d = ST_STAGE2;
      ST_STAGE2: if (done) state_d = ST_STAGE3;
      ST_STAGE3: if (done) state_d = ST_FINISH;
      ST_FINISH: state_d = ST_FINISH;
      default:   state_d = ST_STAGE1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= ST_STAGE1;
    else        state_q <= state_d;
  end

  assign stage  = state_q;
  assign finish = (state_q == ST_FINISH);
endmodule
