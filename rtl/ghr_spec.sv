// ghr_spec: speculative global branch history register.
//
// The history is shifted with the predicted direction in the cycle a branch is predicted, so
// the next lookup already sees it. When any re-steer happens (an override of the first-level
// prediction, a decode-stage re-steer or a back-end misprediction) the history is replaced by
// the value the re-steering instruction carries, corrected with its new direction. Bit 0 is
// the newest outcome. Repair has priority over a same-cycle shift (the shifting fetch is
// squashed by the re-steer). Resets to all zeros (not taken).
// Timing: ghr is a register; push/repair take effect at the clock edge.
module ghr_spec
  import bp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push_valid,   // a branch was predicted this cycle
  input  logic   push_taken,
  input  logic   repair_valid, // restore after a re-steer
  input  ghist_t repair_ghr,   // history including the re-steering branch's corrected outcome
  output ghist_t ghr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            ghr <= '0;
    else if (repair_valid) ghr <= repair_ghr;
    else if (push_valid)   ghr <= {ghr[HIST_LEN-2:0], push_taken};
  end
endmodule
