// hu_mux: the hierarchical-update multiplexer in front of the first-level predictor's
// single update port.
//
// Two sources want to train the first-level counters. The commit stage sends the actual
// outcome of every committed conditional branch. With hierarchical update enabled, the
// overriding predictor also sends its own final direction as soon as it is known, many
// cycles before commit, so the small predictor learns sooner. At commit the record of the
// branch says whether that early update was written (hu_done) and whether the overriding
// direction was wrong:
//   no early update                -> normal update toward the outcome, step 1
//   early update, overrider right  -> nothing to do, the counter already moved
//   early update, overrider wrong  -> compensating update toward the outcome, step 2
// The port takes one write per cycle. A commit write wins; an early update that meets one
// is dropped and reported (hu_accept low), so its branch later gets a normal step-1 update.
// This priority is this design's choice. With HIER_UPDATE = 0 the block is the conventional
// commit-only path. Purely combinational.
module hu_mux
  import bp_pkg::*;
#(
  parameter bit HIER_UPDATE = 1'b1
) (
  // commit-time update
  input  logic   cm_valid,
  input  pc_t    cm_pc,
  input  ghist_t cm_ghr,
  input  logic   cm_taken,      // actual outcome
  input  logic   cm_ovr_wrong,  // overriding predictor's final direction was wrong
  input  logic   cm_hu_done,    // an early update was written for this branch
  // early update from the overriding predictor
  input  logic   hu_valid,
  input  pc_t    hu_pc,
  input  ghist_t hu_ghr,
  input  logic   hu_taken,
  output logic   hu_accept,
  // to the first-level predictor
  output logic   up_valid,
  output pc_t    up_pc,
  output ghist_t up_ghr,
  output logic   up_taken,
  output logic   up_double,
  // events
  output logic   ev_commit_normal,
  output logic   ev_commit_comp,
  output logic   ev_commit_skip
);
  logic early;      // this commit's branch was trained early
  logic cm_write;   // commit needs the port

  always_comb begin
    early            = HIER_UPDATE && cm_hu_done;
    cm_write         = cm_valid && !(early && !cm_ovr_wrong);
    ev_commit_normal = cm_valid && !early;
    ev_commit_comp   = cm_valid && early && cm_ovr_wrong;
    ev_commit_skip   = cm_valid && early && !cm_ovr_wrong;
    hu_accept        = HIER_UPDATE && hu_valid && !cm_write;

    up_valid  = cm_write || hu_accept;
    up_pc     = cm_write ? cm_pc    : hu_pc;
    up_ghr    = cm_write ? cm_ghr   : hu_ghr;
    up_taken  = cm_write ? cm_taken : hu_taken;
    up_double = cm_write && early && cm_ovr_wrong;
  end
endmodule
