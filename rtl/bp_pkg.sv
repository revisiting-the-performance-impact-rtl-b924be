// bp_pkg: types and constants shared by the overriding branch prediction front end.
//
// The front end predicts one fetch address per cycle. Every fetched instruction carries a
// metadata record (bp_meta_t) down the pipeline; the back end hands it back with the resolved
// outcome when the branch is re-steered or commits, so no predictor needs its own
// checkpoint queue. Sizes follow the 20-stage configuration that the design is built around:
// a 47-bit global history feeding a perceptron of 348 rows. The 64-bit PC (Alpha) and the
// 8-bit perceptron weights are this design's choices.
package bp_pkg;

  localparam int unsigned PC_W     = 64;   // Alpha addresses
  localparam int unsigned HIST_LEN = 47;   // global history used by the perceptron
  localparam int unsigned W_BITS   = 8;    // signed perceptron weight width
  localparam int unsigned N_WEIGHTS = HIST_LEN + 1;  // bias plus one weight per history bit
  // |sum| <= N_WEIGHTS * 2^(W_BITS-1) = 6144, which needs 14 signed bits
  localparam int unsigned SUM_W    = 14;
  localparam int unsigned LHIST_W  = 10;   // hybrid predictor: local history per branch

  // Which predictor overrides the first level.
  typedef enum logic {
    OVR_PERCEPTRON = 1'b0,   // perceptron with partial prediction (three levels)
    OVR_HYBRID     = 1'b1    // global/local tournament predictor (two levels)
  } ovr_kind_e;

  typedef logic [PC_W-1:0]     pc_t;
  typedef logic [HIST_LEN-1:0] ghist_t;   // bit 0 is the most recent outcome
  typedef logic signed [SUM_W-1:0] psum_t;
  typedef logic [LHIST_W-1:0]  lhist_t;

  // Record that travels with each fetched instruction.
  typedef struct packed {
    pc_t    pc;          // fetch address
    ghist_t ghr;         // speculative global history seen by this lookup (before it)
    logic   is_br;       // BTB hit: treated as a conditional branch at fetch
    pc_t    target;      // BTB target (valid when is_br)
    logic   l1_taken;    // first-level (gshare) direction
    logic   part_taken;  // partial perceptron direction (middle level)
    logic   full_taken;  // full perceptron direction (final level)
    logic   final_taken; // direction the fetch stream followed after all overrides
    psum_t  perc_sum;    // full perceptron output, needed for threshold training
    lhist_t lhist;       // hybrid: local history used by the lookup
    logic   hyb_local;   // hybrid: local component's direction
    logic   hyb_global;  // hybrid: global component's direction
    logic   hu_done;     // first-level entry was already trained by the overriding predictor
  } bp_meta_t;

  // Re-steer request from outside the prediction pipeline.
  typedef struct packed {
    logic   valid;
    pc_t    pc;          // correct fetch address
    ghist_t ghr;         // history to restore (history after the re-steering instruction)
  } bp_redirect_t;

  // The existing decode-stage re-steer points.
  typedef enum logic [1:0] {
    RS_RAS    = 2'd0,
    RS_STATIC = 2'd1,
    RS_DECODE = 2'd2,
    RS_IBTB   = 2'd3
  } resteer_src_e;

  // A conditional branch leaving the machine in program order.
  typedef struct packed {
    logic     valid;
    bp_meta_t meta;
    logic     taken;     // actual outcome
    pc_t      target;    // actual taken target
  } bp_commit_t;

  // One-cycle event pulses, for performance counters.
  typedef struct packed {
    logic fetch;          // a fetch slot was issued
    logic l1_pred;        // a BTB hit received a first-level prediction
    logic part_override;  // partial perceptron disagreed and re-steered fetch
    logic full_override;  // full perceptron disagreed and re-steered fetch
    logic misp_redirect;  // back-end misprediction re-steer
    logic dec_redirect;   // decode-stage re-steer (RAS, static, decode target, iBTB)
    logic hu_write;       // hierarchical update written into the first-level predictor
    logic hu_dropped;     // hierarchical update lost the update port to a commit update
    logic commit_normal;  // commit update with step 1
    logic commit_comp;    // compensating commit update with step 2
    logic commit_skip;    // commit update skipped: early update was already correct
    logic deliver;        // an instruction left the prediction pipeline
  } bp_events_t;

  // Perceptron training threshold, floor(1.93*h + 14) for history length h.
  function automatic int unsigned perc_theta(int unsigned h);
    return (193 * h + 1400) / 100;
  endfunction

endpackage
