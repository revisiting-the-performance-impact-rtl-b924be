// bp_frontend: three-level overriding branch prediction front end with hierarchical update.
//
// Every cycle the PC register fetches one instruction address. In that same cycle the BTB
// says whether it is a branch and gives its target, and the single-cycle gshare predictor
// gives a direction, so the next fetch address is chosen with no bubble. The same lookup is
// started in the slower perceptron. LAT_PART cycles after the lookup a partial perceptron
// prediction (bias plus the most recent history bank) is compared with the direction the
// fetch stream followed; on disagreement fetch is re-steered and the younger lookups are
// squashed (middle override). LAT_FULL cycles after the lookup the full perceptron does the
// same (final override). The instruction then leaves the prediction pipeline on deliver_*
// with its metadata record.
//
// Hierarchical update: at the final override stage the full perceptron's direction is also
// written into the gshare table at once instead of waiting for commit. At commit the gshare
// entry is left alone if that early update was right and moved two steps toward the real
// outcome if it was wrong (hu_mux, comp_counter). The perceptron itself and the BTB are
// trained at commit.
//
// OVR_KIND selects the overriding predictor: the multi-overriding perceptron (default) or a
// global/local tournament predictor (hybrid_ovr), which has only a final level, so with it
// MULTI_OVERRIDE has no effect and hierarchical update trains gshare from the tournament
// predictor's direction.
//
// Global history is updated speculatively with each first-level prediction and repaired on
// every re-steer. Re-steer priority, oldest instruction first: back-end misprediction,
// decode-stage re-steer (RAS, static predictor, decode target, iBTB), final override,
// middle override, first-level prediction. Back-end and decode-stage re-steers come from
// instructions already delivered, so they squash the whole prediction pipeline.
//
// Interface timing: fetch_pc is the register output for the current cycle. A redirect input
// or an override in cycle t makes fetch_pc equal the new address in cycle t+1. An
// instruction fetched in cycle t is delivered in cycle t+LAT_FULL-1 unless squashed.
// commit is applied in the cycle it is presented. ready stays low while the tables are
// cleared after reset (one entry per cycle, 2048 cycles for the gshare table); nothing is
// fetched until then. There is no fetch back-pressure.
//
// Follows the document: the overriding organisation, the two override levels from a single
// banked perceptron, the 2K gshare / 348-row, 47-history perceptron / 4-cycle full latency of
// the 20-stage machine, hierarchical update of the first level by the full perceptron only,
// compensating step-2 counter updates and the 4K 4-way BTB. This design's choices: the
// partial latency (2), the one-instruction-per-cycle fetch, the redirect priorities, the
// update-port arbitration and the metadata-record interface to the back end.
module bp_frontend
  import bp_pkg::*;
#(
  parameter int unsigned L1_ENTRIES     = 2048,
  parameter int unsigned PERC_ENTRIES   = 348,
  parameter int unsigned BTB_ENTRIES    = 4096,
  parameter int unsigned BTB_WAYS       = 4,
  parameter int unsigned LAT_PART       = 2,
  parameter int unsigned LAT_FULL       = 4,
  parameter bit          HIER_UPDATE    = 1'b1,
  parameter bit          MULTI_OVERRIDE = 1'b1,
  parameter ovr_kind_e   OVR_KIND       = OVR_PERCEPTRON,
  parameter pc_t         RESET_PC       = 64'h1000
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         ready,
  // to the instruction cache
  output logic         fetch_valid,
  output pc_t          fetch_pc,
  // to decode / fetch queue: instruction leaving the prediction pipeline
  output logic         deliver_valid,
  output bp_meta_t     deliver_meta,
  // re-steers from later stages
  input  bp_redirect_t misp_redirect,
  input  bp_redirect_t dec_redirect [4],   // indexed by resteer_src_e
  // committed conditional branch
  input  bp_commit_t   commit,
  // event pulses
  output bp_events_t   events
);
  localparam int unsigned F = LAT_FULL - 1;            // final override stage
  localparam int unsigned P = LAT_PART - 1;            // middle override stage
  localparam bit MO_ON = MULTI_OVERRIDE && (OVR_KIND == OVR_PERCEPTRON) &&
                         (LAT_PART < LAT_FULL);

  // ---------------- state ----------------
  pc_t      pc_q;
  logic     rec_v [F];        // rec_*[k-1] is pipeline stage k (looked up k cycles ago)
  bp_meta_t rec_m [F];
  ghist_t   ghr;

  // ---------------- stage 0: fetch, BTB and first-level prediction ----------------
  logic   btb_hit, l1_taken;
  pc_t    btb_target;
  logic   ovr_ready, l1_ready, btb_ready;

  assign ready       = ovr_ready && l1_ready && btb_ready;
  assign fetch_valid = ready;
  assign fetch_pc    = pc_q;

  btb #(.ENTRIES(BTB_ENTRIES), .WAYS(BTB_WAYS)) u_btb (
    .clk, .rst_n,
    .ready    (btb_ready),
    .lk_pc    (pc_q),
    .lk_hit   (btb_hit),
    .lk_target(btb_target),
    .up_valid (commit.valid && commit.taken),
    .up_pc    (commit.meta.pc),
    .up_target(commit.target)
  );

  logic   up_valid, up_taken, up_double;
  pc_t    up_pc;
  ghist_t up_ghr;

  gshare_l1 #(.ENTRIES(L1_ENTRIES)) u_l1 (
    .clk, .rst_n,
    .ready    (l1_ready),
    .lk_pc    (pc_q),
    .lk_ghr   (ghr),
    .lk_taken (l1_taken),
    .up_valid, .up_pc, .up_ghr, .up_taken, .up_double
  );

  // ---------------- overriding predictor ----------------
  logic   part_valid, part_taken, full_valid, full_taken;
  psum_t  full_sum;
  lhist_t hyb_lhist;
  logic   hyb_local, hyb_global;
  logic   sp_valid;            // final direction known for a branch still on the fetch path

  if (OVR_KIND == OVR_PERCEPTRON) begin : g_perc
    psum_t part_sum;           // only its sign is used
    perceptron_mo #(
      .ENTRIES (PERC_ENTRIES),
      .LAT_PART(LAT_PART),
      .LAT_FULL(LAT_FULL)
    ) u_perc (
      .clk, .rst_n,
      .ready     (ovr_ready),
      .lk_valid  (fetch_valid),
      .lk_pc     (pc_q),
      .lk_ghr    (ghr),
      .part_valid, .part_taken, .part_sum,
      .full_valid, .full_taken, .full_sum,
      .tr_valid  (commit.valid),
      .tr_pc     (commit.meta.pc),
      .tr_ghr    (commit.meta.ghr),
      .tr_taken  (commit.taken),
      .tr_sum    (commit.meta.perc_sum)
    );
    assign hyb_lhist  = '0;
    assign hyb_local  = 1'b0;
    assign hyb_global = 1'b0;
  end else begin : g_hyb
    hybrid_ovr #(.LAT(LAT_FULL)) u_hyb (
      .clk, .rst_n,
      .ready     (ovr_ready),
      .lk_valid  (fetch_valid),
      .lk_pc     (pc_q),
      .lk_ghr    (ghr),
      .out_valid (full_valid),
      .out_taken (full_taken),
      .out_lhist (hyb_lhist),
      .out_local (hyb_local),
      .out_global(hyb_global),
      .sp_valid,
      .sp_pc     (st_m[F].pc),
      .sp_taken  (full_taken),
      .tr_valid  (commit.valid),
      .tr_ghr    (commit.meta.ghr),
      .tr_lhist  (commit.meta.lhist),
      .tr_local  (commit.meta.hyb_local),
      .tr_global (commit.meta.hyb_global),
      .tr_taken  (commit.taken)
    );
    assign part_valid = 1'b0;
    assign part_taken = 1'b0;
    assign full_sum   = '0;
  end

  // ---------------- per-stage view with the override decisions ----------------
  logic     st_v [LAT_FULL];
  bp_meta_t st_m [LAT_FULL];    // metadata after this cycle's override updates
  logic     part_ovr, full_ovr, ext;
  logic     hu_valid, hu_accept;
  pc_t      next_pc;
  ghist_t   repair_ghr;
  int       kill_upto;          // stages 0..kill_upto are squashed this cycle

  // decode-stage re-steer points, fixed priority RAS > static > decode target > iBTB
  bp_redirect_t dec_sel;
  always_comb begin
    dec_sel = '0;
    for (int i = 3; i >= 0; i--) if (dec_redirect[i].valid) dec_sel = dec_redirect[i];
  end

  // hierarchical update request from the final level (killed by an older re-steer)
  assign sp_valid = rec_v[F-1] && full_valid && rec_m[F-1].is_br &&
                    !misp_redirect.valid && !dec_sel.valid;
  assign hu_valid = sp_valid;

  function automatic pc_t dir_target(bp_meta_t m, logic taken);
    return taken ? m.target : m.pc + 64'd4;
  endfunction

  always_comb begin
    // stage 0
    st_v[0]             = fetch_valid;
    st_m[0]             = '0;
    st_m[0].pc          = pc_q;
    st_m[0].ghr         = ghr;
    st_m[0].is_br       = btb_hit;
    st_m[0].target      = btb_target;
    st_m[0].l1_taken    = l1_taken;
    st_m[0].part_taken  = l1_taken;
    st_m[0].full_taken  = l1_taken;
    st_m[0].final_taken = btb_hit && l1_taken;
    for (int k = 1; k < int'(LAT_FULL); k++) begin
      st_v[k] = rec_v[k-1];
      st_m[k] = rec_m[k-1];
    end

    // middle override: partial perceptron
    part_ovr = 1'b0;
    if (MO_ON) begin
      st_m[P].part_taken = part_taken;
      if (st_m[P].is_br) begin
        part_ovr = st_v[P] && part_valid && (part_taken != st_m[P].final_taken);
        st_m[P].final_taken = part_taken;
      end
    end

    // final override: full perceptron
    st_m[F].full_taken = full_taken;
    st_m[F].perc_sum   = full_sum;
    st_m[F].lhist      = hyb_lhist;
    st_m[F].hyb_local  = hyb_local;
    st_m[F].hyb_global = hyb_global;
    full_ovr = 1'b0;
    if (st_m[F].is_br) begin
      full_ovr = st_v[F] && full_valid && (full_taken != st_m[F].final_taken);
      st_m[F].final_taken = full_taken;
    end

    ext = misp_redirect.valid || dec_sel.valid;

    // next fetch address, history repair and squash range, oldest source first
    repair_ghr = '0;
    kill_upto  = -1;
    if (misp_redirect.valid) begin
      next_pc    = misp_redirect.pc;
      repair_ghr = misp_redirect.ghr;
      kill_upto  = int'(F);
    end else if (dec_sel.valid) begin
      next_pc    = dec_sel.pc;
      repair_ghr = dec_sel.ghr;
      kill_upto  = int'(F);
    end else if (full_ovr) begin
      next_pc    = dir_target(st_m[F], full_taken);
      repair_ghr = {st_m[F].ghr[HIST_LEN-2:0], full_taken};
      kill_upto  = int'(F) - 1;
    end else if (part_ovr) begin
      next_pc    = dir_target(st_m[P], part_taken);
      repair_ghr = {st_m[P].ghr[HIST_LEN-2:0], part_taken};
      kill_upto  = int'(P) - 1;
    end else if (fetch_valid) begin
      next_pc    = dir_target(st_m[0], st_m[0].final_taken);
    end else begin
      next_pc    = pc_q;
    end
  end

  // ---------------- first-level update port ----------------
  logic ev_cm_normal, ev_cm_comp, ev_cm_skip;

  hu_mux #(.HIER_UPDATE(HIER_UPDATE)) u_hu (
    .cm_valid    (commit.valid),
    .cm_pc       (commit.meta.pc),
    .cm_ghr      (commit.meta.ghr),
    .cm_taken    (commit.taken),
    .cm_ovr_wrong(commit.meta.full_taken != commit.taken),
    .cm_hu_done  (commit.meta.hu_done),
    .hu_valid,
    .hu_pc       (st_m[F].pc),
    .hu_ghr      (st_m[F].ghr),
    .hu_taken    (full_taken),
    .hu_accept,
    .up_valid, .up_pc, .up_ghr, .up_taken, .up_double,
    .ev_commit_normal(ev_cm_normal),
    .ev_commit_comp  (ev_cm_comp),
    .ev_commit_skip  (ev_cm_skip)
  );

  // ---------------- speculative history ----------------
  ghr_spec u_ghr (
    .clk, .rst_n,
    .push_valid  (st_v[0] && btb_hit && kill_upto < 0),
    .push_taken  (l1_taken),
    .repair_valid(kill_upto >= 0),
    .repair_ghr,
    .ghr
  );

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q <= RESET_PC;
      for (int k = 0; k < int'(F); k++) rec_v[k] <= 1'b0;
    end else begin
      pc_q <= next_pc;
      for (int k = 0; k < int'(F); k++) rec_v[k] <= st_v[k] && (k > kill_upto);
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(F); k++) rec_m[k] <= st_m[k];
  end

  // ---------------- outputs ----------------
  assign deliver_valid = st_v[F] && !ext;
  always_comb begin
    deliver_meta         = st_m[F];
    deliver_meta.hu_done = hu_accept;
  end

  always_comb begin
    events               = '0;
    events.fetch         = fetch_valid;
    events.l1_pred       = fetch_valid && btb_hit;
    events.part_override = part_ovr && !ext && !full_ovr;
    events.full_override = full_ovr && !ext;
    events.misp_redirect = misp_redirect.valid;
    events.dec_redirect  = dec_sel.valid && !misp_redirect.valid;
    events.hu_write      = hu_accept;
    events.hu_dropped    = HIER_UPDATE && hu_valid && !hu_accept;
    events.commit_normal = ev_cm_normal;
    events.commit_comp   = ev_cm_comp;
    events.commit_skip   = ev_cm_skip;
    events.deliver       = deliver_valid;
  end

  // Fetch addresses are instruction aligned; re-steer inputs must be too.
  a_pc_aligned: assert property (@(posedge clk) disable iff (!rst_n) pc_q[1:0] == 2'b00);
  a_redirect_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (misp_redirect.valid |-> misp_redirect.pc[1:0] == 2'b00) and
    (dec_sel.valid       |-> dec_sel.pc[1:0]       == 2'b00));
endmodule
