// bp_backend_model: behavioural execute/commit back end and program for the front-end tests.
//
// It plays a small looping program: a counted loop of 8 (0x1008), a pseudo-random branch
// (0x100c), a branch that repeats it (0x1014, needs global history), a branch taken every
// third time (0x101c) and an always-taken back edge (0x1024). Random choices come from a
// private xorshift generator seeded by SEED, so two instances with the same seed see the
// same program and stall pattern.
// For every instruction delivered on the correct path it checks the address, the carried
// global history and the LAT_FULL-1 cycle trip through the prediction pipeline. A wrong next
// address is re-steered RESOLVE_LAT cycles later with the repaired history. Branches commit
// in order, one per cycle, COMMIT_LAT cycles after delivery; with odds 1/STALL_ODDS per
// commit the next head blocks commit for STALL_LEN cycles (a load missing to memory).
// Decode-stage re-steers to the already-correct address are injected with odds 1/DEC_ODDS.
// After RUN_CYCLES cycles of fetch, done rises and stats holds the counts.
module bp_backend_model
  import bp_pkg::*;
  import bp_tb_pkg::*;
#(
  parameter int          LAT_FULL    = 4,
  parameter int          RESOLVE_LAT = 8,
  parameter int          COMMIT_LAT  = 14,
  parameter int          RUN_CYCLES  = 40000,
  parameter int          STALL_ODDS  = 60,
  parameter int          STALL_LEN   = 150,
  parameter int          DEC_ODDS    = 150,
  parameter int unsigned SEED        = 32'h1234_5678
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fetch_valid,
  input  pc_t          fetch_pc,
  input  logic         deliver_valid,
  input  bp_meta_t     deliver_meta,
  input  bp_events_t   events,
  output bp_redirect_t misp_redirect,
  output bp_redirect_t dec_redirect [4],
  output bp_commit_t   commit,
  output logic         done,
  output bp_stats_t    stats
);
  localparam pc_t BASE = 64'h1000;

  int unsigned rng = SEED;
  function automatic int unsigned next_rand();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng;
  endfunction

  task automatic fail(string msg);
    stats.failures++;
    if (stats.failures < 20) $display("FAIL %m @%0d: %s", stats.cycles, msg);
  endtask

  // ---------------- program ----------------
  int loop_cnt = 0, b1_last = 0, b3_cnt = 0;

  function automatic bit is_branch(pc_t pc);
    return pc == BASE + 8 || pc == BASE + 12 || pc == BASE + 20 || pc == BASE + 28 ||
           pc == BASE + 36;
  endfunction
  function automatic pc_t br_target(pc_t pc);
    case (pc)
      BASE + 8:  return BASE;
      BASE + 12: return BASE + 20;
      BASE + 20: return BASE + 28;
      BASE + 28: return BASE + 36;
      default:   return BASE;
    endcase
  endfunction
  function automatic bit br_outcome(pc_t pc);
    bit t;
    case (pc)
      BASE + 8:  begin t = (loop_cnt != 7); loop_cnt = (loop_cnt + 1) % 8; end
      BASE + 12: begin t = next_rand() % 2 == 1; b1_last = t; end
      BASE + 20: t = b1_last;
      BASE + 28: begin t = (b3_cnt == 0); b3_cnt = (b3_cnt + 1) % 3; end
      default:   t = 1;
    endcase
    return t;
  endfunction

  // ---------------- state ----------------
  pc_t    expected_pc = BASE;
  ghist_t expected_ghr = '0;
  bit     waiting = 0;
  int     resolve_at = -1;
  bp_redirect_t pending_resolve;
  int     dec_at = -1;
  int     dec_src_sel = 0;
  pc_t    fetch_hist [int];
  typedef struct { bp_meta_t meta; bit taken; pc_t target; int ready_at; } cq_t;
  cq_t    cq [$];
  int     stall_until = 0;

  initial begin
    stats = '{default: 0};
    done = 0;
    misp_redirect = '0;
    foreach (dec_redirect[i]) dec_redirect[i] = '0;
    commit = '0;
  end

  always @(negedge clk) begin
    if (rst_n && fetch_valid && !done) begin
      stats.cycles++;
      misp_redirect = '0;
      foreach (dec_redirect[i]) dec_redirect[i] = '0;
      commit = '0;
      if (resolve_at == stats.cycles) begin
        misp_redirect = pending_resolve;
        waiting       = 0;
        resolve_at    = -1;
      end else if (dec_at == stats.cycles) begin
        dec_redirect[dec_src_sel].valid = 1'b1;
        dec_redirect[dec_src_sel].pc    = expected_pc;
        dec_redirect[dec_src_sel].ghr   = expected_ghr;
        dec_at = -1;
      end
      if (cq.size() > 0 && cq[0].ready_at <= stats.cycles && stats.cycles >= stall_until) begin
        commit.valid  = 1'b1;
        commit.meta   = cq[0].meta;
        commit.taken  = cq[0].taken;
        commit.target = cq[0].target;
        void'(cq.pop_front());
        stats.commits++;
        if (next_rand() % STALL_ODDS == 0) begin
          stall_until = stats.cycles + STALL_LEN;
          stats.stalls++;
        end
      end
      #1;
      fetch_hist[stats.cycles] = fetch_pc;
      stats.l1      += int'(events.l1_pred);
      stats.part    += int'(events.part_override);
      stats.full    += int'(events.full_override);
      stats.misp    += int'(events.misp_redirect);
      stats.dec     += int'(events.dec_redirect);
      stats.hu      += int'(events.hu_write);
      stats.hu_drop += int'(events.hu_dropped);
      stats.cm_norm += int'(events.commit_normal);
      stats.cm_comp += int'(events.commit_comp);
      stats.cm_skip += int'(events.commit_skip);
      stats.deliver += int'(events.deliver);

      if (deliver_valid) begin
        stats.checks++;
        if (!fetch_hist.exists(stats.cycles - LAT_FULL + 1) ||
            fetch_hist[stats.cycles - LAT_FULL + 1] != deliver_meta.pc)
          fail($sformatf("deliver pc %h not fetched %0d cycles earlier", deliver_meta.pc,
                         LAT_FULL - 1));
        if (!waiting) begin
          bit  br, taken;
          pc_t actual_next, pred_next;
          stats.checks++;
          if (deliver_meta.pc != expected_pc)
            fail($sformatf("correct-path pc %h, expected %h", deliver_meta.pc, expected_pc));
          stats.checks++;
          if (deliver_meta.ghr != expected_ghr)
            fail($sformatf("history %h, expected %h", deliver_meta.ghr, expected_ghr));
          br          = is_branch(deliver_meta.pc);
          taken       = br ? br_outcome(deliver_meta.pc) : 1'b0;
          actual_next = taken ? br_target(deliver_meta.pc) : deliver_meta.pc + 4;
          pred_next   = (deliver_meta.is_br && deliver_meta.final_taken) ? deliver_meta.target
                                                                         : deliver_meta.pc + 4;
          if (deliver_meta.is_br || taken) expected_ghr = {deliver_meta.ghr[HIST_LEN-2:0], taken};
          else                             expected_ghr = deliver_meta.ghr;
          expected_pc = actual_next;
          if (br) begin
            cq.push_back('{meta: deliver_meta, taken: taken, target: br_target(deliver_meta.pc),
                           ready_at: stats.cycles + COMMIT_LAT});
          end
          if (pred_next != actual_next) begin
            waiting               = 1;
            resolve_at            = stats.cycles + RESOLVE_LAT;
            pending_resolve.valid = 1'b1;
            pending_resolve.pc    = actual_next;
            pending_resolve.ghr   = expected_ghr;
            dec_at                = -1;
          end else begin
            stats.correct++;
            if (dec_at < 0 && next_rand() % DEC_ODDS == 0) begin
              dec_at      = stats.cycles + 1;
              dec_src_sel = int'(next_rand() % 4);
            end
          end
        end
      end
      if (stats.cycles == RUN_CYCLES) done = 1;
    end
  end
endmodule
