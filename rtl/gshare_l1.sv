// gshare_l1: single-cycle first-level direction predictor of the overriding organisation.
//
// A table of 2-bit counters indexed by the word address XORed with the most recent global
// history bits (gshare). The lookup is combinational, so the prediction steers the very next
// fetch. The single write port is driven by the hierarchical-update multiplexer, which picks
// either the commit-time update or the early update from the overriding predictor; the new
// counter value comes from comp_counter, which steps by 2 for a compensating update.
// The 2K-entry size follows the 10/20-stage configuration (1K for 30/40 stages). The index
// function, the counter reset value (01, weakly not-taken) and the read-before-write
// behaviour of a same-cycle lookup and update are this design's choices. After reset the
// table is walked once, one entry per cycle, writing 01 everywhere; ready rises when done
// and updates are ignored until then.
// Timing: lk_* -> lk_taken combinational; an update is written at the clock edge.
module gshare_l1
  import bp_pkg::*;
#(
  parameter int unsigned ENTRIES = 2048
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   ready,
  // lookup
  input  pc_t    lk_pc,
  input  ghist_t lk_ghr,
  output logic   lk_taken,
  // update port
  input  logic   up_valid,
  input  pc_t    up_pc,
  input  ghist_t up_ghr,
  input  logic   up_taken,    // training direction
  input  logic   up_double    // compensating update: step 2
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  typedef logic [IDX_W-1:0] idx_t;

  logic [1:0] table_q [ENTRIES];

  function automatic idx_t index(pc_t pc, ghist_t ghr);
    return idx_t'(pc[IDX_W+1:2]) ^ idx_t'(ghr);
  endfunction

  idx_t       lk_idx, up_idx;
  logic [1:0] up_old, up_new;

  assign lk_idx   = index(lk_pc, lk_ghr);
  assign lk_taken = table_q[lk_idx][1];
  assign up_idx   = index(up_pc, up_ghr);
  assign up_old   = table_q[up_idx];

  comp_counter u_ctr (
    .ctr      (up_old),
    .taken    (up_taken),
    .ovr_wrong(up_double),
    .ctr_next (up_new)
  );

  idx_t clr_idx;
  logic clearing;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_idx  <= '0;
      clearing <= 1'b1;
    end else if (clearing) begin
      if (clr_idx == idx_t'(ENTRIES - 1)) clearing <= 1'b0;
      clr_idx <= clr_idx + 1'b1;
    end
  end
  assign ready = !clearing;

  always_ff @(posedge clk) begin
    if (clearing)      table_q[clr_idx] <= 2'b01;
    else if (up_valid) table_q[up_idx]  <= up_new;
  end
endmodule
