// hybrid_ovr: global/local tournament predictor (the kind used in the Alpha 21264), as the
// alternative overriding predictor of the front end.
//
// A 1K-entry local history table, indexed by the word address, holds the last LHIST_W
// outcomes of each branch; they index a 1K-entry table of 3-bit local counters. The global
// history indexes a 4K-entry table of 2-bit global counters and a 4K-entry table of 2-bit
// choice counters that pick the global (MSB set) or the local direction. Local histories are
// updated speculatively with the front end's final direction (sp_*) and are not repaired on a
// misprediction. At commit (tr_*) both components are trained toward the outcome and the
// chooser moves toward whichever component was right when they disagreed.
//
// Timing: a lookup in cycle t reads the local history, global and choice tables at the clock
// edge; the local counter is read in cycle t+1 and the result is visible in cycle t+LAT-1
// (LAT >= 2). After reset the tables are cleared one entry per cycle (ready rises after 4K
// cycles): counters start weakly not-taken and the chooser weakly prefers the local side.
//
// Sizes are those of the document's hybrid; index functions, counter reset values, the
// speculative-update port and the 12-bit global index are this design's choices.
module hybrid_ovr
  import bp_pkg::*;
#(
  parameter int unsigned LHT_ENTRIES  = 1024,
  parameter int unsigned LPT_ENTRIES  = 1024,
  parameter int unsigned GPT_ENTRIES  = 4096,
  parameter int unsigned LAT          = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   ready,
  // lookup
  input  logic   lk_valid,
  input  pc_t    lk_pc,
  input  ghist_t lk_ghr,
  output logic   out_valid,
  output logic   out_taken,
  output lhist_t out_lhist,
  output logic   out_local,
  output logic   out_global,
  // speculative local history update with the final predicted direction
  input  logic   sp_valid,
  input  pc_t    sp_pc,
  input  logic   sp_taken,
  // training at commit
  input  logic   tr_valid,
  input  ghist_t tr_ghr,
  input  lhist_t tr_lhist,
  input  logic   tr_local,
  input  logic   tr_global,
  input  logic   tr_taken
);
  localparam int unsigned LHT_W = $clog2(LHT_ENTRIES);
  localparam int unsigned LPT_W = $clog2(LPT_ENTRIES);
  localparam int unsigned GPT_W = $clog2(GPT_ENTRIES);
  localparam int unsigned CLR_N = GPT_ENTRIES;   // largest table

  if (LAT < 2) begin : g_bad_lat
    $error("hybrid_ovr: LAT must be at least 2");
  end
  if (LPT_W > LHIST_W || LHT_ENTRIES > CLR_N || LPT_ENTRIES > CLR_N) begin : g_bad_size
    $error("hybrid_ovr: table sizes do not fit the history widths");
  end

  lhist_t     lht [LHT_ENTRIES];
  logic [2:0] lpt [LPT_ENTRIES];
  logic [1:0] gpt [GPT_ENTRIES];
  logic [1:0] cpt [GPT_ENTRIES];

  // ---------------- clearing after reset ----------------
  logic [GPT_W-1:0] clr_idx;
  logic             clearing;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_idx  <= '0;
      clearing <= 1'b1;
    end else if (clearing) begin
      if (clr_idx == GPT_W'(CLR_N - 1)) clearing <= 1'b0;
      clr_idx <= clr_idx + 1'b1;
    end
  end
  assign ready = !clearing;

  // ---------------- lookup ----------------
  logic [LHT_W-1:0] lk_lidx, sp_lidx;
  logic [GPT_W-1:0] lk_gidx, tr_gidx;
  logic [LPT_W-1:0] tr_pidx;
  assign lk_lidx = lk_pc[LHT_W+1:2];
  assign sp_lidx = sp_pc[LHT_W+1:2];
  assign lk_gidx = lk_ghr[GPT_W-1:0];
  assign tr_gidx = tr_ghr[GPT_W-1:0];
  assign tr_pidx = tr_lhist[LPT_W-1:0];

  logic       v_q;
  lhist_t     lh_q;
  logic [1:0] g_q, c_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= lk_valid && ready;
  end
  always_ff @(posedge clk) begin
    lh_q <= lht[lk_lidx];
    g_q  <= gpt[lk_gidx];
    c_q  <= cpt[lk_gidx];
  end

  // second cycle: local counter read through the local history
  typedef struct packed {
    logic   taken;
    lhist_t lhist;
    logic   loc;
    logic   glob;
  } hyb_out_t;
  hyb_out_t res_c, res_d;
  always_comb begin
    res_c.loc   = lpt[lh_q[LPT_W-1:0]][2];
    res_c.glob  = g_q[1];
    res_c.taken = c_q[1] ? res_c.glob : res_c.loc;
    res_c.lhist = lh_q;
  end

  pipe_delay #(.W($bits(hyb_out_t)), .DEPTH(LAT - 2)) u_dly (
    .clk, .rst_n, .in_valid(v_q), .in_data(res_c), .out_valid, .out_data(res_d)
  );
  assign out_taken  = res_d.taken;
  assign out_lhist  = res_d.lhist;
  assign out_local  = res_d.loc;
  assign out_global = res_d.glob;

  // ---------------- updates ----------------
  function automatic logic [2:0] sat3(logic [2:0] c, logic up);
    return up ? ((c == 3'd7) ? c : c + 1'b1) : ((c == 3'd0) ? c : c - 1'b1);
  endfunction
  function automatic logic [1:0] sat2(logic [1:0] c, logic up);
    return up ? ((c == 2'd3) ? c : c + 1'b1) : ((c == 2'd0) ? c : c - 1'b1);
  endfunction

  logic tr_do, sp_do;
  assign tr_do = tr_valid && !clearing;
  assign sp_do = sp_valid && !clearing;

  always_ff @(posedge clk) begin
    if (clearing) begin
      if (clr_idx < GPT_W'(LHT_ENTRIES)) lht[clr_idx[LHT_W-1:0]] <= '0;
      if (clr_idx < GPT_W'(LPT_ENTRIES)) lpt[clr_idx[LPT_W-1:0]] <= 3'd3;
      gpt[clr_idx] <= 2'd1;
      cpt[clr_idx] <= 2'd1;
    end else begin
      if (sp_do) lht[sp_lidx] <= {lht[sp_lidx][LHIST_W-2:0], sp_taken};
      if (tr_do) begin
        lpt[tr_pidx] <= sat3(lpt[tr_pidx], tr_taken);
        gpt[tr_gidx] <= sat2(gpt[tr_gidx], tr_taken);
        if (tr_local != tr_global) cpt[tr_gidx] <= sat2(cpt[tr_gidx], tr_global == tr_taken);
      end
    end
  end
endmodule
