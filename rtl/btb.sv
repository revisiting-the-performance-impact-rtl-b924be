// btb: set-associative branch target buffer.
//
// Identifies, in the fetch cycle, whether the fetch address holds a known branch and gives
// its taken target, so the first-level direction prediction can steer the next fetch.
// 4K entries in 4 ways (1024 sets), as in the base machine. Set index = word address bits,
// tag = the remaining upper bits. Entries are written when a taken branch commits: a hit
// refreshes the target, a miss fills the way named by the set's round-robin pointer.
// Lookup is combinational; a write lands at the clock edge. After reset the sets are
// invalidated one per cycle (ready rises when done); updates wait for ready.
// Replacement, index/tag split and update policy are this design's choices.
module btb
  import bp_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096,
  parameter int unsigned WAYS    = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic ready,
  input  pc_t  lk_pc,
  output logic lk_hit,
  output pc_t  lk_target,
  input  logic up_valid,
  input  pc_t  up_pc,
  input  pc_t  up_target
);
  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = PC_W - SET_W - 2;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  typedef logic [SET_W-1:0] set_t;
  typedef logic [TAG_W-1:0] tag_t;

  logic [WAYS-1:0]  valid_q [SETS];
  logic [WAY_W-1:0] rr_q    [SETS];
  tag_t             tag_q   [SETS][WAYS];
  pc_t              tgt_q   [SETS][WAYS];

  set_t lk_set, up_set;
  tag_t lk_tag, up_tag;
  assign lk_set = lk_pc[SET_W+1:2];
  assign lk_tag = lk_pc[PC_W-1:SET_W+2];
  assign up_set = up_pc[SET_W+1:2];
  assign up_tag = up_pc[PC_W-1:SET_W+2];

  always_comb begin
    lk_hit    = 1'b0;
    lk_target = '0;
    for (int w = 0; w < int'(WAYS); w++) begin
      if (valid_q[lk_set][w] && tag_q[lk_set][w] == lk_tag) begin
        lk_hit    = 1'b1;
        lk_target = tgt_q[lk_set][w];
      end
    end
  end

  logic             up_hit;
  logic [WAY_W-1:0] up_way;
  always_comb begin
    up_hit = 1'b0;
    up_way = rr_q[up_set];
    for (int w = 0; w < int'(WAYS); w++) begin
      if (valid_q[up_set][w] && tag_q[up_set][w] == up_tag) begin
        up_hit = 1'b1;
        up_way = WAY_W'(w);
      end
    end
  end

  set_t clr_set;
  logic clearing;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_set  <= '0;
      clearing <= 1'b1;
    end else if (clearing) begin
      if (clr_set == set_t'(SETS - 1)) clearing <= 1'b0;
      clr_set <= clr_set + 1'b1;
    end
  end
  assign ready = !clearing;

  always_ff @(posedge clk) begin
    if (clearing) begin
      valid_q[clr_set] <= '0;
      rr_q[clr_set]    <= '0;
    end else if (up_valid) begin
      valid_q[up_set] <= valid_q[up_set] | (WAYS'(1) << up_way);
      if (!up_hit) rr_q[up_set] <= rr_q[up_set] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (up_valid && !clearing) begin
      tag_q[up_set][up_way] <= up_tag;
      tgt_q[up_set][up_way] <= up_target;
    end
  end
endmodule
