// perceptron_mo: overriding perceptron predictor with an early partial prediction.
//
// Each of the ENTRIES rows holds a bias weight and one signed weight per global history bit.
// The prediction is the sign of  w0 + sum_i (h_i ? +w_i : -w_i).  The rows are split into
// BANKS banks; bank 0 holds the bias and the weights of the most recent history bits. A
// narrow extra adder sums bank 0 alone and gives a partial (short-history) prediction, which
// the front end uses as a middle override level; the full sum over all banks gives the final
// prediction. Both come from the same weights, so the partial prediction costs one adder.
//
// Timing: a lookup presented in cycle t (lk_valid, lk_pc, lk_ghr) reads the banks at the
// clock edge; the partial result is visible in cycle t+LAT_PART-1 and the full result in
// cycle t+LAT_FULL-1 (combinational outputs of that cycle), so a latency of 1 would be a
// single-cycle predictor. One lookup can start every cycle.
// Training (tr_*) follows the usual perceptron rule at commit: when the stored output had the
// wrong sign or |sum| <= THETA, every weight moves one step toward agreement with the outcome,
// saturating at the weight range. It reads and writes a row in one cycle.
// After reset the weights are cleared one row per cycle; ready rises when that is done.
//
// From the 20-stage configuration: 348 rows, history 47, full latency 4, banked table with a
// tap on the most recent bank. This design's choices: 8-bit weights, the index
// (word address modulo ENTRIES), four banks of equal size, a partial latency of 2, the
// threshold floor(1.93*h+14) and row clearing after reset.
module perceptron_mo
  import bp_pkg::*;
#(
  parameter int unsigned ENTRIES  = 348,
  parameter int unsigned BANKS    = 4,
  parameter int unsigned LAT_PART = 2,
  parameter int unsigned LAT_FULL = 4,
  parameter int unsigned THETA    = perc_theta(HIST_LEN)
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   ready,
  // lookup
  input  logic   lk_valid,
  input  pc_t    lk_pc,
  input  ghist_t lk_ghr,
  output logic   part_valid,
  output logic   part_taken,
  output psum_t  part_sum,
  output logic   full_valid,
  output logic   full_taken,
  output psum_t  full_sum,
  // training at commit
  input  logic   tr_valid,
  input  pc_t    tr_pc,
  input  ghist_t tr_ghr,
  input  logic   tr_taken,
  input  psum_t  tr_sum
);
  localparam int unsigned BANK_N = N_WEIGHTS / BANKS;   // weights per bank
  localparam int unsigned IDX_W  = $clog2(ENTRIES);
  typedef logic [IDX_W-1:0] idx_t;
  typedef logic signed [W_BITS-1:0] weight_t;
  localparam weight_t W_MAX = weight_t'((1 << (W_BITS-1)) - 1);
  localparam weight_t W_MIN = weight_t'(-(1 << (W_BITS-1)));

  if (N_WEIGHTS % BANKS != 0) begin : g_bad_banks
    $error("perceptron_mo: BANKS must divide the weight count");
  end
  if (LAT_PART < 2 || LAT_FULL < LAT_PART) begin : g_bad_lat
    $error("perceptron_mo: need 2 <= LAT_PART <= LAT_FULL");
  end

  function automatic idx_t index(pc_t pc);
    return idx_t'(pc[31:2] % 30'(ENTRIES));
  endfunction

  // ---------------- row clearing after reset ----------------
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

  // ---------------- training decision ----------------
  idx_t  lk_idx, tr_idx;
  logic  tr_do;
  psum_t tr_mag;
  assign lk_idx = index(lk_pc);
  assign tr_idx = index(tr_pc);
  assign tr_mag = tr_sum[SUM_W-1] ? -tr_sum : tr_sum;
  assign tr_do  = tr_valid && ready &&
                  ((!tr_sum[SUM_W-1] != tr_taken) || (tr_mag <= psum_t'(THETA)));

  // ---------------- banked weight table ----------------
  weight_t row_q [N_WEIGHTS];   // weights read for the lookup, cycle t+1

  for (genvar b = 0; b < int'(BANKS); b++) begin : g_bank
    logic [BANK_N*W_BITS-1:0] mem [ENTRIES];
    logic [BANK_N*W_BITS-1:0] rd_q, tr_old, tr_new;

    assign tr_old = mem[tr_idx];
    always_comb begin
      for (int k = 0; k < int'(BANK_N); k++) begin
        automatic int unsigned i = b * BANK_N + k;  // weight number, 0 = bias
        automatic weight_t w = weight_t'(tr_old[k*W_BITS +: W_BITS]);
        automatic logic x = (i == 0) ? 1'b1 : tr_ghr[i-1];
        automatic logic up = (x == tr_taken);
        if (up) tr_new[k*W_BITS +: W_BITS] = (w == W_MAX) ? w : w + 1'b1;
        else    tr_new[k*W_BITS +: W_BITS] = (w == W_MIN) ? w : w - 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (clearing)   mem[clr_idx] <= '0;
      else if (tr_do) mem[tr_idx]  <= tr_new;
      rd_q <= mem[lk_idx];
    end

    for (genvar k = 0; k < int'(BANK_N); k++) begin : g_w
      assign row_q[b*BANK_N + k] = weight_t'(rd_q[k*W_BITS +: W_BITS]);
    end
  end

  logic   lk_v_q;
  ghist_t ghr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lk_v_q <= 1'b0;
    else        lk_v_q <= lk_valid && ready;
  end
  always_ff @(posedge clk) ghr_q <= lk_ghr;

  // ---------------- addition: partial tap and full tree ----------------
  psum_t sum_part_c, sum_full_c;
  always_comb begin
    sum_part_c = '0;
    sum_full_c = '0;
    for (int i = 0; i < int'(N_WEIGHTS); i++) begin
      automatic logic  x = (i == 0) ? 1'b1 : ghr_q[i-1];
      automatic psum_t t = psum_t'(row_q[i]);
      if (!x) t = -t;
      sum_full_c = sum_full_c + t;
      if (i < int'(BANK_N)) sum_part_c = sum_part_c + t;
    end
  end

  pipe_delay #(.W(SUM_W), .DEPTH(LAT_PART - 2)) u_part_dly (
    .clk, .rst_n, .in_valid(lk_v_q), .in_data(sum_part_c),
    .out_valid(part_valid), .out_data(part_sum)
  );
  pipe_delay #(.W(SUM_W), .DEPTH(LAT_FULL - 2)) u_full_dly (
    .clk, .rst_n, .in_valid(lk_v_q), .in_data(sum_full_c),
    .out_valid(full_valid), .out_data(full_sum)
  );
  assign part_taken = !part_sum[SUM_W-1];
  assign full_taken = !full_sum[SUM_W-1];
endmodule
