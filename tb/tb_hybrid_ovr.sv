// tb_hybrid_ovr: checks the tournament predictor against reference tables. Every cycle
// after the clearing walk it starts a lookup and, at random, a speculative local-history
// update and a commit training step. Expected outputs follow the read timing of the block:
// local history, global and choice counters as they stand in the lookup cycle, the local
// counter as it stands one cycle later; the result must appear exactly LAT-1 cycles after
// the lookup.
module tb_hybrid_ovr;
  import bp_pkg::*;
  localparam int LAT = 3, LHT = 1024, LPT = 1024, GPT = 4096;

  logic   clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic   ready, lk_valid, out_valid, out_taken, out_local, out_global;
  logic   sp_valid, sp_taken, tr_valid, tr_local, tr_global, tr_taken;
  pc_t    lk_pc, sp_pc;
  ghist_t lk_ghr, tr_ghr;
  lhist_t out_lhist, tr_lhist;
  int checks = 0, failures = 0;

  hybrid_ovr dut (.clk, .rst_n, .ready, .lk_valid, .lk_pc, .lk_ghr, .out_valid, .out_taken,
                  .out_lhist, .out_local, .out_global, .sp_valid, .sp_pc, .sp_taken, .tr_valid,
                  .tr_ghr, .tr_lhist, .tr_local, .tr_global, .tr_taken);

  int r_lht [LHT], r_lpt [LPT], r_gpt [GPT], r_cpt [GPT];
  // lookups waiting for their second read: cycle -> {lhist, g, c}
  int pend_lh [int], pend_g [int], pend_c [int];
  int exp_taken [int], exp_lh [int], exp_loc [int], exp_glob [int];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  function automatic int sat(int v, int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  int cyc;
  initial begin
    foreach (r_lht[i]) r_lht[i] = 0;
    foreach (r_lpt[i]) r_lpt[i] = 3;
    foreach (r_gpt[i]) r_gpt[i] = 1;
    foreach (r_cpt[i]) r_cpt[i] = 1;
    lk_valid = 0; lk_pc = '0; lk_ghr = '0; sp_valid = 0; sp_pc = '0; sp_taken = 0;
    tr_valid = 0; tr_ghr = '0; tr_lhist = '0; tr_local = 0; tr_global = 0; tr_taken = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (ready);
    for (cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      lk_valid  = 1;
      lk_pc     = 64'h2000 + 64'($urandom_range(0, 7)) * 4;
      lk_ghr    = ghist_t'($urandom_range(0, 15));
      sp_valid  = $urandom_range(0, 1);
      sp_pc     = 64'h2000 + 64'($urandom_range(0, 7)) * 4;
      sp_taken  = $urandom_range(0, 3) != 0;
      tr_valid  = $urandom_range(0, 1);
      tr_ghr    = ghist_t'($urandom_range(0, 15));
      tr_lhist  = lhist_t'($urandom_range(0, 31));
      tr_local  = $urandom_range(0, 1);
      tr_global = $urandom_range(0, 1);
      tr_taken  = $urandom_range(0, 4) != 0;
      #1;
      // first read of this lookup
      pend_lh[cyc + 1] = r_lht[(lk_pc >> 2) % LHT];
      pend_g[cyc + 1]  = r_gpt[lk_ghr % GPT];
      pend_c[cyc + 1]  = r_cpt[lk_ghr % GPT];
      // second read of last cycle's lookup
      if (pend_lh.exists(cyc)) begin
        automatic int lh = pend_lh[cyc];
        automatic int loc = r_lpt[lh % LPT] >= 4;
        automatic int glob = pend_g[cyc] >= 2;
        exp_lh[cyc + LAT - 2]    = lh;
        exp_loc[cyc + LAT - 2]   = loc;
        exp_glob[cyc + LAT - 2]  = glob;
        exp_taken[cyc + LAT - 2] = (pend_c[cyc] >= 2) ? glob : loc;
      end
      check(out_valid == exp_taken.exists(cyc), $sformatf("out_valid @%0d", cyc));
      if (exp_taken.exists(cyc)) begin
        check(out_taken == exp_taken[cyc] && out_lhist == lhist_t'(exp_lh[cyc]) &&
              out_local == exp_loc[cyc] && out_global == exp_glob[cyc],
              $sformatf("@%0d taken %b/%0d lhist %h/%h", cyc, out_taken, exp_taken[cyc],
                        out_lhist, exp_lh[cyc]));
      end
      // reference updates at the clock edge
      if (sp_valid) begin
        automatic int i = int'((sp_pc >> 2) % LHT);
        r_lht[i] = ((r_lht[i] << 1) | int'(sp_taken)) % (1 << LHIST_W);
      end
      if (tr_valid) begin
        automatic int p = int'(tr_lhist) % LPT, g = int'(tr_ghr) % GPT;
        r_lpt[p] = sat(r_lpt[p] + (tr_taken ? 1 : -1), 7);
        r_gpt[g] = sat(r_gpt[g] + (tr_taken ? 1 : -1), 3);
        if (tr_local != tr_global) r_cpt[g] = sat(r_cpt[g] + ((tr_global == tr_taken) ? 1 : -1), 3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
