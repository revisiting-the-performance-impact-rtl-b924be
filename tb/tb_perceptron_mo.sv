// tb_perceptron_mo: checks the overriding perceptron against a reference weight table.
// After the post-reset clearing (ready must rise after ENTRIES cycles), every cycle starts a
// lookup and usually a training step. The expected partial sum (bias plus the most recent
// history bank) and full sum are computed from the reference weights as they stand when the
// lookup is issued, and must appear exactly LAT_PART-1 and LAT_FULL-1 cycles later. Training
// follows the threshold rule with saturating 8-bit weights; addresses come from a small pool
// with biased outcomes so weights reach saturation.
module tb_perceptron_mo;
  import bp_pkg::*;
  localparam int unsigned ENTRIES = 348, BANKS = 4, LAT_PART = 2, LAT_FULL = 4;
  localparam int unsigned BANK_N = N_WEIGHTS / BANKS;
  localparam int THETA = 104;   // floor(1.93*47 + 14)

  logic   clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic   ready, lk_valid, part_valid, part_taken, full_valid, full_taken;
  logic   tr_valid, tr_taken;
  pc_t    lk_pc, tr_pc;
  ghist_t lk_ghr, tr_ghr;
  psum_t  part_sum, full_sum, tr_sum;
  int checks = 0, failures = 0;

  perceptron_mo dut (.clk, .rst_n, .ready, .lk_valid, .lk_pc, .lk_ghr, .part_valid,
                     .part_taken, .part_sum, .full_valid, .full_taken, .full_sum, .tr_valid,
                     .tr_pc, .tr_ghr, .tr_taken, .tr_sum);

  int w [ENTRIES][N_WEIGHTS];
  int exp_part [int];
  int exp_full [int];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  function automatic int row_of(pc_t pc);
    return int'((pc >> 2) % 64'(ENTRIES));
  endfunction
  function automatic pc_t rand_pc();
    return 64'h8000 + 64'($urandom_range(0, 15)) * 4;
  endfunction

  int cyc = 0, ready_cyc = -1;

  initial begin
    foreach (w[r, i]) w[r][i] = 0;
    lk_valid = 0; lk_pc = '0; lk_ghr = '0;
    tr_valid = 0; tr_pc = '0; tr_ghr = '0; tr_taken = 0; tr_sum = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < 8000; cyc++) begin
      @(negedge clk);
      if (ready && ready_cyc < 0) begin
        ready_cyc = cyc;
        check(cyc >= int'(ENTRIES) - 2 && cyc <= int'(ENTRIES) + 2, $sformatf("ready at %0d", cyc));
      end
      lk_valid = ready;
      lk_pc    = rand_pc();
      lk_ghr   = ghist_t'({$urandom, $urandom});
      tr_valid = ready && ($urandom_range(0, 3) != 0);
      tr_pc    = rand_pc();
      tr_ghr   = ghist_t'({$urandom, $urandom});
      tr_taken = ($urandom_range(0, 19) < 19) ? tr_pc[2] : !tr_pc[2];
      tr_sum   = psum_t'($urandom_range(0, 400)) - psum_t'(200);
      #1;
      // expected sums of this lookup, from the weights before this cycle's training
      if (lk_valid) begin
        automatic int r = row_of(lk_pc), sp = 0, sf = 0;
        for (int i = 0; i < int'(N_WEIGHTS); i++) begin
          automatic bit x = (i == 0) ? 1'b1 : lk_ghr[i-1];
          automatic int t = x ? w[r][i] : -w[r][i];
          sf += t;
          if (i < int'(BANK_N)) sp += t;
        end
        exp_part[cyc + int'(LAT_PART) - 1] = sp;
        exp_full[cyc + int'(LAT_FULL) - 1] = sf;
      end
      // outputs due now
      check(part_valid == exp_part.exists(cyc), $sformatf("part_valid @%0d", cyc));
      if (exp_part.exists(cyc)) begin
        check(int'(part_sum) == exp_part[cyc] && part_taken == (exp_part[cyc] >= 0),
              $sformatf("part_sum %0d expected %0d", part_sum, exp_part[cyc]));
      end
      check(full_valid == exp_full.exists(cyc), $sformatf("full_valid @%0d", cyc));
      if (exp_full.exists(cyc)) begin
        check(int'(full_sum) == exp_full[cyc] && full_taken == (exp_full[cyc] >= 0),
              $sformatf("full_sum %0d expected %0d", full_sum, exp_full[cyc]));
      end
      // reference training
      if (tr_valid) begin
        automatic int s = int'(tr_sum);
        automatic int r = row_of(tr_pc);
        if (((s >= 0) != tr_taken) || (s <= THETA && s >= -THETA)) begin
          for (int i = 0; i < int'(N_WEIGHTS); i++) begin
            automatic bit x = (i == 0) ? 1'b1 : tr_ghr[i-1];
            if (x == tr_taken) w[r][i] = (w[r][i] == 127) ? 127 : w[r][i] + 1;
            else               w[r][i] = (w[r][i] == -128) ? -128 : w[r][i] - 1;
          end
        end
      end
    end
    begin
      automatic int sat = 0;
      foreach (w[r, i]) if (w[r][i] == 127 || w[r][i] == -128) sat++;
      check(sat > 0, "no weight reached saturation");
    end
    check(ready_cyc >= 0, "never ready");
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
