// tb_gshare_l1: random lookups and updates of the first-level gshare predictor against a
// reference table kept in the testbench (index = word address bits XOR history, 2-bit
// counters starting at 01, step 2 for compensating updates). Lookups are combinational;
// updates are checked through later lookups.
module tb_gshare_l1;
  import bp_pkg::*;
  localparam int unsigned ENTRIES = 2048;

  logic   clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  pc_t    lk_pc, up_pc;
  ghist_t lk_ghr, up_ghr;
  logic   ready, lk_taken, up_valid, up_taken, up_double;
  int checks = 0, failures = 0;

  gshare_l1 dut (.clk, .rst_n, .ready, .lk_pc, .lk_ghr, .lk_taken, .up_valid, .up_pc, .up_ghr,
                 .up_taken, .up_double);

  int ref_ctr [ENTRIES];

  function automatic int ref_idx(pc_t pc, ghist_t g);
    return int'(((pc >> 2) ^ 64'(g)) % 64'(ENTRIES));
  endfunction

  // small address/history pool so that entries get trained repeatedly
  function automatic pc_t rand_pc();
    return 64'h4000 + 64'($urandom_range(0, 63)) * 4;
  endfunction
  function automatic ghist_t rand_ghr();
    return ghist_t'({$urandom, $urandom}) & ghist_t'(47'h7);
  endfunction

  initial begin
    foreach (ref_ctr[i]) ref_ctr[i] = 1;
    lk_pc = '0; lk_ghr = '0; up_pc = '0; up_ghr = '0;
    up_valid = 0; up_taken = 0; up_double = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (ready);
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      lk_pc     = rand_pc();
      lk_ghr    = rand_ghr();
      up_valid  = $urandom_range(0, 1);
      up_pc     = rand_pc();
      up_ghr    = rand_ghr();
      up_taken  = $urandom_range(0, 1);
      up_double = ($urandom_range(0, 3) == 0);
      #1;
      checks++;
      if (lk_taken !== (ref_ctr[ref_idx(lk_pc, lk_ghr)] >= 2)) begin
        failures++;
        if (failures < 10) $display("FAIL lookup pc=%h ghr=%h got %b", lk_pc, lk_ghr, lk_taken);
      end
      if (up_valid) begin
        automatic int i = ref_idx(up_pc, up_ghr);
        automatic int s = up_double ? 2 : 1;
        ref_ctr[i] = up_taken ? ((ref_ctr[i] + s > 3) ? 3 : ref_ctr[i] + s)
                              : ((ref_ctr[i] - s < 0) ? 0 : ref_ctr[i] - s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
