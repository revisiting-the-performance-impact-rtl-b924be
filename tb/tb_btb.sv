// tb_btb: fills the 4-way BTB with random taken branches, several mapping to the same set,
// and checks hits, targets and round-robin replacement against a reference model.
module tb_btb;
  import bp_pkg::*;
  localparam int unsigned ENTRIES = 4096, WAYS = 4, SETS = ENTRIES / WAYS;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  pc_t  lk_pc, lk_target, up_pc, up_target;
  logic ready, lk_hit, up_valid;
  int checks = 0, failures = 0;

  btb dut (.clk, .rst_n, .ready, .lk_pc, .lk_hit, .lk_target, .up_valid, .up_pc, .up_target);

  // reference: per set, WAYS slots and a round-robin pointer
  pc_t ref_pc  [SETS][WAYS];
  pc_t ref_tgt [SETS][WAYS];
  bit  ref_v   [SETS][WAYS];
  int  ref_rr  [SETS];

  function automatic int set_of(pc_t pc);
    return int'((pc >> 2) % 64'(SETS));
  endfunction

  // addresses in 8 sets, 12 candidates each, so replacement happens
  function automatic pc_t rand_pc();
    return 64'h10000 + 64'($urandom_range(0, 7)) * 4 + 64'($urandom_range(0, 11)) * 64'(SETS * 4);
  endfunction

  initial begin
    foreach (ref_v[s, w]) ref_v[s][w] = 0;
    foreach (ref_rr[s]) ref_rr[s] = 0;
    lk_pc = '0; up_pc = '0; up_target = '0; up_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (ready);
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      lk_pc     = rand_pc();
      up_valid  = $urandom_range(0, 1);
      up_pc     = rand_pc();
      up_target = {$urandom, $urandom} & ~64'h3;
      #1;
      begin
        automatic int s = set_of(lk_pc);
        automatic bit hit = 0;
        automatic pc_t t = '0;
        for (int w = 0; w < int'(WAYS); w++)
          if (ref_v[s][w] && ref_pc[s][w] == lk_pc) begin hit = 1; t = ref_tgt[s][w]; end
        checks++;
        if (lk_hit !== hit || (hit && lk_target !== t)) begin
          failures++;
          if (failures < 10) $display("FAIL pc=%h hit=%b/%b tgt=%h/%h", lk_pc, lk_hit, hit,
                                      lk_target, t);
        end
      end
      if (up_valid) begin
        automatic int s = set_of(up_pc);
        automatic int way = -1;
        for (int w = 0; w < int'(WAYS); w++)
          if (ref_v[s][w] && ref_pc[s][w] == up_pc) way = w;
        if (way < 0) begin
          way = ref_rr[s];
          ref_rr[s] = (ref_rr[s] + 1) % int'(WAYS);
        end
        ref_v[s][way] = 1; ref_pc[s][way] = up_pc; ref_tgt[s][way] = up_target;
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
