// tb_bp_workload: the front-end organisations side by side on the same program and the
// same commit-stall pattern, at the latencies of 10-, 20-, 30- and 40-stage pipelines
// (perceptron 2/4/6/8 cycles, gshare 2K/2K/1K/1K, partial tap at 2/2/3/4 cycles) and with the
// tournament predictor at 20 and 40 stages (3 and 5 cycles):
//   BASE  - overriding perceptron, first level trained at commit only
//   HU    - hierarchical update of the first level by the full perceptron
//   MO    - partial-perceptron middle override level
//   BOTH  - hierarchical update and multi-overriding together
// Each instance runs its own behavioural back end (all correctness checks apply). The
// testbench reports, per organisation, correct-path instructions delivered per fetch cycle
// (a front-end throughput proxy), overrides and back-end mispredictions, and checks that
// hierarchical update cuts the number of final perceptron overrides (the first level agrees
// with the perceptron more often). With the tournament predictor the effect is smaller and
// may go either way, so it is only reported. Throughput is reported, not checked: on a five-branch loop it
// depends on how the random branch lines up with the stall pattern.
module tb_bp_workload;
  import bp_pkg::*;
  import bp_tb_pkg::*;

  localparam int RUN_CYCLES = 30000;
  localparam int N = 18;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         done [N];
  bp_stats_t    st [N];
  int checks = 0, failures = 0;

  // configurations; entry 0 of each group is its BASE
  localparam int    LF_OF [N] = '{2, 2, 4, 4, 4, 4, 6, 6, 6, 6, 8, 8, 8, 8, 3, 3, 5, 5};
  localparam int    LP_OF [N] = '{2, 2, 2, 2, 2, 2, 3, 3, 3, 3, 4, 4, 4, 4, 2, 2, 2, 2};
  localparam int    L1_OF [N] = '{2048, 2048, 2048, 2048, 2048, 2048, 1024, 1024, 1024, 1024,
                                  1024, 1024, 1024, 1024, 2048, 2048, 1024, 1024};
  localparam bit    HU_OF [N] = '{0, 1, 0, 1, 0, 1, 0, 1, 0, 1, 0, 1, 0, 1, 0, 1, 0, 1};
  localparam bit    MO_OF [N] = '{0, 0, 0, 0, 1, 1, 0, 0, 1, 1, 0, 0, 1, 1, 0, 0, 0, 0};
  localparam bit    HY_OF [N] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1};
  localparam string NAME  [N] = '{"p10 BASE", "p10 HU", "p20 BASE", "p20 HU", "p20 MO",
                                  "p20 BOTH", "p30 BASE", "p30 HU", "p30 MO", "p30 BOTH",
                                  "p40 BASE", "p40 HU", "p40 MO", "p40 BOTH", "h20 BASE",
                                  "h20 HU", "h40 BASE", "h40 HU"};
  // index of each configuration's BASE, and whether it is a multi-overriding one
  localparam int    BASE_OF [N] = '{0, 0, 2, 2, 2, 2, 6, 6, 6, 6, 10, 10, 10, 10, 14, 14, 16, 16};

  for (genvar i = 0; i < N; i++) begin : g_cfg
    logic         fetch_valid, deliver_valid, ready;
    pc_t          fetch_pc;
    bp_meta_t     deliver_meta;
    bp_redirect_t misp_redirect;
    bp_redirect_t dec_redirect [4];
    bp_commit_t   commit;
    bp_events_t   events;

    bp_frontend #(
      .L1_ENTRIES(L1_OF[i]), .LAT_PART(LP_OF[i]), .LAT_FULL(LF_OF[i]),
      .HIER_UPDATE(HU_OF[i]), .MULTI_OVERRIDE(MO_OF[i]),
      .OVR_KIND(HY_OF[i] ? OVR_HYBRID : OVR_PERCEPTRON)
    ) dut (
      .clk, .rst_n, .ready, .fetch_valid, .fetch_pc, .deliver_valid, .deliver_meta,
      .misp_redirect, .dec_redirect, .commit, .events
    );

    bp_backend_model #(
      .LAT_FULL(LF_OF[i]), .RESOLVE_LAT(2 * LF_OF[i]), .COMMIT_LAT(4 * LF_OF[i]),
      .RUN_CYCLES(RUN_CYCLES), .STALL_ODDS(25), .STALL_LEN(40 * LF_OF[i]), .DEC_ODDS(1000000)
    ) be (
      .clk, .rst_n, .fetch_valid, .fetch_pc, .deliver_valid, .deliver_meta, .events,
      .misp_redirect, .dec_redirect, .commit, .done(done[i]), .stats(st[i])
    );
  end

  task automatic need(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) wait (done[i]);
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      $display("%-9s ipc=%0.4f full_ovr=%0d part_ovr=%0d misp=%0d hu=%0d comp=%0d", NAME[i],
               real'(st[i].correct) / real'(st[i].cycles), st[i].full, st[i].part, st[i].misp,
               st[i].hu, st[i].cm_comp);
      checks   += st[i].checks;
      failures += st[i].failures;
    end
    for (int i = 0; i < N; i++) begin
      if (HU_OF[i] && !MO_OF[i] && !HY_OF[i])
        need(st[i].full < st[BASE_OF[i]].full, {NAME[i], " has fewer final overrides than BASE"});
      if (MO_OF[i] && LP_OF[i] < LF_OF[i])
        need(st[i].part > 0, {NAME[i], " uses the middle level"});
      if (!MO_OF[i])
        need(st[i].part == 0, {NAME[i], " has no middle level"});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN_CYCLES + 10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
