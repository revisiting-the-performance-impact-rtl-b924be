// tb_bp_frontend_hybrid: end-to-end test of the front end with the tournament predictor as
// the overriding level (two levels, 3-cycle overriding latency of the 20-stage machine) and
// hierarchical update. Same behavioural back end and program as the default test; the
// partial override must never fire in this configuration.
module tb_bp_frontend_hybrid;
  import bp_pkg::*;
  import bp_tb_pkg::*;

  localparam int RUN_CYCLES = 40000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         ready, fetch_valid, deliver_valid, done;
  pc_t          fetch_pc;
  bp_meta_t     deliver_meta;
  bp_redirect_t misp_redirect;
  bp_redirect_t dec_redirect [4];
  bp_commit_t   commit;
  bp_events_t   events;
  bp_stats_t    st;
  int checks = 0, failures = 0;

  bp_frontend #(.OVR_KIND(OVR_HYBRID), .LAT_FULL(3)) dut (
    .clk, .rst_n, .ready, .fetch_valid, .fetch_pc, .deliver_valid, .deliver_meta,
    .misp_redirect, .dec_redirect, .commit, .events
  );

  bp_backend_model #(.LAT_FULL(3), .RUN_CYCLES(RUN_CYCLES)) be (
    .clk, .rst_n, .fetch_valid, .fetch_pc, .deliver_valid, .deliver_meta, .events,
    .misp_redirect, .dec_redirect, .commit, .done, .stats(st)
  );

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
    wait (done);
    @(posedge clk);
    $display("deliveries=%0d correct-path=%0d l1=%0d partial_ovr=%0d full_ovr=%0d", st.deliver,
             st.correct, st.l1, st.part, st.full);
    $display("misp=%0d dec_resteer=%0d hu_write=%0d hu_dropped=%0d", st.misp, st.dec, st.hu,
             st.hu_drop);
    $display("commit normal=%0d compensating=%0d skipped=%0d commit_stalls=%0d", st.cm_norm,
             st.cm_comp, st.cm_skip, st.stalls);
    checks   += st.checks;
    failures += st.failures;
    need(st.l1 > 0,      "first-level prediction");
    need(st.part == 0,   "no partial override with the hybrid predictor");
    need(st.full > 0,    "hybrid override");
    need(st.misp > 0,    "back-end misprediction re-steer");
    need(st.dec > 0,     "decode-stage re-steer");
    need(st.hu > 0,      "hierarchical update");
    need(st.hu_drop > 0, "dropped hierarchical update");
    need(st.cm_norm > 0, "normal commit update");
    need(st.cm_comp > 0, "compensating commit update");
    need(st.cm_skip > 0, "skipped commit update");
    need(st.stalls > 0,  "commit stall");
    need(st.correct * 2 > st.deliver, "most deliveries on the correct path");
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
