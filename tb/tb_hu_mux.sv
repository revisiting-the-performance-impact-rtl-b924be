// tb_hu_mux: random checks of the hierarchical-update multiplexer against the update rules:
// commit without early update -> step 1; early update right -> no commit write; early update
// wrong -> step 2; an early update is accepted only when the commit does not need the port.
// Also runs the conventional configuration (HIER_UPDATE = 0).
module tb_hu_mux;
  import bp_pkg::*;
  int checks = 0, failures = 0;

  logic   cm_valid, cm_taken, cm_ovr_wrong, cm_hu_done, hu_valid, hu_taken;
  pc_t    cm_pc, hu_pc;
  ghist_t cm_ghr, hu_ghr;
  logic   hu_accept [2], up_valid [2], up_taken [2], up_double [2];
  pc_t    up_pc [2];
  ghist_t up_ghr [2];
  logic   ev_n [2], ev_c [2], ev_s [2];

  hu_mux #(.HIER_UPDATE(1'b1)) dut_hu (
    .cm_valid, .cm_pc, .cm_ghr, .cm_taken, .cm_ovr_wrong, .cm_hu_done,
    .hu_valid, .hu_pc, .hu_ghr, .hu_taken, .hu_accept(hu_accept[1]),
    .up_valid(up_valid[1]), .up_pc(up_pc[1]), .up_ghr(up_ghr[1]), .up_taken(up_taken[1]),
    .up_double(up_double[1]), .ev_commit_normal(ev_n[1]), .ev_commit_comp(ev_c[1]),
    .ev_commit_skip(ev_s[1]));
  hu_mux #(.HIER_UPDATE(1'b0)) dut_base (
    .cm_valid, .cm_pc, .cm_ghr, .cm_taken, .cm_ovr_wrong, .cm_hu_done,
    .hu_valid, .hu_pc, .hu_ghr, .hu_taken, .hu_accept(hu_accept[0]),
    .up_valid(up_valid[0]), .up_pc(up_pc[0]), .up_ghr(up_ghr[0]), .up_taken(up_taken[0]),
    .up_double(up_double[0]), .ev_commit_normal(ev_n[0]), .ev_commit_comp(ev_c[0]),
    .ev_commit_skip(ev_s[0]));

  task automatic expect1(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      cm_valid = $urandom_range(0, 1); cm_taken = $urandom_range(0, 1);
      cm_ovr_wrong = $urandom_range(0, 1); cm_hu_done = $urandom_range(0, 1);
      hu_valid = $urandom_range(0, 1); hu_taken = $urandom_range(0, 1);
      cm_pc = {$urandom, $urandom}; hu_pc = {$urandom, $urandom};
      cm_ghr = ghist_t'({$urandom, $urandom}); hu_ghr = ghist_t'({$urandom, $urandom});
      #1;
      for (int h = 0; h < 2; h++) begin
        automatic bit early  = (h == 1) && cm_hu_done;
        automatic bit cwrite = cm_valid && !(early && !cm_ovr_wrong);
        automatic bit acc    = (h == 1) && hu_valid && !cwrite;
        expect1(hu_accept[h] == acc, "hu_accept");
        expect1(up_valid[h] == (cwrite || acc), "up_valid");
        if (cwrite) begin
          expect1(up_pc[h] == cm_pc && up_ghr[h] == cm_ghr && up_taken[h] == cm_taken,
                  "commit data");
          expect1(up_double[h] == (early && cm_ovr_wrong), "commit step");
        end else if (acc) begin
          expect1(up_pc[h] == hu_pc && up_ghr[h] == hu_ghr && up_taken[h] == hu_taken &&
                  !up_double[h], "early update data");
        end
        expect1(ev_n[h] == (cm_valid && !early), "normal event");
        expect1(ev_c[h] == (cm_valid && early && cm_ovr_wrong), "compensating event");
        expect1(ev_s[h] == (cm_valid && early && !cm_ovr_wrong), "skip event");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
