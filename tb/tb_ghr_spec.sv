// tb_ghr_spec: random speculative pushes and repairs of the global history register
// against a reference shift register; repair wins over a same-cycle push.
module tb_ghr_spec;
  import bp_pkg::*;
  logic   clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic   push_valid, push_taken, repair_valid;
  ghist_t repair_ghr, ghr, ref_ghr;
  int checks = 0, failures = 0;

  ghr_spec dut (.clk, .rst_n, .push_valid, .push_taken, .repair_valid, .repair_ghr, .ghr);

  initial begin
    push_valid = 0; push_taken = 0; repair_valid = 0; repair_ghr = '0;
    ref_ghr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (ghr !== ref_ghr) begin
        failures++;
        if (failures < 10) $display("FAIL ghr %h expected %h", ghr, ref_ghr);
      end
      push_valid   = $urandom_range(0, 3) != 0;
      push_taken   = $urandom_range(0, 1);
      repair_valid = $urandom_range(0, 9) == 0;
      repair_ghr   = ghist_t'({$urandom, $urandom});
      if (repair_valid)    ref_ghr = repair_ghr;
      else if (push_valid) ref_ghr = ghist_t'({ref_ghr, push_taken});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
