// tb_comp_counter: exhaustive check of the compensating 2-bit counter against a table of
// expected next states (step 1 when the overriding predictor was right, step 2 when it was
// wrong, saturating at 00 and 11).
module tb_comp_counter;
  logic [1:0] ctr, ctr_next;
  logic       taken, ovr_wrong;
  int checks = 0, failures = 0;

  comp_counter dut (.ctr, .taken, .ovr_wrong, .ctr_next);

  // expected[{ovr_wrong, taken, ctr}]
  logic [1:0] expected [16] = '{
    // ovr right, not taken: 00 00 01 10
    2'b00, 2'b00, 2'b01, 2'b10,
    // ovr right, taken:     01 10 11 11
    2'b01, 2'b10, 2'b11, 2'b11,
    // ovr wrong, not taken: 00 00 00 01
    2'b00, 2'b00, 2'b00, 2'b01,
    // ovr wrong, taken:     10 11 11 11
    2'b10, 2'b11, 2'b11, 2'b11
  };

  initial begin
    for (int i = 0; i < 16; i++) begin
      {ovr_wrong, taken, ctr} = 4'(i);
      #1;
      checks++;
      if (ctr_next !== expected[i]) begin
        failures++;
        $display("FAIL ctr=%b taken=%b wrong=%b -> %b, expected %b", ctr, taken, ovr_wrong,
                 ctr_next, expected[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
