// comp_counter: next-state logic of the first-level predictor's 2-bit saturating counter
// with compensating updates.
//
// With hierarchical update the first-level counter is trained early in the direction the
// overriding predictor chose. If that direction later proves wrong, the counter has been
// pushed one step the wrong way, so the commit-time update moves it two steps toward the
// actual outcome: one step undoes the bad early update, one is the normal training. The
// step is 1 otherwise. Counts saturate at 00 and 11; the MSB is the taken prediction.
// Interface: purely combinational, ctr/taken/ovr_wrong in, ctr_next out.
// Transitions follow the state diagram of the compensating counter (00..11, edges for
// taken/not-taken outcome and overriding predictor correct/wrong).
module comp_counter (
  input  logic [1:0] ctr,        // current counter
  input  logic       taken,      // training direction
  input  logic       ovr_wrong,  // earlier early update was wrong: step 2 instead of 1
  output logic [1:0] ctr_next
);
  logic [2:0] step;
  logic [2:0] sum;

  always_comb begin
    step = ovr_wrong ? 3'd2 : 3'd1;
    sum  = {1'b0, ctr} + step;
    if (taken) begin
      ctr_next = (sum > 3'd3) ? 2'b11 : sum[1:0];
    end else begin
      ctr_next = ({1'b0, ctr} < step) ? 2'b00 : 2'(ctr - step[1:0]);
    end
  end
endmodule
