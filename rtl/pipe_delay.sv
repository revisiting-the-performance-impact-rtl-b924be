// pipe_delay: a chain of DEPTH registers that delays a value and its valid bit.
// DEPTH = 0 is a plain wire. Used to give a predictor output its lookup latency in cycles.
// Reset clears the valid bits only.
module pipe_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  if (DEPTH == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_regs
    logic         v_q [DEPTH];
    logic [W-1:0] d_q [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) v_q[i] <= 1'b0;
      end else begin
        v_q[0] <= in_valid;
        for (int i = 1; i < int'(DEPTH); i++) v_q[i] <= v_q[i-1];
      end
    end
    always_ff @(posedge clk) begin
      d_q[0] <= in_data;
      for (int i = 1; i < int'(DEPTH); i++) d_q[i] <= d_q[i-1];
    end
    assign out_valid = v_q[DEPTH-1];
    assign out_data  = d_q[DEPTH-1];
  end
endmodule
