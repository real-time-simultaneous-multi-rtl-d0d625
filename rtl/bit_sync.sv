// bit_sync -- multi-stage flip-flop synchronizer.
//
// Brings WIDTH asynchronous inputs into the clk domain through STAGES
// flip-flops each. All bits see the same latency (STAGES cycles), which the
// ADC interface relies on to keep the serial clock and the serial data in step.
// Reset value of every stage is RESET_VAL.
module bit_sync #(
  parameter int unsigned     WIDTH     = 1,
  parameter int unsigned     STAGES    = 2,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);

  logic [WIDTH-1:0] stage_q [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < STAGES; s++) stage_q[s] <= RESET_VAL;
    end else begin
      stage_q[0] <= d_i;
      for (int s = 1; s < STAGES; s++) stage_q[s] <= stage_q[s-1];
    end
  end

  assign q_o = stage_q[STAGES-1];

endmodule
