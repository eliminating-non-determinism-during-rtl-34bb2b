// cdc_sync -- multi-flop synchronizer for a Gray-coded pointer.
//
// Brings a WIDTH-bit value from another clock domain into the clk domain
// through STAGES flip-flops.  It is only safe for values that change by at
// most one bit per source clock, such as the Gray-coded FIFO pointers of
// the elasticity buffer.  Latency: q follows d after STAGES rising edges of
// clk (plus up to one edge for the sampling uncertainty of the first flop).
// Reset (asynchronous, active low) clears all stages to zero.
module cdc_sync #(
  parameter int unsigned WIDTH  = 4,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] stage [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(STAGES); i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < int'(STAGES); i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[STAGES-1];

  initial assert (STAGES >= 1) else $error("cdc_sync: STAGES must be at least 1");

endmodule
