// sync_chain: multi-flop synchronizer for a bundle of level signals.
//
// Each bit of d is an asynchronous level (a control from another clock
// domain or an external pin). It passes through STAGES positive-edge
// flip-flops clocked by clk, so q is d delayed by STAGES cycles with the
// first flops absorbing metastability. Bits are synchronized independently,
// so only single-bit levels or Gray-coded values may be passed.
// The three-stage default follows the published design for control and
// status crossings; the reset value of zero is this design's choice.
module sync_chain #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 3
) (
  input  logic             clk,
  input  logic             rst_n,   // asynchronous, active low
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] stage_q [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) stage_q[i] <= '0;
    end else begin
      stage_q[0] <= d;
      for (int i = 1; i < STAGES; i++) stage_q[i] <= stage_q[i-1];
    end
  end

  assign q = stage_q[STAGES-1];

  initial assert (STAGES >= 2) else $error("sync_chain needs at least 2 stages");

endmodule
