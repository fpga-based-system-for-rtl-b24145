// reset_sync: reset synchronizer for one clock domain.
//
// rst_n_in asserts rst_n_out at once (asynchronously); the release is
// delayed by STAGES clock edges so that every flip-flop of the domain
// leaves reset on the same, clean clock edge. This design's own helper.
module reset_sync #(
  parameter int unsigned STAGES = 3
) (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) chain <= '0;
    else           chain <= {chain[STAGES-2:0], 1'b1};
  end

  assign rst_n_out = chain[STAGES-1];

endmodule
