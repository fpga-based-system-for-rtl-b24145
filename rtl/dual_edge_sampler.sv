// dual_edge_sampler: double-edge sampling front end of one ToT channel.
//
// The comparator output tot_in is asynchronous. It is sampled on both edges
// of the 200 MHz clock, giving two samples per 5 ns cycle (2.5 ns bins):
//   * a chain of three positive-edge flip-flops,
//   * a chain of three negative-edge flip-flops followed by one
//     positive-edge flip-flop that moves the sample into the positive-edge
//     domain.
// Both chains have the same latency measured from their first sampling edge,
// so after each rising clock edge the pair (n_q, p_q) holds two consecutive
// half-cycle samples of the input: n_q taken half a cycle before p_q. With
// p_prev, the positive sample of the previous cycle, the three samples
// p_prev -> n_q -> p_q are in time order and the edge detection logic
// (combinational, registered on the output) reports:
//   rise / fall      : a 0->1 / 1->0 transition inside this window
//   rise_neg/fall_neg: the transition happened between p_prev and n_q, i.e.
//                      it was first seen by the negative-edge sample; else
//                      it was first seen by the positive-edge sample.
// A pulse shorter than a cycle (0,1,0) reports a rise on the negative phase
// and a fall on the positive phase in the same window; a short gap (1,0,1)
// reports a fall on the negative phase and a rise on the positive phase.
// Structure and stage counts follow the published design; the registered
// outputs (one extra cycle of latency) are this design's choice.
// Latency from an input edge to the outputs: 4 to 5 clk cycles.
module dual_edge_sampler #(
  parameter int unsigned STAGES = 3
) (
  input  logic clk,       // 200 MHz acquisition clock
  input  logic rst_n,     // asynchronous, active low, released synchronously
  input  logic tot_in,    // asynchronous comparator output
  output logic rise,
  output logic rise_neg,
  output logic fall,
  output logic fall_neg
);

  logic [STAGES-1:0] pos_sync;
  logic [STAGES-1:0] neg_sync;
  logic              neg_pos;   // negedge sample moved to the posedge domain
  logic              p_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pos_sync <= '0;
    else        pos_sync <= {pos_sync[STAGES-2:0], tot_in};
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) neg_sync <= '0;
    else        neg_sync <= {neg_sync[STAGES-2:0], tot_in};
  end

  logic p_q, n_q;
  assign p_q = pos_sync[STAGES-1];
  assign n_q = neg_pos;

  // Edge detection over the three time-ordered samples p_prev, n_q, p_q.
  logic rise_c, rise_neg_c, fall_c, fall_neg_c;
  always_comb begin
    rise_neg_c = !p_prev &&  n_q;
    fall_neg_c =  p_prev && !n_q;
    rise_c     = rise_neg_c || (!n_q &&  p_q);
    fall_c     = fall_neg_c || ( n_q && !p_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      neg_pos  <= 1'b0;
      p_prev   <= 1'b0;
      rise     <= 1'b0;
      rise_neg <= 1'b0;
      fall     <= 1'b0;
      fall_neg <= 1'b0;
    end else begin
      neg_pos  <= neg_sync[STAGES-1];
      p_prev   <= p_q;
      rise     <= rise_c;
      rise_neg <= rise_neg_c;
      fall     <= fall_c;
      fall_neg <= fall_neg_c;
    end
  end

  initial assert (STAGES >= 2) else $error("dual_edge_sampler needs at least 2 stages");

endmodule
