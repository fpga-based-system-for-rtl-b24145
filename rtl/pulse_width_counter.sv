// pulse_width_counter: pulse width counter of one ToT channel.
//
// Counts elapsed time in units of 2.5 ns while a pulse is being measured.
// The clock is 200 MHz (5 ns), so the count advances by 2 per cycle.
// start (one cycle, from the pulse width FSM on a detected rising edge)
// loads 2, the value one cycle after the rising-edge window; en keeps it
// counting. The count saturates at the largest even value of CNT_W bits
// instead of wrapping, so very long pulses still read as long.
// Counting by 2 per 5 ns cycle follows the published design; the load value,
// the width and the saturation are this design's choices.
module pulse_width_counter #(
  parameter int unsigned CNT_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,   // load 2 (first cycle after the rise)
  input  logic             en,      // keep counting
  output logic [CNT_W-1:0] count    // 2 x (cycles since the rise window)
);

  localparam logic [CNT_W-1:0] CNT_MAX = {{(CNT_W-1){1'b1}}, 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                count <= '0;
    else if (start)            count <= CNT_W'(2);
    else if (en && count != CNT_MAX) count <= count + CNT_W'(2);
  end

endmodule
