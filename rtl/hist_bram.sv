// hist_bram: dual-port histogram memory of one channel.
//
// NUM_WORDS x DATA_W words (512 bins x 16-bit counts by default, one M9K-
// sized block). Port A is the read/write port used by the histogram update
// state machine for read-modify-write; port B is a read-only port for the
// UART readout, so readout never blocks updates. Both ports have a one-
// cycle registered read: the word addressed in cycle t appears in t+1.
// A port A write and read of the same address in one cycle returns the old
// word. The memory itself is not reset; the update state machine clears it.
// The organisation (512 x 16, port A update, port B readout) follows the
// published design; read-during-write behaviour and the read enables are
// this design's choices.
module hist_bram #(
  parameter int unsigned NUM_WORDS = 512,
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned ADDR_W    = $clog2(NUM_WORDS)
) (
  input  logic              clk,
  // port A: read/write
  input  logic [ADDR_W-1:0] addr_a,
  input  logic              rden_a,
  input  logic              wren_a,
  input  logic [DATA_W-1:0] data_a,
  output logic [DATA_W-1:0] q_a,
  // port B: read only
  input  logic [ADDR_W-1:0] addr_b,
  input  logic              rden_b,
  output logic [DATA_W-1:0] q_b
);

  logic [DATA_W-1:0] mem [NUM_WORDS];

  always_ff @(posedge clk) begin
    if (wren_a) mem[addr_a] <= data_a;
    if (rden_a) q_a <= mem[addr_a];
  end

  always_ff @(posedge clk) begin
    if (rden_b) q_b <= mem[addr_b];
  end

endmodule
