// pulse_width_fsm: pulse width compute state machine of one ToT channel.
//
// Consumes the edge reports of dual_edge_sampler (one per 200 MHz cycle)
// and produces one FIFO word per measured pulse:
//   IDLE    waits for a rising edge while run is high. On a rise it starts
//           pulse_width_counter and remembers the rise phase. If the whole
//           pulse fell inside the same sampling window (shorter than one
//           cycle) the width is 1 and the FSM goes to FALL.
//   COUNT   counter running; on a falling edge the width is
//              count + (rise on negative phase) - (fall on negative phase)
//           in 2.5 ns units, then clamped to the largest bin address.
//   FALL    second cycle of a pulse that ended inside its rise window.
//   STALL   the FIFO was full when the word was ready: hold it until there
//           is room (events arriving meanwhile are not seen).
// The word is written one cycle after the fall is handled (registered
// wr_en/wdata). A measurement needs at least two cycles (one for the rise,
// one for the fall), so the write rate is at most one word per 10 ns.
// Dropping run abandons a pulse being counted; a held word is still written.
// Follows the published design in: count by 2, +-1 phase correction,
// clamping, stall on FIFO full, two cycles per event. Own choices: the
// state encoding, clamping to 511 (see MAX_WIDTH), discarding on stop.
module pulse_width_fsm
  import podd_pkg::*;
#(
  parameter int unsigned CNT_W     = 12,
  parameter int unsigned MAX_WIDTH = NUM_BINS - 1   // clamp value
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,        // acquisition enabled (synchronized)
  input  logic              rise,
  input  logic              rise_neg,
  input  logic              fall,
  input  logic              fall_neg,
  // pulse width counter
  output logic              cnt_start,
  output logic              cnt_en,
  input  logic [CNT_W-1:0]  cnt,
  // FIFO write side
  input  logic              fifo_full,
  output logic              fifo_wr,
  output logic [FIFO_W-1:0] fifo_wdata,
  output logic              stalled     // high while waiting for FIFO room
);

  typedef enum logic [1:0] {S_IDLE, S_COUNT, S_FALL, S_STALL} state_e;
  state_e state;

  logic              rise_neg_q;
  logic [FIFO_W-1:0] width_q;

  // Width of a pulse ending in the current window, clamped.
  logic [CNT_W:0]    raw_w;
  logic [FIFO_W-1:0] width_c;
  always_comb begin
    raw_w = {1'b0, cnt} + (CNT_W+1)'(rise_neg_q) - (CNT_W+1)'(fall_neg);
    if (raw_w > (CNT_W+1)'(MAX_WIDTH)) width_c = FIFO_W'(MAX_WIDTH);
    else                               width_c = FIFO_W'(raw_w);
  end

  logic in_window_pulse;   // 0 -> 1 -> 0 inside one window
  assign in_window_pulse = rise && rise_neg && fall && !fall_neg;

  assign cnt_start = (state == S_IDLE) && run && rise && !in_window_pulse;
  assign cnt_en    = (state == S_COUNT);
  assign stalled   = (state == S_STALL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      rise_neg_q <= 1'b0;
      width_q    <= '0;
      fifo_wr    <= 1'b0;
      fifo_wdata <= '0;
    end else begin
      fifo_wr <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (run && rise) begin
            rise_neg_q <= rise_neg;
            if (in_window_pulse) begin
              width_q <= FIFO_W'(1);
              state   <= S_FALL;
            end else begin
              state   <= S_COUNT;
            end
          end
        end
        S_COUNT: begin
          if (!run) begin
            state <= S_IDLE;
          end else if (fall) begin
            if (fifo_full) begin
              width_q <= width_c;
              state   <= S_STALL;
            end else begin
              fifo_wr    <= 1'b1;
              fifo_wdata <= width_c;
              state      <= S_IDLE;
            end
          end
        end
        S_FALL, S_STALL: begin
          if (!fifo_full) begin
            fifo_wr    <= 1'b1;
            fifo_wdata <= width_q;
            state      <= S_IDLE;
          end else begin
            state      <= S_STALL;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A word is only written when the FIFO reported room the cycle before.
  property p_no_write_when_full;
    @(posedge clk) disable iff (!rst_n) fifo_wr |-> $past(!fifo_full);
  endproperty
  assert property (p_no_write_when_full);

endmodule
