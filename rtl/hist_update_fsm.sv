// hist_update_fsm: histogram update state machine of one channel.
//
// Runs in the 50 MHz domain between the channel's pulse-width FIFO and
// port A of its histogram memory.
//   INIT   after reset or a clear request, writes zero to every bin, one bin
//          per cycle, then spends one cycle leaving INIT: NUM_BINS + 1
//          cycles in all (513 cycles, about 10.3 us at 50 MHz).
//   IDLE   when the FIFO is not empty, asserts the FIFO read request.
//   WAIT   three cycles allowed for the FIFO read data to settle.
//   READ   the low BIN_W bits of the FIFO word address port A for a read.
//   WRITE  writes the read count plus one back to the same bin (the count
//          saturates at all ones instead of wrapping).
// One update therefore takes 6 cycles (120 ns), a sustained drain rate of
// 8.3 M events/s per channel. A clear request seen during an update is
// remembered and acted on when the update finishes. init_done is low while
// bins are being cleared.
// The states, the 513-cycle clear, the 3-cycle wait and the 6-cycle update
// follow the published design; saturating counts and deferred clears are
// this design's choices.
module hist_update_fsm
  import podd_pkg::*;
#(
  parameter int unsigned N_BINS    = NUM_BINS,
  parameter int unsigned ADDR_W    = $clog2(N_BINS),
  parameter int unsigned CNT_W     = COUNT_W,
  parameter int unsigned WAIT_CYC  = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,       // one-cycle request to zero all bins
  output logic              init_done,
  // FIFO read side
  input  logic              fifo_empty,
  input  logic [FIFO_W-1:0] fifo_rdata,
  output logic              fifo_rd,
  // histogram memory port A
  output logic [ADDR_W-1:0] addr_a,
  output logic              rden_a,
  output logic              wren_a,
  output logic [CNT_W-1:0]  data_a,
  input  logic [CNT_W-1:0]  q_a,
  output logic              update_done  // one cycle per completed increment
);

  typedef enum logic [2:0] {S_INIT, S_INIT_END, S_IDLE, S_WAIT, S_READ, S_WRITE} state_e;
  state_e state;

  logic [ADDR_W-1:0] init_addr;
  logic [ADDR_W-1:0] bin_q;
  logic [1:0]        wait_cnt;
  logic              clear_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT;
      init_addr  <= '0;
      bin_q      <= '0;
      wait_cnt   <= '0;
      clear_pend <= 1'b0;
    end else begin
      if (clear) clear_pend <= 1'b1;
      unique case (state)
        S_INIT: begin
          init_addr <= init_addr + 1'b1;
          if (init_addr == ADDR_W'(N_BINS - 1)) state <= S_INIT_END;
        end
        S_INIT_END: state <= S_IDLE;
        S_IDLE: begin
          if (clear || clear_pend) begin
            clear_pend <= 1'b0;
            init_addr  <= '0;
            state      <= S_INIT;
          end else if (!fifo_empty) begin
            wait_cnt <= '0;
            state    <= S_WAIT;
          end
        end
        S_WAIT: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == 2'(WAIT_CYC - 1)) state <= S_READ;
        end
        S_READ: begin
          bin_q <= fifo_rdata[ADDR_W-1:0];
          state <= S_WRITE;
        end
        S_WRITE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    fifo_rd     = (state == S_IDLE) && !clear && !clear_pend && !fifo_empty;
    addr_a      = '0;
    rden_a      = 1'b0;
    wren_a      = 1'b0;
    data_a      = '0;
    update_done = 1'b0;
    unique case (state)
      S_INIT: begin
        addr_a = init_addr;
        wren_a = 1'b1;
      end
      S_READ: begin
        addr_a = fifo_rdata[ADDR_W-1:0];
        rden_a = 1'b1;
      end
      S_WRITE: begin
        addr_a      = bin_q;
        wren_a      = 1'b1;
        data_a      = (q_a == '1) ? q_a : q_a + 1'b1;
        update_done = 1'b1;
      end
      default: ;
    endcase
  end

  assign init_done = (state != S_INIT) && (state != S_INIT_END);

  initial assert (WAIT_CYC >= 1 && WAIT_CYC <= 4) else $error("WAIT_CYC must be 1..4");

endmodule
