// hist_channel: one of the parallel histogram compute channels.
//
// Builds the energy histogram of one ToT input. 200 MHz (clk_hf) side:
// dual_edge_sampler -> pulse_width_fsm + pulse_width_counter, writing one
// 16-bit pulse width per detected pulse into async_fifo. 50 MHz (clk_lf)
// side: hist_update_fsm pops the FIFO and increments bin (width mod 512) of
// hist_bram through port A. Port B of the memory is brought out for readout.
// The acquisition enable crosses from clk_lf to clk_hf through a 3-FF
// synchronizer; acquisition is only enabled while run is high and the
// histogram is not being cleared. The FIFO-stall status crosses back to
// clk_lf through another 3-FF synchronizer.
// Latency from the falling edge of a pulse to the incremented bin is about
// 6 clk_hf cycles plus the FIFO crossing (5 clk_lf stages) plus the 6-cycle
// update. Throughput: one pulse per 10 ns into the FIFO, one bin update per
// 120 ns out of it.
// The partitioning follows the published block diagram; enabling
// acquisition only after clearing finishes is this design's choice.
module hist_channel
  import podd_pkg::*;
#(
  parameter int unsigned N_BINS      = NUM_BINS,
  parameter int unsigned FIFO_D      = FIFO_DEPTH,
  parameter int unsigned SYNC_STAGES = 3,   // control synchronizers
  parameter int unsigned FIFO_SYNC   = 5    // FIFO pointer synchronizers
) (
  input  logic                      clk_hf,
  input  logic                      rst_hf_n,
  input  logic                      clk_lf,
  input  logic                      rst_lf_n,
  input  logic                      tot_in,
  // control / status (clk_lf domain)
  input  logic                      run,
  input  logic                      clear,
  output logic                      init_done,
  output logic                      stalled,     // FIFO-full stall seen
  output logic                      updated,     // one cycle per bin increment
  // readout port (clk_lf domain, one-cycle latency)
  input  logic [$clog2(N_BINS)-1:0] rd_addr,
  input  logic                      rd_en,
  output logic [COUNT_W-1:0]        rd_data
);

  localparam int unsigned AW    = $clog2(N_BINS);
  localparam int unsigned CNT_W = AW + 3;

  // ---------------- clk_hf side ----------------
  logic run_hf;
  sync_chain #(.WIDTH(1), .STAGES(SYNC_STAGES)) u_run_sync (
    .clk(clk_hf), .rst_n(rst_hf_n), .d(run && init_done), .q(run_hf));

  logic rise, rise_neg, fall, fall_neg;
  dual_edge_sampler u_sampler (
    .clk(clk_hf), .rst_n(rst_hf_n), .tot_in(tot_in),
    .rise(rise), .rise_neg(rise_neg), .fall(fall), .fall_neg(fall_neg));

  logic             cnt_start, cnt_en;
  logic [CNT_W-1:0] cnt;
  pulse_width_counter #(.CNT_W(CNT_W)) u_counter (
    .clk(clk_hf), .rst_n(rst_hf_n), .start(cnt_start), .en(cnt_en), .count(cnt));

  logic              fifo_full, fifo_wr, stalled_hf;
  logic [FIFO_W-1:0] fifo_wdata;
  pulse_width_fsm #(.CNT_W(CNT_W), .MAX_WIDTH(N_BINS - 1)) u_pw_fsm (
    .clk(clk_hf), .rst_n(rst_hf_n), .run(run_hf),
    .rise(rise), .rise_neg(rise_neg), .fall(fall), .fall_neg(fall_neg),
    .cnt_start(cnt_start), .cnt_en(cnt_en), .cnt(cnt),
    .fifo_full(fifo_full), .fifo_wr(fifo_wr), .fifo_wdata(fifo_wdata),
    .stalled(stalled_hf));

  // ---------------- crossing ----------------
  logic              fifo_empty, fifo_rd;
  logic [FIFO_W-1:0] fifo_rdata;
  async_fifo #(.WIDTH(FIFO_W), .DEPTH(FIFO_D), .SYNC_STAGES(FIFO_SYNC)) u_fifo (
    .wclk(clk_hf), .wrst_n(rst_hf_n), .wr_en(fifo_wr), .wdata(fifo_wdata), .full(fifo_full),
    .rclk(clk_lf), .rrst_n(rst_lf_n), .rd_en(fifo_rd), .rdata(fifo_rdata), .empty(fifo_empty));

  sync_chain #(.WIDTH(1), .STAGES(SYNC_STAGES)) u_stall_sync (
    .clk(clk_lf), .rst_n(rst_lf_n), .d(stalled_hf), .q(stalled));

  // ---------------- clk_lf side ----------------
  logic [AW-1:0]      addr_a;
  logic               rden_a, wren_a;
  logic [COUNT_W-1:0] data_a, q_a;
  hist_update_fsm #(.N_BINS(N_BINS)) u_update (
    .clk(clk_lf), .rst_n(rst_lf_n), .clear(clear), .init_done(init_done),
    .fifo_empty(fifo_empty), .fifo_rdata(fifo_rdata), .fifo_rd(fifo_rd),
    .addr_a(addr_a), .rden_a(rden_a), .wren_a(wren_a), .data_a(data_a), .q_a(q_a),
    .update_done(updated));

  hist_bram #(.NUM_WORDS(N_BINS), .DATA_W(COUNT_W)) u_bram (
    .clk(clk_lf),
    .addr_a(addr_a), .rden_a(rden_a), .wren_a(wren_a), .data_a(data_a), .q_a(q_a),
    .addr_b(rd_addr), .rden_b(rd_en), .q_b(rd_data));

endmodule
