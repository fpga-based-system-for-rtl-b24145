// podd_fpga_top: 16-channel time-over-threshold energy histogram system.
//
// Each detector channel delivers a comparator pulse whose width encodes the
// deposited gamma energy. For every channel a hist_channel measures pulse
// widths in 2.5 ns units with double-edge sampling at 200 MHz (clk_hf) and
// accumulates them, through a dual-clock FIFO, into a 512-bin x 16-bit
// histogram kept in dual-port memory in the 50 MHz domain (clk_lf). A
// single uart_controller (115200 baud, 8N1) lets the host start, stop and
// clear acquisition and read any range of bins of one or all channels
// through the memories' second port, without pausing acquisition.
// clk_hf must be a 200 MHz clock derived from clk_lf (an FPGA PLL in the
// published system; here an input). rst_n is an asynchronous, active-low
// reset; each domain releases it through its own reset_sync.
// Status outputs (clk_lf domain): running, init_done (no channel is
// clearing) and, per channel, stalled (its pulse-width FIFO was full).
// The block structure, clock plan and sizes follow the published design.
module podd_fpga_top
  import podd_pkg::*;
#(
  parameter int unsigned N_CH     = NUM_CH,
  parameter int unsigned N_BINS   = NUM_BINS,
  parameter int unsigned CLK_HZ   = 50_000_000,
  parameter int unsigned BAUD     = 115_200
) (
  input  logic            clk_lf,     // 50 MHz board oscillator
  input  logic            clk_hf,     // 200 MHz acquisition clock
  input  logic            rst_n,
  input  logic [N_CH-1:0] tot_in,     // comparator (ToT) outputs
  input  logic            uart_rx,    // from the host
  output logic            uart_tx,    // to the host
  output logic            running,
  output logic            init_done,
  output logic [N_CH-1:0] stalled
);

  localparam int unsigned AW  = $clog2(N_BINS);
  localparam int unsigned CHW = $clog2(N_CH + 1);

  logic rst_lf_n, rst_hf_n;
  reset_sync u_rst_lf (.clk(clk_lf), .rst_n_in(rst_n), .rst_n_out(rst_lf_n));
  reset_sync u_rst_hf (.clk(clk_hf), .rst_n_in(rst_n), .rst_n_out(rst_hf_n));

  logic               run, clear;
  logic [CHW-1:0]     rd_ch;
  logic [AW-1:0]      rd_addr;
  logic               rd_en;
  logic [COUNT_W-1:0] rd_data;
  logic [N_CH-1:0]    ch_init_done;
  logic [COUNT_W-1:0] ch_rd_data [N_CH];

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    hist_channel #(.N_BINS(N_BINS)) u_ch (
      .clk_hf(clk_hf), .rst_hf_n(rst_hf_n),
      .clk_lf(clk_lf), .rst_lf_n(rst_lf_n),
      .tot_in(tot_in[c]),
      .run(run), .clear(clear),
      .init_done(ch_init_done[c]), .stalled(stalled[c]), .updated(),
      .rd_addr(rd_addr), .rd_en(rd_en && rd_ch == CHW'(c)),
      .rd_data(ch_rd_data[c]));
  end

  // Read data of the selected channel (rd_ch is held until it is sampled).
  always_comb begin
    rd_data = '0;
    for (int c = 0; c < N_CH; c++)
      if (rd_ch == CHW'(c)) rd_data = ch_rd_data[c];
  end

  assign init_done = &ch_init_done;

  uart_controller #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .N_CH(N_CH), .N_BINS(N_BINS)) u_ctrl (
    .clk(clk_lf), .rst_n(rst_lf_n),
    .uart_rx(uart_rx), .uart_tx(uart_tx),
    .run(run), .clear(clear), .init_done(init_done),
    .rd_ch(rd_ch), .rd_addr(rd_addr), .rd_en(rd_en), .rd_data(rd_data),
    .start_bin_address(), .num_bins(), .channel_sel());

  assign running = run;

endmodule
