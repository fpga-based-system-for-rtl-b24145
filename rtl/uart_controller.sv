// uart_controller: command/response controller on the host UART link.
//
// The host (the system microcontroller) sends a command byte, for the
// commands that take a value two parameter bytes (LSB first, then MSB), and
// the END_COMMAND byte 0xFF. Only when the 0xFF arrives is the command
// executed; the controller then answers and always ends its answer with its
// own 0xFF:
//   FPGA_VERSION     -> VERSION, 0xFF
//   START_HISTOGRAM  run <= 1                          -> 0xFF
//   STOP_HISTOGRAM   run <= 0 (histograms kept)        -> 0xFF
//   CLEAR_RESULTS    pulse clear, wait for all channels to finish zeroing
//                                                      -> 0xFF
//   SET_BIN_ADDRESS  start bin (9 bits, 0..511)        -> 0xFF
//   SET_NUM_BINS     number of bins (10 bits, 1..512)  -> 0xFF
//   SET_CHANNEL      0..NUM_CH-1 one channel, NUM_CH (16) all channels
//                                                      -> 0xFF
//   START_UPLOAD     for each selected channel, for each bin from the start
//                    bin: count[7:0], then {channel[3:0], count[11:8]};
//                    then 0xFF
//   IS_HIST_RUNNING  -> 0xF0 (running) or 0xF1 (idle), 0xFF
// Defaults after reset: start bin 0, 512 bins, all channels, stopped.
// A byte that is not a command code while waiting for one is ignored; if
// the byte where 0xFF is expected is anything else, the command is dropped
// without an answer.
// Readout uses port B of the histogram memories: rd_ch/rd_addr/rd_en select
// a bin, and rd_data must hold that bin's count one cycle later.
// The command codes, framing, defaults, 0xFF acknowledgement and the
// channel tag in the upper nibble of the second byte follow the published
// protocol. Own choices: two parameter bytes for SET_CHANNEL too, the
// version byte, clamping out-of-range values, bin addresses wrapping modulo
// 512 during upload, and answering CLEAR_RESULTS once zeroing is done.
// The tag leaves 12 bits for the count, so counts above 4095 are sent
// modulo 4096.
module uart_controller
  import podd_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned BAUD    = 115_200,
  parameter int unsigned N_CH    = NUM_CH,
  parameter int unsigned N_BINS  = NUM_BINS,
  parameter logic [7:0]  VERSION = 8'h01,
  localparam int unsigned AW     = $clog2(N_BINS),
  localparam int unsigned CHW    = $clog2(N_CH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               uart_rx,
  output logic               uart_tx,
  // acquisition control / status
  output logic               run,
  output logic               clear,        // one-cycle pulse
  input  logic               init_done,    // all channels finished zeroing
  // histogram readout
  output logic [CHW-1:0]     rd_ch,
  output logic [AW-1:0]      rd_addr,
  output logic               rd_en,
  input  logic [COUNT_W-1:0] rd_data,
  // settings, for observation
  output logic [AW-1:0]      start_bin_address,
  output logic [AW:0]        num_bins,
  output logic [CHW-1:0]     channel_sel
);

  // ---------------- byte links ----------------
  logic       rx_valid;
  logic [7:0] rx_data;
  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk(clk), .rst_n(rst_n), .rx(uart_rx), .valid(rx_valid), .data(rx_data));

  logic       tx_valid, tx_ready;
  logic [7:0] tx_data;
  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk(clk), .rst_n(rst_n), .valid(tx_valid), .data(tx_data),
    .ready(tx_ready), .tx(uart_tx));

  // ---------------- state ----------------
  typedef enum logic [3:0] {
    S_CMD, S_PAR0, S_PAR1, S_END,   // receiving
    S_EXEC, S_CLEAR_WAIT,           // acting
    S_RESP0, S_RESP1,               // sending a short answer
    S_U_READ, S_U_WAIT, S_U_LO, S_U_HI  // uploading
  } state_e;
  state_e state;

  logic [7:0]  cmd_q, par_lo, par_hi;
  logic [7:0]  resp0;
  logic [3:0]  clr_wait;
  logic [AW:0] bins_left;
  logic [AW-1:0] addr_q;
  logic [CHW-1:0] ch_q;
  logic [COUNT_W-1:0] count_q;

  function automatic logic has_params(input logic [7:0] c);
    return c == CMD_SET_BIN_ADDRESS || c == CMD_SET_NUM_BINS || c == CMD_SET_CHANNEL;
  endfunction

  function automatic logic is_cmd(input logic [7:0] c);
    return c >= CMD_FPGA_VERSION && c <= CMD_IS_HIST_RUNNING;
  endfunction

  logic [15:0] par;
  assign par = {par_hi, par_lo};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= S_CMD;
      cmd_q             <= '0;
      par_lo            <= '0;
      par_hi            <= '0;
      resp0             <= '0;
      clr_wait          <= '0;
      bins_left         <= '0;
      addr_q            <= '0;
      ch_q              <= '0;
      count_q           <= '0;
      run               <= 1'b0;
      clear             <= 1'b0;
      start_bin_address <= '0;
      num_bins          <= (AW+1)'(N_BINS);
      channel_sel       <= CHW'(N_CH);
    end else begin
      clear <= 1'b0;
      unique case (state)
        // ---------- receive ----------
        S_CMD: if (rx_valid && is_cmd(rx_data)) begin
          cmd_q <= rx_data;
          state <= has_params(rx_data) ? S_PAR0 : S_END;
        end
        S_PAR0: if (rx_valid) begin
          par_lo <= rx_data;
          state  <= S_PAR1;
        end
        S_PAR1: if (rx_valid) begin
          par_hi <= rx_data;
          state  <= S_END;
        end
        S_END: if (rx_valid) begin
          state <= (rx_data == END_COMMAND) ? S_EXEC : S_CMD;
        end
        // ---------- execute ----------
        S_EXEC: begin
          state    <= S_RESP1;
          case (cmd_q)
            CMD_FPGA_VERSION: begin
              resp0    <= VERSION;
              state    <= S_RESP0;
            end
            CMD_START_HISTOGRAM: run <= 1'b1;
            CMD_STOP_HISTOGRAM:  run <= 1'b0;
            CMD_CLEAR_RESULTS: begin
              clear    <= 1'b1;
              clr_wait <= '0;
              state    <= S_CLEAR_WAIT;
            end
            CMD_SET_BIN_ADDRESS:
              start_bin_address <= (par > 16'(N_BINS - 1)) ? AW'(N_BINS - 1) : par[AW-1:0];
            CMD_SET_NUM_BINS:
              num_bins <= (par > 16'(N_BINS)) ? (AW+1)'(N_BINS) : par[AW:0];
            CMD_SET_CHANNEL:
              channel_sel <= (par > 16'(N_CH)) ? CHW'(N_CH) : par[CHW-1:0];
            CMD_START_UPLOAD: begin
              ch_q      <= (channel_sel == CHW'(N_CH)) ? '0 : channel_sel;
              addr_q    <= start_bin_address;
              bins_left <= num_bins;
              state     <= (num_bins == '0) ? S_RESP1 : S_U_READ;
            end
            CMD_IS_HIST_RUNNING: begin
              resp0    <= run ? STAT_FPGA_RUNNING : STAT_FPGA_IDLE;
              state    <= S_RESP0;
            end
            default: ;
          endcase
        end
        S_CLEAR_WAIT: begin
          // give every channel time to leave an update in progress
          if (clr_wait != 4'd15) clr_wait <= clr_wait + 1'b1;
          else if (init_done)    state    <= S_RESP1;
        end
        // ---------- answer ----------
        S_RESP0: if (tx_ready) state <= S_RESP1;
        S_RESP1: if (tx_ready) state <= S_CMD;
        // ---------- upload ----------
        S_U_READ: state <= S_U_WAIT;   // rd_en is high in this cycle
        S_U_WAIT: begin
          count_q <= rd_data;          // memory answers one cycle after rd_en
          state   <= S_U_LO;
        end
        S_U_LO: if (tx_ready) state <= S_U_HI;
        S_U_HI: if (tx_ready) begin
          addr_q <= addr_q + 1'b1;
          if (bins_left != (AW+1)'(1)) begin
            bins_left <= bins_left - 1'b1;
            state     <= S_U_READ;
          end else if (channel_sel == CHW'(N_CH) && ch_q != CHW'(N_CH - 1)) begin
            ch_q      <= ch_q + 1'b1;
            addr_q    <= start_bin_address;
            bins_left <= num_bins;
            state     <= S_U_READ;
          end else begin
            state <= S_RESP1;
          end
        end
        default: state <= S_CMD;
      endcase
    end
  end

  assign rd_ch   = ch_q;
  assign rd_addr = addr_q;
  assign rd_en   = (state == S_U_READ);

  always_comb begin
    tx_valid = 1'b0;
    tx_data  = END_COMMAND;
    unique case (state)
      S_RESP0: begin tx_valid = 1'b1; tx_data = resp0;          end
      S_RESP1: begin tx_valid = 1'b1; tx_data = END_COMMAND;    end
      S_U_LO:  begin tx_valid = 1'b1; tx_data = count_q[7:0];   end
      S_U_HI:  begin tx_valid = 1'b1; tx_data = {4'(ch_q), count_q[11:8]}; end
      default: ;
    endcase
  end

endmodule
