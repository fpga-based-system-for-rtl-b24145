// podd_pkg: constants and types shared by the ToT histogram design.
//
// Holds the sizes of the design (16 channels, 512 bins of 16-bit counts,
// 16-bit FIFO words) and the UART protocol byte codes. The command and
// status codes are the ones of the published protocol table; the version
// byte returned by FPGA_VERSION is this design's own choice.
package podd_pkg;

  localparam int unsigned NUM_CH     = 16;   // parallel detector channels
  localparam int unsigned NUM_BINS   = 512;  // bins per channel histogram
  localparam int unsigned COUNT_W    = 16;   // bits per bin
  localparam int unsigned FIFO_W     = 16;   // width of a pulse-width FIFO word
  localparam int unsigned FIFO_DEPTH = 32;   // entries per channel FIFO

  // Command bytes from the host (microcontroller) to the FPGA.
  typedef enum logic [7:0] {
    CMD_END_COMMAND     = 8'hFF,
    CMD_FPGA_VERSION    = 8'h01,
    CMD_START_HISTOGRAM = 8'h02,
    CMD_STOP_HISTOGRAM  = 8'h03,
    CMD_CLEAR_RESULTS   = 8'h04,
    CMD_START_UPLOAD    = 8'h05,
    CMD_SET_BIN_ADDRESS = 8'h06,
    CMD_SET_NUM_BINS    = 8'h07,
    CMD_SET_CHANNEL     = 8'h08,
    CMD_IS_HIST_RUNNING = 8'h09
  } cmd_e;

  // Status bytes from the FPGA to the host.
  localparam logic [7:0] STAT_FPGA_RUNNING = 8'hF0;
  localparam logic [7:0] STAT_FPGA_IDLE    = 8'hF1;
  localparam logic [7:0] END_COMMAND       = 8'hFF;

endpackage
