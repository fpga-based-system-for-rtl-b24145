// tb_uart_controller: self-checking testbench of uart_controller.
// Runs the link at 2.5 Mbaud (20 clocks per bit) to keep the simulation
// short; the controller logic is the same at 115200 baud. A uart_host model
// plays the microcontroller. The histogram memories are modelled by a
// function of (channel, bin) returned one cycle after rd_en, and the
// channels' init_done by a 513-cycle low pulse after each clear.
// Checks every command of the protocol: acknowledgement bytes, version and
// status bytes, the start/stop level, the clear handshake, the protocol's
// SET_BIN_ADDRESS example (bytes 27, 1 -> 283), upload of one channel and
// of all channels with the channel tag in the upper nibble, address wrap,
// clamping of out-of-range values, reset defaults, dropped malformed
// commands, and that uploaded bytes follow each other without gaps.
`timescale 1ps/1ps
module tb_uart_controller;
  import podd_pkg::*;
  localparam int unsigned CLK_HZ = 50_000_000, BAUD = 2_500_000;
  localparam longint BIT_PS = 64'(CLK_HZ / BAUD) * 20000;
  localparam int unsigned NCH = 16, NB = 512;

  logic clk = 0, rst_n = 0, rx, tx, run, clear, init_done = 1, rd_en;
  logic [4:0] rd_ch, channel_sel;
  logic [8:0] rd_addr, start_bin_address;
  logic [9:0] num_bins;
  logic [COUNT_W-1:0] rd_data = '0;
  int checks = 0, failures = 0;

  uart_controller #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (
    .clk(clk), .rst_n(rst_n), .uart_rx(rx), .uart_tx(tx),
    .run(run), .clear(clear), .init_done(init_done),
    .rd_ch(rd_ch), .rd_addr(rd_addr), .rd_en(rd_en), .rd_data(rd_data),
    .start_bin_address(start_bin_address), .num_bins(num_bins), .channel_sel(channel_sel));

  uart_host #(.BIT_PS(BIT_PS)) host (.txd(rx), .rxd(tx));

  always #10000 clk = ~clk;

  initial begin
    #(64'd2_000_000_000); failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] bin_val(int ch, int a);
    return 16'((ch * 977 + a * 131 + 5) & 16'hFFFF);
  endfunction

  // memory model
  always @(posedge clk) if (rd_en) rd_data <= bin_val(int'(rd_ch), int'(rd_addr));

  // init_done model
  int clear_pulses = 0;
  longint clear_time = 0;
  always @(posedge clk) if (rst_n && clear) begin
    clear_pulses++; clear_time = $time;
    init_done <= 0;
    repeat (513) @(posedge clk);
    init_done <= 1;
  end

  task automatic expect_byte(logic [7:0] e, string what);
    logic [7:0] b; bit ok;
    host.get_byte(b, ok, 200 * BIT_PS);
    checks++;
    if (!ok || b !== e) begin
      failures++; $display("%s: got %h (ok=%0d) expected %h", what, b, ok, e);
    end
  endtask

  task automatic expect_silence(string what);
    logic [7:0] b; bit ok;
    host.get_byte(b, ok, 30 * BIT_PS);
    checks++;
    if (ok) begin failures++; $display("%s: unexpected byte %h", what, b); end
  endtask

  task automatic cmd(cmd_e c);
    host.send_byte(c); host.send_byte(8'hFF);
  endtask

  task automatic cmd_par(cmd_e c, int v);
    host.send_byte(c); host.send_byte(v[7:0]); host.send_byte(v[15:8]); host.send_byte(8'hFF);
  endtask

  task automatic check_upload(int ch0, int ch1, int start, int n, string what);
    for (int ch = ch0; ch <= ch1; ch++)
      for (int i = 0; i < n; i++) begin
        logic [15:0] v;
        v = bin_val(ch, (start + i) % NB);
        expect_byte(v[7:0], what);
        expect_byte({4'(ch), v[11:8]}, what);
      end
    expect_byte(8'hFF, {what, " end"});
  endtask

  initial begin
    longint t0, t1;
    #100000 rst_n = 1;
    #100000;
    checks++;
    if (start_bin_address != 0 || num_bins != 512 || channel_sel != 16 || run) begin
      failures++; $display("bad reset defaults");
    end
    cmd(CMD_FPGA_VERSION);
    expect_byte(8'h01, "version"); expect_byte(8'hFF, "version end");
    cmd(CMD_IS_HIST_RUNNING);
    expect_byte(STAT_FPGA_IDLE, "idle"); expect_byte(8'hFF, "idle end");
    cmd(CMD_START_HISTOGRAM);
    expect_byte(8'hFF, "start ack");
    checks++; if (!run) begin failures++; $display("run not set"); end
    cmd(CMD_IS_HIST_RUNNING);
    expect_byte(STAT_FPGA_RUNNING, "running"); expect_byte(8'hFF, "running end");
    // Fig. 2.12 example
    cmd_par(CMD_SET_BIN_ADDRESS, 32'h011B);
    expect_byte(8'hFF, "set address ack");
    checks++; if (start_bin_address != 283) begin failures++; $display("address %0d", start_bin_address); end
    cmd_par(CMD_SET_NUM_BINS, 5);
    expect_byte(8'hFF, "num bins ack");
    cmd_par(CMD_SET_CHANNEL, 3);
    expect_byte(8'hFF, "channel ack");
    t0 = $time;
    cmd(CMD_START_UPLOAD);
    check_upload(3, 3, 283, 5, "upload ch3");
    t1 = $time;
    // 2 command bytes in, 11 bytes out, each 10 bits; allow a little slack
    checks++;
    if (t1 - t0 > (13 * 10 + 8) * BIT_PS) begin failures++; $display("upload slow: %0d bits", (t1 - t0) / BIT_PS); end
    // all channels, wrapping
    cmd_par(CMD_SET_CHANNEL, 16);   expect_byte(8'hFF, "ch all ack");
    cmd_par(CMD_SET_NUM_BINS, 3);   expect_byte(8'hFF, "n3 ack");
    cmd_par(CMD_SET_BIN_ADDRESS, 510); expect_byte(8'hFF, "a510 ack");
    cmd(CMD_START_UPLOAD);
    check_upload(0, 15, 510, 3, "upload all");
    // out-of-range values clamp
    cmd_par(CMD_SET_NUM_BINS, 1024); expect_byte(8'hFF, "n1024 ack");
    cmd_par(CMD_SET_CHANNEL, 40);    expect_byte(8'hFF, "ch40 ack");
    checks++; if (num_bins != 512 || channel_sel != 16) begin failures++; $display("no clamping"); end
    // malformed: wrong terminator -> dropped silently
    host.send_byte(CMD_SET_BIN_ADDRESS); host.send_byte(8'd5); host.send_byte(8'd0); host.send_byte(8'h00);
    expect_silence("bad terminator");
    checks++; if (start_bin_address != 510) begin failures++; $display("dropped command took effect"); end
    // stray byte
    host.send_byte(8'h55);
    expect_silence("stray byte");
    // stop
    cmd(CMD_STOP_HISTOGRAM);
    expect_byte(8'hFF, "stop ack");
    checks++; if (run) begin failures++; $display("run not cleared"); end
    // clear: acknowledged only after the channels finished zeroing
    cmd(CMD_CLEAR_RESULTS);
    expect_byte(8'hFF, "clear ack");
    checks++;
    if (clear_pulses != 1 || $time - clear_time < 513 * 20000) begin
      failures++; $display("clear handshake: pulses=%0d dt=%0d", clear_pulses, $time - clear_time);
    end
    // one bin, channel 15, address 0
    cmd_par(CMD_SET_CHANNEL, 15);   expect_byte(8'hFF, "ch15 ack");
    cmd_par(CMD_SET_NUM_BINS, 1);   expect_byte(8'hFF, "n1 ack");
    cmd_par(CMD_SET_BIN_ADDRESS, 0); expect_byte(8'hFF, "a0 ack");
    cmd(CMD_START_UPLOAD);
    check_upload(15, 15, 0, 1, "upload ch15");
    checks++; if (host.framing_errors != 0) begin failures++; $display("framing errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
