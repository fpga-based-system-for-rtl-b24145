// tb_fil_workload: the in-the-loop histogram test, run on podd_fpga_top at
// its default parameters (115200 baud, 16 channels, 512 bins).
// 800 back-to-back pulses with widths spread over the whole bin range are
// sent into channel 0. The host then issues START_HISTOGRAM,
// STOP_HISTOGRAM, SET_NUM_BINS 512, SET_BIN_ADDRESS 0, SET_CHANNEL 0 and
// START_UPLOAD, each acknowledged with 0xFF. The upload must consist of
// exactly 1025 bytes (512 bins x 2 bytes + 0xFF), must match the histogram
// expected from the known pulse widths bin for bin, and must take no more
// than 1025 UART frames (about 89 ms) plus a small margin.
// Pulse widths are whole multiples of 2.5 ns with edges placed away from
// the clock edges, so each pulse's expected bin is its width / 2.5 ns.
`timescale 1ps/1ps
module tb_fil_workload;
  import podd_pkg::*;
  localparam int unsigned NB = 512;
  localparam longint BIT_PS = 64'd434 * 20000;

  logic clk_lf = 0, clk_hf = 0, rst_n = 1;   // pulsed low at 1 ps
  logic [15:0] tot_in = '0, stalled;
  logic rx, tx, running, init_done;
  int checks = 0, failures = 0;

  podd_fpga_top dut (
    .clk_lf(clk_lf), .clk_hf(clk_hf), .rst_n(rst_n), .tot_in(tot_in),
    .uart_rx(rx), .uart_tx(tx), .running(running), .init_done(init_done), .stalled(stalled));

  uart_host #(.BIT_PS(BIT_PS)) host (.txd(rx), .rxd(tx));

  always #2500  clk_hf = ~clk_hf;
  always #10000 clk_lf = ~clk_lf;

  initial begin
    #(64'd300_000_000_000); failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_byte(logic [7:0] e, string what);
    logic [7:0] b; bit ok;
    host.get_byte(b, ok, 400 * BIT_PS);
    checks++;
    if (!ok || b !== e) begin failures++; $display("%s: got %h expected %h", what, b, e); end
  endtask

  task automatic cmd(cmd_e c);
    host.send_byte(c); host.send_byte(8'hFF);
    expect_byte(8'hFF, "ack");
  endtask

  task automatic cmd_par(cmd_e c, int v);
    host.send_byte(c); host.send_byte(v[7:0]); host.send_byte(v[15:8]); host.send_byte(8'hFF);
    expect_byte(8'hFF, "parameter ack");
  endtask

  int exp_h [NB];
  initial begin
    longint t0;
    int n_bytes, bad;
    logic [7:0] lo, hi;
    bit ok;
    for (int i = 0; i < NB; i++) exp_h[i] = 0;
    #1 rst_n = 0;
    #50000 rst_n = 1;
    wait (init_done);
    #200000;
    cmd(CMD_START_HISTOGRAM);
    #200000;
    // align to 1.25 ns after a rising edge of the 200 MHz clock
    @(posedge clk_hf); #1250;
    for (int i = 0; i < 800; i++) begin
      int w;
      w = 1 + ($urandom % 511);
      if (i < 4) w = 1;                 // a few minimum-width pulses
      exp_h[w]++;
      tot_in[0] = 1; #(w * 2500);
      tot_in[0] = 0; #(200 * 2500);      // 500 ns gap, longer than an update
    end
    #2_000_000;
    cmd(CMD_STOP_HISTOGRAM);
    cmd_par(CMD_SET_NUM_BINS, 512);
    cmd_par(CMD_SET_BIN_ADDRESS, 0);
    cmd_par(CMD_SET_CHANNEL, 0);
    host.send_byte(CMD_START_UPLOAD); host.send_byte(8'hFF);
    t0 = $time;
    n_bytes = 0; bad = 0;
    for (int i = 0; i < NB; i++) begin
      host.get_byte(lo, ok, 400 * BIT_PS); if (ok) n_bytes++;
      host.get_byte(hi, ok, 400 * BIT_PS); if (ok) n_bytes++;
      checks++;
      if ({hi, lo} != {4'h0, 12'(exp_h[i])}) begin
        failures++; bad++;
        if (bad < 8) $display("bin %0d: got %h%h expected %0d", i, hi, lo, exp_h[i]);
      end
    end
    expect_byte(8'hFF, "upload end");
    n_bytes++;
    checks++;
    if (n_bytes != 1025) begin failures++; $display("%0d bytes received", n_bytes); end
    $display("upload of 1025 bytes took %0d us", ($time - t0) / 1_000_000);
    checks++;
    if ($time - t0 > 1027 * 10 * BIT_PS) begin failures++; $display("upload too slow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
