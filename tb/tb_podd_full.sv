// tb_podd_full: one complete acquisition with podd_fpga_top at its default
// parameters (16 channels, 512 bins, 115200 baud, 200/50 MHz clocks).
// The host clears the histograms, starts acquisition, the testbench sends
// pulses of random widths (mostly under 80 ns, some clamping) on all
// channels, the host stops acquisition and reads back
//   1. all 512 bins of channel 3 (1024 data bytes plus the closing 0xFF),
//   2. bins 0..31 of all 16 channels,
// and every value is compared with the reference histogram the testbench
// builds by sampling the inputs on both 200 MHz clock edges.
`timescale 1ps/1ps
module tb_podd_full;
  import podd_pkg::*;
  localparam int unsigned NCH = 16, NB = 512;
  localparam longint BIT_PS = 64'd434 * 20000;   // 50 MHz / 115200, rounded

  logic clk_lf = 0, clk_hf = 0, rst_n = 1;   // pulsed low at 1 ps
  logic [NCH-1:0] tot_in = '0, stalled;
  logic rx, tx, running, init_done;
  int checks = 0, failures = 0;

  podd_fpga_top dut (
    .clk_lf(clk_lf), .clk_hf(clk_hf), .rst_n(rst_n), .tot_in(tot_in),
    .uart_rx(rx), .uart_tx(tx), .running(running), .init_done(init_done), .stalled(stalled));

  uart_host #(.BIT_PS(BIT_PS)) host (.txd(rx), .rxd(tx));

  always #2500  clk_hf = ~clk_hf;
  always #10000 clk_lf = ~clk_lf;

  initial begin
    #(64'd400_000_000_000); failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_h [NCH][NB];
  int cur_w [NCH];
  logic [NCH-1:0] last = '0;
  bit counting = 0;
  always @(clk_hf) begin
    for (int c = 0; c < NCH; c++) begin
      if (tot_in[c]) cur_w[c]++;
      if (last[c] && !tot_in[c] && counting) ref_h[c][cur_w[c] > 511 ? 511 : cur_w[c]]++;
      if (!tot_in[c]) cur_w[c] = 0;
    end
    last = tot_in;
  end

  task automatic get(output logic [7:0] b, input string what);
    bit ok;
    host.get_byte(b, ok, 400 * BIT_PS);
    if (!ok) begin failures++; $display("%s: no answer", what); end
  endtask

  task automatic expect_byte(logic [7:0] e, string what);
    logic [7:0] b;
    get(b, what);
    checks++;
    if (b !== e) begin failures++; $display("%s: got %h expected %h", what, b, e); end
  endtask

  task automatic cmd(cmd_e c);
    host.send_byte(c); host.send_byte(8'hFF);
    expect_byte(8'hFF, "ack");
  endtask

  task automatic cmd_par(cmd_e c, int v);
    host.send_byte(c); host.send_byte(v[7:0]); host.send_byte(v[15:8]); host.send_byte(8'hFF);
    expect_byte(8'hFF, "parameter ack");
  endtask

  task automatic upload_check(int ch0, int ch1, int start, int n);
    logic [7:0] lo, hi;
    int bad;
    bad = 0;
    host.send_byte(CMD_START_UPLOAD); host.send_byte(8'hFF);
    for (int ch = ch0; ch <= ch1; ch++)
      for (int i = 0; i < n; i++) begin
        int e;
        get(lo, "lo"); get(hi, "hi");
        e = ref_h[ch][(start + i) % NB];
        checks++;
        if ({hi, lo} != {4'(ch), 12'(e)}) begin
          failures++; bad++;
          if (bad < 8) $display("ch %0d bin %0d: got %h%h expected count %0d", ch, start + i, hi, lo, e);
        end
      end
    expect_byte(8'hFF, "upload end");
  endtask

  task automatic pulse(int c, int width_ps, int gap_ps);
    tot_in[c] = 1; #(width_ps);
    tot_in[c] = 0; #(gap_ps);
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) begin
      cur_w[c] = 0;
      for (int i = 0; i < NB; i++) ref_h[c][i] = 0;
    end
    #1 rst_n = 0;
    #50000 rst_n = 1;
    #200000;
    cmd(CMD_CLEAR_RESULTS);
    cmd(CMD_START_HISTOGRAM);
    #200000;
    counting = 1;
    for (int c = 0; c < NCH; c++) begin
      fork
        automatic int cc = c;
        begin
          for (int i = 0; i < 150; i++) begin
            int w;
            w = 700 + ($urandom % 80000);
            if (i % 13 == 0) w = 1_300_000 + ($urandom % 300_000);
            pulse(cc, w, 150_000 + ($urandom % 200_000));
          end
        end
      join_none
    end
    wait fork;
    #3_000_000;
    counting = 0;
    cmd(CMD_STOP_HISTOGRAM);
    cmd_par(CMD_SET_CHANNEL, 3);
    upload_check(3, 3, 0, NB);
    cmd_par(CMD_SET_CHANNEL, 16);
    cmd_par(CMD_SET_NUM_BINS, 32);
    upload_check(0, NCH - 1, 0, 32);
    checks++; if (host.framing_errors != 0) begin failures++; $display("framing errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
