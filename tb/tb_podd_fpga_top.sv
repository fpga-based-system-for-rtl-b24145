// tb_podd_fpga_top: end-to-end testbench of podd_fpga_top.
// All 16 channels, 512 bins, real 200/50 MHz clocks; only the UART runs at
// 2.5 Mbaud instead of 115200 to keep the run short. A uart_host model
// plays the microcontroller and drives the whole protocol:
//   A. version query, CLEAR_RESULTS, START_HISTOGRAM, random pulses on all
//      channels (some shorter than one clock, some longer than 1.28 us so
//      they clamp), STOP_HISTOGRAM, IS_HIST_RUNNING;
//   B. START_UPLOAD with the reset defaults (all channels, bins 0..511):
//      every bin of every channel must match the reference histogram the
//      testbench builds by sampling the inputs on both clock edges, and
//      every second byte must carry its channel number;
//   C. a burst of pulses faster than the histogram update on channel 5:
//      the FIFO fills and the channel stalls; the uploaded channel 5
//      histogram must have gained between 32 and the burst size counts;
//   D. CLEAR_RESULTS, then a windowed upload (SET_BIN_ADDRESS/SET_NUM_BINS,
//      wrapping past bin 511) of all channels must read zero.
// Each mechanism is counted and a failure is counted for any that never
// happened.
`timescale 1ps/1ps
module tb_podd_fpga_top;
  import podd_pkg::*;
  localparam int unsigned NCH = 16, NB = 512;
  localparam int unsigned CLK_HZ = 50_000_000, BAUD = 2_500_000;
  localparam longint BIT_PS = 64'(CLK_HZ / BAUD) * 20000;

  logic clk_lf = 0, clk_hf = 0, rst_n = 1;   // pulsed low at 1 ps
  logic [NCH-1:0] tot_in = '0, stalled;
  logic rx, tx, running, init_done;
  int checks = 0, failures = 0;

  podd_fpga_top #(.BAUD(BAUD)) dut (
    .clk_lf(clk_lf), .clk_hf(clk_hf), .rst_n(rst_n), .tot_in(tot_in),
    .uart_rx(rx), .uart_tx(tx), .running(running), .init_done(init_done), .stalled(stalled));

  uart_host #(.BIT_PS(BIT_PS)) host (.txd(rx), .rxd(tx));

  always #2500  clk_hf = ~clk_hf;
  always #10000 clk_lf = ~clk_lf;

  initial begin
    #(64'd200_000_000_000); failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference histograms ----------------
  int ref_h [NCH][NB];
  int cur_w [NCH];
  logic [NCH-1:0] last = '0;
  bit counting = 0;
  int n_short = 0, n_clamp = 0, n_events = 0;
  always @(clk_hf) begin
    for (int c = 0; c < NCH; c++) begin
      if (tot_in[c]) cur_w[c]++;
      if (last[c] && !tot_in[c] && counting) begin
        n_events++;
        if (cur_w[c] == 1) n_short++;
        if (cur_w[c] > 511) n_clamp++;
        ref_h[c][cur_w[c] > 511 ? 511 : cur_w[c]]++;
      end
      if (!tot_in[c]) cur_w[c] = 0;
    end
    last = tot_in;
  end

  // mechanisms seen inside the design
  int n_stall = 0, n_rise_neg = 0, n_fall_neg = 0;
  always @(posedge clk_lf) if (rst_n && stalled != '0) n_stall++;
  always @(posedge clk_hf) if (rst_n) begin
    if (dut.g_ch[0].u_ch.u_pw_fsm.cnt_start && dut.g_ch[0].u_ch.rise_neg) n_rise_neg++;
    if (dut.g_ch[0].u_ch.u_pw_fsm.state == 2'd1 && dut.g_ch[0].u_ch.fall && dut.g_ch[0].u_ch.fall_neg) n_fall_neg++;
  end

  // ---------------- host helpers ----------------
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
  endtask

  task automatic cmd_par(cmd_e c, int v);
    host.send_byte(c); host.send_byte(v[7:0]); host.send_byte(v[15:8]); host.send_byte(8'hFF);
    expect_byte(8'hFF, "parameter ack");
  endtask

  // upload and return counts (12 bits each) of channels ch0..ch1
  task automatic upload(int ch0, int ch1, int start, int n, output int h [NCH][NB]);
    logic [7:0] lo, hi;
    cmd(CMD_START_UPLOAD);
    for (int ch = ch0; ch <= ch1; ch++)
      for (int i = 0; i < n; i++) begin
        get(lo, "upload lo"); get(hi, "upload hi");
        checks++;
        if (hi[7:4] != 4'(ch)) begin failures++; $display("channel tag %0d expected %0d", hi[7:4], ch); end
        h[ch][(start + i) % NB] = int'({hi[3:0], lo});
      end
    expect_byte(8'hFF, "upload end");
  endtask

  task automatic pulse(int c, int width_ps, int gap_ps);
    tot_in[c] = 1; #(width_ps);
    tot_in[c] = 0; #(gap_ps);
  endtask

  int h [NCH][NB];
  initial begin
    int bad, total_before, total_after, n_uploads;
    n_uploads = 0;
    for (int c = 0; c < NCH; c++) begin
      cur_w[c] = 0;
      for (int i = 0; i < NB; i++) begin ref_h[c][i] = 0; h[c][i] = 0; end
    end
    #1 rst_n = 0;
    #50000 rst_n = 1;
    #200000;
    // ---------- A ----------
    cmd(CMD_FPGA_VERSION);
    expect_byte(8'h01, "version"); expect_byte(8'hFF, "version end");
    cmd(CMD_CLEAR_RESULTS);
    expect_byte(8'hFF, "clear ack");
    checks++; if (!init_done) begin failures++; $display("clear acknowledged early"); end
    cmd(CMD_START_HISTOGRAM);
    expect_byte(8'hFF, "start ack");
    #200000;
    counting = 1;
    for (int c = 0; c < NCH; c++) begin
      fork
        automatic int cc = c;
        begin
          for (int i = 0; i < 120; i++) begin
            int w;
            w = 700 + ($urandom % 30000);
            if (i % 9 == 0) w = 1_300_000 + ($urandom % 300_000);
            if (i % 11 == 0) w = 300 + ($urandom % 2500);
            pulse(cc, w, 150_000 + ($urandom % 200_000));
          end
        end
      join_none
    end
    wait fork;
    #3_000_000;
    counting = 0;
    cmd(CMD_STOP_HISTOGRAM);
    expect_byte(8'hFF, "stop ack");
    cmd(CMD_IS_HIST_RUNNING);
    expect_byte(STAT_FPGA_IDLE, "status"); expect_byte(8'hFF, "status end");
    // pulses while stopped are ignored
    for (int i = 0; i < 10; i++) pulse(2, 20000, 200000);
    #2_000_000;
    // ---------- B ----------
    upload(0, NCH - 1, 0, NB, h); n_uploads++;
    bad = 0;
    for (int c = 0; c < NCH; c++)
      for (int i = 0; i < NB; i++) begin
        checks++;
        if (h[c][i] != ref_h[c][i]) begin
          failures++; bad++;
          if (bad < 8) $display("ch %0d bin %0d = %0d expected %0d", c, i, h[c][i], ref_h[c][i]);
        end
      end
    // ---------- C ----------
    total_before = 0;
    for (int i = 0; i < NB; i++) total_before += h[5][i];
    cmd(CMD_START_HISTOGRAM);
    expect_byte(8'hFF, "start ack 2");
    #200000;
    for (int i = 0; i < 100; i++) pulse(5, 3000, 7000);
    #20_000_000;
    cmd(CMD_STOP_HISTOGRAM);
    expect_byte(8'hFF, "stop ack 2");
    cmd_par(CMD_SET_CHANNEL, 5);
    upload(5, 5, 0, NB, h); n_uploads++;
    total_after = 0;
    for (int i = 0; i < NB; i++) total_after += h[5][i];
    checks++;
    if (total_after - total_before < 32 || total_after - total_before > 100) begin
      failures++; $display("burst kept %0d of 100", total_after - total_before);
    end
    // ---------- D ----------
    cmd(CMD_CLEAR_RESULTS);
    expect_byte(8'hFF, "clear ack 2");
    cmd_par(CMD_SET_CHANNEL, 16);
    cmd_par(CMD_SET_BIN_ADDRESS, 508);
    cmd_par(CMD_SET_NUM_BINS, 8);
    for (int c = 0; c < NCH; c++) for (int i = 0; i < NB; i++) h[c][i] = -1;
    upload(0, NCH - 1, 508, 8, h); n_uploads++;
    for (int c = 0; c < NCH; c++)
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (h[c][(508 + i) % NB] != 0) begin failures++; $display("ch %0d bin %0d not cleared", c, (508 + i) % NB); end
      end
    // ---------- mechanisms ----------
    $display("events=%0d short=%0d clamped=%0d rise_neg=%0d fall_neg=%0d stall_cycles=%0d uploads=%0d",
             n_events, n_short, n_clamp, n_rise_neg, n_fall_neg, n_stall, n_uploads);
    checks++; if (n_short == 0)    begin failures++; $display("no sub-cycle pulse"); end
    checks++; if (n_clamp == 0)    begin failures++; $display("no clamped pulse"); end
    checks++; if (n_rise_neg == 0) begin failures++; $display("no negative-phase rise"); end
    checks++; if (n_fall_neg == 0) begin failures++; $display("no negative-phase fall"); end
    checks++; if (n_stall == 0)    begin failures++; $display("no FIFO stall"); end
    checks++; if (host.framing_errors != 0) begin failures++; $display("framing errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
