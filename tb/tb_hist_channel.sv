// tb_hist_channel: self-checking testbench of hist_channel.
// 200 MHz and 50 MHz clocks. The testbench samples tot_in itself on both
// edges of the 200 MHz clock; the expected bin of a pulse is the number of
// half-period samples for which it was high, clamped to 511. Phases:
//   1. random pulses (widths 1 ns .. 1.4 us, so some clamp) at a rate the
//      histogram can absorb; the whole histogram read through the readout
//      port must equal the reference histogram;
//   2. run low: pulses are ignored;
//   3. a burst of short pulses faster than the 120 ns update: the FIFO
//      fills, the stall status rises and all counts stay consistent;
//   4. clear: all bins read zero.
`timescale 1ps/1ps
module tb_hist_channel;
  import podd_pkg::*;
  localparam int unsigned N = 512, AW = 9;
  logic clk_hf = 0, clk_lf = 0, rst_n = 0, tot_in = 0, run = 0, clear = 0;
  logic init_done, stalled, updated, rd_en = 0;
  logic [AW-1:0] rd_addr = '0;
  logic [COUNT_W-1:0] rd_data;
  int checks = 0, failures = 0;

  hist_channel dut (
    .clk_hf(clk_hf), .rst_hf_n(rst_n), .clk_lf(clk_lf), .rst_lf_n(rst_n), .tot_in(tot_in),
    .run(run), .clear(clear), .init_done(init_done), .stalled(stalled), .updated(updated),
    .rd_addr(rd_addr), .rd_en(rd_en), .rd_data(rd_data));

  always #2500  clk_hf = ~clk_hf;
  always #10000 clk_lf = ~clk_lf;

  initial begin
    #(64'd5_000_000_000); failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference sampling
  int ref_h [N];
  int cur_w = 0;
  bit counting = 0;
  logic last = 0;
  int n_stall = 0, n_updates = 0;
  always @(clk_hf) begin
    if (tot_in) cur_w++;
    if (last && !tot_in && counting) begin
      ref_h[cur_w > 511 ? 511 : cur_w]++;
    end
    if (!tot_in) cur_w = 0;
    last = tot_in;
  end
  always @(posedge clk_lf) begin
    if (rst_n && stalled) n_stall++;
    if (rst_n && updated) n_updates++;
  end

  task automatic read_hist(output int h [N]);
    for (int i = 0; i < N; i++) begin
      @(negedge clk_lf); rd_addr = AW'(i); rd_en = 1;
      @(negedge clk_lf); rd_en = 0;
      h[i] = int'(rd_data);
    end
  endtask

  task automatic compare(string what);
    int h [N];
    int bad;
    bad = 0;
    read_hist(h);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (h[i] != ref_h[i]) begin
        failures++; bad++;
        if (bad < 6) $display("%s: bin %0d = %0d expected %0d", what, i, h[i], ref_h[i]);
      end
    end
  endtask

  task automatic pulse(int width_ps, int gap_ps);
    tot_in = 1; #(width_ps);
    tot_in = 0; #(gap_ps);
  endtask

  initial begin
    int h [N];
    int total, total0;
    for (int i = 0; i < N; i++) ref_h[i] = 0;
    #30000 rst_n = 1;
    wait (init_done);
    #50000;
    run = 1; #100000;
    counting = 1;
    // 1. random pulses
    for (int i = 0; i < 1500; i++) begin
      int w;
      w = 700 + ($urandom % 40000);
      if (i % 10 == 0) w = 1000 + ($urandom % 1500000);
      if (i % 17 == 0) w = 400 + ($urandom % 2000);
      pulse(w, 150000 + ($urandom % 100000));
    end
    #2_000_000;
    counting = 0;
    compare("random pulses");
    total0 = 0;
    for (int i = 0; i < N; i++) total0 += ref_h[i];
    checks++;
    if (n_stall != 0) begin failures++; $display("stall at low rate"); end
    // 2. stopped: ignored
    run = 0; #200000;
    for (int i = 0; i < 20; i++) pulse(20000, 200000);
    #1_000_000;
    compare("while stopped");
    // 3. burst
    run = 1; #200000;
    for (int i = 0; i < 120; i++) pulse(3000, 7000);
    #30_000_000;
    checks++;
    if (n_stall == 0) begin failures++; $display("burst did not stall"); end
    read_hist(h);
    total = 0;
    for (int i = 0; i < N; i++) total += h[i];
    checks++;
    if (total - total0 < 40 || total - total0 > 120) begin
      failures++; $display("burst: %0d counts kept of 120", total - total0);
    end
    // 4. clear
    @(negedge clk_lf) clear = 1;
    @(negedge clk_lf) clear = 0;
    #100000;
    wait (init_done);
    for (int i = 0; i < N; i++) ref_h[i] = 0;
    compare("after clear");
    $display("stall cycles=%0d updates=%0d", n_stall, n_updates);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
