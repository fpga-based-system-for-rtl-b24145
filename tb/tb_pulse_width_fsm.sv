// tb_pulse_width_fsm: self-checking testbench of pulse_width_fsm.
// Drives the edge reports directly, one sampling window per clock, with a
// pulse_width_counter attached as in the channel. For each pulse the
// expected FIFO word is 2*(fall window - rise window) + (rise on negative
// phase) - (fall on negative phase), clamped to 511. Covers: pulses inside
// one window, both phase corrections, clamping of long pulses, back-to-back
// pulses at the maximum rate of one word per two cycles, the stall while
// the FIFO reports full, and a pulse abandoned when run drops.
module tb_pulse_width_fsm;
  import podd_pkg::*;
  localparam int unsigned CW = 12;
  logic clk = 0, rst_n = 0, run = 0;
  logic rise = 0, rise_neg = 0, fall = 0, fall_neg = 0;
  logic cnt_start, cnt_en, fifo_full = 0, fifo_wr, stalled;
  logic [CW-1:0] cnt;
  logic [FIFO_W-1:0] fifo_wdata;
  int checks = 0, failures = 0;

  pulse_width_counter #(.CNT_W(CW)) u_cnt (.clk(clk), .rst_n(rst_n), .start(cnt_start), .en(cnt_en), .count(cnt));
  pulse_width_fsm #(.CNT_W(CW)) dut (
    .clk(clk), .rst_n(rst_n), .run(run), .rise(rise), .rise_neg(rise_neg), .fall(fall), .fall_neg(fall_neg),
    .cnt_start(cnt_start), .cnt_en(cnt_en), .cnt(cnt), .fifo_full(fifo_full),
    .fifo_wr(fifo_wr), .fifo_wdata(fifo_wdata), .stalled(stalled));

  always #2.5 clk = ~clk;

  initial begin
    #2_000_000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q[$];
  int n_writes = 0, cyc = 0, stall_cycles = 0, first_wr = 0, last_wr = 0;
  always @(posedge clk) begin
    cyc++;
    if (stalled) stall_cycles++;
    if (fifo_wr) begin
      n_writes++;
      if (n_writes == 1) first_wr = cyc;
      last_wr = cyc;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected write %0d", fifo_wdata);
      end else begin
        int e;
        e = exp_q.pop_front();
        if (int'(fifo_wdata) != e) begin
          failures++; $display("width %0d expected %0d", fifo_wdata, e);
        end
      end
      if (fifo_full) begin failures++; $display("write while full"); end
    end
  end

  task automatic win(bit r, bit rn, bit f, bit fn);
    @(negedge clk);
    rise = r; rise_neg = rn; fall = f; fall_neg = fn;
  endtask

  task automatic idle(int n);
    repeat (n) win(0, 0, 0, 0);
  endtask

  // one pulse: rise in a window, fall `len` windows later (len may be 0)
  task automatic pulse(int len, bit rn, bit fn, bit expect_word = 1);
    int w;
    if (len == 0) begin rn = 1; fn = 0; end
    w = 2 * len + int'(rn) - int'(fn);
    if (w > 511) w = 511;
    if (expect_word) exp_q.push_back(w);
    if (len == 0) win(1, 1, 1, 0);
    else begin
      win(1, rn, 0, 0);
      idle(len - 1);
      win(0, 0, 1, fn);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1; run = 1;
    idle(3);
    // directed: in-window pulse and the four phase combinations
    pulse(0, 1, 0); idle(2);
    pulse(1, 0, 1); idle(1);   // 2 - 1 = 1
    pulse(1, 1, 0); idle(1);   // 2 + 1 = 3
    pulse(3, 0, 0); idle(1);
    pulse(3, 1, 1); idle(1);
    // clamp
    pulse(300, 0, 0); idle(1);
    pulse(256, 0, 0); idle(1); // 512 -> 511
    pulse(255, 1, 0); idle(1); // 511
    pulse(255, 0, 1); idle(1); // 509
    // random
    for (int i = 0; i < 200; i++) begin
      int len;
      len = $urandom % 40;
      pulse(len, 1'($urandom), 1'($urandom));
      idle(len == 0 ? 2 : 1);
    end
    idle(5);
    // maximum rate: rise and fall in consecutive windows, back to back
    begin
      int nb0;
      nb0 = n_writes;
      for (int i = 0; i < 20; i++) pulse(1, 0, 0);
      idle(4);
      checks++;
      if (n_writes - nb0 != 20) begin failures++; $display("back-to-back: %0d words", n_writes - nb0); end
    end
    begin
      int t0, t1, nb;
      nb = n_writes; t0 = cyc;
      for (int i = 0; i < 20; i++) pulse(1, 1, 1);
      idle(3);
      t1 = last_wr;
      checks++;
      if (n_writes - nb != 20) begin failures++; $display("rate test lost words"); end
      // 20 events at 2 cycles each
      checks++;
      if (t1 - t0 > 20 * 2 + 4) begin failures++; $display("rate test took %0d cycles", t1 - t0); end
    end
    // stall: FIFO full when the fall is seen
    @(negedge clk) fifo_full = 1;
    pulse(5, 0, 0);
    idle(10);
    checks++;
    if (!stalled) begin failures++; $display("not stalled while full"); end
    @(negedge clk) fifo_full = 0;
    idle(3);
    checks++;
    if (stalled || exp_q.size() != 0) begin failures++; $display("stall did not release"); end
    // in-window pulse while full
    @(negedge clk) fifo_full = 1;
    pulse(0, 1, 0);
    idle(4);
    @(negedge clk) fifo_full = 0;
    idle(3);
    // run dropped during a pulse: no word
    win(1, 0, 0, 0); idle(3);
    @(negedge clk) run = 0;
    idle(2); win(0, 0, 1, 0); idle(2);
    // pulses while stopped: ignored
    pulse(4, 0, 0, 0); idle(2);
    run = 1; idle(5);
    pulse(7, 1, 0); idle(4);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d words missing", exp_q.size()); end
    checks++;
    if (stall_cycles < 10) begin failures++; $display("stall not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
