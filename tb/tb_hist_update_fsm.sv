// tb_hist_update_fsm: self-checking testbench of hist_update_fsm.
// The FSM is connected to a hist_bram and to a FIFO model with the same
// one-cycle registered read data as async_fifo. Checks: bins are all zero
// after the 513-cycle initialisation (after pre-filling the memory with
// garbage); each FIFO word increments bin (word mod 512); an update takes
// exactly 6 cycles from read request to the next read request; counts
// saturate at 65535; a clear request during updates zeroes everything.
module tb_hist_update_fsm;
  import podd_pkg::*;
  localparam int unsigned N = 512, AW = 9;
  logic clk = 0, rst_n = 0, clear = 0;
  logic init_done, fifo_rd, rden_a, wren_a, update_done;
  logic [AW-1:0] addr_a, addr_b = '0;
  logic [COUNT_W-1:0] data_a, q_a, q_b;
  logic rden_b = 0;
  int checks = 0, failures = 0;

  // FIFO model
  logic [FIFO_W-1:0] fq[$];
  logic [FIFO_W-1:0] fifo_rdata = '0;
  logic fifo_empty;
  assign fifo_empty = (fq.size() == 0);
  always @(posedge clk) if (fifo_rd) begin
    if (fq.size() == 0) begin failures++; $display("read while empty"); end
    else fifo_rdata <= fq.pop_front();
  end

  hist_update_fsm dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .init_done(init_done),
    .fifo_empty(fifo_empty), .fifo_rdata(fifo_rdata), .fifo_rd(fifo_rd),
    .addr_a(addr_a), .rden_a(rden_a), .wren_a(wren_a), .data_a(data_a), .q_a(q_a),
    .update_done(update_done));
  hist_bram #(.NUM_WORDS(N), .DATA_W(COUNT_W)) u_mem (
    .clk(clk), .addr_a(addr_a), .rden_a(rden_a), .wren_a(wren_a), .data_a(data_a), .q_a(q_a),
    .addr_b(addr_b), .rden_b(rden_b), .q_b(q_b));

  always #10 clk = ~clk;

  initial begin
    #20_000_000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_rd = -1, gaps_bad = 0, gaps_seen = 0;
  always @(posedge clk) begin
    cyc++;
    if (fifo_rd) begin
      if (last_rd >= 0 && fq.size() > 0) ;  // spacing checked below
      if (last_rd >= 0 && cyc - last_rd < 6) gaps_bad++;
      if (last_rd >= 0 && cyc - last_rd == 6) gaps_seen++;
      last_rd = cyc;
    end
  end

  int ref_h [N];
  task automatic read_all_and_check(string what);
    int bad;
    bad = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); addr_b = AW'(i); rden_b = 1;
      @(negedge clk); rden_b = 0;
      checks++;
      if (int'(q_b) != ref_h[i]) begin
        failures++; bad++;
        if (bad < 5) $display("%s: bin %0d = %0d expected %0d", what, i, q_b, ref_h[i]);
      end
    end
  endtask

  task automatic wait_idle();
    while (fq.size() != 0) @(posedge clk);
    repeat (8) @(posedge clk);
  endtask

  initial begin
    int t0, w;
    for (int i = 0; i < N; i++) u_mem.mem[i] = COUNT_W'($urandom);
    for (int i = 0; i < N; i++) ref_h[i] = 0;
    @(negedge clk); rst_n = 1; t0 = cyc;
    while (!init_done) @(posedge clk);
    checks++;
    if (cyc - t0 < 512 || cyc - t0 > 514) begin failures++; $display("init took %0d cycles", cyc - t0); end
    read_all_and_check("after init");
    // random events, including widths above 511 (address uses low 9 bits)
    for (int i = 0; i < 600; i++) begin
      w = $urandom % 1024;
      if (i % 3 == 0) w = $urandom % 8;       // some bins get many hits
      fq.push_back(FIFO_W'(w));
      ref_h[w % N]++;
    end
    wait_idle();
    checks++;
    if (gaps_bad != 0 || gaps_seen < 500) begin failures++; $display("update spacing: %0d short, %0d at 6", gaps_bad, gaps_seen); end
    read_all_and_check("after events");
    // saturation: preload bin 100 near the top
    u_mem.mem[100] = 16'hFFFD; ref_h[100] = 65535;
    repeat (5) fq.push_back(FIFO_W'(100));
    wait_idle();
    read_all_and_check("saturation");
    // clear while updates are pending
    for (int i = 0; i < 20; i++) fq.push_back(FIFO_W'(i));
    repeat (7) @(posedge clk);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    repeat (7) @(posedge clk);
    checks++;
    if (init_done) begin failures++; $display("clear did not start initialisation"); end
    while (!init_done) @(posedge clk);
    // events after clear are still counted; those before are gone
    for (int i = 0; i < N; i++) ref_h[i] = 0;
    wait_idle();
    begin
      // updates that completed after the clear finished are legitimate
      int remaining;
      remaining = 0;
      for (int i = 0; i < N; i++) begin
        @(negedge clk); addr_b = AW'(i); rden_b = 1;
        @(negedge clk); rden_b = 0;
        remaining += int'(q_b);
      end
      checks++;
      if (remaining > 19) begin failures++; $display("clear left %0d counts", remaining); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
