// tb_async_fifo: self-checking testbench of async_fifo.
// Write clock 200 MHz, read clock 50 MHz, as in the channel. First fills
// the FIFO without reading and checks that full rises after exactly DEPTH
// words and that extra writes are refused; then drains it and checks order
// and empty. Then runs random writes and reads concurrently and compares
// every word read with a reference queue of the accepted writes.
module tb_async_fifo;
  localparam int unsigned W = 16, D = 32;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  async_fifo #(.WIDTH(W), .DEPTH(D), .SYNC_STAGES(5)) dut (
    .wclk(wclk), .wrst_n(wrst_n), .wr_en(wr_en), .wdata(wdata), .full(full),
    .rclk(rclk), .rrst_n(rrst_n), .rd_en(rd_en), .rdata(rdata), .empty(empty));

  always #2.5 wclk = ~wclk;
  always #10  rclk = ~rclk;

  initial begin
    #1_000_000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model[$];
  int accepted = 0, refused = 0, popped = 0;
  bit rand_wr = 0, rand_rd = 0;

  // write side bookkeeping
  always @(posedge wclk) if (wrst_n && wr_en) begin
    if (!full) begin model.push_back(wdata); accepted++; end
    else refused++;
  end
  always @(negedge wclk) if (rand_wr) begin
    wr_en = ($urandom % 3) == 0;
    wdata = W'($urandom);
  end

  // read side: rdata is valid the cycle after an accepted pop
  bit pend = 0;
  always @(posedge rclk) begin
    if (pend) begin
      logic [W-1:0] e;
      checks++;
      if (model.size() == 0) begin failures++; $display("read from empty model"); end
      else begin
        e = model.pop_front();
        if (rdata !== e) begin failures++; $display("rdata %h expected %h", rdata, e); end
      end
      popped++;
    end
    pend = rrst_n && rd_en && !empty;
  end
  always @(negedge rclk) if (rand_rd) rd_en = ($urandom % 2) == 0;

  initial begin
    repeat (4) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    repeat (2) @(posedge rclk);
    checks++; if (!empty || full) begin failures++; $display("bad flags after reset"); end
    // fill
    for (int i = 0; i < D + 8; i++) begin
      @(negedge wclk); wr_en = 1; wdata = W'(16'h1000 + i);
    end
    @(negedge wclk); wr_en = 0;
    checks++; if (!full) begin failures++; $display("not full after %0d writes", D + 8); end
    checks++; if (accepted != D) begin failures++; $display("accepted %0d, expected %0d", accepted, D); end
    repeat (10) @(posedge rclk);
    checks++; if (empty) begin failures++; $display("empty while holding data"); end
    // drain
    while (!empty) begin
      @(negedge rclk); rd_en = 1;
      @(posedge rclk);
    end
    @(negedge rclk); rd_en = 0;
    repeat (3) @(posedge rclk);
    checks++; if (popped != D) begin failures++; $display("popped %0d", popped); end
    repeat (10) @(posedge wclk);
    checks++; if (full) begin failures++; $display("still full after drain"); end
    // random traffic
    rand_wr = 1; rand_rd = 1;
    repeat (3000) @(posedge rclk);
    rand_wr = 0; @(negedge wclk) wr_en = 0;
    repeat (200) @(posedge rclk);
    rand_rd = 0; @(negedge rclk) rd_en = 0;
    repeat (4) @(posedge rclk);
    checks++; if (model.size() != 0 || !empty) begin failures++; $display("%0d words left", model.size()); end
    checks++; if (refused == D) begin failures++; $display("random phase never filled the FIFO"); end
    $display("accepted=%0d refused=%0d popped=%0d", accepted, refused, popped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
