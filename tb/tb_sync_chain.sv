// tb_sync_chain: self-checking testbench of sync_chain.
// Drives random 4-bit values every clock and checks that q equals d from
// exactly STAGES cycles earlier, and that reset clears the chain.
module tb_sync_chain;
  localparam int unsigned W = 4, S = 3;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d = '0, q;
  int checks = 0, failures = 0;

  sync_chain #(.WIDTH(W), .STAGES(S)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] hist [$];
  initial begin
    d = 4'hA;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (q !== '0) begin failures++; $display("q not cleared by reset"); end
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = W'($urandom);
      hist.push_back(d);
      @(posedge clk); #1;
      if (hist.size() > S) void'(hist.pop_front());
      if (hist.size() == S) begin
        checks++;
        if (q !== hist[0]) begin
          failures++;
          $display("mismatch q=%h expected %h", q, hist[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
