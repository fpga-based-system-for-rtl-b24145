// tb_pulse_width_counter: self-checking testbench of pulse_width_counter.
// Starts the counter, lets it run a random number of cycles and checks the
// count is twice the number of cycles since start; checks it holds when
// disabled and saturates at the top even value.
module tb_pulse_width_counter;
  localparam int unsigned W = 6;
  logic clk = 0, rst_n = 0, start = 0, en = 0;
  logic [W-1:0] count;
  int checks = 0, failures = 0;

  pulse_width_counter #(.CNT_W(W)) dut (.clk(clk), .rst_n(rst_n), .start(start), .en(en), .count(count));

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(count) != exp) begin
      failures++; $display("%s: count=%0d expected %0d", what, count, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      int n;
      n = 1 + ($urandom % 25);
      @(negedge clk); start = 1; en = 0;
      @(negedge clk); start = 0; en = 1;
      check(2, "after start");
      repeat (n - 1) @(negedge clk);
      check(2 * n, "running");
      en = 0;
      repeat (3) @(negedge clk);
      check(2 * n, "held");
    end
    // saturation
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; en = 1;
    repeat (100) @(negedge clk);
    check(62, "saturated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
