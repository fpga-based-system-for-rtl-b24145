// tb_hist_bram: self-checking testbench of hist_bram.
// Writes the values 1..9 to addresses 1..9 and reads them back on both
// ports, then runs random writes on port A with simultaneous random reads
// on both ports against a reference array (one-cycle read latency; a read
// of the address written in the same cycle returns the old word).
module tb_hist_bram;
  localparam int unsigned N = 512, DW = 16, AW = 9;
  logic clk = 0;
  logic [AW-1:0] addr_a = '0, addr_b = '0;
  logic rden_a = 0, wren_a = 0, rden_b = 0;
  logic [DW-1:0] data_a = '0, q_a, q_b;
  int checks = 0, failures = 0;

  hist_bram #(.NUM_WORDS(N), .DATA_W(DW)) dut (
    .clk(clk), .addr_a(addr_a), .rden_a(rden_a), .wren_a(wren_a), .data_a(data_a), .q_a(q_a),
    .addr_b(addr_b), .rden_b(rden_b), .q_b(q_b));

  always #10 clk = ~clk;

  initial begin
    #2_000_000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] ref_mem [N];
  logic [DW-1:0] exp_a, exp_b;
  bit chk_a = 0, chk_b = 0;

  always @(posedge clk) begin
    #1;
    if (chk_a) begin checks++; if (q_a !== exp_a) begin failures++; $display("q_a %h expected %h", q_a, exp_a); end end
    if (chk_b) begin checks++; if (q_b !== exp_b) begin failures++; $display("q_b %h expected %h", q_b, exp_b); end end
  end

  // apply one cycle of port activity
  task automatic cycle(bit wa, bit ra, logic [AW-1:0] aa, logic [DW-1:0] da, bit rb, logic [AW-1:0] ab);
    @(negedge clk);
    wren_a = wa; rden_a = ra; addr_a = aa; data_a = da; rden_b = rb; addr_b = ab;
    chk_a = ra; chk_b = rb;
    if (ra) exp_a = ref_mem[aa];
    if (rb) exp_b = ref_mem[ab];
    if (wa) ref_mem[aa] = da;
  endtask

  initial begin
    // initialise through port A
    for (int i = 0; i < N; i++) cycle(1, 0, AW'(i), '0, 0, '0);
    for (int i = 1; i <= 9; i++) cycle(1, 0, AW'(i), DW'(i), 0, '0);
    for (int i = 1; i <= 9; i++) cycle(0, 1, AW'(i), '0, 1, AW'(10 - i));
    for (int i = 0; i < 4000; i++)
      cycle(1'($urandom), 1'($urandom), AW'($urandom % 16), DW'($urandom), 1'($urandom), AW'($urandom % 16));
    cycle(0, 0, '0, '0, 0, '0);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
