// tb_dual_edge_sampler: self-checking testbench of dual_edge_sampler.
// A 200 MHz clock (5 ns) and random pulses and gaps of 1..24 half-periods,
// with edges placed at random points between clock edges. The testbench
// samples the input itself on every clock edge (both polarities) and builds
// the expected list of transitions with the phase that first saw them and
// the number of half-periods since the previous transition. The DUT's
// reports are turned into the same list (a window's negative-phase slot
// precedes its positive-phase slot) and the two lists are compared.
`timescale 1ps/1ps
module tb_dual_edge_sampler;
  logic clk = 0, rst_n = 0, tot_in = 0;
  logic rise, rise_neg, fall, fall_neg;
  int checks = 0, failures = 0;

  dual_edge_sampler dut (.clk(clk), .rst_n(rst_n), .tot_in(tot_in),
    .rise(rise), .rise_neg(rise_neg), .fall(fall), .fall_neg(fall_neg));

  always #2500 clk = ~clk;

  initial begin
    #50_000_000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event = {is_rise, is_neg_phase, slot}
  typedef struct { bit is_rise; bit neg; longint slot; } ev_t;
  ev_t exp_q[$], obs_q[$];

  longint half = 0;   // half-period index, advanced on every clock edge
  logic   last = 0;
  bit     armed = 0;
  always @(clk) begin
    half++;
    if (armed && tot_in != last) exp_q.push_back('{tot_in, !clk, half});
    last = tot_in;
  end

  longint win = 0;
  always @(posedge clk) begin
    win++;
    #1;
    if (armed) begin
      // order inside a window: the negative-phase slot comes first
      if (rise && fall) begin
        if (rise_neg && !fall_neg) begin
          obs_q.push_back('{1, 1, 2*win-1}); obs_q.push_back('{0, 0, 2*win});
        end else begin
          obs_q.push_back('{0, 1, 2*win-1}); obs_q.push_back('{1, 0, 2*win});
        end
      end else if (rise) obs_q.push_back('{1, rise_neg, rise_neg ? 2*win-1 : 2*win});
      else if (fall)     obs_q.push_back('{0, fall_neg, fall_neg ? 2*win-1 : 2*win});
    end
  end

  int short_pulses = 0, short_gaps = 0;
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (6) @(posedge clk);
    armed = 1;
    #1000;
    for (int i = 0; i < 400; i++) begin
      int hi, lo;
      hi = 1 + ($urandom % 24); lo = 1 + ($urandom % 24);
      if (i % 5 == 0) hi = 1;
      if (i % 7 == 0) lo = 1;
      if (hi == 1) short_pulses++;
      if (lo == 1) short_gaps++;
      // move to a random point inside the current half-period, then hold
      tot_in = 1; #(hi * 2500);
      tot_in = 0; #(lo * 2500 + ($urandom % 3) * 400 - 400);
    end
    #100000;
    armed = 0;
    checks++;
    if (exp_q.size() != obs_q.size() || exp_q.size() < 700) begin
      failures++;
      $display("event count: expected %0d observed %0d", exp_q.size(), obs_q.size());
    end
    for (int i = 1; i < exp_q.size() && i < obs_q.size(); i++) begin
      checks++;
      if (exp_q[i].is_rise != obs_q[i].is_rise || exp_q[i].neg != obs_q[i].neg ||
          exp_q[i].slot - exp_q[i-1].slot != obs_q[i].slot - obs_q[i-1].slot) begin
        failures++;
        if (failures < 10)
          $display("event %0d: expected rise=%0d neg=%0d d=%0d, got rise=%0d neg=%0d d=%0d", i,
                   exp_q[i].is_rise, exp_q[i].neg, exp_q[i].slot - exp_q[i-1].slot,
                   obs_q[i].is_rise, obs_q[i].neg, obs_q[i].slot - obs_q[i-1].slot);
      end
    end
    checks++;
    if (short_pulses == 0 || short_gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
