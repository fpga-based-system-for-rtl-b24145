// uart_host: behavioural model of the host end of the 8N1 UART link
// (the system microcontroller), for testbenches only.
// send_byte() drives txd with a start bit, 8 data bits LSB first and a stop
// bit, each BIT_PS picoseconds long. A receiver process decodes rxd by
// sampling mid-bit and queues every byte; get_byte() takes the oldest,
// waiting up to timeout_ps for one to arrive.
`timescale 1ps/1ps
module uart_host #(
  parameter longint BIT_PS = 8_680_556   // 115200 baud
) (
  output logic txd,
  input  logic rxd
);
  logic [7:0] rxq[$];
  int unsigned framing_errors = 0;

  initial txd = 1'b1;

  task automatic send_byte(input logic [7:0] b);
    txd = 1'b0; #(BIT_PS);
    for (int i = 0; i < 8; i++) begin txd = b[i]; #(BIT_PS); end
    txd = 1'b1; #(BIT_PS);
  endtask

  task automatic get_byte(output logic [7:0] b, output bit ok, input longint timeout_ps);
    longint waited;
    waited = 0;
    while (rxq.size() == 0 && waited < timeout_ps) begin
      #(BIT_PS); waited += BIT_PS;
    end
    ok = rxq.size() != 0;
    b = ok ? rxq.pop_front() : 8'h00;
  endtask

  initial begin
    logic [7:0] b;
    forever begin
      @(negedge rxd);
      #(BIT_PS / 2);
      if (rxd == 1'b0) begin
        for (int i = 0; i < 8; i++) begin #(BIT_PS); b[i] = rxd; end
        #(BIT_PS);
        if (rxd) rxq.push_back(b);
        else framing_errors++;
      end
    end
  end
endmodule
