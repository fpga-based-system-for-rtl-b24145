// uart_tx: 8N1 UART transmitter.
//
// A byte is accepted when valid and ready are both high, then sent as a low
// start bit, eight data bits LSB first and a high stop bit, each lasting
// CLK_HZ / BAUD clock cycles (rounded). ready is high only while idle, so
// back-to-back bytes leave no gap: one byte per 10 bit periods.
// Entirely this design's own; the published design gives only the baud rate.
module uart_tx #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       tx
);

  localparam int unsigned DIV   = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned DIV_W = $clog2(DIV + 1);

  logic [DIV_W-1:0] tick;
  logic [3:0]       bits_left;   // frame bits still to send
  logic [9:0]       frame;       // {stop, data, start}, shifted out LSB first

  assign ready = (bits_left == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick      <= '0;
      bits_left <= '0;
      frame     <= '1;
      tx        <= 1'b1;
    end else if (bits_left == '0) begin
      tx <= 1'b1;
      if (valid) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        tick      <= '0;
        tx        <= 1'b0;
      end
    end else if (tick == DIV_W'(DIV - 1)) begin
      tick      <= '0;
      bits_left <= bits_left - 1'b1;
      frame     <= {1'b1, frame[9:1]};
      tx        <= (bits_left == 4'd1) ? 1'b1 : frame[1];
    end else begin
      tick <= tick + 1'b1;
    end
  end

endmodule
