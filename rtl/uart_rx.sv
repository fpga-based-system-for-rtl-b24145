// uart_rx: 8N1 UART receiver.
//
// The rx pin passes a 2-FF synchronizer. A falling edge starts a frame; the
// start bit is re-checked half a bit later, then the eight data bits (LSB
// first) and the stop bit are sampled in the middle of each bit period
// (CLK_HZ / BAUD clock cycles, rounded). A frame whose stop bit is low is
// dropped. valid is high for one cycle with the received byte on data.
// Entirely this design's own; the published design gives only the baud rate.
module uart_rx #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       valid,
  output logic [7:0] data
);

  localparam int unsigned DIV   = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned DIV_W = $clog2(DIV + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;
  state_e state;

  logic [1:0]       rx_sync;
  logic [DIV_W-1:0] tick;
  logic [2:0]       bit_idx;
  logic [7:0]       shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_sync <= 2'b11;
    else        rx_sync <= {rx_sync[0], rx};
  end

  logic rx_s;
  assign rx_s = rx_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      tick    <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      valid   <= 1'b0;
      data    <= '0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          tick <= '0;
          if (!rx_s) state <= S_START;
        end
        S_START: begin
          if (tick == DIV_W'(DIV / 2 - 1)) begin
            tick    <= '0;
            bit_idx <= '0;
            state   <= rx_s ? S_IDLE : S_DATA;
          end else tick <= tick + 1'b1;
        end
        S_DATA: begin
          if (tick == DIV_W'(DIV - 1)) begin
            tick  <= '0;
            shreg <= {rx_s, shreg[7:1]};
            if (bit_idx == 3'd7) state <= S_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else tick <= tick + 1'b1;
        end
        S_STOP: begin
          if (tick == DIV_W'(DIV - 1)) begin
            tick  <= '0;
            state <= S_IDLE;
            if (rx_s) begin
              valid <= 1'b1;
              data  <= shreg;
            end
          end else tick <= tick + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
