// uart_tx -- UART transmitter, 8 data bits, no parity, 1 stop bit.
//
// A one-clock UART_TX_DV pulse while idle loads UART_TX_DATA; the line then
// carries a start bit (0), the 8 data bits LSB first and a stop bit (1), each
// CLKS_PER_BIT clocks long. UART_TX_DONE pulses for one clock at the end of
// the stop bit, after which the next byte may be given. A UART_TX_DV pulse
// while busy is ignored. The line idles high. The default of 87 clocks per
// bit gives 115,200 baud from the 10 MHz clock of the description.
module uart_tx #(
  parameter int CLKS_PER_BIT = 87
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] uart_tx_data,
  input  logic       uart_tx_dv,
  output logic       tx,
  output logic       uart_tx_done
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);
  logic [9:0]    frame;      // stop, data[7:0], start -- shifted out LSB first
  logic [3:0]    nbits;
  logic          busy;
  logic [CW-1:0] cnt;

  assign busy = (nbits != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      frame        <= '1;
      nbits        <= '0;
      cnt          <= '0;
      tx           <= 1'b1;
      uart_tx_done <= 1'b0;
    end else begin
      uart_tx_done <= 1'b0;
      if (!busy) begin
        tx <= 1'b1;
        if (uart_tx_dv) begin
          frame <= {1'b1, uart_tx_data, 1'b0};
          nbits <= 4'd10;
          cnt   <= '0;
          tx    <= 1'b0;
        end
      end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt   <= '0;
        nbits <= nbits - 1'b1;
        frame <= {1'b1, frame[9:1]};
        tx    <= (nbits == 4'd1) ? 1'b1 : frame[1];
        if (nbits == 4'd1) uart_tx_done <= 1'b1;
      end else cnt <= cnt + 1'b1;
    end
  end
endmodule
