// uart_rx -- UART receiver, 8 data bits, no parity, 1 stop bit.
//
// The serial input is synchronised with two flip-flops. A falling edge starts
// a frame; the start bit is checked at its middle and each data bit (LSB
// first) is sampled CLKS_PER_BIT clocks later. After the stop bit's middle,
// UART_RX_DATA holds the byte and UART_RX_DV is high for one clock. A frame
// whose start bit is not low at mid-bit is ignored. The default of 87 clocks
// per bit is 115,200 baud from the 10 MHz UART clock of the description (0.2%
// fast); the sampling scheme is this design's choice.
module uart_rx #(
  parameter int CLKS_PER_BIT = 87
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] uart_rx_data,
  output logic       uart_rx_dv
);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  localparam int CW = $clog2(CLKS_PER_BIT + 1);
  state_e      state;
  logic [1:0]  sync;
  logic [CW-1:0] cnt;
  logic [2:0]  bitn;
  logic [7:0]  shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= IDLE;
      sync         <= 2'b11;
      cnt          <= '0;
      bitn         <= '0;
      shreg        <= '0;
      uart_rx_data <= '0;
      uart_rx_dv   <= 1'b0;
    end else begin
      sync       <= {sync[0], rx};
      uart_rx_dv <= 1'b0;
      case (state)
        IDLE: if (!sync[1]) begin
          cnt   <= '0;
          state <= START;
        end
        START: if (cnt == CW'(CLKS_PER_BIT / 2)) begin
          cnt   <= '0;
          bitn  <= '0;
          state <= sync[1] ? IDLE : DATA;
        end else cnt <= cnt + 1'b1;
        DATA: if (cnt == CW'(CLKS_PER_BIT - 1)) begin
          cnt   <= '0;
          shreg <= {sync[1], shreg[7:1]};
          bitn  <= bitn + 1'b1;
          if (bitn == 3'd7) state <= STOP;
        end else cnt <= cnt + 1'b1;
        default: if (cnt == CW'(CLKS_PER_BIT - 1)) begin
          state <= IDLE;
          if (sync[1]) begin
            uart_rx_data <= shreg;
            uart_rx_dv   <= 1'b1;
          end
        end else cnt <= cnt + 1'b1;
      endcase
    end
  end
endmodule
