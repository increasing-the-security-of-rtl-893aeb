// uart_controller -- command interpreter of the PC link (UART clock domain).
//
// Bytes from the UART receiver (UART_RX_DATA with a UART_RX_DV pulse) are
// parsed as commands; the statistics answer goes out through the UART
// transmitter (UART_TX_DATA / UART_TX_DV, next byte after UART_TX_DONE).
// The description names the interface (DR_DATA[223:0], DR_ADDR[7:0], DR_WE,
// REQ_STAT, ACK_STAT, STAT_DATA[575:0]) and says that rules are loaded and
// statistics read over this link; the command set below is this design's own:
//   52h 'R', p, a, 28 bytes  write rule a of port p (0 = A, 1 = B); the 224-bit
//                            rule word is sent most significant byte first.
//                            One DR_WE pulse per rule, DR_DATA/DR_ADDR held.
//   4Dh 'M', p, m            list mode of port p: m[0] = 0 whitelist, 1 blacklist
//   53h 'S', p               read statistics of port p: REQ_STAT[p] is raised
//                            and held until ACK_STAT[p] (synchronised here)
//                            is seen; STAT_DATA is then sent as 72 bytes,
//                            least significant byte first; REQ_STAT drops.
// Other command bytes are ignored. The port byte uses only bit 0.
module uart_controller
  import fw_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        uart_rx_data,
  input  logic              uart_rx_dv,
  output logic [7:0]        uart_tx_data,
  output logic              uart_tx_dv,
  input  logic              uart_tx_done,
  output logic [RULE_W-1:0] dr_data,
  output logic [7:0]        dr_addr,
  output logic [1:0]        dr_we,
  output logic [1:0]        blacklist,
  output logic [1:0]        req_stat,
  input  logic [1:0]        ack_stat,
  input  logic [STAT_W-1:0] stat_data_a,
  input  logic [STAT_W-1:0] stat_data_b
);
  localparam logic [7:0] CMD_RULE = 8'h52;
  localparam logic [7:0] CMD_MODE = 8'h4D;
  localparam logic [7:0] CMD_STAT = 8'h53;
  localparam int NB_RULE = RULE_W / 8;   // 28
  localparam int NB_STAT = STAT_W / 8;   // 72

  typedef enum logic [2:0] {C_CMD, C_PORT, C_ADDR, C_DATA, C_MODE, C_WAIT_ACK,
                            C_SEND, C_WAIT_DONE} state_e;
  state_e      state;
  logic [7:0]  cmd;
  logic        port;
  logic [6:0]  nbyte;
  logic [1:0]  ack_s1, ack_s2;
  logic [STAT_W-1:0] snap;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= C_CMD;
      cmd          <= '0;
      port         <= 1'b0;
      nbyte        <= '0;
      ack_s1       <= '0;
      ack_s2       <= '0;
      snap         <= '0;
      dr_data      <= '0;
      dr_addr      <= '0;
      dr_we        <= '0;
      blacklist    <= '0;
      req_stat     <= '0;
      uart_tx_data <= '0;
      uart_tx_dv   <= 1'b0;
    end else begin
      ack_s1     <= ack_stat;
      ack_s2     <= ack_s1;
      dr_we      <= '0;
      uart_tx_dv <= 1'b0;
      case (state)
        C_CMD: if (uart_rx_dv) begin
          cmd <= uart_rx_data;
          if (uart_rx_data == CMD_RULE || uart_rx_data == CMD_MODE || uart_rx_data == CMD_STAT)
            state <= C_PORT;
        end
        C_PORT: if (uart_rx_dv) begin
          port <= uart_rx_data[0];
          if (cmd == CMD_RULE)      state <= C_ADDR;
          else if (cmd == CMD_MODE) state <= C_MODE;
          else begin
            req_stat[uart_rx_data[0]] <= 1'b1;
            state <= C_WAIT_ACK;
          end
        end
        C_ADDR: if (uart_rx_dv) begin
          dr_addr <= uart_rx_data;
          nbyte   <= '0;
          state   <= C_DATA;
        end
        C_DATA: if (uart_rx_dv) begin
          dr_data <= {dr_data[RULE_W-9:0], uart_rx_data};
          nbyte   <= nbyte + 1'b1;
          if (nbyte == 7'(NB_RULE - 1)) begin
            dr_we[port] <= 1'b1;
            state       <= C_CMD;
          end
        end
        C_MODE: if (uart_rx_dv) begin
          blacklist[port] <= uart_rx_data[0];
          state <= C_CMD;
        end
        C_WAIT_ACK: if (ack_s2[port]) begin
          snap     <= port ? stat_data_b : stat_data_a;
          req_stat <= '0;
          nbyte    <= '0;
          state    <= C_SEND;
        end
        C_SEND: if (!ack_s2[port]) begin        // handshake closed
          uart_tx_data <= snap[7:0];
          uart_tx_dv   <= 1'b1;
          snap         <= {8'd0, snap[STAT_W-1:8]};
          nbyte        <= nbyte + 1'b1;
          state        <= C_WAIT_DONE;
        end
        default: if (uart_tx_done)             // C_WAIT_DONE
          state <= (nbyte == 7'(NB_STAT)) ? C_CMD : C_SEND;
      endcase
    end
  end
endmodule
