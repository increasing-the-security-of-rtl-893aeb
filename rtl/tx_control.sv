// tx_control -- transmit side of one firewall direction.
//
// Works through the control-word queue in order, at address k (steps T1-T5):
//  T1/T2  the word at k is read every cycle until its STATUS BYTE is not 00h
//         (the verdict is in);
//  T3/T4  status 37h: the PACKET LENGTH bytes from PACKET START ADDRESS on are
//         read from the data memory and sent to the MAC as a byte stream
//         (TX_DATA, TX_DV, TX_LAST on the final byte; a byte moves when TX_DV
//         and TX_READY are both high, AXI-stream style). Any other status
//         (2Ch, 21h): the packet is skipped;
//  then   TX_COMPLETED is held high, with TX_CADDR = k and TX_PCK_LENGTH, until
//         the RX control answers with TX_ACK (it frees the slot, R9/R10);
//  T5     k is incremented.
// The data-memory read address is the next byte's address whenever a byte is
// taken, so a byte is sent every cycle in which TX_READY is high.
// Reads of both memories take one cycle. From the cycle the verdict is written
// into the control memory, the first byte is offered 4 cycles later. TX_ERR
// is never raised. The exact handshake timing is this design's choice.
module tx_control
  import fw_pkg::*;
#(
  parameter int DDEPTH = 16384,
  parameter int CDEPTH = 1024,
  parameter int DAW    = $clog2(DDEPTH),
  parameter int CAW    = $clog2(CDEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  // control memory read port
  output logic [CAW-1:0] caddr_out,
  input  ctrl_word_t     cdata_out,
  // data memory read port
  output logic [DAW-1:0] daddr_out,
  input  logic [7:0]     ddata_out,
  // to the transmitting MAC
  output logic [7:0]     tx_data,
  output logic           tx_dv,
  output logic           tx_last,
  output logic           tx_err,
  input  logic           tx_ready,
  // to/from RX control
  output logic [CAW-1:0] tx_caddr,
  output logic [15:0]    tx_pck_length,
  output logic           tx_completed,
  input  logic           tx_ack,
  // event for the statistics: a packet left (pulse, with tx_pck_length)
  output logic           ev_sent
);
  typedef enum logic [1:0] {T_READ, T_CHECK, T_SEND, T_DONE} state_e;
  state_e         state;
  logic [CAW-1:0] k;
  logic [DAW-1:0] base;
  logic [15:0]    idx, len;
  logic           data_ok;
  logic           take;
  logic [15:0]    idx_next;

  assign caddr_out     = k;
  assign tx_caddr      = k;
  assign tx_pck_length = len;
  assign tx_completed  = (state == T_DONE);
  assign tx_err        = 1'b0;
  assign tx_data       = ddata_out;
  assign tx_dv         = (state == T_SEND) && data_ok;
  assign tx_last       = tx_dv && (idx == len - 16'd1);
  assign take          = tx_dv && tx_ready;
  assign idx_next      = take ? idx + 16'd1 : idx;
  assign daddr_out     = base + DAW'(idx_next);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= T_READ;
      k       <= '0;
      base    <= '0;
      idx     <= '0;
      len     <= '0;
      data_ok <= 1'b0;
      ev_sent <= 1'b0;
    end else begin
      ev_sent <= 1'b0;
      case (state)
        T_READ:  state <= T_CHECK;                  // address k is out
        T_CHECK: if (cdata_out.status != ST_QUARANTINE) begin
          len  <= cdata_out.length;
          base <= DAW'(cdata_out.start);
          idx  <= '0;
          data_ok <= 1'b0;
          state <= (cdata_out.status == ST_PASS && cdata_out.length != 0) ? T_SEND : T_DONE;
        end
        T_SEND: begin
          data_ok <= 1'b1;
          idx     <= idx_next;
          if (take && tx_last) begin
            ev_sent <= 1'b1;
            state   <= T_DONE;
          end
        end
        default: if (tx_ack) begin                  // T5
          k     <= k + 1'b1;
          state <= T_READ;
        end
      endcase
    end
  end

  a_dv_stable: assert property (@(posedge clk) disable iff (rst)
                 tx_dv && !tx_ready |=> tx_dv && $stable(tx_data));
endmodule
