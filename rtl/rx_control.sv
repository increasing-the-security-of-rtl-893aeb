// rx_control -- receive side of one firewall direction.
//
// Takes the byte stream of the receiving MAC (RX_DATA with RX_DV, RX_LAST on
// the final byte, RX_ERR for a bad frame; no back-pressure) and:
//  * stores every byte of an accepted packet in the data memory at i, i+1, ...
//    (step R2) and passes the same byte straight on to the packet analysis
//    (FW_EN, FW_DATA, BYTE_NUMBER);
//  * on the last byte advances the data pointer i by the length n and the
//    control-word pointer j by one (R5), adds n to the used-memory count
//    (R4), and in the next cycle writes {00h, i, n} at control address j
//    (R3) and pulses FW_OUT: one cycle after the last byte, as described;
//  * when the rule checker reports (FW_COMPLETED), writes the control word
//    again with the verdict's status byte (37h, 2Ch or 21h) (R6), one cycle
//    later;
//  * when the TX control reports a packet sent or discarded (TX_COMPLETED,
//    with TX_CADDR and TX_PCK_LENGTH), clears that control word (R9),
//    subtracts the length from the used-memory count (R10) and pulses TX_ACK.
//    R3 and R6 have priority on the control-memory write port; R9 waits.
//  * applies the occupancy hysteresis (R7/R8): once the used memory reaches
//    HI_MARK (12 kB) no new packet is accepted until it falls below LO_MARK
//    (5 kB). A packet is also refused when all control words are in use. A
//    refused packet is dropped whole and only counted.
// Thresholds and sizes follow the description; taking "kB" as 1024 bytes,
// testing the marks continuously rather than only after each verdict, and
// the control word being cleared at R9 are this design's choices. Packets
// must be at least 20 bytes long (the MAC passes only frames of 60 bytes or
// more) so that one verdict is back before the next FW_OUT.
module rx_control
  import fw_pkg::*;
#(
  parameter int DDEPTH  = 16384,
  parameter int CDEPTH  = 1024,
  parameter int HI_MARK = 12 * 1024,
  parameter int LO_MARK = 5 * 1024,
  parameter int DAW     = $clog2(DDEPTH),
  parameter int CAW     = $clog2(CDEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  // from the receiving MAC
  input  logic [7:0]     rx_data,
  input  logic           rx_dv,
  input  logic           rx_last,
  input  logic           rx_err,
  // data memory write port
  output logic [DAW-1:0] daddr_in,
  output logic [7:0]     ddata_in,
  output logic           dwe,
  // control memory write port
  output logic [CAW-1:0] caddr_in,
  output ctrl_word_t     cdata_in,
  output logic           cwe,
  // to packet analysis / rule checker
  output logic           fw_en,
  output logic [7:0]     fw_data,
  output logic [15:0]    byte_number,
  output logic           fw_err,
  output logic           fw_out,
  input  logic [1:0]     fw_result,
  input  logic           fw_completed,
  // from/to TX control
  input  logic [CAW-1:0] tx_caddr,
  input  logic [15:0]    tx_pck_length,
  input  logic           tx_completed,
  output logic           tx_ack,
  // state and events for the statistics
  output logic [15:0]    used_memory,
  output logic [CAW:0]   queued,
  output logic           mem_full,
  output logic           ev_drop,       // a packet was refused (pulse)
  output logic [15:0]    ev_len         // length of the received/dropped packet
);
  logic           in_pkt, dropping;
  logic [15:0]    bn;
  logic [DAW-1:0] wr_ptr;     // i
  logic [CAW-1:0] cw_ptr;     // j
  // packet under check
  logic [CAW-1:0] chk_j;
  logic [15:0]    chk_i, chk_n;

  logic sop, accept_sop, take, fin;
  assign sop        = rx_dv && !in_pkt;
  assign accept_sop = !mem_full && (queued < (CAW+1)'(CDEPTH));
  assign take       = rx_dv && !rst && (in_pkt ? !dropping : accept_sop);
  assign fin        = take && rx_last;

  assign fw_en       = take;
  assign fw_data     = rx_data;
  assign byte_number = in_pkt ? bn : 16'd0;
  assign fw_err      = rx_err;
  assign dwe         = take;
  assign ddata_in    = rx_data;
  assign daddr_in    = wr_ptr + DAW'(byte_number);

  // control-memory write port: R3 > R6 > R9
  logic r9_go;
  assign r9_go = tx_completed && !tx_ack && !fw_out && !fw_completed && !rst;

  always_comb begin
    cwe      = 1'b0;
    caddr_in = chk_j;
    cdata_in = '0;
    if (rst) begin
      cwe      = 1'b0;                      // nothing is written during reset
    end else if (fw_out) begin
      cwe      = 1'b1;
      cdata_in = '{status: ST_QUARANTINE, start: chk_i, length: chk_n};
    end else if (fw_completed) begin
      cwe      = 1'b1;
      cdata_in = '{status: status_of(fw_result), start: chk_i, length: chk_n};
    end else if (r9_go) begin
      cwe      = 1'b1;
      caddr_in = tx_caddr;
    end
  end

  logic [15:0] add_n, sub_m;
  assign add_n = fin ? byte_number + 16'd1 : 16'd0;
  assign sub_m = r9_go ? tx_pck_length : 16'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_pkt      <= 1'b0;
      dropping    <= 1'b0;
      bn          <= '0;
      wr_ptr      <= '0;
      cw_ptr      <= '0;
      chk_j       <= '0;
      chk_i       <= '0;
      chk_n       <= '0;
      fw_out      <= 1'b0;
      tx_ack      <= 1'b0;
      used_memory <= '0;
      queued      <= '0;
      mem_full    <= 1'b0;
      ev_drop     <= 1'b0;
      ev_len      <= '0;
    end else begin
      fw_out  <= 1'b0;
      ev_drop <= 1'b0;
      tx_ack  <= r9_go;
      if (rx_dv) begin
        if (sop) dropping <= !accept_sop;
        in_pkt <= !rx_last;
        bn     <= rx_last ? 16'd0 : byte_number + 16'd1;
        if (rx_last && !take) begin
          ev_drop <= 1'b1;
          ev_len  <= byte_number + 16'd1;
        end
      end
      if (fin) begin                          // R4, R5 now; R3 and FW_OUT next
        chk_j  <= cw_ptr;
        chk_i  <= 16'(wr_ptr);
        chk_n  <= byte_number + 16'd1;
        ev_len <= byte_number + 16'd1;
        wr_ptr <= wr_ptr + DAW'(byte_number) + 1'b1;
        cw_ptr <= cw_ptr + 1'b1;
        fw_out <= 1'b1;
      end
      used_memory <= used_memory + add_n - sub_m;
      queued      <= queued + (CAW+1)'(fin) - (CAW+1)'(r9_go);
      // R7 / R8 hysteresis
      if (used_memory >= 16'(HI_MARK))     mem_full <= 1'b1;
      else if (used_memory < 16'(LO_MARK)) mem_full <= 1'b0;
    end
  end

  a_tx_ack_pulse: assert property (@(posedge clk) disable iff (rst) tx_ack |=> !tx_ack);
  a_one_verdict:  assert property (@(posedge clk) disable iff (rst) !(fw_out && fw_completed));
endmodule
