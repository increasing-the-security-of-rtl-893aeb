// fw_stats -- traffic statistics of one firewall direction.
//
// Eighteen 32-bit counters and gauges, updated on the packet clock from event
// pulses of the RX control, rule checker and TX control (index: meaning):
//   0 packets received and buffered     1 bytes received and buffered
//   2 packets transmitted                3 bytes transmitted
//   4 packets blocked, checksum error    5 packets blocked by the rules
//   6 packets dropped, memory full       7 bytes dropped, memory full
//   8-13 verdicts per protocol: ARP, TCP, UDP, ICMP, IPv6, other
//  14 data memory in use (bytes)        15 peak data memory in use
//  16 packets queued                     17 times the memory-full state began
// The description lists the quantities (packets transmitted, blocked for a
// checksum error or by the rules, dropped when the memory is full, protocol
// of the received packets, memory used, received/transmitted amounts); the
// counter set, widths and order here are this design's choice, sized to the
// 576-bit STAT_DATA bus of the description (18 x 32 = 576).
//
// Snapshot handshake across clock domains: the UART controller raises
// REQ_STAT and holds it; after a two-flop synchroniser, its rising edge
// copies all counters into STAT_DATA, and ACK_STAT follows the synchronised
// request. The requester reads STAT_DATA once it sees ACK_STAT high (it does
// not change until the next request), then drops REQ_STAT.
module fw_stats
  import fw_pkg::*;
#(
  parameter int CAW = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ev_rx,          // packet accepted (fw_out)
  input  logic              ev_drop,        // packet refused
  input  logic [15:0]       ev_len,         // its length
  input  logic              ev_verdict,     // fw_completed
  input  logic [1:0]        fw_result,
  input  pck_type_e         fw_pck_type,
  input  logic              ev_sent,        // packet transmitted
  input  logic [15:0]       tx_len,
  input  logic [15:0]       used_memory,
  input  logic [CAW:0]      queued,
  input  logic              mem_full,
  input  logic              req_stat,       // from the UART clock domain
  output logic              ack_stat,
  output logic [STAT_W-1:0] stat_data
);
  logic [31:0] cnt [NSTAT];
  logic [1:0]  req_sync;
  logic        full_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < NSTAT; s++) cnt[s] <= '0;
      req_sync  <= '0;
      ack_stat  <= 1'b0;
      stat_data <= '0;
      full_q    <= 1'b0;
    end else begin
      if (ev_rx) begin
        cnt[S_RX_PKTS]  <= cnt[S_RX_PKTS] + 1;
        cnt[S_RX_BYTES] <= cnt[S_RX_BYTES] + 32'(ev_len);
      end
      if (ev_drop) begin
        cnt[S_DROP_PKTS]  <= cnt[S_DROP_PKTS] + 1;
        cnt[S_DROP_BYTES] <= cnt[S_DROP_BYTES] + 32'(ev_len);
      end
      if (ev_sent) begin
        cnt[S_TX_PKTS]  <= cnt[S_TX_PKTS] + 1;
        cnt[S_TX_BYTES] <= cnt[S_TX_BYTES] + 32'(tx_len);
      end
      if (ev_verdict) begin
        if (fw_result == RES_CHKSUM_ERR) cnt[S_BLK_CHK]  <= cnt[S_BLK_CHK] + 1;
        if (fw_result == RES_RULE_VIOL)  cnt[S_BLK_RULE] <= cnt[S_BLK_RULE] + 1;
        case (fw_pck_type)
          PT_ARP:  cnt[S_ARP]   <= cnt[S_ARP] + 1;
          PT_TCP:  cnt[S_TCP]   <= cnt[S_TCP] + 1;
          PT_UDP:  cnt[S_UDP]   <= cnt[S_UDP] + 1;
          PT_ICMP: cnt[S_ICMP]  <= cnt[S_ICMP] + 1;
          PT_IPV6: cnt[S_IPV6]  <= cnt[S_IPV6] + 1;
          default: cnt[S_OTHER] <= cnt[S_OTHER] + 1;
        endcase
      end
      cnt[S_USED_MEM] <= 32'(used_memory);
      if (32'(used_memory) > cnt[S_PEAK_MEM]) cnt[S_PEAK_MEM] <= 32'(used_memory);
      cnt[S_QUEUED] <= 32'(queued);
      full_q <= mem_full;
      if (mem_full && !full_q) cnt[S_FULL_EVENTS] <= cnt[S_FULL_EVENTS] + 1;

      req_sync <= {req_sync[0], req_stat};
      ack_stat <= req_sync[1];
      if (req_sync[1] && !ack_stat)
        for (int s = 0; s < NSTAT; s++) stat_data[s*32 +: 32] <= cnt[s];
    end
  end
endmodule
