// fw_pkg -- types and constants shared by the firewall blocks.
//
// Control word (40 bits, one per buffered packet) is {STATUS BYTE, PACKET START
// ADDRESS, PACKET LENGTH}, 8+16+16 bits, status in the top byte. Status codes
// 00h (quarantined, no verdict yet), 37h (allowed), 2Ch (blocked by the rules)
// and 21h (blocked, checksum/frame error) follow the design description.
// FW_RESULT (0 checksum error, 1 rule violation, 3 allowed) and FW_PCK_TYPE
// (0 ARP, 1 TCP, 2 UDP, 3 ICMP, 4 IPv6, 5 other) also follow it.
//
// The 224-bit rule word layout is this design's own choice (the description
// gives only its width and the fields it ranges over): inclusive ranges for
// IP source, IP destination, source port and destination port, an 8-bit
// transport-protocol number and a flag byte (bit 0 valid, bit 1 any protocol).
package fw_pkg;

  // ---- control word --------------------------------------------------------
  localparam logic [7:0] ST_QUARANTINE = 8'h00;
  localparam logic [7:0] ST_PASS       = 8'h37;
  localparam logic [7:0] ST_BLOCK_RULE = 8'h2C;
  localparam logic [7:0] ST_BLOCK_CHK  = 8'h21;

  typedef struct packed {
    logic [7:0]  status;
    logic [15:0] start;
    logic [15:0] length;
  } ctrl_word_t;                       // 40 bits

  // ---- verdict -------------------------------------------------------------
  typedef enum logic [1:0] {
    RES_CHKSUM_ERR = 2'd0,
    RES_RULE_VIOL  = 2'd1,
    RES_PASS       = 2'd3
  } fw_result_e;

  typedef enum logic [2:0] {
    PT_ARP   = 3'd0,
    PT_TCP   = 3'd1,
    PT_UDP   = 3'd2,
    PT_ICMP  = 3'd3,
    PT_IPV6  = 3'd4,
    PT_OTHER = 3'd5
  } pck_type_e;

  function automatic logic [7:0] status_of(input logic [1:0] res);
    case (res)
      RES_PASS:       return ST_PASS;
      RES_CHKSUM_ERR: return ST_BLOCK_CHK;
      default:        return ST_BLOCK_RULE;
    endcase
  endfunction

  // ---- network packet fields (output of packet analysis) -------------------
  typedef struct packed {
    logic [47:0] mac_dest;
    logic [47:0] mac_source;
    logic [15:0] lev3_protocol;
    logic [31:0] ip_source;
    logic [31:0] ip_dest;
    logic [7:0]  lev4_protocol;
    logic [15:0] source_port;
    logic [15:0] dest_port;
  } pkt_fields_t;

  localparam logic [15:0] ETH_IPV4 = 16'h0800;
  localparam logic [15:0] ETH_ARP  = 16'h0806;
  localparam logic [15:0] ETH_IPV6 = 16'h86DD;
  localparam logic [7:0]  IP_ICMP  = 8'd1;
  localparam logic [7:0]  IP_TCP   = 8'd6;
  localparam logic [7:0]  IP_UDP   = 8'd17;

  // ---- firewall rule (224 bits) --------------------------------------------
  localparam int RULE_W = 224;

  typedef struct packed {
    logic [31:0] ip_src_lo;
    logic [31:0] ip_src_hi;
    logic [31:0] ip_dst_lo;
    logic [31:0] ip_dst_hi;
    logic [15:0] sport_lo;
    logic [15:0] sport_hi;
    logic [15:0] dport_lo;
    logic [15:0] dport_hi;
    logic [7:0]  proto;
    logic [7:0]  flags;                // [0] valid, [1] any protocol
    logic [15:0] reserved;
  } rule_t;

  function automatic logic rule_match(input rule_t r, input pkt_fields_t f);
    return r.flags[0]
        && (r.flags[1] || r.proto == f.lev4_protocol)
        && f.ip_source   >= r.ip_src_lo && f.ip_source   <= r.ip_src_hi
        && f.ip_dest     >= r.ip_dst_lo && f.ip_dest     <= r.ip_dst_hi
        && f.source_port >= r.sport_lo  && f.source_port <= r.sport_hi
        && f.dest_port   >= r.dport_lo  && f.dest_port   <= r.dport_hi;
  endfunction

  // ---- statistics (18 x 32-bit counters = STAT_DATA[575:0]) -----------------
  localparam int NSTAT = 18;
  localparam int STAT_W = NSTAT * 32;  // 576
  typedef enum int {
    S_RX_PKTS = 0, S_RX_BYTES, S_TX_PKTS, S_TX_BYTES, S_BLK_CHK, S_BLK_RULE,
    S_DROP_PKTS, S_DROP_BYTES, S_ARP, S_TCP, S_UDP, S_ICMP, S_IPV6, S_OTHER,
    S_USED_MEM, S_PEAK_MEM, S_QUEUED, S_FULL_EVENTS
  } stat_idx_e;

endpackage
