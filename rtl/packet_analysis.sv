// packet_analysis -- extracts the header fields of a packet while it streams in.
//
// The RX control presents every accepted byte once: FW_DATA with FW_EN high
// and BYTE_NUMBER its position in the frame (0 = first byte of the destination
// MAC address; preamble and FCS are not part of the stream). Each field
// register captures its bytes as they pass, so the fields are complete on the
// clock edge that takes the last byte and are valid while FW_OUT is high, one
// cycle later: the block adds no latency of its own, as the description asks.
//
// Fields (all big-endian, as on the wire, standard Ethernet II / IPv4
// offsets): MAC_DEST bytes 0-5, MAC_SOURCE 6-11, LEV3_PROTOCOL (EtherType)
// 12-13; for IPv4: LEV4_PROTOCOL byte 23, IP_SOURCE 26-29, IP_DEST 30-33 and,
// for TCP and UDP, SOURCE_PORT and DEST_PORT in the first four bytes after the
// IP header (its length taken from the IHL field). Fields a packet does not
// carry read 0; all are cleared when byte 0 arrives.
//
// The block also classifies the packet into FW_PCK_TYPE (ARP, TCP, UDP, ICMP,
// IPv6, other) and checks the IPv4 header checksum with a running ones'-
// complement sum. CHKSUM_OK is low if the IPv4 header sum is wrong or if
// FW_ERR (the MAC's receive-error flag) was seen on any byte. Checking the
// IPv4 header checksum here is this design's reading of "packets blocked due
// to checksum errors".
module packet_analysis
  import fw_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        fw_en,
  input  logic [7:0]  fw_data,
  input  logic [15:0] byte_number,
  input  logic        fw_err,
  output pkt_fields_t fields,
  output pck_type_e   pck_type,
  output logic        chksum_ok
);
  logic [3:0]  ihl;
  logic [19:0] sum;          // running sum of 16-bit header words
  logic        err_seen;
  logic        hdr_short;    // IPv4 frame ended before the header did

  logic        is_ipv4;
  logic [15:0] l4_off;
  logic [15:0] hdr_end;
  assign is_ipv4 = (fields.lev3_protocol == ETH_IPV4);
  assign l4_off  = 16'd14 + {10'd0, ihl, 2'b00};
  assign hdr_end = (byte_number == 16'd14) ? 16'd14 + {10'd0, fw_data[3:0], 2'b00} : l4_off;

  always_ff @(posedge clk) begin
    if (rst) begin
      fields    <= '0;
      ihl       <= '0;
      sum       <= '0;
      err_seen  <= 1'b0;
      hdr_short <= 1'b0;
    end else if (fw_en) begin
      if (byte_number == 16'd0) begin
        fields     <= '0;
        fields.mac_dest <= {40'd0, fw_data};
        sum        <= '0;
        ihl        <= '0;
        err_seen   <= fw_err;
        hdr_short  <= 1'b1;
      end else begin
        if (fw_err) err_seen <= 1'b1;
        if (byte_number < 16'd6)
          fields.mac_dest <= {fields.mac_dest[39:0], fw_data};
        else if (byte_number < 16'd12)
          fields.mac_source <= {fields.mac_source[39:0], fw_data};
        else if (byte_number < 16'd14)
          fields.lev3_protocol <= {fields.lev3_protocol[7:0], fw_data};
        else if (is_ipv4) begin
          if (byte_number == 16'd14) ihl <= fw_data[3:0];
          if (byte_number < hdr_end)
            sum <= sum + (byte_number[0] ? {12'd0, fw_data} : {4'd0, fw_data, 8'd0});
          if (byte_number == hdr_end - 16'd1) hdr_short <= 1'b0;
          if (byte_number == 16'd23) fields.lev4_protocol <= fw_data;
          if (byte_number >= 16'd26 && byte_number < 16'd30)
            fields.ip_source <= {fields.ip_source[23:0], fw_data};
          if (byte_number >= 16'd30 && byte_number < 16'd34)
            fields.ip_dest <= {fields.ip_dest[23:0], fw_data};
          if (byte_number >= 16'd15 && ihl >= 4'd5 &&
              (fields.lev4_protocol == IP_TCP || fields.lev4_protocol == IP_UDP)) begin
            if (byte_number == l4_off || byte_number == l4_off + 16'd1)
              fields.source_port <= {fields.source_port[7:0], fw_data};
            if (byte_number == l4_off + 16'd2 || byte_number == l4_off + 16'd3)
              fields.dest_port <= {fields.dest_port[7:0], fw_data};
          end
        end
      end
    end
  end

  // classification
  always_comb begin
    unique case (fields.lev3_protocol)
      ETH_ARP:  pck_type = PT_ARP;
      ETH_IPV6: pck_type = PT_IPV6;
      ETH_IPV4:
        case (fields.lev4_protocol)
          IP_TCP:  pck_type = PT_TCP;
          IP_UDP:  pck_type = PT_UDP;
          IP_ICMP: pck_type = PT_ICMP;
          default: pck_type = PT_OTHER;
        endcase
      default:  pck_type = PT_OTHER;
    endcase
  end

  // ones'-complement fold of the header sum; a correct header sums to FFFFh
  logic [16:0] fold1;
  logic [15:0] fold2;
  always_comb begin
    fold1 = {1'b0, sum[15:0]} + {13'd0, sum[19:16]};
    fold2 = fold1[15:0] + {15'd0, fold1[16]};
    chksum_ok = !err_seen && (!is_ipv4 || (!hdr_short && ihl >= 4'd5 && fold2 == 16'hFFFF));
  end
endmodule
