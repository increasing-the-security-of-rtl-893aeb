// tb_pkt_pkg -- testbench helpers: builds Ethernet frames and rule words.
//
// make_frame() returns the bytes of an Ethernet II frame as the MAC hands it
// over (destination MAC first, no preamble, no FCS), padded to at least 60
// bytes. For IPv4 it writes a 20-byte header with a correct header checksum
// (or a corrupted one when bad_chk is set) and, for TCP/UDP, the two port
// numbers. For ARP it writes a minimal ARP body. The expected header fields are
// the arguments themselves, so checks do not depend on the design under test.
package tb_pkt_pkg;
  typedef logic [7:0] bq_t[$];

  localparam int K_ARP = 0, K_TCP = 1, K_UDP = 2, K_ICMP = 3, K_IPV6 = 4, K_OTHER = 5;

  function automatic bq_t make_frame(input int kind, input logic [47:0] mac_d, mac_s,
                                     input logic [31:0] ip_s, ip_d,
                                     input logic [15:0] sport, dport,
                                     input int len, input bit bad_chk = 0);
    bq_t q;
    logic [15:0] et;
    logic [7:0]  proto;
    logic [31:0] s;
    for (int i = 5; i >= 0; i--) q.push_back(mac_d[i*8 +: 8]);
    for (int i = 5; i >= 0; i--) q.push_back(mac_s[i*8 +: 8]);
    case (kind)
      K_ARP:   et = 16'h0806;
      K_IPV6:  et = 16'h86DD;
      K_OTHER: et = 16'h88B5;
      default: et = 16'h0800;
    endcase
    q.push_back(et[15:8]); q.push_back(et[7:0]);
    if (et == 16'h0800) begin
      proto = (kind == K_TCP) ? 8'd6 : (kind == K_UDP) ? 8'd17 : 8'd1;
      begin
        logic [7:0] h[20];
        logic [15:0] tl;
        tl = 16'(len - 14);
        h = '{8'h45, 8'h00, tl[15:8], tl[7:0], 8'h12, 8'h34, 8'h40, 8'h00, 8'd64, proto,
              8'h00, 8'h00, ip_s[31:24], ip_s[23:16], ip_s[15:8], ip_s[7:0],
              ip_d[31:24], ip_d[23:16], ip_d[15:8], ip_d[7:0]};
        s = 0;
        for (int i = 0; i < 20; i += 2) s += 32'({h[i], h[i+1]});
        s = (s & 32'hFFFF) + (s >> 16);
        s = (s & 32'hFFFF) + (s >> 16);
        s = ~s;
        h[10] = s[15:8]; h[11] = s[7:0] ^ (bad_chk ? 8'h01 : 8'h00);
        foreach (h[i]) q.push_back(h[i]);
      end
      if (kind == K_TCP || kind == K_UDP) begin
        q.push_back(sport[15:8]); q.push_back(sport[7:0]);
        q.push_back(dport[15:8]); q.push_back(dport[7:0]);
      end
    end else if (kind == K_ARP) begin
      logic [7:0] a[8] = '{8'h00, 8'h01, 8'h08, 8'h00, 8'h06, 8'h04, 8'h00, 8'h01};
      foreach (a[i]) q.push_back(a[i]);
    end
    while (q.size() < len) q.push_back(8'($urandom));
    return q;
  endfunction

  // rule word, layout of fw_pkg::rule_t
  function automatic logic [223:0] make_rule(input logic [31:0] src_lo, src_hi, dst_lo, dst_hi,
                                             input logic [15:0] sp_lo, sp_hi, dp_lo, dp_hi,
                                             input logic [7:0] proto, input bit any_proto,
                                             input bit valid = 1);
    return {src_lo, src_hi, dst_lo, dst_hi, sp_lo, sp_hi, dp_lo, dp_hi, proto,
            6'd0, any_proto, valid, 16'd0};
  endfunction
endpackage
