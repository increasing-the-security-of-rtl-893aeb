// tb_packet_analysis -- self-checking test of header-field extraction.
// Streams frames of every class (TCP, UDP, ICMP, ARP, IPv6, other) with
// random addresses and ports, one byte per cycle with random idle cycles, and
// checks the fields, the packet class and the checksum flag in the cycle after
// the last byte. Also checks a corrupted IPv4 checksum and a MAC error flag.
module tb_packet_analysis;
  import fw_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst = 1, fw_en = 0, fw_err = 0;
  logic [7:0]  fw_data = '0;
  logic [15:0] byte_number = '0;
  pkt_fields_t fields;
  pck_type_e   pck_type;
  logic        chksum_ok;
  int checks = 0, failures = 0;

  packet_analysis dut (.*);
  always #4 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [63:0] got, want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: got %h want %h", what, got, want);
    end
  endtask

  task automatic run(input int kind, input bit bad_chk, input bit err);
    logic [47:0] md, ms;
    logic [31:0] is, id;
    logic [15:0] sp, dp;
    bq_t q;
    int len;
    md = {$urandom, $urandom}; ms = {$urandom, $urandom};
    is = $urandom; id = $urandom; sp = 16'($urandom); dp = 16'($urandom);
    len = 60 + ($urandom % 40);
    q = make_frame(kind, md, ms, is, id, sp, dp, len, bad_chk);
    foreach (q[i]) begin
      @(negedge clk);
      fw_en = 1; fw_data = q[i]; byte_number = 16'(i);
      fw_err = err && (i == q.size() - 1);
      if ($urandom % 4 == 0) begin
        @(negedge clk); fw_en = 0; fw_err = 0;
      end
    end
    @(negedge clk); fw_en = 0; fw_err = 0;
    check("mac_dest", 64'(fields.mac_dest), 64'(md));
    check("mac_source", 64'(fields.mac_source), 64'(ms));
    case (kind)
      K_TCP, K_UDP, K_ICMP: begin
        check("lev3", 64'(fields.lev3_protocol), 64'h0800);
        check("ip_src", 64'(fields.ip_source), 64'(is));
        check("ip_dst", 64'(fields.ip_dest), 64'(id));
        check("lev4", 64'(fields.lev4_protocol), (kind == K_TCP) ? 6 : (kind == K_UDP) ? 17 : 1);
        check("sport", 64'(fields.source_port), (kind == K_ICMP) ? 0 : 64'(sp));
        check("dport", 64'(fields.dest_port),   (kind == K_ICMP) ? 0 : 64'(dp));
      end
      default: begin
        check("ip_src0", 64'(fields.ip_source), 0);
        check("sport0", 64'(fields.source_port), 0);
      end
    endcase
    check("type", 64'(pck_type), 64'(kind));
    check("chk", 64'(chksum_ok), 64'(!bad_chk && !err));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 60; n++) run(n % 6, 0, 0);
    run(K_TCP, 1, 0);
    run(K_UDP, 1, 0);
    run(K_UDP, 0, 1);
    run(K_ARP, 0, 1);
    run(K_TCP, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
