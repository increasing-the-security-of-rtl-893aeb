// tb_fw_port -- end-to-end test of one filtering direction at full size.
// Loads rules through the UART-side write port, streams frames into the RX
// side and checks the TX side against a reference model kept here:
//  * allowed frames leave byte-exact and in order, blocked ones never do;
//  * whitelist mode (only rule matches pass) and blacklist mode (rule matches
//    are blocked), a bad IPv4 checksum and a MAC error flag (always blocked);
//  * the first byte of an allowed frame leaves 23 cycles after its last byte
//    when the transmit side is idle (1 + 18 + 4);
//  * with the transmitter stalled, the 12 kB mark is reached, further frames
//    are dropped, and reception resumes once the buffer drains below 5 kB;
//  * statistics read through the REQ_STAT/ACK_STAT handshake match.
module tb_fw_port;
  import fw_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst = 1, clk_uart = 0;
  logic [7:0] rx_data = '0; logic rx_dv = 0, rx_last = 0, rx_err = 0;
  logic [7:0] tx_data; logic tx_dv, tx_last, tx_err; logic tx_ready = 1;
  logic [7:0] dr_addr = '0; logic [RULE_W-1:0] dr_data = '0; logic dr_we = 0;
  logic blacklist = 0, req_stat = 0, ack_stat;
  logic [STAT_W-1:0] stat_data;
  int checks = 0, failures = 0;

  fw_port dut (.*);
  always #4  clk = ~clk;
  always #50 clk_uart = ~clk_uart;

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ------------------------------------------------------
  logic [223:0] rules [256];
  function automatic bit rule_hit(logic [31:0] is, id, logic [7:0] pr, logic [15:0] sp, dp);
    for (int r = 0; r < 256; r++) begin
      logic [223:0] w = rules[r];
      if (w[16] && (w[17] || w[31:24] == pr) && is >= w[223:192] && is <= w[191:160] &&
          id >= w[159:128] && id <= w[127:96] && sp >= w[95:80] && sp <= w[79:64] &&
          dp >= w[63:48] && dp <= w[47:32]) return 1;
    end
    return 0;
  endfunction

  bq_t expected[$];
  int n_sent = 0, n_pass = 0, n_rule = 0, n_chk = 0, n_drop = 0, n_full = 0;

  // ---- output monitor -------------------------------------------------------
  bq_t cur;
  int  t_last_rx, lat_seen = 0;
  bit  measure = 0;
  always @(posedge clk) if (!rst && tx_dv && tx_ready) begin
    if (measure && cur.size() == 0) begin
      chk("latency 23 cycles", ($time - t_last_rx) == 23 * 8);
      lat_seen++;
      measure = 0;
    end
    cur.push_back(tx_data);
    if (tx_last) begin
      chk("unexpected frame", expected.size() > 0);
      if (expected.size() > 0) chk("frame contents", cur == expected.pop_front());
      cur.delete();
    end
  end

  task automatic write_rule(input int a, input logic [223:0] w);
    rules[a] = w;
    @(negedge clk_uart); dr_addr = 8'(a); dr_data = w; dr_we = 1;
    @(negedge clk_uart); dr_we = 0;
  endtask

  // send one frame; expect_verdict: -1 = dropped (memory full), else result
  task automatic send(input int kind, input logic [31:0] is, id, input logic [15:0] sp, dp,
                      input int len, input bit bad = 0, input bit err = 0, input bit drop = 0);
    bq_t q = make_frame(kind, 48'h1df7934ebba5, 48'h795cfd81f26e, is, id, sp, dp, len, bad);
    bit pass;
    logic [7:0] pr = (kind == K_TCP) ? 8'd6 : (kind == K_UDP) ? 8'd17 : (kind == K_ICMP) ? 8'd1 : 8'd0;
    bit ip = (kind == K_TCP || kind == K_UDP || kind == K_ICMP);
    bit m = rule_hit(ip ? is : 0, ip ? id : 0, pr, (kind == K_TCP || kind == K_UDP) ? sp : 0,
                    (kind == K_TCP || kind == K_UDP) ? dp : 0);
    bad = bad && ip;                 // only an IPv4 header carries a checksum
    pass = !bad && !err && (m ^ blacklist);
    if (drop) n_drop++;
    else if (bad || err) n_chk++;
    else if (pass) begin n_pass++; expected.push_back(q); end
    else n_rule++;
    n_sent++;
    foreach (q[i]) begin
      @(negedge clk); rx_dv = 1; rx_data = q[i]; rx_last = (i == q.size() - 1);
      rx_err = err && rx_last;
    end
    @(negedge clk); rx_dv = 0; rx_last = 0; rx_err = 0;
    t_last_rx = $time - 4;
  endtask

  task automatic read_stats(output logic [31:0] s [NSTAT]);
    @(negedge clk_uart); req_stat = 1;
    do @(negedge clk_uart); while (!ack_stat);
    for (int i = 0; i < NSTAT; i++) s[i] = stat_data[i*32 +: 32];
    req_stat = 0;
    do @(negedge clk_uart); while (ack_stat);
  endtask

  logic [31:0] st [NSTAT];
  initial begin
    for (int r = 0; r < 256; r++) rules[r] = '0;
    repeat (3) @(negedge clk_uart);
    rst = 0;
    // whitelist: LAN 192.168.34.0/24 may reach TCP ports 80..443 anywhere,
    // UDP 53 to 8.8.8.8, and ARP (no IP fields: all zero) at the last rule
    write_rule(0, make_rule(32'hC0A8_2200, 32'hC0A8_22FF, 32'h0, 32'hFFFF_FFFF,
                            16'd0, 16'hFFFF, 16'd80, 16'd443, 8'd6, 0));
    write_rule(17, make_rule(32'hC0A8_2200, 32'hC0A8_22FF, 32'h0808_0808, 32'h0808_0808,
                             16'd0, 16'hFFFF, 16'd53, 16'd53, 8'd17, 0));
    write_rule(255, make_rule(32'h0, 32'h0, 32'h0, 32'h0, 16'd0, 16'd0, 16'd0, 16'd0, 8'd0, 1));
    repeat (20) @(negedge clk);
    // single frame on an idle path: latency
    measure = 1;
    send(K_TCP, 32'hC0A8_2256, 32'hD515_89CD, 16'd87, 16'd113, 60);
    repeat (200) @(negedge clk);
    chk("latency measured", lat_seen == 1);
    // mixed traffic, whitelist
    for (int n = 0; n < 60; n++) begin
      automatic int k = n % 6;
      automatic logic [31:0] is = ($urandom % 3 == 0) ? $urandom : {24'hC0A822, 8'($urandom)};
      automatic logic [31:0] id = ($urandom % 4 == 0) ? 32'h0808_0808 : $urandom;
      automatic logic [15:0] dp = ($urandom % 2) ? 16'(80 + $urandom % 400) : ((k == K_UDP) ? 16'd53 : 16'($urandom));
      send(k, is, id, 16'($urandom), dp, 60 + $urandom % 300, n % 13 == 5, n % 17 == 9);
      repeat ($urandom % 20) @(negedge clk);
    end
    repeat (2000) @(negedge clk);
    chk("all allowed frames out (whitelist)", expected.size() == 0);
    // blacklist: block what rule 0/17/255 describe
    @(negedge clk_uart); blacklist = 1;
    repeat (10) @(negedge clk_uart);
    for (int n = 0; n < 40; n++) begin
      automatic logic [31:0] is = ($urandom % 2) ? $urandom : {24'hC0A822, 8'($urandom)};
      send(n % 6, is, $urandom, 16'($urandom), 16'(60 + $urandom % 500), 60 + $urandom % 200);
      repeat ($urandom % 20) @(negedge clk);
    end
    repeat (2000) @(negedge clk);
    chk("all allowed frames out (blacklist)", expected.size() == 0);
    // memory full: stall the transmitter, fill past 12 kB with 1000-byte frames
    tx_ready = 0;
    for (int n = 0; n < 13; n++) send(K_UDP, 32'h0A00_0001, 32'h0A00_0002, 16'd1, 16'd2, 1000);
    repeat (10) @(negedge clk);
    read_stats(st);
    chk("12 kB mark reached", st[S_USED_MEM] == 13000);
    for (int n = 0; n < 3; n++) send(K_UDP, 32'h0A00_0001, 32'h0A00_0002, 16'd1, 16'd2, 500, 0, 0, 1);
    tx_ready = 1;
    do read_stats(st); while (st[S_USED_MEM] >= 5 * 1024);
    repeat (4) @(negedge clk);
    send(K_UDP, 32'h0A00_0001, 32'h0A00_0003, 16'd1, 16'd2, 200);
    repeat (20000) @(negedge clk);
    // statistics
    read_stats(st);
    chk("drained", expected.size() == 0 && st[S_USED_MEM] == 0);
    chk("stat rx pkts", st[S_RX_PKTS] == 32'(n_sent - n_drop));
    chk("stat tx pkts", st[S_TX_PKTS] == 32'(n_pass));
    chk("stat chk", st[S_BLK_CHK] == 32'(n_chk));
    chk("stat rule", st[S_BLK_RULE] == 32'(n_rule));
    chk("stat drop", st[S_DROP_PKTS] == 32'(n_drop) && st[S_DROP_BYTES] == 32'(n_drop * 500));
    chk("stat full events", st[S_FULL_EVENTS] == 1);
    chk("stat peak", st[S_PEAK_MEM] == 13000);
    $display("sent %0d pass %0d rule %0d chk %0d drop %0d", n_sent, n_pass, n_rule, n_chk, n_drop);
    chk("mechanisms", n_pass > 20 && n_rule > 20 && n_chk > 3 && n_drop == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
