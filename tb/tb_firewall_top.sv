// tb_firewall_top -- end-to-end test of the whole firewall.
// Everything is configured the way a PC would: over the serial line. The
// test loads rules for both directions, sets port B's list to blacklist mode,
// sends traffic A->B and B->A, and reads the statistics of both directions
// back over the serial line. It counts each mechanism and fails if one never
// happened: frames allowed and blocked by the rules (whitelist and blacklist),
// blocked for a checksum error, dropped while the buffer is full, transmit
// back-pressure, and the statistics readout. The top is used with all its
// parameters at their defaults (115,200 baud UART, 16 kB buffers, 256 rules).
module tb_firewall_top;
  import fw_pkg::*;
  import tb_pkt_pkg::*;
  localparam int CPB = 87;           // the design's default bit time
  logic clk_125 = 0, clk_10 = 0, rst = 1;
  logic uart_rx = 1, uart_tx;
  logic [7:0] port_a_rx_data = '0, port_b_rx_data = '0;
  logic port_a_rx_dv = 0, port_a_rx_last = 0, port_a_rx_err = 0;
  logic port_b_rx_dv = 0, port_b_rx_last = 0, port_b_rx_err = 0;
  logic [7:0] port_a_tx_data, port_b_tx_data;
  logic port_a_tx_dv, port_a_tx_last, port_a_tx_err, port_b_tx_dv, port_b_tx_last, port_b_tx_err;
  logic port_a_tx_ready = 1, port_b_tx_ready = 1;
  int checks = 0, failures = 0;

  firewall_top dut (.*);
  always #4  clk_125 = ~clk_125;
  always #50 clk_10 = ~clk_10;

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (9000000) @(posedge clk_125);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- serial line to/from the PC -------------------------------------------
  task automatic uart_put(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rx = f[i];
      repeat (CPB) @(posedge clk_10);
    end
  endtask
  logic [7:0] uart_got[$];
  initial forever begin
    logic [7:0] b;
    @(negedge uart_tx);
    repeat (CPB / 2) @(posedge clk_10);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge clk_10);
      b[i] = uart_tx;
    end
    repeat (CPB) @(posedge clk_10);
    uart_got.push_back(b);
  end
  task automatic load_rule(input int port, input int a, input logic [223:0] w);
    uart_put(8'h52); uart_put(8'(port)); uart_put(8'(a));
    for (int i = 27; i >= 0; i--) uart_put(w[i*8 +: 8]);
  endtask
  task automatic read_stats(input int port, output logic [31:0] s [NSTAT]);
    uart_got.delete();
    uart_put(8'h53); uart_put(8'(port));
    wait (uart_got.size() == STAT_W / 8);
    for (int i = 0; i < NSTAT; i++)
      s[i] = {uart_got[4*i+3], uart_got[4*i+2], uart_got[4*i+1], uart_got[4*i]};
  endtask

  // ---- per-direction reference and monitors ----------------------------------
  logic [223:0] rules [2][256];
  bit bl [2] = '{0, 0};
  bq_t expected [2][$];
  int n_pass [2] = '{0, 0}, n_rule [2] = '{0, 0}, n_chk [2] = '{0, 0}, n_drop [2] = '{0, 0};
  int n_rx [2] = '{0, 0}, n_stall = 0;

  function automatic bit hit(int p, logic [31:0] is, id, logic [7:0] pr, logic [15:0] sp, dp);
    for (int r = 0; r < 256; r++) begin
      logic [223:0] w = rules[p][r];
      if (w[16] && (w[17] || w[31:24] == pr) && is >= w[223:192] && is <= w[191:160] &&
          id >= w[159:128] && id <= w[127:96] && sp >= w[95:80] && sp <= w[79:64] &&
          dp >= w[63:48] && dp <= w[47:32]) return 1;
    end
    return 0;
  endfunction

  bq_t cur_b, cur_a;
  always @(posedge clk_125) if (!rst) begin
    if (port_b_tx_dv && !port_b_tx_ready) n_stall++;
    if (port_b_tx_dv && port_b_tx_ready) begin
      cur_b.push_back(port_b_tx_data);
      if (port_b_tx_last) begin
        chk("A->B frame expected", expected[0].size() > 0);
        if (expected[0].size()) chk("A->B frame contents", cur_b == expected[0].pop_front());
        cur_b.delete();
      end
    end
    if (port_a_tx_dv && port_a_tx_ready) begin
      cur_a.push_back(port_a_tx_data);
      if (port_a_tx_last) begin
        chk("B->A frame expected", expected[1].size() > 0);
        if (expected[1].size()) chk("B->A frame contents", cur_a == expected[1].pop_front());
        cur_a.delete();
      end
    end
  end

  // p = 0: frame enters port A, p = 1: enters port B
  task automatic send(input int p, input int kind, input logic [31:0] is, id,
                      input logic [15:0] sp, dp, input int len, input bit bad = 0, input bit drop = 0);
    bq_t q = make_frame(kind, 48'he478fa1c37d9, 48'h216ca9b784f5, is, id, sp, dp, len, bad);
    bit ip = (kind == K_TCP || kind == K_UDP || kind == K_ICMP);
    bit l4 = (kind == K_TCP || kind == K_UDP);
    logic [7:0] pr = (kind == K_TCP) ? 8'd6 : (kind == K_UDP) ? 8'd17 : (kind == K_ICMP) ? 8'd1 : 8'd0;
    bad = bad && ip;
    if (drop) n_drop[p]++;
    else begin
      n_rx[p]++;
      if (bad) n_chk[p]++;
      else if (hit(p, ip ? is : 0, ip ? id : 0, pr, l4 ? sp : 0, l4 ? dp : 0) ^ bl[p]) begin
        n_pass[p]++; expected[p].push_back(q);
      end else n_rule[p]++;
    end
    foreach (q[i]) begin
      @(negedge clk_125);
      if (p == 0) begin port_a_rx_dv = 1; port_a_rx_data = q[i]; port_a_rx_last = (i == q.size() - 1); end
      else        begin port_b_rx_dv = 1; port_b_rx_data = q[i]; port_b_rx_last = (i == q.size() - 1); end
    end
    @(negedge clk_125);
    port_a_rx_dv = 0; port_a_rx_last = 0; port_b_rx_dv = 0; port_b_rx_last = 0;
  endtask

  logic [31:0] st [NSTAT];
  initial begin
    foreach (rules[p, r]) rules[p][r] = '0;
    repeat (5) @(posedge clk_10);
    rst = 0;
    repeat (10) @(posedge clk_10);
    // port A (LAN side), whitelist: web traffic out of 192.168.34.0/24, ARP
    rules[0][3] = make_rule(32'hC0A8_2200, 32'hC0A8_22FF, 32'h0, 32'hFFFF_FFFF,
                            16'd1024, 16'hFFFF, 16'd80, 16'd443, 8'd6, 0);
    rules[0][200] = make_rule(32'h0, 32'h0, 32'h0, 32'h0, 16'd0, 16'd0, 16'd0, 16'd0, 8'd0, 1);
    // port B (Internet side), blacklist: nothing from 13.226.175.71
    rules[1][0] = make_rule(32'h0DE2_AF47, 32'h0DE2_AF47, 32'h0, 32'hFFFF_FFFF,
                            16'd0, 16'hFFFF, 16'd0, 16'hFFFF, 8'd0, 1);
    load_rule(0, 3, rules[0][3]);
    load_rule(0, 200, rules[0][200]);
    load_rule(1, 0, rules[1][0]);
    uart_put(8'h4D); uart_put(8'd1); uart_put(8'd1);
    bl[1] = 1;
    repeat (10) @(posedge clk_10);
    // traffic in both directions
    for (int n = 0; n < 40; n++) begin
      automatic logic [31:0] lan = {24'hC0A822, 8'($urandom)};
      automatic logic [31:0] far = (n % 4 == 0) ? 32'h0DE2_AF47 : ((n % 4 == 1) ? 32'h924B_3D32 : $urandom);
      automatic logic [15:0] dport = (n % 3 == 0) ? 16'(80 + $urandom % 400) : 16'($urandom);
      send(0, n % 6, lan, far, 16'(1024 + $urandom % 1000), dport, 60 + $urandom % 200, n % 11 == 3);
      send(1, (n % 3) + 1, far, lan, dport, 16'($urandom), 60 + $urandom % 300, n % 9 == 4);
    end
    // buffer full on A->B: stall port B's transmitter, then send 1000-byte frames
    port_b_tx_ready = 0;
    for (int n = 0; n < 13; n++) send(0, K_TCP, 32'hC0A8_2201, 32'h0101_0101, 16'd2000, 16'd443, 1000);
    for (int n = 0; n < 2; n++)  send(0, K_TCP, 32'hC0A8_2201, 32'h0101_0101, 16'd2000, 16'd443, 300, 0, 1);
    repeat (50) @(negedge clk_125);
    for (int n = 0; n < 20000 && n_stall < 100; n++) @(negedge clk_125);
    port_b_tx_ready = 1;
    repeat (30000) @(negedge clk_125);
    chk("A->B all out", expected[0].size() == 0);
    chk("B->A all out", expected[1].size() == 0);
    // statistics over the serial line
    for (int p = 0; p < 2; p++) begin
      read_stats(p, st);
      chk("stat rx", st[S_RX_PKTS] == 32'(n_rx[p]));
      chk("stat tx", st[S_TX_PKTS] == 32'(n_pass[p]));
      chk("stat rule", st[S_BLK_RULE] == 32'(n_rule[p]));
      chk("stat chk", st[S_BLK_CHK] == 32'(n_chk[p]));
      chk("stat drop", st[S_DROP_PKTS] == 32'(n_drop[p]));
      chk("stat empty", st[S_USED_MEM] == 0 && st[S_QUEUED] == 0);
      $display("port %0d: rx %0d pass %0d rule %0d chk %0d drop %0d", p, n_rx[p], n_pass[p], n_rule[p], n_chk[p], n_drop[p]);
    end
    $display("stall cycles %0d", n_stall);
    // every mechanism happened
    chk("whitelist pass",  n_pass[0] > 0);
    chk("whitelist block", n_rule[0] > 0);
    chk("blacklist pass",  n_pass[1] > 0);
    chk("blacklist block", n_rule[1] > 0);
    chk("checksum block",  n_chk[0] > 0 && n_chk[1] > 0);
    chk("buffer-full drop", n_drop[0] > 0);
    chk("tx back-pressure", n_stall > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
