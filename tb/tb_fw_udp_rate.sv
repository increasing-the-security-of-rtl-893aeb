// tb_fw_udp_rate -- sustained-rate test of one firewall direction with UDP
// traffic of 100, 250, 500, 750 and 1000 bytes per frame.
//
// For each size a burst of back-to-back frames enters the receive side at
// line rate: one byte per 8 ns cycle with 20 idle cycles between frames,
// the byte times that preamble (8) and inter-frame gap (12) take on a 1 Gb/s
// wire. The transmitting MAC is modelled the same way: after each frame's
// last byte it holds TX_READY low for 20 cycles. Input and output therefore
// have exactly the same capacity, and the firewall keeps up only if its
// per-frame turnaround fits into that gap.
//
// Checks, per size:
//  * every frame leaves byte-exact and in order, none is dropped or blocked;
//  * the first frame's first byte leaves 23 cycles after its last byte;
//  * the data memory never holds more than two frames (the buffer does not
//    fill up under sustained line-rate traffic);
//  * the measured output rate, frame bytes per elapsed 8 ns cycle, reaches
//    the line-rate bound n / (n + 20) (printed next to it in Gb/s).
// Then the transmitter is stalled and 100-byte frames keep arriving: the
// buffer fills to the 12 kB mark, later frames are refused, and once the
// transmitter runs again the time until the buffer is below 5 kB is measured
// against the line-rate estimate (about 70 us, the order of magnitude the
// reference gives for this recovery), after which frames are accepted again.
// The statistics are read through the REQ_STAT/ACK_STAT handshake. The
// block is used at its default sizes (16 kB buffer, 256 rules). The frame
// sizes and the 1 Gb/s rate are those of the reference measurements; the
// 20-cycle wire overhead is standard Ethernet framing.
module tb_fw_udp_rate;
  import fw_pkg::*;
  import tb_pkt_pkg::*;
  localparam int GAP     = 20;
  localparam int NFRAMES = 40;
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- transmitting MAC model and output checker ----------------------------
  bq_t expected[$];
  bq_t cur;
  int  gap_left = 0;
  bit  stall = 0;
  int  n_out = 0, bytes_out = 0;
  longint t_first_out = -1, t_last_out = 0, t_last_rx = 0;
  bit  measure = 0;
  int  lat_ok = 0;
  always @(posedge clk) begin
    if (!rst && tx_dv && tx_ready) begin
      if (measure && cur.size() == 0) begin
        chk("latency 23 cycles", ($time - t_last_rx) == 23 * 8);
        lat_ok++;
        measure = 0;
      end
      if (t_first_out < 0) t_first_out = $time;
      cur.push_back(tx_data);
      if (tx_last) begin
        chk("unexpected frame", expected.size() > 0);
        if (expected.size() > 0) chk("frame contents", cur == expected.pop_front());
        bytes_out += cur.size();
        n_out++;
        t_last_out = $time;
        cur.delete();
        gap_left = GAP;
      end
    end
  end
  always @(negedge clk) begin
    tx_ready = (gap_left == 0) && !stall;
    if (gap_left > 0) gap_left--;
  end

  task automatic read_stats(output logic [31:0] s [NSTAT]);
    @(negedge clk_uart); req_stat = 1;
    do @(negedge clk_uart); while (!ack_stat);
    for (int i = 0; i < NSTAT; i++) s[i] = stat_data[32*i +: 32];
    req_stat = 0;
    do @(negedge clk_uart); while (ack_stat);
  endtask

  task automatic send(input bq_t q, input bit first);
    foreach (q[i]) begin
      @(negedge clk);
      rx_dv = 1; rx_data = q[i]; rx_last = (i == q.size() - 1);
    end
    @(negedge clk);
    // the last byte was taken at the posedge just before this negedge
    if (first) begin t_last_rx = $time - 4; measure = 1; end
    rx_dv = 0; rx_last = 0;
    repeat (GAP - 1) @(negedge clk);
  endtask

  int sizes[5] = '{100, 250, 500, 750, 1000};
  logic [31:0] st [NSTAT];
  int tot_frames = 0, tot_bytes = 0;
  initial begin
    repeat (5) @(posedge clk_uart);
    rst = 0;
    repeat (5) @(posedge clk_uart);
    // whitelist: UDP from anywhere to anywhere
    @(negedge clk_uart);
    dr_addr = 8'd7;
    dr_data = make_rule(32'h0, 32'hFFFF_FFFF, 32'h0, 32'hFFFF_FFFF,
                        16'h0, 16'hFFFF, 16'h0, 16'hFFFF, 8'd17, 0);
    dr_we = 1;
    @(negedge clk_uart); dr_we = 0;
    repeat (5) @(posedge clk_uart);

    foreach (sizes[s]) begin
      automatic int n = sizes[s];
      automatic int peak = 0;
      real rate, bound;
      t_first_out = -1; n_out = 0; bytes_out = 0;
      for (int f = 0; f < NFRAMES; f++) begin
        automatic bq_t q = make_frame(K_UDP, 48'h02_00_00_00_00_0B, 48'h02_00_00_00_00_0A,
                                      32'h0A00_0001 + f, 32'hC0A8_0101, 16'(5000 + f), 16'd9,
                                      n - 4);  // n counts the 4-byte FCS, as on the wire
        expected.push_back(q);
        send(q, f == 0);
      end
      while (n_out < NFRAMES) @(posedge clk);
      chk("latency measured", lat_ok == s + 1);
      rate  = real'(bytes_out) / (real'(t_last_out - t_first_out) / 8.0 + 1.0);
      bound = real'(n - 4) / real'(n - 4 + GAP);
      $display("UDP %0d B: %0d frames, output %.3f Gb/s, line-rate bound %.3f Gb/s",
               n, n_out, rate, bound);
      chk("output at line rate", rate >= bound * 0.999);
      read_stats(st);
      tot_frames += NFRAMES; tot_bytes += NFRAMES * (n - 4);
      peak = int'(st[S_PEAK_MEM]);
      chk("buffer holds at most two frames", peak <= 2 * (n - 4));
      chk("no drops", st[S_DROP_PKTS] == 0);
      chk("none blocked", st[S_BLK_RULE] == 0 && st[S_BLK_CHK] == 0);
      chk("all received", st[S_RX_PKTS] == 32'(tot_frames) && st[S_RX_BYTES] == 32'(tot_bytes));
      chk("all sent", st[S_TX_PKTS] == 32'(tot_frames) && st[S_TX_BYTES] == 32'(tot_bytes));
      chk("UDP counted", st[S_UDP] == 32'(tot_frames));
      chk("buffer empty", st[S_USED_MEM] == 0 && st[S_QUEUED] == 0);
      repeat (100) @(posedge clk);
    end
    // ---- phase 2: buffer full with 100-byte frames, then drain -------------
    begin
      automatic int used = 0, n_acc = 0, n_drop = 0, n = 100 - 4;
      automatic longint t_rel, t_low;
      automatic real us, want_us;
      stall = 1;
      while (n_drop < 10) begin
        automatic bq_t q = make_frame(K_UDP, 48'h02_00_00_00_00_0B, 48'h02_00_00_00_00_0A,
                                      32'h0A00_0100, 32'hC0A8_0101, 16'd6000, 16'd9, n);
        if (used < 12 * 1024) begin
          expected.push_back(q); used += n; n_acc++;
        end else n_drop++;
        send(q, 0);
      end
      read_stats(st);
      chk("12 kB mark reached", int'(st[S_USED_MEM]) == used && used >= 12 * 1024);
      chk("frames refused while full", st[S_DROP_PKTS] == 32'(n_drop) && st[S_FULL_EVENTS] == 1);
      // release the transmitter and time the drain below 5 kB
      @(negedge clk); stall = 0; t_rel = $time;
      do read_stats(st); while (int'(st[S_USED_MEM]) >= 5 * 1024);
      t_low = $time;
      us = real'(t_low - t_rel) / 1000.0;
      // frames that must leave: used - (5 kB - 1) bytes, rounded up to frames,
      // each n bytes plus the 20-cycle wire gap; the statistics poll adds < 1 us
      want_us = real'((used - 5 * 1024 + n) / n) * real'(n + GAP) * 8.0 / 1000.0;
      $display("drain from %0d B to below 5 kB: %.2f us (line-rate estimate %.2f us)",
               used, us, want_us);
      chk("drain at line rate", us >= want_us && us <= want_us + 1.0);
      // reception resumes
      begin
        automatic bq_t q = make_frame(K_UDP, 48'h02_00_00_00_00_0B, 48'h02_00_00_00_00_0A,
                                      32'h0A00_0200, 32'hC0A8_0101, 16'd6001, 16'd9, n);
        expected.push_back(q); n_acc++;
        send(q, 0);
      end
      while (expected.size() > 0) @(posedge clk);
      repeat (50) @(posedge clk);
      read_stats(st);
      chk("accepted after drain", st[S_RX_PKTS] == 32'(tot_frames + n_acc));
      chk("all sent after drain", st[S_TX_PKTS] == 32'(tot_frames + n_acc));
      chk("buffer empty after drain", st[S_USED_MEM] == 0 && st[S_QUEUED] == 0);
    end
    chk("nothing left", expected.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
