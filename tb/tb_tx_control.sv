// tb_tx_control -- self-checking test of the transmit controller.
// Behavioural memories (one-cycle reads) hold queued packets; the test
// writes verdicts into control words one by one, as the RX side would, and
// checks that allowed packets come out byte-exact and in order (with TX_READY
// randomly low), blocked ones are skipped, each packet ends with
// TX_COMPLETED/TX_CADDR/TX_PCK_LENGTH held until TX_ACK, nothing is sent for
// a quarantined word, and the first byte is offered 4 cycles after the verdict
// is written.
module tb_tx_control;
  import fw_pkg::*;
  logic clk = 0, rst = 1;
  logic [9:0] caddr_out; ctrl_word_t cdata_out;
  logic [13:0] daddr_out; logic [7:0] ddata_out;
  logic [7:0] tx_data; logic tx_dv, tx_last, tx_err; logic tx_ready = 0;
  logic [9:0] tx_caddr; logic [15:0] tx_pck_length; logic tx_completed; logic tx_ack = 0;
  logic ev_sent;
  int checks = 0, failures = 0;

  tx_control dut (.*);
  always #4 clk = ~clk;

  logic [7:0] dmem [16384];
  ctrl_word_t cmem [1024];
  logic cw_req = 0; logic [9:0] cw_addr = '0; ctrl_word_t cw_val = '0;
  always_ff @(posedge clk) begin
    if (cw_req) cmem[cw_addr] <= cw_val;
    ddata_out <= dmem[daddr_out];
    cdata_out <= cmem[caddr_out];
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink: collects bytes, random ready
  logic [7:0] got[$];
  int lasts = 0;
  always @(negedge clk) tx_ready = ($urandom % 4 != 0);
  always @(posedge clk) if (!rst && tx_dv && tx_ready) begin
    got.push_back(tx_data);
    if (tx_last) lasts++;
  end

  // RX-side model: answers TX_COMPLETED with TX_ACK, frees the word
  int n_done = 0;
  logic [15:0] done_len[$];
  always @(negedge clk) begin
    tx_ack = 0;
    if (!rst && tx_completed) begin
      done_len.push_back(tx_pck_length);
      chk("caddr", tx_caddr == 10'(n_done % 1024));
      tx_ack = 1;
      n_done++;
      @(negedge clk); tx_ack = 0;
    end
  end

  int start = 16300;   // wraps around the end of the buffer
  initial begin
    for (int a = 0; a < 1024; a++) cmem[a] = '0;
    for (int a = 0; a < 16384; a++) dmem[a] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (20) @(negedge clk);
    chk("idle while quarantined", !tx_dv && !tx_completed && got.size() == 0);
    for (int p = 0; p < 30; p++) begin
      automatic int len = 60 + $urandom % 100;
      automatic bit pass = (p % 4 != 1);
      automatic logic [7:0] want[$];
      automatic int t0, t1;
      for (int i = 0; i < len; i++) want.push_back(dmem[(start + i) % 16384]);
      got.delete();
      @(negedge clk);
      cw_req = 1; cw_addr = 10'(p);
      cw_val = '{status: pass ? ST_PASS : ((p % 8 == 1) ? ST_BLOCK_CHK : ST_BLOCK_RULE),
                  start: 16'(start), length: 16'(len)};
      @(posedge clk); t0 = $time;
      @(negedge clk); cw_req = 0;
      if (pass) begin
        wait (tx_dv);
        t1 = $time;
        // t0 is the edge that writes the word; tx_dv is high 3 edges later,
        // i.e. in the fourth cycle when the write cycle is counted
        chk("latency 4 cycles", (t1 - t0) == 3 * 8);
      end
      wait (n_done == p + 1);
      @(negedge clk);
      chk("length reported", done_len[p] == 16'(len));
      if (pass) begin
        chk("byte count", got.size() == len);
        chk("bytes", got == want);
      end else chk("skipped", got.size() == 0);
      start = (start + len) % 16384;
    end
    chk("lasts", lasts == 30 - 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
