// tb_uart_controller -- self-checking test of the PC command interpreter.
// Feeds command bytes as UART_RX_DV pulses. Checks: a rule write ('R') gives
// one DR_WE pulse on the right port with the 224-bit word and address;
// a mode command ('M') sets that port's list bit; a statistics command ('S')
// raises REQ_STAT of the right port, waits for ACK_STAT (answered here after
// a delay, as a slower clock domain would), then sends the 72 bytes of that
// port's STAT_DATA least significant byte first, one per UART_TX_DONE.
// Unknown command bytes are ignored.
module tb_uart_controller;
  import fw_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] uart_rx_data = '0; logic uart_rx_dv = 0;
  logic [7:0] uart_tx_data; logic uart_tx_dv; logic uart_tx_done = 0;
  logic [RULE_W-1:0] dr_data; logic [7:0] dr_addr; logic [1:0] dr_we;
  logic [1:0] blacklist, req_stat; logic [1:0] ack_stat = '0;
  logic [STAT_W-1:0] stat_data_a, stat_data_b;
  int checks = 0, failures = 0;

  uart_controller dut (.*);
  always #50 clk = ~clk;

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic [7:0] b);
    @(negedge clk); uart_rx_data = b; uart_rx_dv = 1;
    @(negedge clk); uart_rx_dv = 0;
    repeat (3) @(negedge clk);
  endtask

  // write-enable monitor
  int we_cnt [2] = '{0, 0};
  logic [RULE_W-1:0] last_data; logic [7:0] last_addr;
  always @(posedge clk) for (int p = 0; p < 2; p++) if (!rst && dr_we[p]) begin
    we_cnt[p]++; last_data = dr_data; last_addr = dr_addr;
  end

  // statistics side: acknowledge after a delay, drop ack when req drops
  always @(negedge clk) for (int p = 0; p < 2; p++) begin
    if (req_stat[p] && !ack_stat[p]) begin repeat (7) @(negedge clk); ack_stat[p] = 1; end
    else if (!req_stat[p] && ack_stat[p]) begin repeat (3) @(negedge clk); ack_stat[p] = 0; end
  end

  // UART transmitter model
  logic [7:0] txq[$];
  always @(negedge clk) if (uart_tx_dv) begin
    txq.push_back(uart_tx_data);
    repeat (5) @(negedge clk);
    uart_tx_done = 1; @(negedge clk); uart_tx_done = 0;
  end

  initial begin
    for (int i = 0; i < STAT_W / 32; i++) begin
      stat_data_a[i*32 +: 32] = $urandom; stat_data_b[i*32 +: 32] = $urandom;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    put(8'hAA);                                   // ignored
    for (int n = 0; n < 6; n++) begin
      automatic logic [RULE_W-1:0] w = {7{$urandom}};
      automatic int p = n % 2;
      automatic logic [7:0] a = 8'($urandom);
      put(8'h52); put(8'(p)); put(a);
      for (int i = NB - 1; i >= 0; i--) put(w[i*8 +: 8]);
      chk("one write", we_cnt[p] == n / 2 + 1 && we_cnt[1-p] == (p ? n / 2 + 1 : n / 2));
      chk("rule word", last_data == w && last_addr == a);
    end
    put(8'h4D); put(8'd1); put(8'd1);
    chk("mode B blacklist", blacklist == 2'b10);
    put(8'h4D); put(8'd0); put(8'd1);
    put(8'h4D); put(8'd1); put(8'd0);
    chk("mode A blacklist", blacklist == 2'b01);
    for (int p = 1; p >= 0; p--) begin
      automatic logic [STAT_W-1:0] want = p ? stat_data_b : stat_data_a;
      txq.delete();
      put(8'h53); put(8'(p));
      wait (txq.size() == STAT_W / 8);
      repeat (20) @(negedge clk);
      chk("72 bytes", txq.size() == STAT_W / 8);
      for (int i = 0; i < STAT_W / 8; i++) chk("stat byte", txq[i] == want[i*8 +: 8]);
      chk("req released", req_stat == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int NB = RULE_W / 8;
endmodule
