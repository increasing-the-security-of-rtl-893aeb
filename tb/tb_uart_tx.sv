// tb_uart_tx -- self-checking test of the UART transmitter.
// Sends random bytes; a behavioural receiver samples the line at the middle
// of each bit and checks start bit, data (LSB first) and stop bit. Checks the
// frame takes 10 bit times (UART_TX_DONE at its end) and that the line idles
// high.
module tb_uart_tx;
  localparam int CPB = 87;
  logic clk = 0, rst = 1;
  logic [7:0] uart_tx_data = '0; logic uart_tx_dv = 0;
  logic tx, uart_tx_done;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);
  always #50 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    chk("idle high", tx == 1);
    for (int n = 0; n < 40; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic int t = 0;
      @(negedge clk); uart_tx_data = b; uart_tx_dv = 1;
      @(negedge clk); uart_tx_dv = 0; uart_tx_data = ~b;
      repeat (CPB / 2 - 1) @(negedge clk);
      chk("start", tx == 0);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(negedge clk);
        chk("data bit", tx == b[i]);
      end
      repeat (CPB) @(negedge clk);
      chk("stop", tx == 1);
      t = CPB / 2 + 9 * CPB;
      while (!uart_tx_done && t < 20 * CPB) begin @(negedge clk); t++; end
      chk("done after 10 bit times", t == 10 * CPB + 1);
      repeat ($urandom % 20) @(negedge clk);
      chk("idle high", tx == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
