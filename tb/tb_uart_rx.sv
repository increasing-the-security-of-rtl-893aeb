// tb_uart_rx -- self-checking test of the UART receiver.
// A behavioural serial source sends random bytes at the receiver's bit time
// (8N1, LSB first, random idle gaps) and, twice, a 3% slower bit time; every
// byte must come out once on UART_RX_DATA with a UART_RX_DV pulse. A short
// low glitch (not a real start bit) must produce no byte.
module tb_uart_rx;
  localparam int CPB = 87;
  logic clk = 0, rst = 1, rx = 1;
  logic [7:0] uart_rx_data; logic uart_rx_dv;
  int checks = 0, failures = 0;
  logic [7:0] sent[$];

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);
  always #50 clk = ~clk;        // 10 MHz

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (uart_rx_dv) begin
    checks++;
    if (sent.size() == 0 || uart_rx_data !== sent[0]) begin
      failures++; $display("unexpected byte %h", uart_rx_data);
    end
    if (sent.size()) void'(sent.pop_front());
  end

  task automatic send(input logic [7:0] b, input int bit_clks);
    logic [9:0] f = {1'b1, b, 1'b0};
    sent.push_back(b);
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (bit_clks) @(posedge clk);
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      send(8'($urandom), (n % 30 == 7) ? 90 : CPB);
      repeat ($urandom % 50) @(posedge clk);
    end
    rx = 0; repeat (10) @(posedge clk); rx = 1;   // glitch
    repeat (20 * CPB) @(posedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("%0d bytes lost", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
