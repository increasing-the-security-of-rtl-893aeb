// tb_rx_control -- self-checking test of the receive controller.
// Around the block: behavioural data and control memories (arrays written on
// DWE/CWE), a rule-checker model that answers 18 cycles after FW_OUT with a
// chosen verdict, and a TX model that frees slots (TX_COMPLETED until TX_ACK)
// and can be paused. Checks: bytes stored contiguously, forwarded with their
// BYTE_NUMBER, FW_OUT one cycle after the last byte, control word {00h,i,n}
// written with FW_OUT, status byte written one cycle after FW_COMPLETED,
// word cleared and used memory reduced on TX_ACK, and the 12 kB / 5 kB
// hysteresis (scaled to 1200 / 500 bytes here) refusing and then accepting.
module tb_rx_control;
  import fw_pkg::*;
  localparam int HI = 1200, LO = 500;
  logic clk = 0, rst = 1;
  logic [7:0] rx_data = '0; logic rx_dv = 0, rx_last = 0, rx_err = 0;
  logic [13:0] daddr_in; logic [7:0] ddata_in; logic dwe;
  logic [9:0] caddr_in; ctrl_word_t cdata_in; logic cwe;
  logic fw_en, fw_err, fw_out; logic [7:0] fw_data; logic [15:0] byte_number;
  logic [1:0] fw_result = 0; logic fw_completed = 0;
  logic [9:0] tx_caddr = 0; logic [15:0] tx_pck_length = 0; logic tx_completed = 0; logic tx_ack;
  logic [15:0] used_memory; logic [10:0] queued; logic mem_full, ev_drop; logic [15:0] ev_len;
  int checks = 0, failures = 0;

  rx_control #(.HI_MARK(HI), .LO_MARK(LO)) dut (.*);
  always #4 clk = ~clk;

  logic [7:0]  dmem [16384];
  ctrl_word_t  cmem [1024];
  always_ff @(posedge clk) begin
    if (dwe) dmem[daddr_in] <= ddata_in;
    if (cwe) cmem[caddr_in] <= cdata_in;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- checker model: verdict 18 cycles after FW_OUT, R6 one cycle later --
  logic [1:0] verdicts[$];
  int n_verdict = 0;
  always begin
    @(posedge clk);
    if (fw_out && !rst) begin
      logic [9:0] j; logic [1:0] v;
      j = caddr_in;
      chk("R3 word", cwe && cdata_in.status == 8'h00);
      v = verdicts.size() ? verdicts.pop_front() : 2'd3;
      repeat (17) @(posedge clk);
      #1 fw_result = v; fw_completed = 1;
      #1 chk("R6 status", cwe && caddr_in == j && cdata_in.status == status_of(v));
      @(posedge clk); #1 fw_completed = 0;
      n_verdict++;
    end
  end

  // ---- TX model -------------------------------------------------------------
  bit tx_run = 1;
  int k = 0, n_freed = 0;
  always begin
    @(negedge clk);
    if (tx_run && cmem[k].status != 0) begin
      int used0;
      tx_caddr = 10'(k); tx_pck_length = cmem[k].length; tx_completed = 1;
      used0 = used_memory;
      do @(negedge clk); while (!tx_ack);
      tx_completed = 0;
      @(negedge clk);
      chk("R9 clear", cmem[k].status == 0 && cmem[k].length == 0);
      k = (k + 1) % 1024; n_freed++;
    end
  end

  // ---- packet sender with stream checks -------------------------------------
  int exp_ptr = 0;
  task automatic send(input int len, input bit expect_accept);
    logic [7:0] b[];
    int base;
    b = new[len];
    base = exp_ptr;
    foreach (b[i]) b[i] = 8'($urandom);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      rx_dv = 1; rx_data = b[i]; rx_last = (i == len - 1);
      #1;
      if (expect_accept) begin
        chk("fw_en", fw_en && fw_data == b[i] && byte_number == 16'(i));
        chk("daddr", dwe && daddr_in == 14'(base + i));
      end else chk("no store", !dwe && !fw_en);
    end
    @(negedge clk); rx_dv = 0; rx_last = 0;
    if (expect_accept) begin
      chk("fw_out 1 cycle after last", fw_out && cwe && cdata_in.start == 16'(base % 16384) &&
          cdata_in.length == 16'(len));
      for (int i = 0; i < len; i++) chk("stored", dmem[(base + i) % 16384] == b[i]);
      exp_ptr = (base + len) % 16384;
    end else chk("dropped", !fw_out);
  endtask

  int drops = 0;
  always @(posedge clk) if (ev_drop) drops++;

  initial begin
    for (int a = 0; a < 1024; a++) cmem[a] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // normal traffic with mixed verdicts
    for (int n = 0; n < 40; n++) begin
      verdicts.push_back((n % 3 == 0) ? 2'd1 : (n % 7 == 0) ? 2'd0 : 2'd3);
      send(60 + $urandom % 200, 1);
      repeat ($urandom % 30) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    chk("all freed", used_memory == 0 && queued == 0 && n_freed == 40);
    $display("used %0d queued %0d freed %0d", used_memory, queued, n_freed);
    // fill the memory with TX paused
    tx_run = 0;
    while (!mem_full) begin send(100, 1); repeat (25) @(negedge clk); end
    chk("full at HI", used_memory >= HI && used_memory < HI + 100);
    send(100, 0);
    send(80, 0);
    chk("drops counted", drops == 2);
    // drain: below LO the block accepts again
    tx_run = 1;
    wait (!mem_full);
    chk("released below LO", used_memory < LO);
    @(negedge clk);
    send(90, 1);
    repeat (300) @(negedge clk);
    chk("drained", used_memory == 0 && queued == 0);
    chk("all verdicts", n_verdict == n_freed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
