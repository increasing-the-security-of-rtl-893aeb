// tb_fw_stats -- self-checking test of the statistics counters.
// Generates random event pulses with reference counts kept here, then takes a
// snapshot through the REQ_STAT/ACK_STAT handshake (request from a slower,
// unrelated clock) and compares all 18 words of STAT_DATA.
module tb_fw_stats;
  import fw_pkg::*;
  logic clk = 0, rst = 1, clk_u = 0;
  logic ev_rx = 0, ev_drop = 0, ev_verdict = 0, ev_sent = 0, mem_full = 0;
  logic [15:0] ev_len = 0, tx_len = 0, used_memory = 0;
  logic [1:0] fw_result = 0; pck_type_e fw_pck_type = PT_ARP;
  logic [10:0] queued = 0;
  logic req_stat = 0, ack_stat;
  logic [STAT_W-1:0] stat_data;
  int checks = 0, failures = 0;
  logic [31:0] ref_c [NSTAT];
  bit full_prev = 0;

  fw_stats dut (.*);
  always #4  clk = ~clk;
  always #50 clk_u = ~clk_u;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic snapshot_and_check();
    @(negedge clk_u); req_stat = 1;
    do @(negedge clk_u); while (!ack_stat);
    for (int s = 0; s < NSTAT; s++) begin
      checks++;
      if (stat_data[s*32 +: 32] !== ref_c[s]) begin
        failures++; $display("stat %0d: got %0d want %0d", s, stat_data[s*32 +: 32], ref_c[s]);
      end
    end
    req_stat = 0;
    do @(negedge clk_u); while (ack_stat);
  endtask

  initial begin
    for (int s = 0; s < NSTAT; s++) ref_c[s] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int round = 0; round < 3; round++) begin
      for (int n = 0; n < 500; n++) begin
        @(negedge clk);
        ev_rx = $urandom % 2; ev_drop = $urandom % 5 == 0; ev_verdict = $urandom % 2;
        ev_sent = $urandom % 3 == 0;
        ev_len = 16'(60 + $urandom % 1400); tx_len = 16'(60 + $urandom % 1400);
        fw_result = 2'($urandom % 4); if (fw_result == 2) fw_result = 3;
        fw_pck_type = pck_type_e'($urandom % 6);
        used_memory = 16'($urandom % 16000); queued = 11'($urandom % 1024);
        mem_full = ($urandom % 50 == 0) ? !mem_full : mem_full;
        if (ev_rx)   begin ref_c[0]++; ref_c[1] += ev_len; end
        if (ev_sent) begin ref_c[2]++; ref_c[3] += tx_len; end
        if (ev_verdict) begin
          if (fw_result == 0) ref_c[4]++;
          if (fw_result == 1) ref_c[5]++;
          ref_c[8 + int'(fw_pck_type)]++;
        end
        if (ev_drop) begin ref_c[6]++; ref_c[7] += ev_len; end
        ref_c[14] = used_memory;
        if (used_memory > ref_c[15]) ref_c[15] = used_memory;
        ref_c[16] = queued;
        if (mem_full && !full_prev) ref_c[17]++;
        full_prev = mem_full;
      end
      @(negedge clk);
      ev_rx = 0; ev_drop = 0; ev_verdict = 0; ev_sent = 0;
      repeat (2) @(negedge clk);
      snapshot_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
