// tb_check_rules -- self-checking test of the rule checker.
// A behavioural rule store (16 lanes x 16 rows, one-cycle read) holds a rule
// set; random packet fields are checked against a reference verdict computed
// here by a linear search over the rules. Covers whitelist and blacklist
// mode, a checksum error, a match only in the last rule (255), an invalid
// rule, and checks that FW_COMPLETED comes exactly 18 cycles after FW_OUT.
module tb_check_rules;
  import fw_pkg::*;
  import tb_pkt_pkg::*;
  localparam int NUM_RULES = 256, LANES = 16, ROWS = 16;
  logic clk = 0, rst = 1, blacklist = 0, fw_out = 0, chksum_ok = 1;
  pkt_fields_t fields = '0;
  pck_type_e   pck_type = PT_TCP;
  logic [3:0]  address_rules;
  logic [LANES*RULE_W-1:0] data_rules;
  logic [1:0]  fw_result;
  pck_type_e   fw_pck_type;
  logic        fw_completed;
  int checks = 0, failures = 0;
  logic [223:0] rules [NUM_RULES];

  check_rules dut (.*);
  always #4 clk = ~clk;

  always_ff @(posedge clk)
    for (int l = 0; l < LANES; l++) data_rules[l*RULE_W +: RULE_W] <= rules[address_rules * LANES + l];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: linear search, written independently of fw_pkg::rule_match
  function automatic bit ref_match(pkt_fields_t f);
    for (int r = 0; r < NUM_RULES; r++) begin
      logic [223:0] w = rules[r];
      if (w[16] && (w[17] || w[31:24] == f.lev4_protocol) &&
          f.ip_source >= w[223:192] && f.ip_source <= w[191:160] &&
          f.ip_dest >= w[159:128] && f.ip_dest <= w[127:96] &&
          f.source_port >= w[95:80] && f.source_port <= w[79:64] &&
          f.dest_port >= w[63:48] && f.dest_port <= w[47:32]) return 1;
    end
    return 0;
  endfunction

  task automatic one(input pkt_fields_t f, input bit chk, input bit bl, input pck_type_e t);
    int lat;
    logic [1:0] want;
    @(negedge clk);
    fields = f; chksum_ok = chk; blacklist = bl; pck_type = t; fw_out = 1;
    @(negedge clk); fw_out = 0; fields = '0;
    lat = 1;
    while (!fw_completed && lat < 100) begin @(negedge clk); lat++; end
    want = !chk ? 2'd0 : ((ref_match(f) ^ bl) ? 2'd3 : 2'd1);
    checks += 3;
    if (lat != 18) begin failures++; $display("latency %0d", lat); end
    if (fw_result !== want) begin failures++; $display("result %0d want %0d", fw_result, want); end
    if (fw_pck_type !== t) failures++;
  endtask

  int hits = 0;
  initial begin
    for (int r = 0; r < NUM_RULES; r++) rules[r] = '0;
    // 40 narrow rules: /24 source nets 10.0.r.0 -> any dest, port range
    for (int r = 0; r < 40; r++)
      rules[r * 6] = make_rule({8'd10, 8'd0, 8'(r), 8'd0}, {8'd10, 8'd0, 8'(r), 8'd255},
                               32'h0, 32'hFFFF_FFFF, 16'd0, 16'hFFFF, 16'(r * 100), 16'(r * 100 + 50),
                               8'd6, 0);
    // only the last rule matches UDP to 192.168.1.x
    rules[255] = make_rule(32'h0, 32'hFFFF_FFFF, 32'hC0A8_0100, 32'hC0A8_01FF,
                           16'd0, 16'hFFFF, 16'd0, 16'hFFFF, 8'd17, 0);
    // an invalid rule that would match everything
    rules[100] = make_rule(32'h0, 32'hFFFF_FFFF, 32'h0, 32'hFFFF_FFFF,
                           16'd0, 16'hFFFF, 16'd0, 16'hFFFF, 8'd0, 1, 0);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      automatic pkt_fields_t f = '0;
      automatic int r = $urandom % 45;
      f.ip_source = {8'd10, 8'd0, 8'(r), 8'($urandom)};
      f.ip_dest = $urandom;
      f.lev4_protocol = ($urandom % 3 == 0) ? 8'd17 : 8'd6;
      f.source_port = 16'($urandom);
      f.dest_port = 16'(r * 100 + ($urandom % 80));
      if (n % 10 == 0) begin f.ip_dest = 32'hC0A8_0100 | 32'($urandom % 256); f.lev4_protocol = 8'd17; end
      if (ref_match(f)) hits++;
      one(f, (n % 17) != 0, n[0], pck_type_e'(n % 6));
    end
    checks++;
    if (hits < 30) begin failures++; $display("too few matching packets: %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
