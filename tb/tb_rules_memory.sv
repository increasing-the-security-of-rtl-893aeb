// tb_rules_memory -- self-checking test of the banked rule store.
// Writes all 256 rules on the slow write clock, then reads each row on the
// fast clock and checks that lane l of row r holds rule r*LANES + l, and that
// a fresh memory reads as all zero (no valid rule).
module tb_rules_memory;
  localparam int NUM_RULES = 256, LANES = 16, ROWS = NUM_RULES / LANES;
  logic clk = 0, clk_wr = 0, dr_we = 0;
  logic [7:0]   dr_addr = '0;
  logic [223:0] dr_data = '0;
  logic [3:0]   address_rules = '0;
  logic [LANES*224-1:0] data_rules;
  int checks = 0, failures = 0;

  function automatic logic [223:0] pat(int r);
    return {7{32'(r * 32'h9E3779B1 + 1)}};
  endfunction

  rules_memory dut (.*);
  always #4  clk = ~clk;
  always #50 clk_wr = ~clk_wr;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); address_rules = 4'(r);
      @(negedge clk); checks++;
      if (data_rules !== '0) failures++;
    end
    for (int r = 0; r < NUM_RULES; r++) begin
      @(negedge clk_wr); dr_we = 1; dr_addr = 8'(r); dr_data = pat(r);
    end
    @(negedge clk_wr); dr_we = 0;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); address_rules = 4'(r);
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (data_rules[l*224 +: 224] !== pat(r * LANES + l)) begin
          failures++;
          if (failures < 10) $display("row %0d lane %0d wrong", r, l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
