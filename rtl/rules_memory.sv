// rules_memory -- firewall rule store of one firewall direction.
//
// Holds NUM_RULES rules of 224 bits (256 x 224 bits, 7 kB, 8-bit addresses,
// as in the design description). The write port runs on the UART-side clock
// and is driven by the UART controller (DR_ADDR, DR_DATA, DR_WE). The read
// port runs on the packet clock and serves the rule checker.
//
// The read side is this design's own choice: the description gives a
// 224-bit read bus and an 18-cycle check latency for 256 rules, which one
// rule per cycle cannot meet. The memory is therefore split into LANES banks
// (rule r lives in bank r % LANES, row r / LANES) that are read together, so
// one read returns LANES rules and 256 rules are read in 16 cycles. Reads
// are synchronous (one cycle). The store starts cleared, i.e. no valid rule.
module rules_memory #(
  parameter int NUM_RULES = 256,
  parameter int LANES     = 16,
  parameter int RW        = 224,
  parameter int AW        = $clog2(NUM_RULES),
  parameter int ROWS      = NUM_RULES / LANES,
  parameter int RAW       = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  // write port (UART clock domain)
  input  logic                clk_wr,
  input  logic                dr_we,
  input  logic [AW-1:0]       dr_addr,
  input  logic [RW-1:0]       dr_data,
  // read port (packet clock domain)
  input  logic                clk,
  input  logic [RAW-1:0]      address_rules,
  output logic [LANES*RW-1:0] data_rules
);
  for (genvar l = 0; l < LANES; l++) begin : g_bank
    logic [RW-1:0] bank [ROWS];

    initial begin
      for (int a = 0; a < ROWS; a++) bank[a] = '0;
    end

    always_ff @(posedge clk_wr)
      if (dr_we && (32'(dr_addr) % LANES) == l)
        bank[RAW'(32'(dr_addr) / LANES)] <= dr_data;

    always_ff @(posedge clk)
      data_rules[l*RW +: RW] <= bank[address_rules];
  end
endmodule
