// check_rules -- decides whether a packet complies with the rule set.
//
// When FW_OUT rises, the packet fields from the packet analysis are latched
// and the rules memory is scanned, LANES rules per cycle, ROWS = NUM_RULES /
// LANES reads in all. A rule matches when it is valid, its protocol matches
// (or it allows any protocol) and the IP source, IP destination, source port
// and destination port all lie within its inclusive ranges.
//
// Verdict on FW_RESULT: 0 when the packet has a checksum/frame error, else in
// whitelist mode (BLACKLIST = 0) 3 if some rule matches and 1 if none does,
// and in blacklist mode 1 if some rule matches and 3 if none does.
// FW_PCK_TYPE carries the packet class. Both are valid while FW_COMPLETED is
// high for one cycle and hold their value until the next verdict.
//
// Timing: FW_COMPLETED rises ROWS + 2 cycles after FW_OUT, i.e. 18 cycles
// (144 ns at 125 MHz) for 256 rules in 16 lanes, the latency the description
// gives. The lane count is this design's choice, made to meet that figure.
// A new FW_OUT may come only after the previous verdict (packets are at least
// 60 bytes long, so they always are).
module check_rules
  import fw_pkg::*;
#(
  parameter int NUM_RULES = 256,
  parameter int LANES     = 16,
  parameter int ROWS      = NUM_RULES / LANES,
  parameter int RAW       = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    blacklist,
  input  logic                    fw_out,
  input  pkt_fields_t             fields,
  input  pck_type_e               pck_type,
  input  logic                    chksum_ok,
  output logic [RAW-1:0]          address_rules,
  input  logic [LANES*RULE_W-1:0] data_rules,
  output logic [1:0]              fw_result,
  output pck_type_e               fw_pck_type,
  output logic                    fw_completed
);
  typedef enum logic {IDLE, SCAN} state_e;
  state_e       state;
  pkt_fields_t  f_q;
  logic         chk_q;
  logic [RAW:0] rd_cnt;      // rows requested so far
  logic         data_v;      // data_rules holds a row requested last cycle
  logic         match;

  assign address_rules = rd_cnt[RAW-1:0];

  logic row_match;
  always_comb begin
    row_match = 1'b0;
    for (int l = 0; l < LANES; l++)
      if (rule_match(rule_t'(data_rules[l*RULE_W +: RULE_W]), f_q)) row_match = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= IDLE;
      f_q          <= '0;
      chk_q        <= 1'b0;
      rd_cnt       <= '0;
      data_v       <= 1'b0;
      match        <= 1'b0;
      fw_result    <= RES_CHKSUM_ERR;
      fw_pck_type  <= PT_ARP;
      fw_completed <= 1'b0;
    end else begin
      fw_completed <= 1'b0;
      case (state)
        IDLE: if (fw_out) begin
          f_q         <= fields;
          chk_q       <= chksum_ok;
          fw_pck_type <= pck_type;
          rd_cnt      <= '0;
          data_v      <= 1'b0;
          match       <= 1'b0;
          state       <= SCAN;
        end
        default: begin                        // SCAN
          data_v <= (rd_cnt < (RAW+1)'(ROWS));
          if (rd_cnt < (RAW+1)'(ROWS)) rd_cnt <= rd_cnt + 1'b1;
          if (data_v && row_match) match <= 1'b1;
          if (data_v && rd_cnt == (RAW+1)'(ROWS)) begin   // last row is in
            fw_completed <= 1'b1;
            fw_result    <= !chk_q ? RES_CHKSUM_ERR
                          : (((match | row_match) ^ blacklist) ? RES_PASS : RES_RULE_VIOL);
            state        <= IDLE;
          end
        end
      endcase
    end
  end

  // the next packet's FW_OUT never arrives during a scan
  a_no_overlap: assert property (@(posedge clk) disable iff (rst) fw_out |-> state == IDLE);
endmodule
