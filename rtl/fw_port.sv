// fw_port -- one filtering direction of the firewall (input port -> output port).
//
// Wires together, as in the block diagram of the design: the RX control with
// the data memory (16 kB packet buffer) and control memory (1024 control
// words), the packet analysis and rule checker with the rules memory (256
// rules), the TX control and the statistics. Bytes are stored as they arrive;
// the verdict is written into the packet's control word 20 cycles after its
// last byte (1 cycle to FW_OUT, 18 to FW_COMPLETED, 1 to write it); the TX
// control sends buffered packets in arrival order as their verdicts become
// known, or skips blocked ones. Packet side runs on CLK (125 MHz in the
// description); rule writes, the list-mode bit and the statistics request come
// from the UART clock domain CLK_UART. The mode bit is synchronised with two
// flip-flops; the rules memory has a write port on CLK_UART.
module fw_port
  import fw_pkg::*;
#(
  parameter int DDEPTH    = 16384,
  parameter int CDEPTH    = 1024,
  parameter int NUM_RULES = 256,
  parameter int LANES     = 16,
  parameter int HI_MARK   = 12 * 1024,
  parameter int LO_MARK   = 5 * 1024
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clk_uart,
  // receiving MAC
  input  logic [7:0]        rx_data,
  input  logic              rx_dv,
  input  logic              rx_last,
  input  logic              rx_err,
  // transmitting MAC
  output logic [7:0]        tx_data,
  output logic              tx_dv,
  output logic              tx_last,
  output logic              tx_err,
  input  logic              tx_ready,
  // configuration and statistics (UART clock domain)
  input  logic [7:0]        dr_addr,
  input  logic [RULE_W-1:0] dr_data,
  input  logic              dr_we,
  input  logic              blacklist,
  input  logic              req_stat,
  output logic              ack_stat,
  output logic [STAT_W-1:0] stat_data
);
  localparam int DAW  = $clog2(DDEPTH);
  localparam int CAW  = $clog2(CDEPTH);
  localparam int ROWS = NUM_RULES / LANES;
  localparam int RAW  = (ROWS > 1) ? $clog2(ROWS) : 1;

  logic [DAW-1:0] daddr_in, daddr_out;
  logic [7:0]     ddata_in, ddata_out;
  logic           dwe;
  logic [CAW-1:0] caddr_in, caddr_out;
  ctrl_word_t     cdata_in, cdata_out;
  logic           cwe;
  logic           fw_en, fw_err, fw_out, fw_completed;
  logic [7:0]     fw_data;
  logic [15:0]    byte_number;
  logic [1:0]     fw_result;
  pck_type_e      fw_pck_type, pck_type;
  pkt_fields_t    fields;
  logic           chksum_ok;
  logic [RAW-1:0] address_rules;
  logic [LANES*RULE_W-1:0] data_rules;
  logic [CAW-1:0] tx_caddr;
  logic [15:0]    tx_pck_length, used_memory, ev_len;
  logic           tx_completed, tx_ack, ev_drop, ev_sent, mem_full;
  logic [CAW:0]   queued;
  logic [1:0]     mode_sync;

  always_ff @(posedge clk)
    if (rst) mode_sync <= '0;
    else     mode_sync <= {mode_sync[0], blacklist};

  rx_control #(.DDEPTH(DDEPTH), .CDEPTH(CDEPTH), .HI_MARK(HI_MARK), .LO_MARK(LO_MARK)) u_rx (
    .clk, .rst, .rx_data, .rx_dv, .rx_last, .rx_err,
    .daddr_in, .ddata_in, .dwe, .caddr_in, .cdata_in, .cwe,
    .fw_en, .fw_data, .byte_number, .fw_err, .fw_out,
    .fw_result, .fw_completed,
    .tx_caddr, .tx_pck_length, .tx_completed, .tx_ack,
    .used_memory, .queued, .mem_full, .ev_drop, .ev_len);

  data_memory #(.DEPTH(DDEPTH)) u_dmem (
    .clk, .dwe, .daddr_in, .ddata_in, .daddr_out, .ddata_out);

  control_memory #(.DEPTH(CDEPTH)) u_cmem (
    .clk, .cwe, .caddr_in, .cdata_in(cdata_in), .caddr_out, .cdata_out(cdata_out));

  packet_analysis u_pa (
    .clk, .rst, .fw_en, .fw_data, .byte_number, .fw_err,
    .fields, .pck_type, .chksum_ok);

  check_rules #(.NUM_RULES(NUM_RULES), .LANES(LANES)) u_chk (
    .clk, .rst, .blacklist(mode_sync[1]), .fw_out, .fields, .pck_type, .chksum_ok,
    .address_rules, .data_rules, .fw_result, .fw_pck_type, .fw_completed);

  rules_memory #(.NUM_RULES(NUM_RULES), .LANES(LANES)) u_rmem (
    .clk_wr(clk_uart), .dr_we, .dr_addr(dr_addr[$clog2(NUM_RULES)-1:0]), .dr_data,
    .clk, .address_rules, .data_rules);

  tx_control #(.DDEPTH(DDEPTH), .CDEPTH(CDEPTH)) u_tx (
    .clk, .rst, .caddr_out, .cdata_out, .daddr_out, .ddata_out,
    .tx_data, .tx_dv, .tx_last, .tx_err, .tx_ready,
    .tx_caddr, .tx_pck_length, .tx_completed, .tx_ack, .ev_sent);

  fw_stats #(.CAW(CAW)) u_stats (
    .clk, .rst, .ev_rx(fw_out), .ev_drop, .ev_len,
    .ev_verdict(fw_completed), .fw_result, .fw_pck_type,
    .ev_sent, .tx_len(tx_pck_length), .used_memory, .queued, .mem_full,
    .req_stat, .ack_stat, .stat_data);
endmodule
