// firewall_top -- two-port stateless hardware firewall.
//
// Port A faces the protected LAN, port B the Internet. Each direction (A->B
// and B->A) is an fw_port with its own 16 kB packet buffer, control-word queue
// and set of 256 rules, used as a whitelist or a blacklist. The MACs are not
// part of this RTL: each port's receive and transmit byte streams (8-bit
// AXI-stream style, DATA/DV/LAST/ERR plus READY on transmit) are top-level
// ports. A UART link (115,200 baud, 8N1) to a PC loads the rules, sets the
// list mode of each port and reads the statistics of either direction.
//
// Clocks: CLK_125 for all packet logic, CLK_10 for the UART side; both come
// from a clock generator outside this RTL. RST is asynchronous to both and is
// synchronised into each domain (two flip-flops), so each domain leaves reset
// on its own clock; the reset tree is this design's choice.
module firewall_top
  import fw_pkg::*;
#(
  parameter int CLKS_PER_BIT = 87
) (
  input  logic       clk_125,
  input  logic       clk_10,
  input  logic       rst,
  // USB-UART link
  input  logic       uart_rx,
  output logic       uart_tx,
  // Port A MAC
  input  logic [7:0] port_a_rx_data,
  input  logic       port_a_rx_dv,
  input  logic       port_a_rx_last,
  input  logic       port_a_rx_err,
  output logic [7:0] port_a_tx_data,
  output logic       port_a_tx_dv,
  output logic       port_a_tx_last,
  output logic       port_a_tx_err,
  input  logic       port_a_tx_ready,
  // Port B MAC
  input  logic [7:0] port_b_rx_data,
  input  logic       port_b_rx_dv,
  input  logic       port_b_rx_last,
  input  logic       port_b_rx_err,
  output logic [7:0] port_b_tx_data,
  output logic       port_b_tx_dv,
  output logic       port_b_tx_last,
  output logic       port_b_tx_err,
  input  logic       port_b_tx_ready
);
  logic [1:0] rs125, rs10;
  logic       rst_125, rst_10;
  always_ff @(posedge clk_125 or posedge rst)
    if (rst) rs125 <= 2'b11; else rs125 <= {rs125[0], 1'b0};
  always_ff @(posedge clk_10 or posedge rst)
    if (rst) rs10 <= 2'b11; else rs10 <= {rs10[0], 1'b0};
  assign rst_125 = rs125[1];
  assign rst_10  = rs10[1];

  logic [7:0]        uart_rx_data, uart_tx_data;
  logic              uart_rx_dv, uart_tx_dv, uart_tx_done;
  logic [RULE_W-1:0] dr_data;
  logic [7:0]        dr_addr;
  logic [1:0]        dr_we, blacklist, req_stat, ack_stat;
  logic [STAT_W-1:0] stat_a, stat_b;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_urx (
    .clk(clk_10), .rst(rst_10), .rx(uart_rx), .uart_rx_data, .uart_rx_dv);

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_utx (
    .clk(clk_10), .rst(rst_10), .uart_tx_data, .uart_tx_dv, .tx(uart_tx),
    .uart_tx_done);

  uart_controller u_uctl (
    .clk(clk_10), .rst(rst_10), .uart_rx_data, .uart_rx_dv,
    .uart_tx_data, .uart_tx_dv, .uart_tx_done,
    .dr_data, .dr_addr, .dr_we, .blacklist, .req_stat, .ack_stat,
    .stat_data_a(stat_a), .stat_data_b(stat_b));

  // Port A receive -> Port B transmit
  fw_port u_ab (
    .clk(clk_125), .rst(rst_125), .clk_uart(clk_10),
    .rx_data(port_a_rx_data), .rx_dv(port_a_rx_dv), .rx_last(port_a_rx_last), .rx_err(port_a_rx_err),
    .tx_data(port_b_tx_data), .tx_dv(port_b_tx_dv), .tx_last(port_b_tx_last), .tx_err(port_b_tx_err),
    .tx_ready(port_b_tx_ready),
    .dr_addr, .dr_data, .dr_we(dr_we[0]), .blacklist(blacklist[0]),
    .req_stat(req_stat[0]), .ack_stat(ack_stat[0]), .stat_data(stat_a));

  // Port B receive -> Port A transmit
  fw_port u_ba (
    .clk(clk_125), .rst(rst_125), .clk_uart(clk_10),
    .rx_data(port_b_rx_data), .rx_dv(port_b_rx_dv), .rx_last(port_b_rx_last), .rx_err(port_b_rx_err),
    .tx_data(port_a_tx_data), .tx_dv(port_a_tx_dv), .tx_last(port_a_tx_last), .tx_err(port_a_tx_err),
    .tx_ready(port_a_tx_ready),
    .dr_addr, .dr_data, .dr_we(dr_we[1]), .blacklist(blacklist[1]),
    .req_stat(req_stat[1]), .ack_stat(ack_stat[1]), .stat_data(stat_b));
endmodule
