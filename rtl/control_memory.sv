// control_memory -- queue of control words of one firewall direction.
//
// A dual-port block RAM of 1024 words of 40 bits (10-bit addresses), one word
// per buffered packet: {STATUS BYTE, PACKET START ADDRESS, PACKET LENGTH}.
// Port A (CADDR_IN, CDATA_IN, CWE) is written by the RX control; port B
// (CADDR_OUT, CDATA_OUT) is read by the TX control, which polls it every
// cycle. Reads are synchronous with one cycle of latency; a same-cycle read of
// the address being written returns the old word. The memory starts cleared
// (every packet slot quarantined and empty), as an FPGA block RAM with an
// all-zero initial image does; this initial state is this design's choice.
module control_memory #(
  parameter int DEPTH = 1024,
  parameter int AW    = $clog2(DEPTH),
  parameter int DW    = 40
) (
  input  logic          clk,
  input  logic          cwe,
  input  logic [AW-1:0] caddr_in,
  input  logic [DW-1:0] cdata_in,
  input  logic [AW-1:0] caddr_out,
  output logic [DW-1:0] cdata_out
);
  logic [DW-1:0] mem [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) mem[a] = '0;
  end

  always_ff @(posedge clk) begin
    if (cwe) mem[caddr_in] <= cdata_in;
    cdata_out <= mem[caddr_out];
  end
endmodule
