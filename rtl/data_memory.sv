// data_memory -- packet buffer of one firewall direction.
//
// A dual-port block RAM of DEPTH bytes (16 kB, 16,384 words of 8 bits, 14-bit
// addresses, as in the design description). Port A is written by the RX
// control (address DADDR_IN, data DDATA_IN, write enable DWE); port B is read
// by the TX control (address DADDR_OUT, data DDATA_OUT). Both ports use the
// packet clock. Reads are synchronous: DDATA_OUT shows the byte at the address
// presented one clock earlier. A read and a write of the same address in the
// same cycle return the old byte. Only one port writes and one reads: that is
// how the two blocks use the memory, so the unused write of port B and read of
// port A are left out.
module data_memory #(
  parameter int DEPTH = 16384,
  parameter int AW    = $clog2(DEPTH),
  parameter int DW    = 8
) (
  input  logic          clk,
  input  logic          dwe,
  input  logic [AW-1:0] daddr_in,
  input  logic [DW-1:0] ddata_in,
  input  logic [AW-1:0] daddr_out,
  output logic [DW-1:0] ddata_out
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (dwe) mem[daddr_in] <= ddata_in;
    ddata_out <= mem[daddr_out];
  end
endmodule
