// tb_data_memory -- self-checking test of the packet buffer.
// Writes a pseudo-random byte to every address, reads all back (one-cycle
// read latency), and checks that a read of the address being written in the
// same cycle returns the old byte.
module tb_data_memory;
  localparam int DEPTH = 16384;
  logic clk = 0, dwe = 0;
  logic [13:0] daddr_in = '0, daddr_out = '0;
  logic [7:0]  ddata_in = '0, ddata_out;
  int checks = 0, failures = 0;
  logic [7:0] ref_mem [DEPTH];

  data_memory dut (.*);
  always #4 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      ref_mem[a] = 8'(a * 37 + (a >> 8) + 5);
      @(negedge clk); dwe = 1; daddr_in = 14'(a); ddata_in = ref_mem[a];
    end
    @(negedge clk); dwe = 0;
    for (int a = 0; a < DEPTH; a += 3) begin
      @(negedge clk); daddr_out = 14'(a);
      @(negedge clk);
      checks++;
      if (ddata_out !== ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %h want %h", a, ddata_out, ref_mem[a]);
      end
    end
    // collision: read-before-write
    @(negedge clk); dwe = 1; daddr_in = 14'd100; ddata_in = ~ref_mem[100]; daddr_out = 14'd100;
    @(negedge clk); dwe = 0;
    checks++; if (ddata_out !== ref_mem[100]) failures++;
    @(negedge clk);
    checks++; if (ddata_out !== ~ref_mem[100]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
