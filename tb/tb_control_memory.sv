// tb_control_memory -- self-checking test of the control-word memory.
// Checks that every word starts cleared, then writes random 40-bit words
// and reads them back with one cycle of latency.
module tb_control_memory;
  localparam int DEPTH = 1024;
  logic clk = 0, cwe = 0;
  logic [9:0]  caddr_in = '0, caddr_out = '0;
  logic [39:0] cdata_in = '0, cdata_out;
  int checks = 0, failures = 0;
  logic [39:0] ref_mem [DEPTH];

  control_memory dut (.*);
  always #4 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a += 7) begin
      @(negedge clk); caddr_out = 10'(a);
      @(negedge clk); checks++;
      if (cdata_out !== 40'd0) failures++;
    end
    for (int a = 0; a < DEPTH; a++) begin
      ref_mem[a] = {8'($urandom), $urandom};
      @(negedge clk); cwe = 1; caddr_in = 10'(a); cdata_in = ref_mem[a];
    end
    @(negedge clk); cwe = 0;
    for (int a = DEPTH - 1; a >= 0; a -= 5) begin
      @(negedge clk); caddr_out = 10'(a);
      @(negedge clk); checks++;
      if (cdata_out !== ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %h want %h", a, cdata_out, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
