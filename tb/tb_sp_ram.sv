// tb_sp_ram: work RAM. Random writes and reads against a reference array,
// checking one-cycle read latency and read-first behaviour on a write cycle.
`timescale 1ns/1ps
module tb_sp_ram;
  logic clk = 0; always #5 clk = ~clk;
  logic we = 0; logic [11:0] addr = 0; logic [7:0] d = 0, q;
  sp_ram dut (.clk, .we, .addr, .d, .q);
  logic [7:0] ref_m [4096];
  int checks = 0, failures = 0;
  initial begin
    logic [7:0] exp_q; logic pend = 0;
    for (int i = 0; i < 4096; i++) begin ref_m[i] = 8'(i ^ 8'hA5); end
    for (int i = 0; i < 4096; i++) begin @(negedge clk); we = 1; addr = 12'(i); d = ref_m[i]; end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (pend) begin checks++; if (q !== exp_q) begin failures++; $display("FAIL %0d", i); end end
      addr = 12'($urandom); we = ($urandom % 3) == 0; d = 8'($urandom);
      exp_q = ref_m[addr]; pend = 1;
      if (we) ref_m[addr] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
