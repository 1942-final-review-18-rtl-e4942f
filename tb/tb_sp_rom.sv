// tb_sp_rom: block ROM read latency and contents. Loads a generated pattern
// into the array, then reads random addresses and checks that each word
// appears exactly one cycle after its address.
`timescale 1ns/1ps
module tb_sp_rom;
  localparam int D = 8192;
  logic clk = 0; always #5 clk = ~clk;
  logic [12:0] addr = 0; logic [7:0] q;
  sp_rom #(.DEPTH(D), .WIDTH(8)) dut (.clk, .addr, .q);
  int checks = 0, failures = 0;
  function automatic logic [7:0] f(input int a); return 8'((a * 73) ^ (a >> 5) ^ 8'h5C); endfunction
  initial begin
    logic [12:0] prev;
    for (int i = 0; i < D; i++) dut.mem[i] = f(i);
    @(negedge clk); addr = 13'd100; @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      prev = addr; addr = 13'($urandom);
      checks++; if (q !== f(prev)) begin failures++; $display("FAIL addr %0d", prev); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
