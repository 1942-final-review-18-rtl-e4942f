// tb_joystick_if: every control line alone and random combinations; checks
// the active-low input byte layout and the two-cycle synchroniser delay.
`timescale 1ns/1ps
module tb_joystick_if;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  logic [8:0] in = 0;   // coin,start2,start1,flip,fire,up,down,left,right
  logic [7:0] sys, p1, p2;
  joystick_if dut (.clk, .rst, .right(in[0]), .left(in[1]), .down(in[2]), .up(in[3]), .fire(in[4]), .flip(in[5]),
                   .start1(in[6]), .start2(in[7]), .coin(in[8]), .in_system(sys), .in_p1(p1), .in_p2(p2));
  int checks = 0, failures = 0;
  task automatic expect_bytes(input logic [8:0] v);
    logic [7:0] ep1, es;
    ep1 = 8'hFF; es = 8'hFF;
    if (v[0]) ep1[0] = 0; if (v[1]) ep1[1] = 0; if (v[2]) ep1[2] = 0; if (v[3]) ep1[3] = 0;
    if (v[4]) ep1[4] = 0; if (v[5]) ep1[5] = 0;
    if (v[6]) es[0] = 0;  if (v[7]) es[1] = 0;  if (v[8]) es[4] = 0;
    checks++; if (p1 !== ep1 || sys !== es || p2 !== 8'hFF) begin failures++; $display("FAIL %b: %h %h", v, p1, sys); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 60; i++) begin
      logic [8:0] v, prev;
      v = (i < 9) ? 9'(1 << i) : 9'($urandom);
      prev = in;
      @(negedge clk); in = v;
      @(negedge clk); expect_bytes(prev);   // still in the synchroniser
      @(negedge clk); expect_bytes(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
