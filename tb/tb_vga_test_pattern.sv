// tb_vga_test_pattern: the colour test screen. Sweeps a whole 800x525 raster
// and checks each colour against the bar/ramp formula, delayed by the
// pipeline latency.
`timescale 1ns/1ps
module tb_vga_test_pattern;
  import arcade_pkg::*;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  logic [9:0] hc = 0, vc = 0; logic [3:0] r, g, b;
  vga_test_pattern dut (.clk, .rst, .hcount(hc), .vcount(vc), .r, .g, .b);
  int checks = 0, failures = 0, n_lit = 0;
  logic [11:0] q [$];
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int y = 0; y < V_TOTAL; y++) for (int x = 0; x < H_TOTAL; x++) begin
      logic [3:0] bar, lv; logic [11:0] e;
      @(negedge clk);
      if (q.size() == PIXEL_LATENCY) begin
        e = q.pop_front(); checks++;
        if ({r, g, b} !== e) begin failures++; if (failures < 10) $display("FAIL at %0d,%0d: %h exp %h", x, y, {r, g, b}, e); end
        if (e != 0) n_lit++;
      end
      hc = 10'(x); vc = 10'(y);
      bar = 4'(x / 64); lv = 4'((y / 32) % 16);
      q.push_back({bar[0] ? lv : 4'h0, bar[1] ? lv : 4'h0, bar[2] ? lv : 4'h0});
    end
    checks++; if (n_lit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
