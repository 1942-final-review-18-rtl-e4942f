// tb_vga_controller: checks the 640x480@60Hz raster of vga_controller.
// Over one full frame it measures line and frame length, sync widths and
// positions, the colour pipeline delay (colour supplied LATENCY cycles after
// the counters must reach the pins one cycle later, blanked outside the
// visible area) and the line/frame/vsync start strobes.
`timescale 1ns/1ps
module tb_vga_controller;
  import arcade_pkg::*;
  logic clk = 0, rst = 1;
  always #20 clk = ~clk;
  logic [9:0] hc, vc;
  logic ls, fs, vss, hs_n, vs_n;
  logic [3:0] r, g, b, ri, gi, bi;
  vga_controller dut (.clk, .rst, .hcount(hc), .vcount(vc), .line_start(ls), .frame_start(fs), .vsync_start(vss),
                      .r_in(ri), .g_in(gi), .b_in(bi), .hsync_n(hs_n), .vsync_n(vs_n), .vga_r(r), .vga_g(g), .vga_b(b));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  // colour source: a function of the position, delayed by LATENCY cycles
  logic [9:0] hq [PIXEL_LATENCY+1], vq [PIXEL_LATENCY+1];
  always_ff @(posedge clk) begin
    hq[0] <= hc; vq[0] <= vc;
    for (int i = 1; i <= PIXEL_LATENCY; i++) begin hq[i] <= hq[i-1]; vq[i] <= vq[i-1]; end
  end
  assign {ri, gi, bi} = {hq[PIXEL_LATENCY-1][3:0], vq[PIXEL_LATENCY-1][3:0], hq[PIXEL_LATENCY-1][7:4]};

  int cyc = 0, hs_lo = 0, vs_lo_lines = 0, n_ls = 0, n_fs = 0, n_vss = 0;
  int hs_fall_at = -1;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    @(posedge clk iff fs);
    n_fs = 1;
    for (cyc = 0; cyc < H_TOTAL * V_TOTAL; cyc++) begin
      @(posedge clk); #1;
      // expected pin state for the position seen LATENCY+1 cycles before
      begin
        int x, y; bit act, hs, vs;
        x = hq[PIXEL_LATENCY]; y = vq[PIXEL_LATENCY];
        act = x < H_VISIBLE && y < V_VISIBLE;
        hs = x >= H_VISIBLE + H_FRONT && x < H_VISIBLE + H_FRONT + H_SYNC;
        vs = y >= V_VISIBLE + V_FRONT && y < V_VISIBLE + V_FRONT + V_SYNC;
        if (cyc > 8) begin
          check(hs_n == !hs, $sformatf("hsync at %0d,%0d", x, y));
          check(vs_n == !vs, $sformatf("vsync at %0d,%0d", x, y));
          check({r, g, b} == (act ? {x[3:0], y[3:0], x[7:4]} : 12'h0), $sformatf("colour at %0d,%0d", x, y));
        end
      end
      if (ls) n_ls++;
      if (fs) n_fs++;
      if (vss) begin n_vss++; check(vc == V_VISIBLE + V_FRONT && hc == 0, "vsync_start position"); end
      if (!hs_n) hs_lo++;
    end
    check(n_ls == V_TOTAL, $sformatf("lines per frame %0d", n_ls));
    check(n_fs == 2, $sformatf("frame starts %0d", n_fs));
    check(n_vss == 1, "one vsync_start per frame");
    check(hs_lo == H_SYNC * V_TOTAL, $sformatf("hsync low cycles %0d", hs_lo));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #50ms; failures++; $display("watchdog at cycle %0d", cyc); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
