// tb_pixel_pipeline: final pixel stage. The line buffers are replaced by
// functions of (rd_x, rd_y) with random transparency, the palette by a
// registered lookup. Over a whole raster the colour must come out 3 cycles
// after the position, chosen sprite > character > background, with the
// palette region offsets and the background palette bank applied, and black
// outside the game window.
`timescale 1ns/1ps
module tb_pixel_pipeline;
  import arcade_pkg::*;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  logic [9:0] hc = 0, vc = 0; logic [7:0] rx, ry, fgi, bgi, spi; logic win, fgo, spo; logic [1:0] pb = 0;
  logic [10:0] pa; logic [15:0] pq; logic [3:0] r, g, b;
  pixel_pipeline dut (.clk, .rst, .hcount(hc), .vcount(vc), .rd_x(rx), .rd_y(ry), .in_window(win),
    .fg_idx(fgi), .fg_opaque(fgo), .bg_idx(bgi), .spr_idx(spi), .spr_opaque(spo), .pal_bank(pb),
    .pal_addr(pa), .pal_q(pq), .r, .g, .b);
  function automatic logic [15:0] palf(input int i); return 16'((i * 2719) ^ 16'h5A5A); endfunction
  always_ff @(posedge clk) pq <= palf(pa);
  function automatic logic [7:0] hsh(input int x, input int y, input int s);
    int unsigned v;
    v = (32'(x) * 32'd131 + 32'(y) * 32'd7919) ^ (32'(s) * 32'h9E3779B9);
    v = v * 32'h85EBCA6B; v = v ^ (v >> 13); v = v * 32'hC2B2AE35;
    return v[31:24];
  endfunction
  assign spi = hsh(rx, ry, 1); assign spo = hsh(rx, ry, 2) < 8'd60;
  assign fgi = hsh(rx, ry, 3); assign fgo = hsh(rx, ry, 4) < 8'd120;
  assign bgi = hsh(rx, ry, 5);
  int checks = 0, failures = 0, n_s = 0, n_f = 0, n_b = 0, n_both = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  logic [11:0] expq [$];
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int y = 100; y < 380; y++) for (int x = 190; x < 450; x++) begin
      logic [11:0] e; int gx, gy;
      @(negedge clk); hc = 10'(x); vc = 10'(y); pb = 2'(y / 64);
      gx = x - GAME_X0; gy = y - GAME_Y0;
      #1;
      if (gx >= 0 && gx < GAME_W && gy >= 0 && gy < GAME_H) begin
        if (spo) begin e = palf(11'h500 + spi); n_s++; if (fgo) n_both++; end
        else if (fgo) begin e = palf(fgi); n_f++; end
        else begin e = palf(11'h100 + {pb, bgi}); n_b++; end
        check(win && rx == 8'(gx) && ry == 8'(gy), "window position");
      end else e = 12'h0;
      expq.push_back(e);
      if (expq.size() > 3) begin
        logic [11:0] ex; ex = expq.pop_front();
        check({r, g, b} == ex, $sformatf("colour at %0d,%0d got %h exp %h", x, y, {r, g, b}, ex));
      end
    end
    check(n_s > 0 && n_f > 0 && n_b > 0 && n_both > 0, "all three sources chosen, sprite over character");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #5ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
