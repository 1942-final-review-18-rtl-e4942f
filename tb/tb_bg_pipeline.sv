// tb_bg_pipeline: background pipeline on its own. Background RAM and the three
// plane ROMs are modelled here. Lines are built with line_start strobes 800
// cycles apart and several scroll values (including wrap past row 511); after
// each build the whole 256-pixel line buffer is read through rd_x and
// compared with a reference decode with x/y flips. The build must take 256
// cycles (8 per 8-pixel group).
`timescale 1ns/1ps
module tb_bg_pipeline;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  logic ls = 0, nv = 0, busy; logic [7:0] nl = 0, rdx = 0, idx, q0, q1, q2, ram_q; logic [8:0] scroll = 0;
  logic [9:0] ram_addr; logic [13:0] rom_addr;
  bg_pipeline dut (.clk, .rst, .line_start(ls), .next_line(nl), .next_valid(nv), .scroll, .ram_addr, .ram_q,
                   .rom_addr, .rom0_q(q0), .rom1_q(q1), .rom2_q(q2), .rd_x(rdx), .bg_idx(idx), .busy);
  logic [7:0] ram [1024], rom [3][16384];
  always_ff @(posedge clk) begin ram_q <= ram[ram_addr]; q0 <= rom[0][rom_addr]; q1 <= rom[1][rom_addr]; q2 <= rom[2][rom_addr]; end
  int checks = 0, failures = 0, n_fx = 0, n_fy = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  function automatic logic [7:0] ref_pix(input int x, input int line, input int sc);
    int sy, pr, px, a; logic [7:0] c, at;
    sy = (line + sc) % 512;
    c = ram[(sy / 16) * 32 + x / 16]; at = ram[(sy / 16) * 32 + 16 + x / 16];
    pr = (sy % 16) ^ (at[6] ? 15 : 0); px = (x % 16) ^ (at[5] ? 15 : 0);
    a = {at[7], c, 4'(pr), px[3]};
    return {at[4:0], rom[2][a][7 - px % 8], rom[1][a][7 - px % 8], rom[0][a][7 - px % 8]};
  endfunction
  initial begin
    int scrolls [4] = '{0, 37, 300, 500};
    for (int i = 0; i < 1024; i++) ram[i] = 8'($urandom);
    for (int k = 0; k < 3; k++) for (int i = 0; i < 16384; i++) rom[k][i] = 8'($urandom);
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 24; t++) begin
      int line, sc, bcyc;
      line = (t * 41) % 256; sc = scrolls[t % 4];
      // build
      @(negedge clk); ls = 1; nv = 1; nl = 8'(line); scroll = 9'(sc);
      @(negedge clk); ls = 0; bcyc = 0;
      while (busy) begin @(negedge clk); bcyc++; end
      check(bcyc == 256, $sformatf("build took %0d cycles", bcyc));
      repeat (800 - bcyc - 2) @(negedge clk);
      // swap and read back
      @(negedge clk); ls = 1; nv = 0;
      @(negedge clk); ls = 0;
      for (int x = 0; x < 256; x++) begin
        logic [7:0] e;
        rdx = 8'(x); #1 e = ref_pix(x, line, sc);
        check(idx == e, $sformatf("bg x=%0d line=%0d scroll=%0d got %h exp %h", x, line, sc, idx, e));
      end
    end
    for (int i = 0; i < 512; i++) begin if (ram[(i / 16) * 32 + 16 + i % 16][5]) n_fx++; if (ram[(i / 16) * 32 + 16 + i % 16][6]) n_fy++; end
    check(n_fx > 0 && n_fy > 0, "flipped tiles present");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #5ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
