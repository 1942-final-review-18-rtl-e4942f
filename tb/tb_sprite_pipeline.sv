// tb_sprite_pipeline: sprite pipeline on its own. Sprite RAM and the two sprite
// ROMs are modelled here. For many lines: build with a line_start, then swap
// with the next line_start and read all 256 columns, comparing with a
// reference (first 8 sprites on the line in RAM order, first non-transparent
// pixel wins). Several sprites share rows so the 8-per-line limit drops some;
// the number of overflow pulses must match. A line build must end within the
// 800-cycle scanline.
`timescale 1ns/1ps
module tb_sprite_pipeline;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  logic ls = 0, nv = 0, busy, opq, ovf; logic [7:0] nl = 0, rdx = 0, idx, q0, q1, ram_q;
  logic [6:0] ram_addr; logic [14:0] rom_addr;
  sprite_pipeline dut (.clk, .rst, .line_start(ls), .next_line(nl), .next_valid(nv), .ram_addr, .ram_q,
                       .rom_addr, .rom0_q(q0), .rom1_q(q1), .rd_x(rdx), .spr_idx(idx), .spr_opaque(opq), .overflow(ovf), .busy);
  logic [7:0] ram [128], rom [2][32768];
  always_ff @(posedge clk) begin ram_q <= ram[ram_addr]; q0 <= rom[0][rom_addr]; q1 <= rom[1][rom_addr]; end
  int n_ovf = 0; always @(posedge clk) if (ovf && !rst) n_ovf++;
  int checks = 0, failures = 0, n_through = 0, n_hit = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  function automatic logic [8:0] ref_pix(input int x, input int y, output bit through);
    int n, first; logic [7:0] r, d; logic [3:0] p; int base, k, b;
    n = 0; first = -1; through = 0;
    for (int s = 0; s < 32 && n < 8; s++) begin
      r = 8'(y) - ram[4*s+1];
      if (r < 16) begin
        n++; d = 8'(x) - ram[4*s];
        if (d < 16) begin
          base = {ram[4*s+3][7], ram[4*s+2], r[3:0], 2'b00}; k = (d < 8) ? 0 : 2; b = 7 - d % 8;
          p = {rom[1][base+k+1][b], rom[1][base+k][b], rom[0][base+k+1][b], rom[0][base+k][b]};
          if (first < 0) first = s;
          if (p != 4'hF) begin through = (first != s); return {1'b1, ram[4*s+3][3:0], p}; end
        end
      end
    end
    return 9'h000;
  endfunction
  function automatic int ref_drops(input int y);
    int n; logic [7:0] r; n = 0;
    for (int s = 0; s < 32; s++) begin r = 8'(y) - ram[4*s+1]; if (r < 16) n++; end
    return (n > 8) ? n - 8 : 0;
  endfunction
  initial begin
    int exp_ovf = 0;
    for (int s = 0; s < 32; s++) begin
      ram[4*s] = 8'($urandom); ram[4*s+1] = (s < 12) ? 8'd50 + 8'(s) : 8'($urandom); ram[4*s+2] = 8'($urandom); ram[4*s+3] = 8'($urandom);
    end
    ram[4*3] = 8'd100; ram[4*4] = 8'd104;   // overlapping pair
    for (int k = 0; k < 2; k++) for (int i = 0; i < 32768; i++) rom[k][i] = ($urandom % 4 == 0) ? 8'hFF : 8'($urandom);
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 40; t++) begin
      int line, bcyc;
      line = (t < 20) ? 45 + t : (t * 53) % 256;
      exp_ovf += ref_drops(line);
      @(negedge clk); ls = 1; nv = 1; nl = 8'(line);
      @(negedge clk); ls = 0; bcyc = 0;
      while (busy) begin @(negedge clk); bcyc++; end
      check(bcyc < 790, $sformatf("build took %0d cycles", bcyc));
      repeat (10) @(negedge clk);
      @(negedge clk); ls = 1; nv = 0;
      @(negedge clk); ls = 0;
      for (int x = 0; x < 256; x++) begin
        logic [8:0] e; bit th;
        rdx = 8'(x); #1 e = ref_pix(x, line, th);
        check({opq, idx} == e, $sformatf("spr x=%0d line=%0d got %b/%h exp %h", x, line, opq, idx, e));
        if (th) n_through++;
        if (e[8]) n_hit++;
      end
    end
    check(n_ovf == exp_ovf, $sformatf("overflow pulses %0d expected %0d", n_ovf, exp_ovf));
    check(exp_ovf > 0 && n_through > 0 && n_hit > 0, "overflow, overlap and hits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #5ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
