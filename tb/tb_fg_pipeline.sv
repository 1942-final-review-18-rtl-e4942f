// tb_fg_pipeline: character pipeline on its own. Tilemap RAM and character
// ROM are modelled here (one-cycle read latency). For a set of rows the fetch
// column is swept 0..231 as the beam would; for every screen column 0..223
// the buffered pixel (palette index and transparency) is compared with a
// reference decode, and the tilemap read addresses (code, then
// attribute, at the start of each 8-pixel group) are checked.
`timescale 1ns/1ps
module tb_fg_pipeline;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  logic [7:0] fx = 0, gy = 0, ram_q, rom_q, idx; logic fxv = 0, opq;
  logic [10:0] ram_addr; logic [12:0] rom_addr; logic [2:0] rdx;
  fg_pipeline dut (.clk, .rst, .fx, .fx_valid(fxv), .gy, .ram_addr, .ram_q, .rom_addr, .rom_q, .rd_x(rdx), .fg_idx(idx), .fg_opaque(opq));
  logic [7:0] ram [2048], rom [8192];
  always_ff @(posedge clk) begin ram_q <= ram[ram_addr]; rom_q <= rom[rom_addr]; end
  assign rdx = 3'(fx - 8'd8);
  int checks = 0, failures = 0, n_clear = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  function automatic logic [8:0] ref_pix(input int x, input int y);  // {opaque, idx}
    logic [7:0] c, a, b0, b1; int ad; logic [1:0] p;
    c = ram[(y / 8) * 32 + x / 8]; a = ram[1024 + (y / 8) * 32 + x / 8];
    ad = {a[7], c, 3'(y % 8), 1'b0}; b0 = rom[ad]; b1 = rom[ad + 1];
    p = {b1[7 - x % 8], b0[7 - x % 8]};
    return {p != 2'd0, a[5:0], p};
  endfunction
  initial begin
    for (int i = 0; i < 2048; i++) ram[i] = 8'($urandom);
    for (int i = 0; i < 8192; i++) rom[i] = 8'($urandom);
    repeat (2) @(negedge clk); rst = 0;
    for (int y = 0; y < 256; y += 7) begin
      gy = 8'(y);
      for (int f = 0; f < 232; f++) begin
        @(negedge clk);
        fx = 8'(f); fxv = 1;
        #1;
        if (f >= 8) begin
          logic [8:0] e; e = ref_pix(f - 8, y);
          check({opq, idx} == e, $sformatf("fg (%0d,%0d) got %b/%h exp %h", f - 8, y, opq, idx, e));
          if (!e[8]) n_clear++;
        end
        if (f[2:0] == 3'd0 || f[2:0] == 3'd1) check(ram_addr == {f[2:0] == 3'd1, 5'(y / 8), 5'(f / 8)}, "tilemap read address");
      end
      @(negedge clk); fxv = 0;
      repeat (5) @(negedge clk);
    end
    check(n_clear > 0, "transparent pixels seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
