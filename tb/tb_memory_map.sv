// tb_memory_map: CPU address decode. Memories are modelled here as registered
// lookups (ROMs) and arrays (RAMs). Checks reads from every ROM region and
// every bank setting, writes and reads of each RAM region (and that a write
// lands in exactly one RAM), the input bytes, unmapped reads (FF), writes to
// ROM being ignored, and the sound, scroll, palette-bank and ROM-bank registers.
`timescale 1ns/1ps
module tb_memory_map;
  import arcade_pkg::*;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  logic [15:0] a = 0; logic [7:0] wd = 0, rd; logic crd = 0, cwr = 0;
  logic [14:0] rom_addr; logic [13:0] bank_addr; logic [7:0] rom_q, b1_q, b2_q, b3_q, wdata;
  logic ram_we, fg_we, bg_we, spr_we; logic [11:0] ram_addr; logic [10:0] fg_addr; logic [9:0] bg_addr; logic [6:0] spr_addr;
  logic [7:0] ram_q, fg_q, bg_q, spr_q, code; logic swr; logic [8:0] scroll; logic [1:0] pbank, rbank;
  memory_map dut (.clk, .rst, .cpu_addr(a), .cpu_wdata(wd), .cpu_rd(crd), .cpu_wr(cwr), .cpu_rdata(rd),
    .rom_addr, .rom_q, .bank_addr, .bank1_q(b1_q), .bank2_q(b2_q), .bank3_q(b3_q),
    .mem_wdata(wdata), .ram_we, .ram_addr, .ram_q, .fg_we, .fg_addr, .fg_q, .bg_we, .bg_addr, .bg_q, .spr_we, .spr_addr, .spr_q,
    .in_system(8'h11), .in_p1(8'h22), .in_p2(8'h33), .dsw_a(8'h44), .dsw_b(8'h55),
    .sound_code(code), .sound_wr(swr), .scroll, .pal_bank(pbank), .rom_bank(rbank));

  function automatic logic [7:0] f(input int x, input int s); return 8'((x * 37 + s * 91) ^ (x >> 7)); endfunction
  logic [7:0] ram [4096], fg [2048], bg [1024], spr [128];
  int n_we = 0, n_swr = 0;
  always_ff @(posedge clk) begin
    rom_q <= f(rom_addr, 0); b1_q <= f(bank_addr, 1); b2_q <= f(bank_addr[12:0], 2); b3_q <= f(bank_addr, 3);
    if (ram_we) ram[ram_addr] <= wdata; ram_q <= ram[ram_addr];
    if (fg_we) fg[fg_addr] <= wdata;    fg_q <= fg[fg_addr];
    if (bg_we) bg[bg_addr] <= wdata;    bg_q <= bg[bg_addr];
    if (spr_we) spr[spr_addr] <= wdata; spr_q <= spr[spr_addr];
    n_we <= n_we + int'(ram_we) + int'(fg_we) + int'(bg_we) + int'(spr_we);
    if (swr && !rst) n_swr <= n_swr + 1;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  task automatic wr(input logic [15:0] ad, input logic [7:0] d);
    @(negedge clk); a = ad; wd = d; cwr = 1; repeat (3) @(negedge clk); cwr = 0; @(negedge clk);
  endtask
  task automatic rdm(input logic [15:0] ad, output logic [7:0] d);
    @(negedge clk); a = ad; crd = 1; repeat (2) @(negedge clk); d = rd; crd = 0;
  endtask

  initial begin
    logic [7:0] d; int w0;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 20; i++) begin int x; x = $urandom % 32768; rdm(16'(x), d); check(d == f(x, 0), "main ROM"); end
    for (int b = 0; b < 4; b++) begin
      wr(IO_ROM_BANK, 8'(b)); check(rbank == 2'(b), "bank register");
      for (int i = 0; i < 10; i++) begin
        int x; x = $urandom % 16384; rdm(16'h8000 + 16'(x), d);
        case (b)
          0: check(d == f(x, 1), "bank 0");
          1: check(d == f(x % 8192, 2), "bank 1 (8 KiB, mirrored)");
          2: check(d == f(x, 3), "bank 2");
          default: check(d == 8'hFF, "bank 3 empty");
        endcase
      end
    end
    // RAM regions: one write each, exactly one RAM written
    for (int i = 0; i < 20; i++) begin
      logic [15:0] ad; logic [7:0] v;
      v = 8'($urandom);
      case (i % 4)
        0: ad = 16'hE000 + 16'($urandom % 4096);
        1: ad = 16'hD000 + 16'($urandom % 2048);
        2: ad = 16'hD800 + 16'($urandom % 1024);
        default: ad = 16'hCC00 + 16'($urandom % 128);
      endcase
      w0 = n_we; wr(ad, v); check(n_we == w0 + 1, "one RAM write per CPU write");
      rdm(ad, d); check(d == v, $sformatf("RAM readback at %h", ad));
    end
    // writes to ROM and unmapped space change nothing
    w0 = n_we; wr(16'h1234, 8'h00); wr(16'hF000, 8'h00); check(n_we == w0, "ROM write ignored");
    rdm(16'h1234, d); check(d == f(16'h1234, 0), "ROM unchanged");
    rdm(16'hF123, d); check(d == 8'hFF, "unmapped F123");
    rdm(16'hCC80, d); check(d == 8'hFF, "unmapped CC80");
    rdm(16'hDC00, d); check(d == 8'hFF, "unmapped DC00");
    // inputs
    rdm(IO_IN_SYSTEM, d); check(d == 8'h11, "system");
    rdm(IO_IN_P1, d); check(d == 8'h22, "p1");
    rdm(IO_IN_P2, d); check(d == 8'h33, "p2");
    rdm(IO_IN_DSWA, d); check(d == 8'h44, "dsw a");
    rdm(IO_IN_DSWB, d); check(d == 8'h55, "dsw b");
    // registers
    wr(IO_SOUND, 8'h0D); check(code == 8'h0D && n_swr == 1, $sformatf("sound code %h + one strobe (%0d)", code, n_swr));
    wr(IO_SCROLL_LO, 8'hA7); wr(IO_SCROLL_HI, 8'h01); check(scroll == 9'h1A7, "scroll");
    wr(IO_PAL_BANK, 8'h03); check(pbank == 2'd3, "palette bank");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
