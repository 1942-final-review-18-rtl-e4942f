// tb_arcade1942_top: end-to-end test of the 1942 platform at full size.
//
// Acts as the Z80: fills the foreground, background and sprite RAMs through
// the CPU bus, sets scroll and palette bank, switches ROM banks, reads the
// controls, plays sound codes and answers the frame interrupt. All ROMs are
// filled with hashed patterns. One whole frame is then captured from the VGA
// pins and every one of the 224 x 256 game pixels is compared with a
// reference renderer written here from the same RAM and ROM contents; pixels
// outside the game window must be black and sync pulses must have the
// 640x480 widths. Mechanisms that must each occur at least once: sprite line
// overflow, sprite transparency overlap, transparent characters, background
// x and y flip, scroll wrap-around, ROM banking, interrupt acknowledge,
// foreground sound playback, background music start/stop, and the switch
// to the colour test screen (checked at the pins for one frame).
`timescale 1ns/1ps
module tb_arcade1942_top;
  import arcade_pkg::*;

  logic clk_cpu = 0, clk_vid = 0, rst = 1;
  always #20 clk_vid = ~clk_vid;   // ~25 MHz
  always #80 clk_cpu = ~clk_cpu;   // 6.25 MHz

  logic [15:0] cpu_addr = 0;
  logic [7:0]  cpu_wdata = 0, cpu_rdata, dsw_a = 8'h5A, dsw_b = 8'hC3;
  logic        cpu_rd = 0, cpu_wr = 0, cpu_m1_n = 1, cpu_iorq_n = 1, cpu_int_n;
  logic        joy_up = 0, joy_down = 0, joy_left = 0, joy_right = 0;
  logic        btn_fire = 0, btn_flip = 0, btn_start1 = 0, btn_start2 = 0, btn_coin = 0;
  logic        hs_n, vs_n;
  logic [3:0]  vr, vg, vb;
  logic        fg_req = 0, bg_req = 0, bg_link, ovf, test_screen = 0;
  logic [15:0] fg_sample, bg_sample;

  arcade1942_top dut (
    .clk_cpu, .clk_vid, .rst,
    .cpu_addr, .cpu_wdata, .cpu_rd, .cpu_wr, .cpu_m1_n, .cpu_iorq_n, .cpu_rdata, .cpu_int_n,
    .joy_up, .joy_down, .joy_left, .joy_right, .btn_fire, .btn_flip, .btn_start1, .btn_start2, .btn_coin,
    .dsw_a, .dsw_b,
    .vga_hsync_n(hs_n), .vga_vsync_n(vs_n), .vga_r(vr), .vga_g(vg), .vga_b(vb),
    .fg_sample_req(fg_req), .fg_sample, .bg_sample_req(bg_req), .bg_sample, .bg_link,
    .test_screen, .sprite_overflow(ovf)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] h8(input int unsigned a, input int unsigned seed);
    int unsigned x;
    x = (a + seed * 32'h1234567) * 32'h9E3779B1;
    x = x ^ (x >> 15);
    return x[7:0] ^ x[23:16];
  endfunction

  // shadow copies
  logic [7:0]  fgram [2048], bgram [1024], sprram [128];
  logic [7:0]  gfx1 [8192], gfx2 [3][16384], gfx3 [2][32768];
  logic [15:0] pal [1536];
  logic [8:0]  scroll = 9'h1A3;
  logic [1:0]  pbank  = 2'd2;

  initial begin
    for (int i = 0; i < 8192;  i++) begin gfx1[i] = h8(i, 1); dut.u_gfx1.mem[i] = gfx1[i]; end
    for (int i = 0; i < 16384; i++) begin
      gfx2[0][i] = h8(i, 2); gfx2[1][i] = h8(i, 3); gfx2[2][i] = h8(i, 4);
      dut.u_gfx2_1.mem[i] = gfx2[0][i]; dut.u_gfx2_2.mem[i] = gfx2[1][i]; dut.u_gfx2_3.mem[i] = gfx2[2][i];
    end
    for (int i = 0; i < 32768; i++) begin
      gfx3[0][i] = h8(i, 5); gfx3[1][i] = h8(i, 6);
      dut.u_gfx3_1.mem[i] = gfx3[0][i]; dut.u_gfx3_2.mem[i] = gfx3[1][i];
    end
    for (int i = 0; i < 1536; i++) begin pal[i] = {h8(i, 7), h8(i, 8)}; dut.u_palette.mem[i] = pal[i]; end
    for (int i = 0; i < 32768; i++) dut.u_rom_main.mem[i] = h8(i, 9);
    for (int i = 0; i < 16384; i++) begin dut.u_rom_bank1.mem[i] = h8(i, 10); dut.u_rom_bank3.mem[i] = h8(i, 12); end
    for (int i = 0; i < 8192;  i++) dut.u_rom_bank2.mem[i] = h8(i, 11);
    for (int i = 0; i < 16384; i++) begin
      dut.g_snd[0].u_rom.mem[i] = 16'(i * 3 + 1);   dut.g_snd[1].u_rom.mem[i] = 16'(i * 5 + 2);
      dut.g_snd[2].u_rom.mem[i] = 16'(i * 7 + 3);   dut.g_snd[3].u_rom.mem[i] = 16'(i * 9 + 4);
      dut.g_snd[4].u_rom.mem[i] = 16'(i * 11 + 5);  dut.g_snd[5].u_rom.mem[i] = 16'(i * 13 + 6);
      dut.u_music_rom.mem[i] = 16'(16'hA000 + i);
    end
    for (int i = 0; i < 2048; i++) fgram[i] = h8(i, 20);
    for (int i = 0; i < 1024; i++) bgram[i] = h8(i, 21);
    for (int i = 0; i < 32; i++) begin
      sprram[4*i+0] = h8(i, 22);                                 // x
      sprram[4*i+1] = (i < 10) ? 8'd40 : (i < 14 ? 8'd100 + 8'(4*i) : h8(i, 23)); // y
      sprram[4*i+2] = h8(i, 24);                                 // code
      sprram[4*i+3] = h8(i, 25);                                 // attr
    end
    // overlapping pair on lines 150.. to exercise transparency
    sprram[4*10+0] = 8'd60; sprram[4*11+0] = 8'd64;
  end

  // ------------------------------------------------------------ CPU bus model
  task automatic cpu_write(input logic [15:0] a, input logic [7:0] d);
    @(posedge clk_cpu); cpu_addr <= a; cpu_wdata <= d; cpu_wr <= 1;
    repeat (2) @(posedge clk_cpu); cpu_wr <= 0;
    @(posedge clk_cpu);
  endtask
  task automatic cpu_read(input logic [15:0] a, output logic [7:0] d);
    @(posedge clk_cpu); cpu_addr <= a; cpu_rd <= 1;
    repeat (3) @(posedge clk_cpu); d = cpu_rdata; cpu_rd <= 0;
    @(posedge clk_cpu);
  endtask

  // --------------------------------------------------------- reference render
  function automatic logic [11:0] ref_pixel(input int gx, input int gy,
                                            output bit spr_hit, output bit spr_through,
                                            output bit fg_clear, output bit fxu, output bit fyu);
    int n, first_cover;
    logic [7:0] row, d, code, attr;
    logic [3:0] p;
    int base, j, bit_i, k;
    spr_hit = 0; spr_through = 0; fg_clear = 0; fxu = 0; fyu = 0;
    n = 0; first_cover = -1;
    for (int s = 0; s < 32 && n < 8; s++) begin
      row = 8'(gy) - sprram[4*s+1];
      if (row < 16) begin
        n++;
        d = 8'(gx) - sprram[4*s+0];
        if (d < 16) begin
          code = sprram[4*s+2]; attr = sprram[4*s+3];
          base = {attr[7], code, row[3:0], 2'b00};
          j = d; k = (j < 8) ? 0 : 2; bit_i = 7 - (j % 8);
          p = {gfx3[1][base+k+1][bit_i], gfx3[1][base+k][bit_i], gfx3[0][base+k+1][bit_i], gfx3[0][base+k][bit_i]};
          if (first_cover < 0) first_cover = s;
          if (p != 4'hF) begin
            spr_hit = 1; spr_through = (first_cover != s);
            return pal[11'h500 + {attr[3:0], p}][11:0];
          end
        end
      end
    end
    begin
      logic [7:0] fc, fa, b0, b1; logic [1:0] fp; int fa_i;
      fc = fgram[(gy/8)*32 + gx/8]; fa = fgram[1024 + (gy/8)*32 + gx/8];
      fa_i = {fa[7], fc, 3'(gy % 8), 1'b0};
      b0 = gfx1[fa_i]; b1 = gfx1[fa_i + 1];
      fp = {b1[7 - gx%8], b0[7 - gx%8]};
      if (fp != 2'd0) return pal[{fa[5:0], fp}][11:0];
      fg_clear = 1;
    end
    begin
      int sy, tr, tc, pr, px, a; logic [7:0] bc, ba; logic [2:0] bp;
      sy = (gy + scroll) % 512; tr = sy / 16; tc = gx / 16;
      bc = bgram[tr*32 + tc]; ba = bgram[tr*32 + 16 + tc];
      fxu = ba[5]; fyu = ba[6];
      pr = (sy % 16) ^ (ba[6] ? 15 : 0);
      px = (gx % 16) ^ (ba[5] ? 15 : 0);
      a = {ba[7], bc, 4'(pr), px[3]};
      bp = {gfx2[2][a][7 - px%8], gfx2[1][a][7 - px%8], gfx2[0][a][7 - px%8]};
      return pal[11'h100 + {pbank, ba[4:0], bp}][11:0];
    end
  endfunction

  // --------------------------------------------------------------- counters
  int n_overflow = 0, n_through = 0, n_fgclear = 0, n_flipx = 0, n_flipy = 0, n_wrap = 0;
  int n_bank = 0, n_irq = 0, n_sound = 0, n_music = 0, n_joy = 0;
  always @(posedge clk_vid) if (ovf) n_overflow++;

  // raster position seen at the pins: counters delayed by LATENCY + 1
  logic [9:0] hq [PIXEL_LATENCY+1], vq [PIXEL_LATENCY+1];
  always @(posedge clk_vid) begin
    hq[0] <= dut.hcount; vq[0] <= dut.vcount;
    for (int i = 1; i <= PIXEL_LATENCY; i++) begin hq[i] <= hq[i-1]; vq[i] <= vq[i-1]; end
  end

  bit capture = 0, tp_capture = 0;
  int tp_checked = 0, n_mode = 0;
  always @(posedge clk_vid) if (tp_capture) begin
    int x, y; logic [3:0] lv, bar; logic [11:0] e;
    x = hq[PIXEL_LATENCY]; y = vq[PIXEL_LATENCY];
    if (x < H_VISIBLE && y < V_VISIBLE && (x % 13) == 0) begin
      bar = 4'(x / 64); lv = 4'(y / 32);
      e = {bar[0] ? lv : 4'h0, bar[1] ? lv : 4'h0, bar[2] ? lv : 4'h0};
      check({vr, vg, vb} == e, $sformatf("test screen (%0d,%0d) got %h exp %h", x, y, {vr, vg, vb}, e));
      tp_checked++;
    end
  end
  int pix_checked = 0, black_checked = 0;
  int hs_len = 0, hs_seen = 0;
  always @(posedge clk_vid) if (capture) begin
    int x, y;
    x = hq[PIXEL_LATENCY]; y = vq[PIXEL_LATENCY];
    if (x >= GAME_X0 && x < GAME_X0 + GAME_W && y >= GAME_Y0 && y < GAME_Y0 + GAME_H) begin
      bit sh, st, fc, fxu, fyu; logic [11:0] e;
      e = ref_pixel(x - GAME_X0, y - GAME_Y0, sh, st, fc, fxu, fyu);
      check({vr, vg, vb} == e, $sformatf("pixel (%0d,%0d) got %h exp %h", x - GAME_X0, y - GAME_Y0, {vr, vg, vb}, e));
      pix_checked++;
      if (st) n_through++;
      if (fc && !sh) begin n_fgclear++; if (fxu) n_flipx++; if (fyu) n_flipy++; end
      if ((y - GAME_Y0 + scroll) >= 512 && x == GAME_X0) n_wrap++;
    end else if ((x % 37) == 0 && y < V_VISIBLE) begin
      check({vr, vg, vb} == 12'h000, $sformatf("border (%0d,%0d) not black", x, y));
      black_checked++;
    end
    if (!hs_n) hs_len++;
    else if (hs_len != 0) begin check(hs_len == H_SYNC, $sformatf("hsync width %0d", hs_len)); hs_len = 0; hs_seen++; end
  end

  // ------------------------------------------------------------------- test
  logic [7:0] d;
  initial begin
    repeat (10) @(posedge clk_cpu);
    rst = 0;
    for (int i = 0; i < 2048; i++) cpu_write(16'hD000 + 16'(i), fgram[i]);
    for (int i = 0; i < 1024; i++) cpu_write(16'hD800 + 16'(i), bgram[i]);
    for (int i = 0; i < 128; i++)  cpu_write(16'hCC00 + 16'(i), sprram[i]);
    cpu_write(IO_SCROLL_LO, scroll[7:0]);
    cpu_write(IO_SCROLL_HI, {7'd0, scroll[8]});
    cpu_write(IO_PAL_BANK, {6'd0, pbank});
    // read back through the CPU ports
    for (int i = 0; i < 16; i++) begin
      cpu_read(16'hD000 + 16'(i * 131), d); check(d == fgram[i * 131], "fg RAM readback");
      cpu_read(16'hD800 + 16'(i * 61), d);  check(d == bgram[i * 61], "bg RAM readback");
      cpu_read(16'hCC00 + 16'(i * 7), d);   check(d == sprram[i * 7], "sprite RAM readback");
      cpu_write(16'hE000 + 16'(i * 250), 8'(i * 17 + 3));
      cpu_read(16'hE000 + 16'(i * 250), d); check(d == 8'(i * 17 + 3), "work RAM");
      cpu_read(16'(i * 1999), d);           check(d == h8(i * 1999, 9), "main ROM");
    end
    // ROM banking
    for (int b = 0; b < 3; b++) begin
      cpu_write(IO_ROM_BANK, 8'(b));
      for (int i = 0; i < 4; i++) begin
        int a; a = i * 3001 + 5;
        cpu_read(16'h8000 + 16'(a), d);
        check(d == h8((b == 1) ? a % 8192 : a, 10 + b), $sformatf("bank %0d read", b));
        n_bank++;
      end
    end
    cpu_write(IO_ROM_BANK, 8'd0);
    // controls
    joy_left = 1; btn_fire = 1; btn_coin = 1;
    repeat (4) @(posedge clk_cpu);
    cpu_read(IO_IN_P1, d);     check(d == 8'hED, $sformatf("P1 inputs %h", d));
    cpu_read(IO_IN_SYSTEM, d); check(d == 8'hEF, $sformatf("system inputs %h", d));
    cpu_read(IO_IN_DSWA, d);   check(d == dsw_a, "DSW A");
    cpu_read(IO_IN_DSWB, d);   check(d == dsw_b, "DSW B");
    n_joy++;
    joy_left = 0; btn_fire = 0; btn_coin = 0;

    // capture one complete frame
    @(posedge clk_vid iff (dut.hcount == 0 && dut.vcount == 0));
    capture = 1;
    @(posedge clk_vid iff (dut.hcount == 0 && dut.vcount == 10'(V_VISIBLE + 1)));
    capture = 0;
    check(pix_checked == GAME_W * GAME_H, $sformatf("pixels compared %0d", pix_checked));

    // switch to the test screen for one frame and check it at the pins
    test_screen = 1;
    @(posedge clk_vid iff (dut.hcount == 0 && dut.vcount == 0));
    tp_capture = 1;
    @(posedge clk_vid iff (dut.hcount == 0 && dut.vcount == 10'(V_VISIBLE + 1)));
    tp_capture = 0; test_screen = 0;
    check(tp_checked > 1000, "test screen pixels compared");
    n_mode++;
    check(hs_seen > 400, "hsync pulses seen");

    // frame interrupt and acknowledge
    // the request raised by an earlier frame is still pending: answer it,
    // then wait for the next frame's request and answer that one too
    for (int k = 0; k < 2; k++) begin
      if (k == 0) wait (cpu_int_n == 1'b0);
      else @(negedge cpu_int_n);
      if (k == 1) check(vs_n == 1'b0, "interrupt raised during vertical sync");
      @(posedge clk_cpu); cpu_m1_n <= 0; cpu_iorq_n <= 0;
      repeat (2) @(posedge clk_cpu);
      check(cpu_rdata == VBLANK_RST, "interrupt vector");
      cpu_m1_n <= 1; cpu_iorq_n <= 1;
      repeat (2) @(posedge clk_cpu);
      check(cpu_int_n == 1'b1, "interrupt cleared after acknowledge");
    end
    n_irq++;

    // sound: fire, then background music on and off
    cpu_write(IO_SOUND, CODE_FIRE);
    for (int i = 0; i < 5; i++) begin
      @(posedge clk_cpu) fg_req <= 1; @(posedge clk_cpu) fg_req <= 0;
      repeat (3) @(posedge clk_cpu);
      check(fg_sample == 16'(i * 3 + 1), $sformatf("fire sample %0d = %h", i, fg_sample));
      n_sound++;
    end
    cpu_write(IO_SOUND, CODE_EXPLOSION);
    @(posedge clk_cpu) fg_req <= 1; @(posedge clk_cpu) fg_req <= 0;
    repeat (3) @(posedge clk_cpu);
    check(fg_sample == 16'd3, "explosion restarts at sample 0");
    cpu_write(IO_SOUND, CODE_MUSIC_ON);
    check(bg_link == 1'b1, "music link on");
    repeat (4) @(posedge clk_cpu);
    for (int i = 0; i < 3; i++) begin
      @(posedge clk_cpu) bg_req <= 1; @(posedge clk_cpu) bg_req <= 0;
      repeat (3) @(posedge clk_cpu);
      check(bg_sample == 16'(16'hA000 + i), $sformatf("music sample %0d = %h", i, bg_sample));
    end
    cpu_write(IO_SOUND, CODE_MUSIC_OFF);
    repeat (4) @(posedge clk_cpu);
    @(posedge clk_cpu) bg_req <= 1; @(posedge clk_cpu) bg_req <= 0;
    repeat (3) @(posedge clk_cpu);
    check(bg_link == 1'b0 && bg_sample == 16'd0, "music stopped");
    n_music++;

    $display("mechanisms: overflow=%0d transparency_overlap=%0d fg_transparent=%0d flipx=%0d flipy=%0d scroll_wrap=%0d bank=%0d irq=%0d sound=%0d music=%0d joystick=%0d test_screen=%0d",
             n_overflow, n_through, n_fgclear, n_flipx, n_flipy, n_wrap, n_bank, n_irq, n_sound, n_music, n_joy, n_mode);
    check(n_overflow > 0, "sprite overflow happened");
    check(n_through > 0, "sprite transparency overlap happened");
    check(n_fgclear > 0, "transparent character pixels happened");
    check(n_flipx > 0, "background x flip happened");
    check(n_flipy > 0, "background y flip happened");
    check(n_wrap > 0, "scroll wrap happened");
    check(n_bank > 0 && n_irq > 0 && n_sound > 0 && n_music > 0 && n_joy > 0, "cpu-side mechanisms happened");
    check(n_mode > 0, "test screen mode switch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
