// arcade1942_top: the 1942 arcade platform around an external Z80.
//
// Capcom's 1942 board rebuilt from block memories and custom video logic.
// There is no frame buffer: every scanline is composed on the fly from a
// character tilemap, a scrolling background tilemap and up to 8 of 32 sprites,
// turned into colours through a pre-computed 1536-entry palette and sent to a
// 640x480 VGA monitor, with the 224x256 game picture in the middle of the
// raster. The pieces:
//   memory_map      CPU address decode, ROM banking, I/O registers, sound code
//   block memories  program ROMs (32K + 16K + 8K + 16K), character ROM (8K),
//                   three background ROMs (16K each), two sprite ROMs
//                   (32K each), palette ROM (1536 x 16), work RAM (4K) and
//                   three true dual-port video RAMs (2K, 1K, 128 bytes) whose
//                   CPU port runs on clk_cpu and video port on clk_vid
//   fg/bg/sprite pipelines and pixel_pipeline   the video rendering
//   vga_controller  raster timing and the colour pins
//   vga_test_pattern colour test screen, shown instead of the game while
//                   `test_screen` is high
//   vblank_irq      the frame interrupt to the CPU
//   joystick_if     the control panel
//   sound_controller + six sound ROMs (first board) and bg_music_player +
//                   music ROM (second board, joined by the one-bit link that
//                   is also brought out as `bg_link`)
// The Z80 itself and the AC97 codec interfaces are outside: the CPU bus, the
// interrupt and acknowledge lines, and each board's sample request / sample
// are ports. cpu_rd / cpu_wr are memory read and write strobes; cpu_rdata is
// valid one clk_cpu cycle after the address and carries the interrupt vector
// during an interrupt acknowledge.
//
// The registers in memory_map that the video reads (scroll, palette bank) are
// written rarely by the CPU and are used in the video domain without a
// synchroniser; a change can take effect mid-line.
module arcade1942_top
  import arcade_pkg::*;
#(
  parameter int unsigned SOUND_DEPTH = 16384,
  parameter int unsigned SOUND_WIDTH = 16
) (
  input  logic        clk_cpu,
  input  logic        clk_vid,
  input  logic        rst,
  // Z80 bus
  input  logic [15:0] cpu_addr,
  input  logic [7:0]  cpu_wdata,
  input  logic        cpu_rd,
  input  logic        cpu_wr,
  input  logic        cpu_m1_n,
  input  logic        cpu_iorq_n,
  output logic [7:0]  cpu_rdata,
  output logic        cpu_int_n,
  // controls
  input  logic        joy_up,
  input  logic        joy_down,
  input  logic        joy_left,
  input  logic        joy_right,
  input  logic        btn_fire,
  input  logic        btn_flip,
  input  logic        btn_start1,
  input  logic        btn_start2,
  input  logic        btn_coin,
  input  logic [7:0]  dsw_a,
  input  logic [7:0]  dsw_b,
  // VGA
  output logic        vga_hsync_n,
  output logic        vga_vsync_n,
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  // audio (to the two codec interfaces)
  input  logic                   fg_sample_req,
  output logic [SOUND_WIDTH-1:0] fg_sample,
  input  logic                   bg_sample_req,
  output logic [SOUND_WIDTH-1:0] bg_sample,
  output logic                   bg_link,
  // bring-up: 1 shows the colour test screen instead of the game
  input  logic        test_screen,
  // status
  output logic        sprite_overflow
);
  // ---------------------------------------------------------------- CPU side
  logic [7:0]  in_system, in_p1, in_p2;
  logic [14:0] rom_addr;
  logic [13:0] bank_addr;
  logic [7:0]  rom_q, bank1_q, bank2_q, bank3_q, mem_wdata, mm_rdata;
  logic        ram_we, fg_we, bg_we, spr_we;
  logic [11:0] ram_addr;
  logic [10:0] fg_addr_a;
  logic [9:0]  bg_addr_a;
  logic [6:0]  spr_addr_a;
  logic [7:0]  ram_q, fg_q_a, bg_q_a, spr_q_a;
  logic [7:0]  sound_code;
  logic        sound_wr;
  logic [8:0]  scroll;
  logic [1:0]  pal_bank, rom_bank;
  logic [7:0]  irq_vec;
  logic        irq_vec_oe;

  joystick_if u_joy (
    .clk(clk_cpu), .rst,
    .up(joy_up), .down(joy_down), .left(joy_left), .right(joy_right),
    .fire(btn_fire), .flip(btn_flip), .start1(btn_start1), .start2(btn_start2), .coin(btn_coin),
    .in_system, .in_p1, .in_p2
  );

  memory_map u_mmap (
    .clk(clk_cpu), .rst,
    .cpu_addr, .cpu_wdata, .cpu_rd, .cpu_wr, .cpu_rdata(mm_rdata),
    .rom_addr, .rom_q, .bank_addr, .bank1_q, .bank2_q, .bank3_q,
    .mem_wdata, .ram_we, .ram_addr, .ram_q,
    .fg_we, .fg_addr(fg_addr_a), .fg_q(fg_q_a),
    .bg_we, .bg_addr(bg_addr_a), .bg_q(bg_q_a),
    .spr_we, .spr_addr(spr_addr_a), .spr_q(spr_q_a),
    .in_system, .in_p1, .in_p2, .dsw_a, .dsw_b,
    .sound_code, .sound_wr, .scroll, .pal_bank, .rom_bank
  );

  sp_rom #(.DEPTH(32768), .WIDTH(8)) u_rom_main  (.clk(clk_cpu), .addr(rom_addr),        .q(rom_q));
  sp_rom #(.DEPTH(16384), .WIDTH(8)) u_rom_bank1 (.clk(clk_cpu), .addr(bank_addr),       .q(bank1_q));
  sp_rom #(.DEPTH(8192),  .WIDTH(8)) u_rom_bank2 (.clk(clk_cpu), .addr(bank_addr[12:0]), .q(bank2_q));
  sp_rom #(.DEPTH(16384), .WIDTH(8)) u_rom_bank3 (.clk(clk_cpu), .addr(bank_addr),       .q(bank3_q));
  sp_ram #(.DEPTH(4096),  .WIDTH(8)) u_ram_main  (.clk(clk_cpu), .we(ram_we), .addr(ram_addr), .d(mem_wdata), .q(ram_q));

  vblank_irq u_irq (
    .clk(clk_cpu), .rst, .vsync(~vga_vsync_n), .m1_n(cpu_m1_n), .iorq_n(cpu_iorq_n),
    .int_n(cpu_int_n), .vec(irq_vec), .vec_oe(irq_vec_oe)
  );

  assign cpu_rdata = irq_vec_oe ? irq_vec : mm_rdata;

  // -------------------------------------------------------------- video side
  logic [9:0]  hcount, vcount, vnext;
  logic        line_start, frame_start, vsync_start;
  logic [7:0]  rd_x, rd_y, next_line, fx;
  logic        in_window, next_valid, fx_valid, row_valid;
  logic [10:0] fg_addr_b;
  logic [9:0]  bg_addr_b;
  logic [6:0]  spr_addr_b;
  logic [7:0]  fg_q_b, bg_q_b, spr_q_b;
  logic [12:0] gfx1_addr;
  logic [13:0] gfx2_addr;
  logic [14:0] gfx3_addr;
  logic [7:0]  gfx1_q, gfx2_1_q, gfx2_2_q, gfx2_3_q, gfx3_1_q, gfx3_2_q;
  logic [7:0]  fg_idx, bg_idx, spr_idx;
  logic        fg_opaque, spr_opaque, bg_busy, spr_busy;
  logic [10:0] pal_addr;
  logic [15:0] pal_q;
  logic [3:0]  pix_r, pix_g, pix_b, game_r, game_g, game_b, tp_r, tp_g, tp_b;

  vga_controller u_vga (
    .clk(clk_vid), .rst, .hcount, .vcount, .line_start, .frame_start, .vsync_start,
    .r_in(pix_r), .g_in(pix_g), .b_in(pix_b),
    .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n), .vga_r, .vga_g, .vga_b
  );

  // positions handed to the pipelines
  always_comb begin
    vnext      = (vcount == 10'(V_TOTAL - 1)) ? 10'd0 : vcount + 10'd1;
    next_valid = (vnext >= 10'(GAME_Y0)) && (vnext < 10'(GAME_Y0 + GAME_H));
    next_line  = 8'(vnext - 10'(GAME_Y0));
    row_valid  = (vcount >= 10'(GAME_Y0)) && (vcount < 10'(GAME_Y0 + GAME_H));
    fx_valid   = row_valid && (hcount >= 10'(GAME_X0 - 8)) && (hcount < 10'(GAME_X0 + GAME_W));
    fx         = 8'(hcount - 10'(GAME_X0 - 8));
  end

  tdp_ram #(.DEPTH(2048), .WIDTH(8)) u_fgram (
    .clk_a(clk_cpu), .we_a(fg_we), .addr_a(fg_addr_a), .d_a(mem_wdata), .q_a(fg_q_a),
    .clk_b(clk_vid), .we_b(1'b0), .addr_b(fg_addr_b), .d_b(8'h00), .q_b(fg_q_b));
  tdp_ram #(.DEPTH(1024), .WIDTH(8)) u_bgram (
    .clk_a(clk_cpu), .we_a(bg_we), .addr_a(bg_addr_a), .d_a(mem_wdata), .q_a(bg_q_a),
    .clk_b(clk_vid), .we_b(1'b0), .addr_b(bg_addr_b), .d_b(8'h00), .q_b(bg_q_b));
  tdp_ram #(.DEPTH(128), .WIDTH(8)) u_sprram (
    .clk_a(clk_cpu), .we_a(spr_we), .addr_a(spr_addr_a), .d_a(mem_wdata), .q_a(spr_q_a),
    .clk_b(clk_vid), .we_b(1'b0), .addr_b(spr_addr_b), .d_b(8'h00), .q_b(spr_q_b));

  sp_rom #(.DEPTH(8192),  .WIDTH(8))  u_gfx1   (.clk(clk_vid), .addr(gfx1_addr), .q(gfx1_q));
  sp_rom #(.DEPTH(16384), .WIDTH(8))  u_gfx2_1 (.clk(clk_vid), .addr(gfx2_addr), .q(gfx2_1_q));
  sp_rom #(.DEPTH(16384), .WIDTH(8))  u_gfx2_2 (.clk(clk_vid), .addr(gfx2_addr), .q(gfx2_2_q));
  sp_rom #(.DEPTH(16384), .WIDTH(8))  u_gfx2_3 (.clk(clk_vid), .addr(gfx2_addr), .q(gfx2_3_q));
  sp_rom #(.DEPTH(32768), .WIDTH(8))  u_gfx3_1 (.clk(clk_vid), .addr(gfx3_addr), .q(gfx3_1_q));
  sp_rom #(.DEPTH(32768), .WIDTH(8))  u_gfx3_2 (.clk(clk_vid), .addr(gfx3_addr), .q(gfx3_2_q));
  sp_rom #(.DEPTH(PALETTE_ENTRIES), .WIDTH(16)) u_palette (.clk(clk_vid), .addr(pal_addr), .q(pal_q));

  fg_pipeline u_fg (
    .clk(clk_vid), .rst, .fx, .fx_valid, .gy(rd_y),
    .ram_addr(fg_addr_b), .ram_q(fg_q_b), .rom_addr(gfx1_addr), .rom_q(gfx1_q),
    .rd_x(rd_x[2:0]), .fg_idx, .fg_opaque
  );

  bg_pipeline u_bg (
    .clk(clk_vid), .rst, .line_start, .next_line, .next_valid, .scroll,
    .ram_addr(bg_addr_b), .ram_q(bg_q_b), .rom_addr(gfx2_addr),
    .rom0_q(gfx2_1_q), .rom1_q(gfx2_2_q), .rom2_q(gfx2_3_q),
    .rd_x, .bg_idx, .busy(bg_busy)
  );

  sprite_pipeline u_spr (
    .clk(clk_vid), .rst, .line_start, .next_line, .next_valid,
    .ram_addr(spr_addr_b), .ram_q(spr_q_b), .rom_addr(gfx3_addr),
    .rom0_q(gfx3_1_q), .rom1_q(gfx3_2_q),
    .rd_x, .spr_idx, .spr_opaque, .overflow(sprite_overflow), .busy(spr_busy)
  );

  pixel_pipeline u_pix (
    .clk(clk_vid), .rst, .hcount, .vcount, .rd_x, .rd_y, .in_window,
    .fg_idx, .fg_opaque, .bg_idx, .spr_idx, .spr_opaque, .pal_bank,
    .pal_addr, .pal_q, .r(game_r), .g(game_g), .b(game_b)
  );

  vga_test_pattern u_test (.clk(clk_vid), .rst, .hcount, .vcount, .r(tp_r), .g(tp_g), .b(tp_b));

  assign {pix_r, pix_g, pix_b} = test_screen ? {tp_r, tp_g, tp_b} : {game_r, game_g, game_b};

  // ------------------------------------------------------------------- sound
  localparam int unsigned SAW = $clog2(SOUND_DEPTH);
  logic [SAW-1:0]         snd_addr, music_addr;
  logic [SOUND_WIDTH-1:0] snd_q [NUM_FG_SOUNDS];
  logic [SOUND_WIDTH-1:0] music_q;
  logic                   snd_playing, music_playing;
  fg_sound_e              snd_current;

  for (genvar i = 0; i < NUM_FG_SOUNDS; i++) begin : g_snd
    sp_rom #(.DEPTH(SOUND_DEPTH), .WIDTH(SOUND_WIDTH)) u_rom (.clk(clk_cpu), .addr(snd_addr), .q(snd_q[i]));
  end

  sound_controller #(.DEPTH(SOUND_DEPTH), .WIDTH(SOUND_WIDTH)) u_snd (
    .clk(clk_cpu), .rst, .code_wr(sound_wr), .code(sound_code), .sample_req(fg_sample_req),
    .rom_addr(snd_addr), .rom_q(snd_q), .sample(fg_sample), .playing(snd_playing),
    .current(snd_current), .bg_music_on(bg_link)
  );

  // second board
  sp_rom #(.DEPTH(SOUND_DEPTH), .WIDTH(SOUND_WIDTH)) u_music_rom (.clk(clk_cpu), .addr(music_addr), .q(music_q));

  bg_music_player #(.DEPTH(SOUND_DEPTH), .WIDTH(SOUND_WIDTH)) u_music (
    .clk(clk_cpu), .rst, .music_on(bg_link), .sample_req(bg_sample_req),
    .rom_addr(music_addr), .rom_q(music_q), .sample(bg_sample), .playing(music_playing)
  );
endmodule
