// arcade_pkg: constants shared by the 1942 platform.
//
// The screen size (224 x 256 game pixels inside a 640 x 480, 60 Hz VGA
// raster), the palette size (1536 entries in three regions), the tilemap
// and sprite geometry and the CPU memory map come from the design's
// description. The VGA porch and sync widths are the usual 640x480@60Hz
// industry numbers, and the window offsets centre the game on the raster;
// those, the I/O register addresses and the palette region bases are this
// design's own choices (they match the original arcade board's layout).
package arcade_pkg;

  // ---------------- VGA 640x480 @ 60 Hz, 25.175 MHz pixel clock ----------
  localparam int unsigned H_VISIBLE = 640;
  localparam int unsigned H_FRONT   = 16;
  localparam int unsigned H_SYNC    = 96;
  localparam int unsigned H_BACK    = 48;
  localparam int unsigned H_TOTAL   = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;  // 800
  localparam int unsigned V_VISIBLE = 480;
  localparam int unsigned V_FRONT   = 10;
  localparam int unsigned V_SYNC    = 2;
  localparam int unsigned V_BACK    = 33;
  localparam int unsigned V_TOTAL   = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;  // 525

  // ---------------- game window --------------------------------------------
  localparam int unsigned GAME_W = 224;
  localparam int unsigned GAME_H = 256;
  localparam int unsigned GAME_X0 = (H_VISIBLE - GAME_W) / 2;  // 208
  localparam int unsigned GAME_Y0 = (V_VISIBLE - GAME_H) / 2;  // 112

  // cycles from the VGA counters to the colour entering the VGA controller:
  // linebuffer read/choose, palette read, colour register
  localparam int unsigned PIXEL_LATENCY = 3;

  // ---------------- sprites -------------------------------------------------
  localparam int unsigned NUM_SPRITES      = 32;
  localparam int unsigned SPRITES_PER_LINE = 8;
  localparam logic [3:0]  SPRITE_TRANSPARENT = 4'hF;
  localparam logic [1:0]  FG_TRANSPARENT     = 2'd0;

  // ---------------- palette regions (1536 entries) --------------------------
  localparam logic [10:0] PAL_FG_BASE  = 11'h000;  // 256 entries
  localparam logic [10:0] PAL_BG_BASE  = 11'h100;  // 1024 entries
  localparam logic [10:0] PAL_SPR_BASE = 11'h500;  // 256 entries
  localparam int unsigned PALETTE_ENTRIES = 1536;

  // ---------------- CPU memory map ------------------------------------------
  localparam logic [15:0] IO_IN_SYSTEM = 16'hC000;
  localparam logic [15:0] IO_IN_P1     = 16'hC001;
  localparam logic [15:0] IO_IN_P2     = 16'hC002;
  localparam logic [15:0] IO_IN_DSWA   = 16'hC003;
  localparam logic [15:0] IO_IN_DSWB   = 16'hC004;
  localparam logic [15:0] IO_SOUND     = 16'hC800;
  localparam logic [15:0] IO_SCROLL_LO = 16'hC802;
  localparam logic [15:0] IO_SCROLL_HI = 16'hC803;
  localparam logic [15:0] IO_PAL_BANK  = 16'hC805;
  localparam logic [15:0] IO_ROM_BANK  = 16'hC806;

  // which memory answers a CPU read
  typedef enum logic [3:0] {
    SEL_NONE, SEL_ROM, SEL_BANK1, SEL_BANK2, SEL_BANK3,
    SEL_RAM, SEL_FG, SEL_BG, SEL_SPR, SEL_IO
  } rd_sel_e;

  // Z80 restart instruction placed on the bus when the frame interrupt is
  // acknowledged (RST 10h)
  localparam logic [7:0] VBLANK_RST = 8'hD7;

  // ---------------- sound codes ----------------------------------------------
  localparam int unsigned NUM_FG_SOUNDS = 6;
  typedef enum logic [2:0] {
    SND_FIRE = 3'd0, SND_FLIP = 3'd1, SND_EXPLOSION = 3'd2,
    SND_TAKEOFF = 3'd3, SND_RETRY = 3'd4, SND_COIN = 3'd5
  } fg_sound_e;
  localparam logic [7:0] CODE_FIRE      = 8'h04;
  localparam logic [7:0] CODE_FLIP      = 8'h06;
  localparam logic [7:0] CODE_EXPLOSION = 8'h02;
  localparam logic [7:0] CODE_TAKEOFF   = 8'h0D;
  localparam logic [7:0] CODE_RETRY     = 8'h12;
  localparam logic [7:0] CODE_COIN      = 8'h07;
  localparam logic [7:0] CODE_MUSIC_ON  = 8'h11;
  localparam logic [7:0] CODE_MUSIC_OFF = 8'h10;

endpackage
