// pixel_pipeline: final pixel colour pipeline, one pixel per clock.
//
// For the raster position (hcount, vcount) from the VGA controller it works
// out the game column/row inside the 224 x 256 game window and hands the
// column to the line buffers (`rd_x`), which answer combinationally. Then:
//   stage 1  choose a pixel: a non-transparent sprite pixel wins, then a
//            non-transparent character pixel, else the background pixel;
//            form the palette address (region base + index) and register it
//   stage 2  the palette ROM (1 cycle read latency) returns the colour
//   stage 3  register the 12-bit colour {R,G,B} (black outside the window)
// so the colour reaches the VGA controller 3 cycles after the position.
//
// Palette layout (1536 entries): characters 0x000 + {cb[5:0], pix[1:0]},
// background 0x100 + {bank[1:0], cb[4:0], pix[2:0]}, sprites 0x500 +
// {cb[3:0], pix[3:0]}; a palette word holds R in 11:8, G in 7:4, B in 3:0.
// The three stages, the sprite/foreground/background order, the 2-bit
// background palette selector and the 1536-entry size follow the description;
// the region order and word layout are this design's own.
module pixel_pipeline
  import arcade_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [9:0]  hcount,
  input  logic [9:0]  vcount,
  output logic [7:0]  rd_x,
  output logic [7:0]  rd_y,
  output logic        in_window,
  input  logic [7:0]  fg_idx,
  input  logic        fg_opaque,
  input  logic [7:0]  bg_idx,
  input  logic [7:0]  spr_idx,
  input  logic        spr_opaque,
  input  logic [1:0]  pal_bank,
  output logic [10:0] pal_addr,
  input  logic [15:0] pal_q,
  output logic [3:0]  r,
  output logic [3:0]  g,
  output logic [3:0]  b
);
  logic [9:0] gx, gy;
  logic       win_d1, win_d2;

  always_comb begin
    gx = hcount - 10'(GAME_X0);
    gy = vcount - 10'(GAME_Y0);
    in_window = (hcount >= 10'(GAME_X0)) && (gx < 10'(GAME_W)) &&
                (vcount >= 10'(GAME_Y0)) && (gy < 10'(GAME_H));
    rd_x = gx[7:0];
    rd_y = gy[7:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pal_addr <= '0; win_d1 <= 1'b0; win_d2 <= 1'b0;
      r <= '0; g <= '0; b <= '0;
    end else begin
      // stage 1: choose
      win_d1 <= in_window;
      if (spr_opaque)     pal_addr <= PAL_SPR_BASE + {3'b000, spr_idx};
      else if (fg_opaque) pal_addr <= PAL_FG_BASE  + {3'b000, fg_idx};
      else                pal_addr <= PAL_BG_BASE  + {1'b0, pal_bank, bg_idx};
      // stage 2: palette read in the ROM
      win_d2 <= win_d1;
      // stage 3: colour out
      {r, g, b} <= win_d2 ? pal_q[11:0] : 12'h000;
    end
  end
endmodule
