// vga_test_pattern: colour test screen for bringing up the VGA output.
//
// Fills the 640x480 raster with a pattern that changes along both rows and
// columns: the screen is cut into ten 64-pixel-wide vertical bars, and the
// bar number picks which colour channels are lit (bit 0 red, bit 1 green,
// bit 2 blue; bar 0 and bar 8 are black). The lit channels all take an
// intensity that steps every 32 rows (vcount[8:5]), so each bar is a ramp
// from dark at the top to bright at the bottom. The colour comes out
// LATENCY cycles after the position, the same delay as the game's pixel
// pipeline, so the VGA controller can show either without changing its
// timing.
//
// A test screen that checks colour changes along rows and columns follows the
// description; the exact pattern is this design's own.
module vga_test_pattern
  import arcade_pkg::*;
#(
  parameter int unsigned LATENCY = PIXEL_LATENCY
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] hcount,
  input  logic [9:0] vcount,
  output logic [3:0] r,
  output logic [3:0] g,
  output logic [3:0] b
);
  logic [3:0]  bar, level;
  logic [11:0] rgb;
  logic [11:0] pipe [LATENCY];

  always_comb begin
    bar   = hcount[9:6];
    level = vcount[8:5];
    rgb   = {bar[0] ? level : 4'h0, bar[1] ? level : 4'h0, bar[2] ? level : 4'h0};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LATENCY; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= rgb;
      for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign {r, g, b} = pipe[LATENCY-1];
endmodule
