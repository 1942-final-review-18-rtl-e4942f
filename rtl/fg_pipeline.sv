// fg_pipeline: foreground (character) tile pipeline.
//
// The character tilemap is a 32 x 32 grid of 8x8 tiles. Each tile has two
// bytes in the 2048-byte foreground RAM: a tile code at {row,col} and an
// attribute byte at 1024 + {row,col}. The attribute holds the colour base
// (bits 5:0) and a ninth tile-code bit (bit 7). A tile row of 8 pixels is
// two bytes of character ROM (one per bit plane), so a pixel's colour offset
// is 2 bits and its palette index is colourbase * 4 + offset.
//
// The pipeline produces 8 pixels every 8 cycles and runs 8 pixels ahead of
// the beam. The caller gives the fetch column `fx` = screen column + 8 and
// the current screen row `gy`. Inside every 8-cycle group (phase = fx[2:0]):
//   phase 0-1  two sequential tilemap RAM reads (code, attribute)
//   phase 3-4  two sequential character ROM reads (plane 0, plane 1)
//   phase 7    the 8 decoded pixels are loaded into the foreground buffer
// so the buffer holds the tile under the beam for the next 8 columns. Both
// memories have one cycle of read latency. `rd_x` (the low 3 bits of the
// screen column) picks a pixel out of the buffer combinationally.
// A colour offset of 0 is transparent (`fg_opaque` low).
//
// The two-read RAM and ROM steps and the 8-cycle lead follow the description;
// the byte layout of tilemap and ROM is this design's own.
module fg_pipeline
  import arcade_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  fx,         // screen column + 8
  input  logic        fx_valid,
  input  logic [7:0]  gy,         // screen row
  output logic [10:0] ram_addr,
  input  logic [7:0]  ram_q,
  output logic [12:0] rom_addr,
  input  logic [7:0]  rom_q,
  input  logic [2:0]  rd_x,
  output logic [7:0]  fg_idx,     // {colourbase[5:0], offset[1:0]}
  output logic        fg_opaque
);
  logic [2:0] phase;
  logic [4:0] tcol, trow;
  logic [7:0] code_r, attr_r, b0_r, b1_r;
  logic [7:0] buf_idx [8];

  assign phase = fx[2:0];
  assign tcol  = fx[7:3];
  assign trow  = gy[7:3];

  always_comb begin
    ram_addr = (phase == 3'd0) ? {1'b0, trow, tcol} : {1'b1, trow, tcol};
    rom_addr = {attr_r[7], code_r, gy[2:0], (phase == 3'd4)};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      code_r <= '0; attr_r <= '0; b0_r <= '0; b1_r <= '0;
      for (int p = 0; p < 8; p++) buf_idx[p] <= '0;
    end else if (fx_valid) begin
      case (phase)
        3'd1: code_r <= ram_q;
        3'd2: attr_r <= ram_q;
        3'd4: b0_r   <= rom_q;
        3'd5: b1_r   <= rom_q;
        3'd7: for (int p = 0; p < 8; p++)
                buf_idx[p] <= {attr_r[5:0], b1_r[7-p], b0_r[7-p]};
        default: ;
      endcase
    end
  end

  assign fg_idx    = buf_idx[rd_x];
  assign fg_opaque = (buf_idx[rd_x][1:0] != FG_TRANSPARENT);
endmodule
