// bg_pipeline: background tile pipeline with a whole-scanline line buffer.
//
// The background tilemap is a 16 x 32 grid of 16x16 tiles (256 x 512 pixels),
// of which a 224 x 256 window is shown; a 9-bit vertical scroll register picks
// which 256 of the 512 rows are visible, to one-pixel granularity. Each tile
// has a code byte at {row,0,col} and an attribute byte at {row,1,col} in the
// 1024-byte background RAM. Attribute bits: 4:0 colour base, 5 x-flip,
// 6 y-flip, 7 ninth tile-code bit. Pixels are 3 bits (8 colours per colour
// base), one bit from each of three background ROMs, which are read at once.
//
// At `line_start` the pipeline starts building the line buffer for the next
// screen row (`next_line`): source row = next_line + scroll. It walks the 32
// eight-pixel groups of the row, 8 cycles each (256 cycles):
//   phase 0-1  two sequential tilemap RAM reads (code, attribute)
//   phase 3    three simultaneous ROM reads (one bit plane each)
//   phase 5    transform (x-flip reverses the bits and swaps tile halves,
//              y-flip mirrors the row) and write the group to the line buffer
// The line buffer is double-buffered: the half built during one scanline is
// read during the next, selected by `rd_x` with no read latency. Entries are
// {colourbase[4:0], pixel[2:0]}; the palette bank is added later.
//
// The step list, the three parallel ROM reads, flips, and the full-line buffer
// used for pixel-exact scrolling follow the description; the exact RAM and ROM
// layouts and the double buffering are this design's own.
module bg_pipeline
  import arcade_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        line_start,
  input  logic [7:0]  next_line,
  input  logic        next_valid,
  input  logic [8:0]  scroll,
  output logic [9:0]  ram_addr,
  input  logic [7:0]  ram_q,
  output logic [13:0] rom_addr,
  input  logic [7:0]  rom0_q,
  input  logic [7:0]  rom1_q,
  input  logic [7:0]  rom2_q,
  input  logic [7:0]  rd_x,
  output logic [7:0]  bg_idx,
  output logic        busy
);
  logic [63:0] lbuf [2][32];
  logic        disp;            // half being displayed
  logic [8:0]  src_row;
  logic [4:0]  grp;
  logic [2:0]  phase;
  logic [7:0]  code_r, attr_r, p0_r, p1_r, p2_r;
  logic        flipx, flipy;
  logic [3:0]  trow_col;

  assign flipx    = attr_r[5];
  assign flipy    = attr_r[6];
  assign trow_col = grp[4:1];

  always_comb begin
    ram_addr = {src_row[8:4], (phase != 3'd0), trow_col};
    rom_addr = {attr_r[7], code_r, src_row[3:0] ^ {4{flipy}}, grp[0] ^ flipx};
  end

  function automatic logic [63:0] pack_group(input logic [7:0] p0, p1, p2,
                                             input logic [4:0] cb, input logic fx);
    logic [63:0] w;
    int b;
    for (int p = 0; p < 8; p++) begin
      b = fx ? p : 7 - p;
      w[p*8 +: 8] = {cb, p2[b], p1[b], p0[b]};
    end
    return w;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      disp <= 1'b0; busy <= 1'b0; grp <= '0; phase <= '0; src_row <= '0;
      code_r <= '0; attr_r <= '0; p0_r <= '0; p1_r <= '0; p2_r <= '0;
    end else if (line_start) begin
      disp    <= ~disp;
      busy    <= next_valid;
      grp     <= '0;
      phase   <= '0;
      src_row <= {1'b0, next_line} + scroll;
    end else if (busy) begin
      phase <= phase + 3'd1;
      case (phase)
        3'd1: code_r <= ram_q;
        3'd2: attr_r <= ram_q;
        3'd4: begin p0_r <= rom0_q; p1_r <= rom1_q; p2_r <= rom2_q; end
        3'd5: lbuf[~disp][grp] <= pack_group(p0_r, p1_r, p2_r, attr_r[4:0], flipx);
        3'd7: begin
          grp <= grp + 5'd1;
          if (grp == 5'd31) busy <= 1'b0;
        end
        default: ;
      endcase
    end
  end

  logic [63:0] rd_word;
  assign rd_word = lbuf[disp][rd_x[7:3]];
  assign bg_idx  = rd_word[rd_x[2:0]*8 +: 8];
endmodule
