// sprite_pipeline: sprite evaluation one scanline ahead, 8 sprite line buffers.
//
// The 128-byte sprite RAM holds 32 sprites of 4 bytes: x, y, tile code and
// attribute (bits 3:0 colour base, bit 7 a ninth code bit). A sprite is 16x16
// pixels of 4 bits (16 colours per colour base); colour 15 is transparent so
// sprites can overlap. One 16-pixel sprite row is 8 bytes: 4 bytes from each
// of the two sprite ROMs (ROM 0 holds bit planes 0/1, ROM 1 planes 2/3).
//
// At `line_start` the pipeline evaluates the 32 sprites for the next screen
// row (`next_line`), in sprite RAM order. For each sprite:
//   1. four sequential sprite RAM reads (x, y, code, attribute)
//   2. y evaluation: row = next_line - y; the sprite is on the line if row < 16
//   3. four sequential reads from both sprite ROMs (8 bytes)
//   4. transform: the bit planes are turned into 16 4-bit pixels
//   5. the pixels, colour base and x are written into the next free sprite
//      line buffer
// Only 8 sprites fit on a line; later sprites on a full line are dropped and
// `overflow` pulses once per dropped sprite. A sprite takes at most 12 cycles,
// a line at most 384, well inside the 800-cycle scanline.
//
// The 8 buffers built during one scanline are shown during the next (double
// buffered). For a screen column `rd_x` the priority logic picks, among the
// buffers whose x register places column rd_x inside the sprite and whose
// pixel there is not transparent, the one loaded first (lowest RAM index).
//
// The 32 x 4-byte RAM, the step list, 4 reads from 2 ROMs, the 8-per-line
// limit and per-buffer x registers follow the description; the byte order,
// plane packing, transparent colour and priority order are this design's own.
module sprite_pipeline
  import arcade_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        line_start,
  input  logic [7:0]  next_line,
  input  logic        next_valid,
  output logic [6:0]  ram_addr,
  input  logic [7:0]  ram_q,
  output logic [14:0] rom_addr,
  input  logic [7:0]  rom0_q,
  input  logic [7:0]  rom1_q,
  input  logic [7:0]  rd_x,
  output logic [7:0]  spr_idx,     // {colourbase[3:0], pixel[3:0]}
  output logic        spr_opaque,
  output logic        overflow,
  output logic        busy
);
  typedef struct packed {
    logic        valid;
    logic [7:0]  x;
    logic [3:0]  cb;
    logic [63:0] pix;     // pixel j at [j*4 +: 4], j = 0 leftmost
  } slot_t;

  typedef enum logic [2:0] {S_IDLE, S_RAM, S_EVAL, S_ROM, S_WRITE} state_e;

  slot_t       slots [2][SPRITES_PER_LINE];
  logic        disp;
  state_e      state;
  logic [4:0]  idx;
  logic [2:0]  cnt;
  logic [3:0]  nslots;
  logic [7:0]  line_r;
  logic [7:0]  sb [4];           // x, y, code, attr
  logic [7:0]  r0 [4], r1 [4];
  logic [7:0]  row;
  logic [1:0]  cnt_m1;

  assign cnt_m1   = cnt[1:0] - 2'd1;

  assign row      = line_r - sb[1];
  assign ram_addr = {idx, cnt[1:0]};
  assign rom_addr = {sb[3][7], sb[2], row[3:0], cnt[1:0]};
  assign busy     = (state != S_IDLE);

  function automatic logic [63:0] planes_to_pixels(input logic [7:0] a0, a1, a2, a3,
                                                   input logic [7:0] c0, c1, c2, c3);
    logic [63:0] w;
    for (int j = 0; j < 8; j++) begin
      w[j*4 +: 4]     = {c1[7-j], c0[7-j], a1[7-j], a0[7-j]};
      w[(j+8)*4 +: 4] = {c3[7-j], c2[7-j], a3[7-j], a2[7-j]};
    end
    return w;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; disp <= 1'b0; idx <= '0; cnt <= '0; nslots <= '0;
      line_r <= '0; overflow <= 1'b0;
      for (int b = 0; b < 2; b++)
        for (int s = 0; s < SPRITES_PER_LINE; s++) slots[b][s].valid <= 1'b0;
      for (int k = 0; k < 4; k++) begin sb[k] <= '0; r0[k] <= '0; r1[k] <= '0; end
    end else begin
      overflow <= 1'b0;
      if (line_start) begin
        disp   <= ~disp;
        for (int s = 0; s < SPRITES_PER_LINE; s++) slots[disp][s].valid <= 1'b0;
        idx    <= '0;
        cnt    <= '0;
        nslots <= '0;
        line_r <= next_line;
        state  <= next_valid ? S_RAM : S_IDLE;
      end else begin
        case (state)
          S_RAM: begin
            if (cnt != 3'd0) sb[cnt_m1] <= ram_q;
            if (cnt == 3'd4) begin cnt <= '0; state <= S_EVAL; end
            else cnt <= cnt + 3'd1;
          end
          S_EVAL: begin
            if (row < 8'd16) begin
              if (nslots < 4'(SPRITES_PER_LINE)) state <= S_ROM;
              else begin overflow <= 1'b1; state <= (idx == 5'(NUM_SPRITES-1)) ? S_IDLE : S_RAM; idx <= idx + 5'd1; end
            end else begin
              state <= (idx == 5'(NUM_SPRITES-1)) ? S_IDLE : S_RAM;
              idx   <= idx + 5'd1;
            end
          end
          S_ROM: begin
            if (cnt != 3'd0) begin r0[cnt_m1] <= rom0_q; r1[cnt_m1] <= rom1_q; end
            if (cnt == 3'd4) begin cnt <= '0; state <= S_WRITE; end
            else cnt <= cnt + 3'd1;
          end
          S_WRITE: begin
            slots[~disp][nslots[2:0]] <= '{valid: 1'b1, x: sb[0], cb: sb[3][3:0],
                                           pix: planes_to_pixels(r0[0], r0[1], r0[2], r0[3],
                                                                 r1[0], r1[1], r1[2], r1[3])};
            nslots <= nslots + 4'd1;
            state  <= (idx == 5'(NUM_SPRITES-1)) ? S_IDLE : S_RAM;
            idx    <= idx + 5'd1;
          end
          default: ;
        endcase
      end
    end
  end

  // priority logic over the displayed buffers
  always_comb begin
    logic [7:0] d;
    logic [3:0] p;
    spr_idx    = '0;
    spr_opaque = 1'b0;
    for (int s = SPRITES_PER_LINE - 1; s >= 0; s--) begin
      d = rd_x - slots[disp][s].x;
      p = slots[disp][s].pix[d[3:0]*4 +: 4];
      if (slots[disp][s].valid && d < 8'd16 && p != SPRITE_TRANSPARENT) begin
        spr_idx    = {slots[disp][s].cb, p};
        spr_opaque = 1'b1;
      end
    end
  end
endmodule
