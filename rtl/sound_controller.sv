// sound_controller: sound-code decoder and foreground sound player.
//
// The main CPU writes a sound code to C800 (`code_wr` pulse). Six codes each
// start one recorded foreground sound, held in its own sound ROM:
//   04 fire, 06 flip, 02 explosion, 0D take-off, 12 retry, 07 coin/power-up
// and two codes control the background music on the second board:
//   11 start, 10 stop  -> the one-bit `bg_music_on` link
// Other codes are ignored. A new foreground code restarts playback at sample
// 0 of the chosen sound, cutting off whatever was playing. While a sound
// plays, every `sample_req` pulse from the codec interface (one per audio
// frame) takes the ROM word at the current address onto `sample` and steps
// the address; after the last word (DEPTH-1) playback stops and `sample`
// returns to 0. The six ROMs share one address (`rom_addr`); the controller
// selects which one's data is sent.
//
// The code table, the ROM per sound, the ROM selection and the link bit follow
// the description; the sample width, ROM depth, restart policy and end-of-
// sound rule are this design's own.
module sound_controller
  import arcade_pkg::*;
#(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     code_wr,
  input  logic [7:0]               code,
  input  logic                     sample_req,
  output logic [$clog2(DEPTH)-1:0] rom_addr,
  input  logic [WIDTH-1:0]         rom_q [NUM_FG_SOUNDS],
  output logic [WIDTH-1:0]         sample,
  output logic                     playing,
  output fg_sound_e                current,
  output logic                     bg_music_on
);
  always_ff @(posedge clk) begin
    if (rst) begin
      rom_addr <= '0; sample <= '0; playing <= 1'b0; current <= SND_FIRE; bg_music_on <= 1'b0;
    end else if (code_wr) begin
      case (code)
        CODE_FIRE:      begin current <= SND_FIRE;      playing <= 1'b1; rom_addr <= '0; end
        CODE_FLIP:      begin current <= SND_FLIP;      playing <= 1'b1; rom_addr <= '0; end
        CODE_EXPLOSION: begin current <= SND_EXPLOSION; playing <= 1'b1; rom_addr <= '0; end
        CODE_TAKEOFF:   begin current <= SND_TAKEOFF;   playing <= 1'b1; rom_addr <= '0; end
        CODE_RETRY:     begin current <= SND_RETRY;     playing <= 1'b1; rom_addr <= '0; end
        CODE_COIN:      begin current <= SND_COIN;      playing <= 1'b1; rom_addr <= '0; end
        CODE_MUSIC_ON:  bg_music_on <= 1'b1;
        CODE_MUSIC_OFF: bg_music_on <= 1'b0;
        default: ;
      endcase
    end else if (sample_req) begin
      if (playing) begin
        sample   <= rom_q[current];
        rom_addr <= rom_addr + 1'b1;
        if (rom_addr == ($clog2(DEPTH))'(DEPTH - 1)) playing <= 1'b0;
      end else begin
        sample <= '0;
      end
    end
  end
endmodule
