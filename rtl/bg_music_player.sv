// bg_music_player: background music player on the second (slave) board.
//
// The background music did not fit in the first board's block memory, so it
// plays from a ROM on a second FPGA, started and stopped by one wire from the
// first board (`music_on`, driven by sound codes 11/10). The wire is
// synchronised with two flip-flops. On its rising edge playback restarts at
// sample 0; while it is high, each `sample_req` from the codec interface
// moves the ROM word onto `sample` and steps the address, wrapping at DEPTH so
// the music loops. When the wire is low, `sample` is 0.
//
// The second board and one-bit link follow the description; looping, restart
// and the sizes are this design's own.
module bg_music_player #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     music_on,
  input  logic                     sample_req,
  output logic [$clog2(DEPTH)-1:0] rom_addr,
  input  logic [WIDTH-1:0]         rom_q,
  output logic [WIDTH-1:0]         sample,
  output logic                     playing
);
  logic [2:0] on_s;

  assign playing = on_s[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      on_s <= '0; rom_addr <= '0; sample <= '0;
    end else begin
      on_s <= {on_s[1:0], music_on};
      if (on_s[1] && !on_s[2]) begin
        rom_addr <= '0;
      end else if (sample_req) begin
        if (on_s[1]) begin
          sample   <= rom_q;
          rom_addr <= (rom_addr == ($clog2(DEPTH))'(DEPTH - 1)) ? '0 : rom_addr + 1'b1;
        end else begin
          sample <= '0;
        end
      end
    end
  end
endmodule
