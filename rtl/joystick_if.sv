// joystick_if: arcade control inputs.
//
// The ribbon cable brings the 8-way joystick (up/down/left/right), the two
// play buttons (fire, flip), the two start buttons and the coin button. Each
// line (active high when pressed) is passed through a two-flop synchroniser
// and packed into the active-low input bytes the game reads:
//   in_system: bit0 start 1, bit1 start 2, bit4 coin, other bits 1
//   in_p1    : bit0 right, bit1 left, bit2 down, bit3 up, bit4 fire, bit5 flip
//   in_p2    : all 1 (the second player's controls are not wired)
// Inputs appear two cycles after they change. The set of controls follows the
// description; the bit layout is that of the original board.
module joystick_if (
  input  logic       clk,
  input  logic       rst,
  input  logic       up,
  input  logic       down,
  input  logic       left,
  input  logic       right,
  input  logic       fire,
  input  logic       flip,
  input  logic       start1,
  input  logic       start2,
  input  logic       coin,
  output logic [7:0] in_system,
  output logic [7:0] in_p1,
  output logic [7:0] in_p2
);
  logic [8:0] s1, s2;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0; s2 <= '0;
    end else begin
      s1 <= {coin, start2, start1, flip, fire, up, down, left, right};
      s2 <= s1;
    end
  end

  assign in_p1     = ~{2'b00, s2[5], s2[4], s2[3], s2[2], s2[1], s2[0]};
  assign in_system = ~{3'b000, s2[8], 2'b00, s2[7], s2[6]};
  assign in_p2     = 8'hFF;
endmodule
