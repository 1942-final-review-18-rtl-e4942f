// sp_rom: single-port synchronous block ROM.
//
// Models one block ROM of the platform (game code, banked code, character,
// background and sprite graphics, the pre-computed palette and the recorded
// sounds). The address is registered on the rising clock edge and the word
// appears on `q` in the next cycle, the behaviour of a block ROM with its
// optional output register turned off. The contents are loaded from INIT_FILE
// (hex, one word per line) when one is given; with no file the array is
// filled in by whatever configures the FPGA, for example a testbench.
// The single read port follows the description: each ROM is only read by one
// client at a time.
module sp_rom #(
  parameter int unsigned DEPTH     = 32768,
  parameter int unsigned WIDTH     = 8,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         q
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) q <= mem[addr];
endmodule
