// sp_ram: single-port synchronous block RAM (main CPU work RAM).
//
// One address, one write enable. A write stores `d` at `addr` on the rising
// edge; a read returns the word at the registered address in the next cycle
// (read-first: a write cycle returns the old contents). The 4096 x 8 default
// is the main CPU RAM at E000-EFFF.
module sp_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 8
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         d,
  output logic [WIDTH-1:0]         q
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= d;
    q <= mem[addr];
  end
endmodule
