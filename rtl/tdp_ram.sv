// tdp_ram: true dual-port block RAM with one clock per port.
//
// Used for the foreground tilemap (2048 x 8), background tilemap (1024 x 8)
// and sprite RAM (128 x 8). Port A sits in the CPU clock domain, port B in
// the video clock domain, so the CPU and the video pipelines reach the same
// RAM at once with no arbitration. Each port registers its address and
// returns data one cycle later (read-first). Writing the same word from both
// ports in the same instant is undefined, as in the block RAM it models; the
// video pipelines only read. Lint reports the array as driven from two
// clocked blocks with different clocks: that is the nature of a two-clock
// true dual-port RAM, which synthesis maps onto a block RAM primitive.
module tdp_ram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 8
) (
  input  logic                     clk_a,
  input  logic                     we_a,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [WIDTH-1:0]         d_a,
  output logic [WIDTH-1:0]         q_a,
  input  logic                     clk_b,
  input  logic                     we_b,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  input  logic [WIDTH-1:0]         d_b,
  output logic [WIDTH-1:0]         q_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_a) begin
    if (we_a) mem[addr_a] <= d_a;
    q_a <= mem[addr_a];
  end

  always_ff @(posedge clk_b) begin
    if (we_b) mem[addr_b] <= d_b;
    q_b <= mem[addr_b];
  end
endmodule
