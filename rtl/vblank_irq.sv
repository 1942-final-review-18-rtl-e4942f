// vblank_irq: once-per-frame interrupt to the Z80 main CPU.
//
// The game is paced by an interrupt at vertical sync. `vsync` comes from the
// video clock domain; it is brought into the CPU clock domain with two
// flip-flops and its rising edge sets a pending request, which drives the
// active-low `int_n`. The Z80 acknowledges with M1 and IORQ low together;
// during that acknowledge cycle the block drives the restart instruction
// VECTOR onto the data bus (`vec_oe` high), which makes the CPU jump to the
// frame interrupt handler, and the request is cleared.
//
// The VSYNC interrupt and the instruction handed to the CPU follow the
// description; the synchroniser and the RST 10h vector are this design's own.
module vblank_irq
  import arcade_pkg::*;
#(
  parameter logic [7:0] VECTOR = VBLANK_RST
) (
  input  logic       clk,      // CPU clock
  input  logic       rst,
  input  logic       vsync,    // active high, video clock domain
  input  logic       m1_n,
  input  logic       iorq_n,
  output logic       int_n,
  output logic [7:0] vec,
  output logic       vec_oe
);
  logic [2:0] vs_sync;
  logic       pending, acking, ack;

  assign ack = ~m1_n & ~iorq_n;

  always_ff @(posedge clk) begin
    if (rst) begin
      vs_sync <= '0; pending <= 1'b0; acking <= 1'b0;
    end else begin
      vs_sync <= {vs_sync[1:0], vsync};
      if (ack && pending) begin
        pending <= 1'b0;
        acking  <= 1'b1;
      end else if (!ack) begin
        acking  <= 1'b0;
      end
      if (vs_sync[1] && !vs_sync[2]) pending <= 1'b1;
    end
  end

  assign int_n  = ~pending;
  assign vec_oe = ack & (pending | acking);
  assign vec    = VECTOR;
endmodule
