// vga_controller: 640x480 @ 60 Hz raster timing and colour output.
//
// Two counters walk the raster: `hcount` (0..799) and `vcount` (0..524) at the
// 25.175 MHz pixel clock. They are brought out so the pixel hardware can work
// out the colour for the current column and row. That colour (three 4-bit
// values) must arrive LATENCY cycles after the counters showed the position;
// the controller delays its own sync and blanking by the same LATENCY so
// colour and sync line up, then registers everything once more onto the pins.
// Outside the 640x480 visible area the colour pins are driven to zero. Sync
// pulses are active low. Off-chip, each 4-bit colour goes through a weighted
// resistor ladder (bit 3 through the smallest resistor) into the VGA monitor.
//
// `line_start` pulses at hcount == 0 of every line, `frame_start` at the first
// pixel of a frame, `vsync_start` on the first cycle of the vertical sync
// pulse (used for the frame interrupt).
//
// The 640x480 / 60 Hz mode and the counter structure follow the description;
// the porch and sync widths are the standard ones for this mode.
module vga_controller
  import arcade_pkg::*;
#(
  parameter int unsigned LATENCY = PIXEL_LATENCY
) (
  input  logic       clk,          // pixel clock
  input  logic       rst,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       line_start,
  output logic       frame_start,
  output logic       vsync_start,
  input  logic [3:0] r_in,
  input  logic [3:0] g_in,
  input  logic [3:0] b_in,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic [3:0] vga_r,
  output logic [3:0] vga_g,
  output logic [3:0] vga_b
);
  logic hs, vs, act;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == 10'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 10'd1;
    end else begin
      hcount <= hcount + 10'd1;
    end
  end

  always_comb begin
    hs  = (hcount >= 10'(H_VISIBLE + H_FRONT)) && (hcount < 10'(H_VISIBLE + H_FRONT + H_SYNC));
    vs  = (vcount >= 10'(V_VISIBLE + V_FRONT)) && (vcount < 10'(V_VISIBLE + V_FRONT + V_SYNC));
    act = (hcount < 10'(H_VISIBLE)) && (vcount < 10'(V_VISIBLE));
    line_start  = (hcount == '0);
    frame_start = (hcount == '0) && (vcount == '0);
    vsync_start = (hcount == '0) && (vcount == 10'(V_VISIBLE + V_FRONT));
  end

  // delay line matching the pixel hardware's latency
  logic [LATENCY:0] hs_d, vs_d, act_d;
  always_ff @(posedge clk) begin
    if (rst) begin
      hs_d <= '0; vs_d <= '0; act_d <= '0;
    end else begin
      hs_d  <= {hs_d[LATENCY-1:0], hs};
      vs_d  <= {vs_d[LATENCY-1:0], vs};
      act_d <= {act_d[LATENCY-1:0], act};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hsync_n <= 1'b1; vsync_n <= 1'b1;
      vga_r <= '0; vga_g <= '0; vga_b <= '0;
    end else begin
      hsync_n <= ~hs_d[LATENCY-1];
      vsync_n <= ~vs_d[LATENCY-1];
      vga_r   <= act_d[LATENCY-1] ? r_in : 4'h0;
      vga_g   <= act_d[LATENCY-1] ? g_in : 4'h0;
      vga_b   <= act_d[LATENCY-1] ? b_in : 4'h0;
    end
  end
endmodule
