// memory_map: main CPU address decoder, ROM banking and memory-mapped I/O.
//
// Maps the Z80's 16-bit address space onto the block memories and registers:
//   0000-7FFF  main program ROM (32 KiB)
//   8000-BFFF  banked program ROM window; the bank register selects
//              bank 0 = ROM 10000-13FFF, 1 = ROM 14000-15FFF (8 KiB, mirrored
//              in the window), 2 = ROM 18000-1BFFF, 3 = nothing (reads FF)
//   C000-C004  inputs: system, player 1, player 2, DIP switch A, DIP switch B
//   C800       sound code (write) -> sound controller (`sound_wr` pulse)
//   C802/C803  background vertical scroll, low byte / bit 8
//   C805       background palette bank (2 bits)
//   C806       ROM bank register (2 bits)
//   CC00-CC7F  sprite RAM          D000-D7FF  foreground tilemap RAM
//   D800-DBFF  background tilemap RAM          E000-EFFF  work RAM
// The CPU side is a plain memory interface: `cpu_rd` / `cpu_wr` are the
// decoded memory read and write strobes (levels). One write is performed on
// the rising edge of `cpu_wr`. Memory addresses are driven straight from the
// CPU address; a read's source is registered with the address, so
// `cpu_rdata` is valid one cycle after the address, matching the block
// memories' one-cycle latency. Unmapped reads return FF; writes to ROM are
// ignored. Video RAMs are reached through their CPU-side ports.
//
// The ROM and RAM ranges, the banking, the input reads and the sound-code
// address C800 follow the description; the other register addresses and the
// bank encoding are this design's own (taken from the original board).
module memory_map
  import arcade_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] cpu_addr,
  input  logic [7:0]  cpu_wdata,
  input  logic        cpu_rd,
  input  logic        cpu_wr,
  output logic [7:0]  cpu_rdata,
  // program ROMs
  output logic [14:0] rom_addr,
  input  logic [7:0]  rom_q,
  output logic [13:0] bank_addr,
  input  logic [7:0]  bank1_q,
  input  logic [7:0]  bank2_q,
  input  logic [7:0]  bank3_q,
  // RAMs (CPU ports); all share cpu_wdata
  output logic [7:0]  mem_wdata,
  output logic        ram_we,
  output logic [11:0] ram_addr,
  input  logic [7:0]  ram_q,
  output logic        fg_we,
  output logic [10:0] fg_addr,
  input  logic [7:0]  fg_q,
  output logic        bg_we,
  output logic [9:0]  bg_addr,
  input  logic [7:0]  bg_q,
  output logic        spr_we,
  output logic [6:0]  spr_addr,
  input  logic [7:0]  spr_q,
  // peripherals
  input  logic [7:0]  in_system,
  input  logic [7:0]  in_p1,
  input  logic [7:0]  in_p2,
  input  logic [7:0]  dsw_a,
  input  logic [7:0]  dsw_b,
  // registers
  output logic [7:0]  sound_code,
  output logic        sound_wr,
  output logic [8:0]  scroll,
  output logic [1:0]  pal_bank,
  output logic [1:0]  rom_bank
);
  rd_sel_e    sel, sel_q;
  logic [7:0] io_q;
  logic       wr_q, wr_pulse;

  assign wr_pulse  = cpu_wr & ~wr_q;
  assign rom_addr  = cpu_addr[14:0];
  assign bank_addr = cpu_addr[13:0];
  assign ram_addr  = cpu_addr[11:0];
  assign fg_addr   = cpu_addr[10:0];
  assign bg_addr   = cpu_addr[9:0];
  assign spr_addr  = cpu_addr[6:0];
  assign mem_wdata = cpu_wdata;

  always_comb begin
    sel = SEL_NONE;
    if (!cpu_addr[15])                          sel = SEL_ROM;
    else if (cpu_addr[15:14] == 2'b10) begin
      case (rom_bank)
        2'd0:    sel = SEL_BANK1;
        2'd1:    sel = SEL_BANK2;
        2'd2:    sel = SEL_BANK3;
        default: sel = SEL_NONE;
      endcase
    end
    else if (cpu_addr >= IO_IN_SYSTEM && cpu_addr <= IO_IN_DSWB) sel = SEL_IO;
    else if (cpu_addr[15:7]  == 9'b1100_1100_0) sel = SEL_SPR;   // CC00-CC7F
    else if (cpu_addr[15:11] == 5'b1101_0)      sel = SEL_FG;    // D000-D7FF
    else if (cpu_addr[15:10] == 6'b1101_10)     sel = SEL_BG;    // D800-DBFF
    else if (cpu_addr[15:12] == 4'hE)           sel = SEL_RAM;   // E000-EFFF
  end

  assign ram_we = wr_pulse && sel == SEL_RAM;
  assign fg_we  = wr_pulse && sel == SEL_FG;
  assign bg_we  = wr_pulse && sel == SEL_BG;
  assign spr_we = wr_pulse && sel == SEL_SPR;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_q <= 1'b0; sel_q <= SEL_NONE; io_q <= 8'hFF;
      sound_code <= '0; sound_wr <= 1'b0; scroll <= '0; pal_bank <= '0; rom_bank <= '0;
    end else begin
      wr_q     <= cpu_wr;
      sound_wr <= 1'b0;
      if (cpu_rd) begin
        sel_q <= sel;
        case (cpu_addr[2:0])
          3'd0:    io_q <= in_system;
          3'd1:    io_q <= in_p1;
          3'd2:    io_q <= in_p2;
          3'd3:    io_q <= dsw_a;
          default: io_q <= dsw_b;
        endcase
      end
      if (wr_pulse) begin
        case (cpu_addr)
          IO_SOUND:     begin sound_code <= cpu_wdata; sound_wr <= 1'b1; end
          IO_SCROLL_LO: scroll[7:0] <= cpu_wdata;
          IO_SCROLL_HI: scroll[8]   <= cpu_wdata[0];
          IO_PAL_BANK:  pal_bank    <= cpu_wdata[1:0];
          IO_ROM_BANK:  rom_bank    <= cpu_wdata[1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (sel_q)
      SEL_ROM:   cpu_rdata = rom_q;
      SEL_BANK1: cpu_rdata = bank1_q;
      SEL_BANK2: cpu_rdata = bank2_q;
      SEL_BANK3: cpu_rdata = bank3_q;
      SEL_RAM:   cpu_rdata = ram_q;
      SEL_FG:    cpu_rdata = fg_q;
      SEL_BG:    cpu_rdata = bg_q;
      SEL_SPR:   cpu_rdata = spr_q;
      SEL_IO:    cpu_rdata = io_q;
      default:   cpu_rdata = 8'hFF;
    endcase
  end
endmodule
