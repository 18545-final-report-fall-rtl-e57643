// snes_pkg: types and constants shared by the SNES system modules.
//
// Holds the CPU address map (which 24-bit bank:address goes to which unit),
// the bus target enumeration used by the memory access unit, register
// addresses of the PPU, CPU-side and DMA register blocks, and a few helper
// functions (LoROM translation, colour expansion). The address ranges are
// those of the original console memory map; the numeric register offsets
// inside each range follow the console's published register layout.
package snes_pkg;

  // ---- bus targets chosen by the memory map decoder ----
  typedef enum logic [3:0] {
    T_NONE    = 4'd0,  // open bus
    T_WRAM    = 4'd1,  // direct CPU RAM (banks 7E/7F and low 8 KiB of every bank)
    T_ROM     = 4'd2,  // game ROM in flash (0x8000-0xFFFF)
    T_PPU     = 4'd3,  // PPU registers 0x2100-0x213F
    T_APU     = 4'd4,  // audio ports 0x2140-0x2143
    T_WMPORT  = 4'd5,  // CPU RAM access port 0x2180-0x2183
    T_CPUREG  = 4'd6,  // 0x42xx CPU registers (mul/div, joypad, NMI)
    T_DMA     = 4'd7   // 0x43xx channel registers and 0x420B/0x420C enables
  } bus_target_e;

  // one bus request (from the CPU port or the DMA engine)
  typedef struct packed {
    logic        req;
    logic        we;
    logic [23:0] addr;
    logic [7:0]  wdata;
  } bus_req_t;

  // ---- register addresses (low 16 bits) ----
  localparam logic [15:0] A_MDMAEN = 16'h420B;
  localparam logic [15:0] A_HDMAEN = 16'h420C;

  // PPU register offsets (address - 0x2100)
  localparam logic [5:0] P_INIDISP  = 6'h00;
  localparam logic [5:0] P_OBSEL    = 6'h01;
  localparam logic [5:0] P_OAMADDL  = 6'h02;
  localparam logic [5:0] P_OAMADDH  = 6'h03;
  localparam logic [5:0] P_OAMDATA  = 6'h04;
  localparam logic [5:0] P_BGMODE   = 6'h05;
  localparam logic [5:0] P_BG1SC    = 6'h07;
  localparam logic [5:0] P_BG2SC    = 6'h08;
  localparam logic [5:0] P_BG12NBA  = 6'h0B;
  localparam logic [5:0] P_BG1HOFS  = 6'h0D;
  localparam logic [5:0] P_BG1VOFS  = 6'h0E;
  localparam logic [5:0] P_BG2HOFS  = 6'h0F;
  localparam logic [5:0] P_BG2VOFS  = 6'h10;
  localparam logic [5:0] P_VMAIN    = 6'h15;
  localparam logic [5:0] P_VMADDL   = 6'h16;
  localparam logic [5:0] P_VMADDH   = 6'h17;
  localparam logic [5:0] P_VMDATAL  = 6'h18;
  localparam logic [5:0] P_VMDATAH  = 6'h19;
  localparam logic [5:0] P_CGADD    = 6'h21;
  localparam logic [5:0] P_CGDATA   = 6'h22;
  localparam logic [5:0] P_TM       = 6'h2C;
  localparam logic [5:0] P_CGADSUB  = 6'h31;
  localparam logic [5:0] P_COLDATA  = 6'h32;
  localparam logic [5:0] P_OAMREAD  = 6'h38;
  localparam logic [5:0] P_VMREADL  = 6'h39;
  localparam logic [5:0] P_VMREADH  = 6'h3A;
  localparam logic [5:0] P_CGREAD   = 6'h3B;

  // ---- address map decoder ----
  // Order of precedence: banks 7E/7F are CPU RAM in full; otherwise the
  // address within the bank selects the unit.
  function automatic bus_target_e decode_addr(input logic [23:0] a);
    logic [7:0]  bank;
    logic [15:0] off;
    bank = a[23:16];
    off  = a[15:0];
    if (bank == 8'h7E || bank == 8'h7F)           return T_WRAM;
    if (off[15])                                   return T_ROM;
    if (off < 16'h2000)                            return T_WRAM;
    if (off >= 16'h2100 && off <= 16'h213F)        return T_PPU;
    if (off >= 16'h2140 && off <= 16'h2143)        return T_APU;
    if (off >= 16'h2180 && off <= 16'h2183)        return T_WMPORT;
    if (off == A_MDMAEN || off == A_HDMAEN)        return T_DMA;
    if (off[15:8] == 8'h42)                        return T_CPUREG;
    if (off[15:8] == 8'h43)                        return T_DMA;
    return T_NONE;
  endfunction

  // 17-bit CPU RAM byte address for a direct access
  function automatic logic [16:0] wram_addr(input logic [23:0] a);
    if (a[23:16] == 8'h7E || a[23:16] == 8'h7F) return {a[16], a[15:0]};
    return {4'b0000, a[12:0]};   // low 8 KiB (stack area) of bank 7E
  endfunction

  // LoROM translation: each bank holds 32 KiB of ROM in 0x8000-0xFFFF,
  // ROM byte offset = {bank[6:0], addr[14:0]}.
  function automatic logic [22:0] lorom_offset(input logic [23:0] a);
    return {1'b0, a[22:16], a[14:0]};
  endfunction

  // 5-bit colour component to 8 bits
  function automatic logic [7:0] c5to8(input logic [4:0] c);
    return {c, c[4:2]};
  endfunction

endpackage
