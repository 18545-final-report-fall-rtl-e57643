// snes_top: the console around an external 65816-family CPU core.
//
// The CPU core itself is not part of this design: its memory cycles arrive
// on the cpu_* port as held requests (see mem_access) and it is told when to
// stop (cpu_rdy low during DMA/HDMA) and when to take the vertical-blank NMI
// (cpu_nmi_n). Around it sit the parts the console adds: CPU RAM and the
// memory map, the 0x42xx registers with the multiplier/divider and pad
// auto-read, the eight-channel DMA/HDMA engine, the audio mailbox ports, the
// background PPU with its VRAM/CGRAM arbitration, the 640x480 video timing
// and game-window wrapper for the DVI encoder, and the flash controller that
// serves both the game ROM and the pre-recorded music, which is played to an
// AC'97 codec. Everything except the AC'97 link runs on the pixel clock
// `clk` (25.175 MHz for 640x480 at 60 Hz); the link runs on the codec's bit
// clock. The sound processor and its DSP are not modelled: their side of
// the four mailbox ports is brought out as from_apu/to_apu.
module snes_top
  import snes_pkg::*;
#(
  parameter int unsigned FLASH_AW   = 22,
  parameter int unsigned FLASH_WAIT = 3,
  parameter int unsigned SOUND_BASE = 32'h0010_0000,
  parameter int unsigned SOUND_LEN  = 1440000,
  parameter int unsigned SAMPLE_DIV = 524,
  parameter int unsigned PAD_LATCH  = 302,
  parameter int unsigned PAD_HALF   = 151
) (
  input  logic                clk,
  input  logic                rst_n,
  // CPU core bus
  input  logic                cpu_req,
  input  logic                cpu_we,
  input  logic [23:0]         cpu_addr,
  input  logic [7:0]          cpu_wdata,
  output logic [7:0]          cpu_rdata,
  output logic                cpu_ack,
  output logic                cpu_rdy,
  output logic                cpu_nmi_n,
  // flash
  output logic [FLASH_AW-1:0] flash_addr,
  input  logic [15:0]         flash_dq,
  output logic                flash_ce_n,
  output logic                flash_oe_n,
  // game pads
  output logic                pad_latch,
  output logic                pad_clk,
  input  logic                pad1_data,
  input  logic                pad2_data,
  // AC'97 codec
  input  logic                ac97_bit_clk,
  output logic                ac97_sync,
  output logic                ac97_sdata_out,
  output logic                ac97_reset_n,
  // video to the DVI encoder
  output logic                hsync_n,
  output logic                vsync_n,
  output logic                de,
  output logic [7:0]          red,
  output logic [7:0]          green,
  output logic [7:0]          blue,
  // sound processor side of the mailbox
  output logic [3:0][7:0]     to_apu,
  input  logic [3:0][7:0]     from_apu
);
  // ---- raster timing ----
  logic [9:0] hcount, vcount;
  logic       t_hs, t_vs, t_de, g_hblank, g_vblank, hblank_stb, vblank_stb, frame_stb;
  video_timing u_timing (
    .clk, .rst_n, .hcount, .vcount, .hsync_n(t_hs), .vsync_n(t_vs), .de(t_de),
    .game_hblank(g_hblank), .game_vblank(g_vblank),
    .hblank_stb, .vblank_stb, .frame_stb
  );

  // ---- bus ----
  logic        t_we;
  logic [15:0] t_addr;
  logic [7:0]  t_wdata;
  logic        ppu_stb, ppu_ack, apu_stb, creg_stb, dreg_stb;
  logic [7:0]  ppu_rdata, apu_rdata, creg_rdata, dreg_rdata;
  logic        rom_req, rom_ack;
  logic [FLASH_AW:0] rom_byte_addr;
  logic [7:0]  rom_rdata;
  logic        dma_busy, dma_req, dma_we, dma_ack;
  logic [23:0] dma_addr;
  logic [7:0]  dma_wdata, dma_rdata;
  bus_target_e tgt;

  mem_access #(.FLASH_AW(FLASH_AW)) u_bus (
    .clk, .rst_n,
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_ack, .cpu_rdy,
    .dma_busy, .dma_req, .dma_we, .dma_addr, .dma_wdata, .dma_rdata, .dma_ack,
    .t_we, .t_addr, .t_wdata,
    .ppu_stb, .ppu_rdata, .ppu_ack, .apu_stb, .apu_rdata,
    .creg_stb, .creg_rdata, .dreg_stb, .dreg_rdata,
    .rom_req, .rom_byte_addr, .rom_ack, .rom_rdata, .tgt
  );

  dma_ctrl u_dma (
    .clk, .rst_n, .stb(dreg_stb), .we(t_we), .addr(t_addr), .wdata(t_wdata), .rdata(dreg_rdata),
    .hdma_init(frame_stb), .hdma_line(hblank_stb),
    .m_req(dma_req), .m_we(dma_we), .m_addr(dma_addr), .m_wdata(dma_wdata),
    .m_ack(dma_ack), .m_rdata(dma_rdata), .busy(dma_busy),
    .dma_byte_stb(), .hdma_byte_stb()
  );

  // ---- CPU registers and pads ----
  logic        pad_start, pad_busy;
  logic [15:0] joy1, joy2;
  cpu_regs u_cregs (
    .clk, .rst_n, .stb(creg_stb), .we(t_we), .addr(t_addr[7:0]), .wdata(t_wdata),
    .rdata(creg_rdata), .vblank_stb, .in_vblank(g_vblank), .in_hblank(g_hblank),
    .pad_start, .pad_busy, .joy1, .joy2, .nmi_n(cpu_nmi_n)
  );
  ctrl_reader #(.LATCH_CYC(PAD_LATCH), .HALF_CYC(PAD_HALF)) u_pads (
    .clk, .rst_n, .start(pad_start), .pad_latch, .pad_clk, .pad1_data, .pad2_data,
    .joy1, .joy2, .busy(pad_busy), .done()
  );

  // ---- audio mailbox ----
  apu_ports u_apu (
    .clk, .rst_n, .stb(apu_stb), .we(t_we), .addr(t_addr[1:0]), .wdata(t_wdata),
    .rdata(apu_rdata), .to_apu, .from_apu
  );

  // ---- picture ----
  logic [4:0] pr, pg, pb;
  logic       pvalid;
  ppu u_ppu (
    .clk, .rst_n, .stb(ppu_stb), .we(t_we), .addr(t_addr[5:0]), .wdata(t_wdata),
    .rdata(ppu_rdata), .ack(ppu_ack), .hcount, .vcount,
    .pix_r(pr), .pix_g(pg), .pix_b(pb), .pix_valid(pvalid), .render_done()
  );
  video_window u_win (
    .clk, .rst_n, .hsync_n_in(t_hs), .vsync_n_in(t_vs), .de_in(t_de),
    .pix_r(pr), .pix_g(pg), .pix_b(pb), .pix_valid(pvalid),
    .hsync_n, .vsync_n, .de, .red, .green, .blue
  );

  // ---- flash: game ROM and music ----
  logic                snd_req, snd_ack, sample_tgl;
  logic [FLASH_AW-1:0] snd_addr;
  logic [15:0]         snd_rdata, sample;
  flash_ctrl #(.FLASH_AW(FLASH_AW), .WAIT_CYC(FLASH_WAIT)) u_flash (
    .clk, .rst_n, .rom_req, .rom_byte_addr, .rom_ack, .rom_rdata,
    .snd_req, .snd_addr, .snd_ack, .snd_rdata,
    .flash_addr, .flash_dq, .flash_ce_n, .flash_oe_n
  );
  sound_player #(.FLASH_AW(FLASH_AW), .SOUND_BASE(SOUND_BASE), .SOUND_LEN(SOUND_LEN),
                 .SAMPLE_DIV(SAMPLE_DIV)) u_snd (
    .clk, .rst_n, .enable(1'b1), .snd_req, .snd_addr, .snd_ack, .snd_rdata,
    .sample, .sample_tgl, .wrapped()
  );
  ac97_link u_ac97 (
    .bit_clk(ac97_bit_clk), .rst_n, .sample, .sample_tgl,
    .sync(ac97_sync), .sdata_out(ac97_sdata_out), .codec_reset_n(ac97_reset_n), .frame_stb()
  );
endmodule
