// mem_access: the CPU-side memory access unit.
//
// Sits between the two bus masters (the CPU and the DMA engine) and
// everything they can address. It decodes each 24-bit bank:address by the
// console's memory map (see snes_pkg::decode_addr) and runs the access:
//   - CPU RAM: 128 KiB block RAM, reached directly (banks 7E/7F, and the
//     low 8 KiB of the other banks, where the stack lives) or through the
//     0x2180-0x2183 port, whose 17-bit address auto-increments;
//   - game ROM (0x8000-0xFFFF): LoROM-translated to a flash byte address
//     and fetched by the flash controller, however long that takes;
//   - PPU registers, audio ports, 0x42xx CPU registers and 0x43xx DMA
//     registers: passed on as a one-clock strobe with address and data.
// While the DMA engine is busy it owns the bus and the CPU's `cpu_rdy` is
// low; ownership changes only between accesses.
//
// Handshake, for both masters: hold req, we, addr and wdata until ack; ack
// is one clock wide and rdata is valid with it. An access to a plain
// register or to RAM takes four clocks from request to the next request;
// PPU accesses that reach VRAM/CGRAM and ROM reads take longer. An address
// nothing answers to reads back the last byte on the bus.
module mem_access
  import snes_pkg::*;
#(
  parameter int unsigned FLASH_AW = 22,
  parameter logic [22:0] ROM_BASE = '0      // flash byte address of ROM offset 0
) (
  input  logic        clk,
  input  logic        rst_n,
  // CPU port
  input  logic        cpu_req,
  input  logic        cpu_we,
  input  logic [23:0] cpu_addr,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  output logic        cpu_ack,
  output logic        cpu_rdy,
  // DMA port
  input  logic        dma_busy,
  input  logic        dma_req,
  input  logic        dma_we,
  input  logic [23:0] dma_addr,
  input  logic [7:0]  dma_wdata,
  output logic [7:0]  dma_rdata,
  output logic        dma_ack,
  // register targets
  output logic        t_we,
  output logic [15:0] t_addr,
  output logic [7:0]  t_wdata,
  output logic        ppu_stb,
  input  logic [7:0]  ppu_rdata,
  input  logic        ppu_ack,
  output logic        apu_stb,
  input  logic [7:0]  apu_rdata,
  output logic        creg_stb,
  input  logic [7:0]  creg_rdata,
  output logic        dreg_stb,
  input  logic [7:0]  dreg_rdata,
  // flash ROM port
  output logic                rom_req,
  output logic [FLASH_AW:0]   rom_byte_addr,
  input  logic                rom_ack,
  input  logic [7:0]          rom_rdata,
  // observation
  output bus_target_e tgt
);
  typedef enum logic [2:0] {S_IDLE, S_ACC, S_CAP, S_WAIT} state_e;
  state_e      st;
  logic        own_dma, ack_r;
  logic [7:0]  mdr;
  logic [16:0] wmadd;
  bus_req_t    m;

  always_comb begin
    m.req   = own_dma ? dma_req   : cpu_req;
    m.we    = own_dma ? dma_we    : cpu_we;
    m.addr  = own_dma ? dma_addr  : cpu_addr;
    m.wdata = own_dma ? dma_wdata : cpu_wdata;
  end

  // CPU RAM
  logic        ram_en, ram_we;
  logic [16:0] ram_addr;
  logic [7:0]  ram_rdata;
  spram #(.AW(17), .DW(8)) u_wram (
    .clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(m.wdata), .rdata(ram_rdata)
  );

  always_comb begin
    t_we    = m.we;
    t_addr  = m.addr[15:0];
    t_wdata = m.wdata;
    ppu_stb  = (st == S_ACC) && (tgt == T_PPU);
    apu_stb  = (st == S_ACC) && (tgt == T_APU);
    creg_stb = (st == S_ACC) && (tgt == T_CPUREG);
    dreg_stb = (st == S_ACC) && (tgt == T_DMA);
    ram_en   = (st == S_ACC) && (tgt == T_WRAM || (tgt == T_WMPORT && m.addr[1:0] == 2'd0));
    ram_we   = ram_en && m.we;
    ram_addr = (tgt == T_WRAM) ? wram_addr(m.addr) : wmadd;
    rom_req  = (st == S_WAIT) && (tgt == T_ROM);
    rom_byte_addr = (FLASH_AW + 1)'(ROM_BASE + lorom_offset(m.addr));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; own_dma <= 1'b0; ack_r <= 1'b0; mdr <= '0; wmadd <= '0; tgt <= T_NONE;
    end else begin
      ack_r <= 1'b0;
      unique case (st)
        S_IDLE: begin
          if (!ack_r) begin
            if (dma_busy != own_dma) own_dma <= dma_busy;   // hand over between accesses
            else if (m.req) begin
              tgt <= decode_addr(m.addr);
              st  <= S_ACC;
            end
          end
        end
        S_ACC: begin
          unique case (tgt)
            T_WRAM, T_APU, T_CPUREG, T_DMA: st <= S_CAP;
            T_WMPORT: begin
              st <= S_CAP;
              unique case (m.addr[1:0])
                2'd0: wmadd <= wmadd + 1'b1;
                2'd1: if (m.we) wmadd[7:0]  <= m.wdata;
                2'd2: if (m.we) wmadd[15:8] <= m.wdata;
                2'd3: if (m.we) wmadd[16]   <= m.wdata[0];
              endcase
            end
            T_PPU: st <= S_WAIT;
            T_ROM: if (m.we) begin ack_r <= 1'b1; st <= S_IDLE; end  // ROM ignores writes
                   else st <= S_WAIT;
            default: begin ack_r <= 1'b1; st <= S_IDLE; end   // open bus: mdr unchanged
          endcase
        end
        S_CAP: begin
          if (!m.we) begin
            unique case (tgt)
              T_WRAM:   mdr <= ram_rdata;
              T_WMPORT: mdr <= (m.addr[1:0] == 2'd0) ? ram_rdata : mdr;
              T_APU:    mdr <= apu_rdata;
              T_CPUREG: mdr <= creg_rdata;
              T_DMA:    mdr <= dreg_rdata;
              default:  ;
            endcase
          end else mdr <= m.wdata;
          ack_r <= 1'b1; st <= S_IDLE;
        end
        S_WAIT: begin
          if (tgt == T_PPU && ppu_ack) begin
            mdr <= m.we ? m.wdata : ppu_rdata; ack_r <= 1'b1; st <= S_IDLE;
          end else if (tgt == T_ROM && rom_ack) begin
            mdr <= m.we ? m.wdata : rom_rdata; ack_r <= 1'b1; st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    cpu_ack   = ack_r && !own_dma;
    dma_ack   = ack_r && own_dma;
    cpu_rdata = mdr;
    dma_rdata = mdr;
    cpu_rdy   = !dma_busy && !own_dma;
  end

  // a master keeps its request steady until it is answered
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
            (st != S_IDLE) |-> m.req);
endmodule
