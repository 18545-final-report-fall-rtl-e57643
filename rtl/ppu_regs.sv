// ppu_regs: the PPU register file at 0x2100-0x213F.
//
// This is the only meeting point between the CPU/DMA bus and the picture
// unit. It keeps the display settings (forced blank and brightness, the
// tile size of each layer in BGMODE bits 4/5, the two background layers' tile-map and character bases and scroll offsets,
// main-screen layer enables) and the access ports into the three PPU
// memories: VRAM through VMAIN/VMADD/VMDATA (writes and prefetched reads),
// CGRAM through CGADD/CGDATA (two byte writes per 15-bit colour) and OAM
// through OAMADD/OAMDATA (byte writes with auto-increment, 544 bytes). OAM
// has a second, word-wide read port (o_addr/o_rdata) for the sprite
// renderer, and OBSEL (0x2101) holds the sprite sizes and tile base.
// CGADSUB (0x2131) and COLDATA (0x2132) set up colour math against a
// fixed colour; a COLDATA write sets the components chosen by its bits 7:5
// (blue, green, red) to its bits 4:0.
//
// Timing: a bus access starts with `stb` and ends with `ack`. Plain
// registers acknowledge on the next clock. An access that touches VRAM or
// CGRAM holds its request, address and data at the memory arbiter until the
// drawing side lets it in, and only then acknowledges, so a write coming
// from DMA is never dropped while the picture is being drawn.
// VRAM is word-wide: the word is written when the byte that advances the
// address (chosen by VMAIN bit 7) is written, together with the last value
// written to the other byte. Scroll registers are written twice, low byte
// then high byte, sharing one latch. Register numbers follow the console.
module ppu_regs
  import snes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stb,
  input  logic        we,
  input  logic [5:0]  addr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic        ack,
  // VRAM, CPU side of the arbiter
  output logic        v_req,
  output logic        v_we,
  output logic [14:0] v_addr,
  output logic [15:0] v_wdata,
  input  logic        v_gnt,
  input  logic        v_ack,
  input  logic [15:0] v_rdata,
  // CGRAM, CPU side of the arbiter
  output logic        c_req,
  output logic        c_we,
  output logic [7:0]  c_addr,
  output logic [14:0] c_wdata,
  input  logic        c_gnt,
  input  logic        c_ack,
  input  logic [14:0] c_rdata,
  // settings for the drawing side
  output logic        force_blank,
  output logic [3:0]  brightness,
  output logic [7:0]  bgmode, bg1sc, bg2sc, bg12nba,
  output logic [9:0]  bg1hofs, bg1vofs, bg2hofs, bg2vofs,
  output logic [4:0]  tm,
  output logic [7:0]  obsel,
  output logic [7:0]  cgadsub,
  output logic [14:0] fixcol,
  // OAM read port of the sprite renderer (one clock latency)
  input  logic [7:0]  o_addr,
  output logic [31:0] o_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_ACK, S_VWR, S_VPF, S_CWR, S_CRD} state_e;
  state_e      st;
  logic [7:0]  vmain, vlo, vhi, cglo, ofs_latch;
  logic [15:0] vmadd, vlatch;
  logic [7:0]  cgadd;
  logic        cg_hi, cgr_hi;
  logic [9:0]  oamadd;
  logic        oam_we;
  logic [7:0]  oam_rdata;
  logic        oam_rd;

  // OAM: byte port for the CPU side, word port for the sprite renderer
  oam_ram u_oam (
    .clk(clk), .a_en(stb && addr inside {P_OAMDATA, P_OAMREAD}), .a_we(oam_we),
    .a_addr(oamadd), .a_wdata(wdata), .a_rdata(oam_rdata),
    .b_addr(o_addr), .b_rdata(o_rdata)
  );
  assign oam_we = stb && we && (addr == P_OAMDATA);

  function automatic logic [15:0] vinc(input logic [7:0] m);
    unique case (m[1:0])
      2'd0:    return 16'd1;
      2'd1:    return 16'd32;
      default: return 16'd128;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ack <= 1'b0; rdata <= '0;
      force_blank <= 1'b1; brightness <= '0; bgmode <= '0; bg1sc <= '0; bg2sc <= '0; bg12nba <= '0;
      bg1hofs <= '0; bg1vofs <= '0; bg2hofs <= '0; bg2vofs <= '0; tm <= '0; cgadsub <= '0; fixcol <= '0;
      vmain <= '0; vlo <= '0; vhi <= '0; cglo <= '0; ofs_latch <= '0; vmadd <= '0; vlatch <= '0;
      cgadd <= '0; cg_hi <= 1'b0; cgr_hi <= 1'b0; oamadd <= '0; oam_rd <= 1'b0; obsel <= '0;
      v_req <= 1'b0; v_we <= 1'b0; v_addr <= '0; v_wdata <= '0;
      c_req <= 1'b0; c_we <= 1'b0; c_addr <= '0; c_wdata <= '0;
    end else begin
      ack    <= 1'b0;
      oam_rd <= 1'b0;
      if (oam_rd) rdata <= oam_rdata;
      unique case (st)
        S_IDLE: if (stb) begin
          st <= S_ACK;
          if (we) begin
            unique case (addr)
              P_INIDISP: begin force_blank <= wdata[7]; brightness <= wdata[3:0]; end
              P_OBSEL:   obsel <= wdata;
              P_OAMADDL: oamadd <= {oamadd[9], wdata, 1'b0};
              P_OAMADDH: oamadd <= {wdata[0], oamadd[8:0]};
              P_OAMDATA: oamadd <= (oamadd == 10'd543) ? '0 : oamadd + 1'b1;
              P_BGMODE:  bgmode <= wdata;
              P_BG1SC:   bg1sc <= wdata;
              P_BG2SC:   bg2sc <= wdata;
              P_BG12NBA: bg12nba <= wdata;
              P_BG1HOFS: begin bg1hofs <= {wdata[1:0], ofs_latch}; ofs_latch <= wdata; end
              P_BG1VOFS: begin bg1vofs <= {wdata[1:0], ofs_latch}; ofs_latch <= wdata; end
              P_BG2HOFS: begin bg2hofs <= {wdata[1:0], ofs_latch}; ofs_latch <= wdata; end
              P_BG2VOFS: begin bg2vofs <= {wdata[1:0], ofs_latch}; ofs_latch <= wdata; end
              P_VMAIN:   vmain <= wdata;
              P_VMADDL, P_VMADDH: begin
                if (addr == P_VMADDL) vmadd[7:0] <= wdata; else vmadd[15:8] <= wdata;
                v_req <= 1'b1; v_we <= 1'b0;
                v_addr <= (addr == P_VMADDL) ? {vmadd[14:8], wdata} : {wdata[6:0], vmadd[7:0]};
                st <= S_VPF;
              end
              P_VMDATAL, P_VMDATAH: begin
                if (addr == P_VMDATAL) vlo <= wdata; else vhi <= wdata;
                if ((addr == P_VMDATAH) == vmain[7]) begin
                  v_req <= 1'b1; v_we <= 1'b1; v_addr <= vmadd[14:0];
                  v_wdata <= (addr == P_VMDATAL) ? {vhi, wdata} : {wdata, vlo};
                  st <= S_VWR;
                end
              end
              P_CGADD: begin cgadd <= wdata; cg_hi <= 1'b0; cgr_hi <= 1'b0; end
              P_CGDATA: begin
                if (!cg_hi) begin cglo <= wdata; cg_hi <= 1'b1; end
                else begin
                  cg_hi <= 1'b0; c_req <= 1'b1; c_we <= 1'b1; c_addr <= cgadd;
                  c_wdata <= {wdata[6:0], cglo}; st <= S_CWR;
                end
              end
              P_TM: tm <= wdata[4:0];
              P_CGADSUB: cgadsub <= wdata;
              P_COLDATA: begin
                if (wdata[5]) fixcol[4:0]   <= wdata[4:0];
                if (wdata[6]) fixcol[9:5]   <= wdata[4:0];
                if (wdata[7]) fixcol[14:10] <= wdata[4:0];
              end
              default: ;
            endcase
          end else begin
            unique case (addr)
              P_OAMREAD: begin
                oam_rd <= 1'b1;
                oamadd <= (oamadd == 10'd543) ? '0 : oamadd + 1'b1;
              end
              P_VMREADL, P_VMREADH: begin
                rdata <= (addr == P_VMREADL) ? vlatch[7:0] : vlatch[15:8];
                if ((addr == P_VMREADH) == vmain[7]) begin
                  v_req <= 1'b1; v_we <= 1'b0; v_addr <= 15'(vmadd + vinc(vmain));
                  vmadd <= vmadd + vinc(vmain);
                  st <= S_VPF;
                end
              end
              P_CGREAD: begin
                c_req <= 1'b1; c_we <= 1'b0; c_addr <= cgadd; st <= S_CRD;
              end
              default: rdata <= 8'h00;
            endcase
          end
        end
        S_ACK: begin ack <= 1'b1; st <= S_IDLE; end
        S_VWR: if (v_gnt) begin
          v_req <= 1'b0; vmadd <= vmadd + vinc(vmain); st <= S_ACK;
        end
        S_VPF: begin
          if (v_gnt) v_req <= 1'b0;
          if (v_ack) begin vlatch <= v_rdata; ack <= 1'b1; st <= S_IDLE; end
        end
        S_CWR: if (c_gnt) begin
          c_req <= 1'b0; cgadd <= cgadd + 1'b1; st <= S_ACK;
        end
        S_CRD: begin
          if (c_gnt) c_req <= 1'b0;
          if (c_ack) begin
            rdata  <= cgr_hi ? {1'b0, c_rdata[14:8]} : c_rdata[7:0];
            cgr_hi <= !cgr_hi;
            if (cgr_hi) cgadd <= cgadd + 1'b1;
            ack <= 1'b1; st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
