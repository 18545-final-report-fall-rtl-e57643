// bg_render: draws one line of the two background layers into line buffers.
//
// The background is made of 8x8-pixel tiles with 16 colours (4 bits per
// pixel). Each layer has a 32x32-entry tile map in VRAM; an entry is one
// word: tile number (bits 9:0), palette (12:10), priority (13, unused
// here), horizontal flip (14) and vertical flip (15). A tile row is two VRAM
// words: bit planes 0/1 at char_base + 16*tile + row and planes 2/3 eight
// words further on. Scroll offsets move each layer by whole pixels.
//
// BGMODE bits 4 (BG1) and 5 (BG2) switch a layer to 16x16 tiles: a map
// entry then covers four 8x8 tiles, n and n+1 above n+16 and n+17, swapped
// by the flip bits, and the 32x32 map spans 512x512 pixels.
//
// On `start` the renderer builds game line `line` for layer 2 and then
// layer 1: for each of the 33 tiles a line can touch it reads the map entry,
// then the two plane words, and stores eight 8-bit CGRAM indices (palette *
// 16 + colour, 0 meaning transparent) in one line-buffer word. That is four
// clocks per tile, 264 per line, and it reads VRAM on three clocks out of
// four, leaving the fourth to the CPU side. Line buffers are double-buffered
// by line parity, so a line is drawn while the previous one is shown. The
// display side reads a pixel combinationally with the layer's own fine
// horizontal scroll applied. `done` pulses when the line is complete.
module bg_render (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  line,           // game line 0..239
  input  logic [7:0]  bg1sc, bg2sc,   // tile map base in bits 6:2 (1K-word units)
  input  logic [7:0]  bg12nba,        // char base: BG1 in 2:0, BG2 in 6:4 (4K-word units)
  input  logic [7:0]  bgmode,         // bit 4: BG1 16x16 tiles, bit 5: BG2 16x16 tiles
  input  logic [9:0]  bg1hofs, bg1vofs, bg2hofs, bg2vofs,
  // VRAM read port (highest priority at the arbiter)
  output logic        v_req,
  output logic [14:0] v_addr,
  input  logic [15:0] v_rdata,
  output logic        busy,
  output logic        done,
  // display read port
  input  logic        rd_bank,        // line parity of the line shown
  input  logic [7:0]  rd_x,
  output logic [7:0]  bg1_pix,
  output logic [7:0]  bg2_pix
);
  // line buffers: [bank][layer 0=BG1,1=BG2][tile][pixel]
  logic [7:0] lb [2][2][33][8];
  logic [2:0] fine [2][2];

  typedef enum logic [2:0] {S_IDLE, S_MAP, S_P01, S_P23, S_WR} state_e;
  state_e      st;
  logic        layer;       // 1 = BG2 (drawn first), 0 = BG1
  logic        bank;
  logic [5:0]  t;
  logic [15:0] entry, p01;
  logic [7:0]  ln;

  // per-layer settings of the layer being drawn
  logic [9:0]  hofs, vofs;
  logic [7:0]  sc;
  logic [2:0]  nba;
  logic [9:0]  yy;
  logic [4:0]  tx, ty;
  logic [2:0]  row;
  logic        big;         // 16x16 tiles
  logic [6:0]  col8;        // 8-pixel column of the map the tile slot falls in
  logic [9:0]  tile;        // 8x8 tile number after the 16x16 sub-tile selection
  logic [15:0] ent;         // map entry: straight from VRAM on the clock it arrives
  always_comb begin
    ent  = (st == S_P01) ? v_rdata : entry;
    hofs = layer ? bg2hofs : bg1hofs;
    vofs = layer ? bg2vofs : bg1vofs;
    sc   = layer ? bg2sc : bg1sc;
    nba  = layer ? bg12nba[6:4] : bg12nba[2:0];
    big  = layer ? bgmode[5] : bgmode[4];
    yy   = 10'(ln) + vofs;
    col8 = hofs[9:3] + 7'(t);
    ty   = big ? yy[8:4] : yy[7:3];
    tx   = big ? col8[5:1] : col8[4:0];
    row  = ent[15] ? ~yy[2:0] : yy[2:0];
    tile = ent[9:0];
    if (big) tile = ent[9:0] + {5'd0, yy[3] ^ ent[15], 3'd0, col8[0] ^ ent[14]};
  end

  // VRAM addresses: map entry, then the two plane words of the tile row
  logic [14:0] map_addr, chr_addr;
  always_comb begin
    map_addr = {sc[6:2], ty, tx};
    chr_addr = {nba, 12'h000} + {1'b0, tile, 4'h0} + 15'(row);
    v_req  = (st == S_MAP && t < 6'd33) || (st == S_P01) || (st == S_P23);
    unique case (st)
      S_P01:   v_addr = chr_addr;
      S_P23:   v_addr = chr_addr + 15'd8;
      default: v_addr = map_addr;
    endcase
  end

  // pixel p of the tile row, left to right, from the four planes
  function automatic logic [7:0] pix(input logic [15:0] e, input logic [15:0] w01,
                                     input logic [15:0] w23, input int p);
    int b;
    logic [3:0] c;
    b = e[14] ? p : 7 - p;
    c = {w23[8 + b], w23[b], w01[8 + b], w01[b]};
    return (c == 4'd0) ? 8'd0 : {1'b0, e[12:10], c};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; layer <= 1'b1; bank <= 1'b0; t <= '0; entry <= '0; p01 <= '0;
      ln <= '0; done <= 1'b0;
      for (int b = 0; b < 2; b++) for (int l = 0; l < 2; l++) fine[b][l] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_MAP; layer <= 1'b1; t <= '0; ln <= line; bank <= line[0];
        end
        S_MAP: begin
          // map entry arrives next clock
          if (t == 6'd0) fine[bank][layer] <= hofs[2:0];
          st <= S_P01;
        end
        S_P01: begin entry <= v_rdata; st <= S_P23; end   // entry valid; p01 requested now
        S_P23: begin p01 <= v_rdata;  st <= S_WR;  end    // p23 requested now
        S_WR: begin
          for (int p = 0; p < 8; p++) lb[bank][layer][t][p] <= pix(entry, p01, v_rdata, p);
          if (t == 6'd32) begin
            t <= '0;
            if (layer) begin layer <= 1'b0; st <= S_MAP; end
            else begin st <= S_IDLE; done <= 1'b1; end
          end else begin
            t <= t + 1'b1; st <= S_MAP;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
  assign busy = (st != S_IDLE);

  // display side
  logic [8:0] pos1, pos2;
  always_comb begin
    pos1 = 9'(rd_x) + 9'(fine[rd_bank][0]);
    pos2 = 9'(rd_x) + 9'(fine[rd_bank][1]);
    bg1_pix = lb[rd_bank][0][pos1[8:3]][pos1[2:0]];
    bg2_pix = lb[rd_bank][1][pos2[8:3]][pos2[2:0]];
  end
endmodule
