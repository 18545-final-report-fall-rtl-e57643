// obj_render: draws the sprites (objects) of one game line into line buffers.
//
// Sprites come from OAM: 128 entries of X (9 bits, signed), Y, tile number
// (9 bits), palette (3 bits), priority (2 bits, kept but not used here) and
// horizontal and vertical flip, plus a size bit that picks the small or the
// large of the two sizes OBSEL bits 7:5 select (8/16, 8/32, 8/64, 16/32,
// 16/64, 32/64 pixels square). A sprite is a square block of 8x8 4-bit tiles
// from the sprite character area: OBSEL bits 1:0 give its base (8K-word
// units; bit 2 lies beyond the 32K-word VRAM); tiles 256-511 sit a further
// (OBSEL bits 4:3 + 1) x 4K words on, wrapping in VRAM.
// Within a sprite the tile to the right is tile+1 and the one below is
// tile+16, each wrapping in its 4-bit field, as on the console.
//
// Per line, in two phases:
//   1. Evaluation, from `start` (about 140 clocks): reads the 8 words of the
//      size/X-bit-8 table, then the 128 sprite words one per clock from the
//      OAM read port, and keeps the first MAX_SPR sprites that cover the line
//      (Y <= line < Y + size, wrapping at 256), in OAM order.
//   2. Drawing, from `go` (the background renderer has released VRAM): for
//      each kept sprite and each 8-pixel sliver of it, left to right, reads
//      the two plane words (three clocks per sliver) and writes the visible,
//      non-transparent pixels that no earlier sprite has covered. At most
//      MAX_SLIVER slivers are drawn per line; later ones are dropped.
// The line buffer (double-buffered by line parity like the background's)
// holds CGRAM indices 128 + palette x 16 + colour, 0 for no sprite, as 32
// words of eight pixels, so a sliver touches at most two words; it is
// cleared when evaluation starts. `done` pulses at the end of drawing.
//
// Taken from the console: OAM layout, sizes, tile arrangement, palettes 8-15
// and lowest-index-wins among sprites; the 32-sprite and 34-sliver limits
// are the console's numbers. This design's own choices: the two-phase
// schedule, a sprite shown from line Y (not Y + 1), and slivers that fall
// off screen counting against the sliver limit.
module obj_render #(
  parameter int unsigned MAX_SPR    = 32,
  parameter int unsigned MAX_SLIVER = 34
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,          // begin evaluation of game line `line`
  input  logic        go,             // VRAM is free: begin drawing
  input  logic [7:0]  line,
  input  logic [7:0]  obsel,
  // OAM read port (registered, one clock)
  output logic [7:0]  o_addr,
  input  logic [31:0] o_rdata,
  // VRAM read port (registered, one clock)
  output logic        v_req,
  output logic [14:0] v_addr,
  input  logic [15:0] v_rdata,
  output logic        busy,
  output logic        done,
  // display read port
  input  logic        rd_bank,
  input  logic [7:0]  rd_x,
  output logic [7:0]  obj_pix
);
  localparam int unsigned LW = $clog2(MAX_SPR + 1);
  localparam int unsigned EW = $clog2(MAX_SPR);

  // line buffers: [bank][8-pixel word], pixel q of a word in bits 8q+7:8q
  logic [63:0] lb [2][32];

  // kept sprites
  logic [8:0] s_x    [MAX_SPR];
  logic [8:0] s_tile [MAX_SPR];
  logic [5:0] s_row  [MAX_SPR];   // row within the sprite, flip applied
  logic [2:0] s_pal  [MAX_SPR];
  logic       s_hfl  [MAX_SPR];
  logic [3:0] s_w    [MAX_SPR];   // width in slivers: 1, 2, 4 or 8
  logic [LW-1:0] n_spr;

  typedef enum logic [2:0] {S_IDLE, S_HI, S_EVAL, S_WAIT, S_F01, S_F23, S_FW} state_e;
  state_e      st;
  logic        bank, go_seen;
  logic [7:0]  ln, cnt;
  logic [255:0] hi;
  logic [EW-1:0] e;              // sprite being drawn
  logic [3:0]  sl;               // sliver within it
  logic [5:0]  n_sl;             // slivers drawn
  logic [15:0] p01;

  // sizes in pixels for the small and large sprite of each OBSEL setting
  function automatic logic [6:0] size_px(input logic [2:0] sel, input logic big);
    unique case (sel)
      3'd0: return big ? 7'd16 : 7'd8;
      3'd1: return big ? 7'd32 : 7'd8;
      3'd2: return big ? 7'd64 : 7'd8;
      3'd3: return big ? 7'd32 : 7'd16;
      3'd4: return big ? 7'd64 : 7'd16;
      default: return big ? 7'd64 : 7'd32;
    endcase
  endfunction

  // evaluation of the sprite whose word arrives this clock (index cnt - 1)
  logic [6:0]  ev_i;
  logic [7:0]  ev_y, ev_dy;
  logic [6:0]  ev_h;
  logic        ev_on;
  logic [5:0]  ev_row;
  always_comb begin
    ev_i   = 7'(cnt - 8'd1);
    ev_y   = o_rdata[15:8];
    ev_h   = size_px(obsel[7:5], hi[{ev_i, 1'b1}]);
    ev_dy  = ln - ev_y;
    ev_on  = ({1'b0, ev_dy} < 9'(ev_h));
    ev_row = o_rdata[31] ? 6'(ev_h - 7'd1 - 7'(ev_dy)) : 6'(ev_dy);
  end

  // VRAM address of the current sliver's plane-0/1 word
  logic [3:0]  col;
  logic [8:0]  tn;
  logic [14:0] base, sl_addr;
  always_comb begin
    col  = s_hfl[e] ? 4'(s_w[e] - 4'd1 - sl) : sl;
    tn   = {s_tile[e][8], 4'(s_tile[e][7:4] + 4'(s_row[e][5:3])), 4'(s_tile[e][3:0] + col)};
    base = {obsel[1:0], 13'h0};
    if (tn[8]) base = base + ((15'(obsel[4:3]) + 15'd1) << 12);
    sl_addr = base + {3'b0, tn[7:0], 4'h0} + 15'(s_row[e][2:0]);
    v_req  = (st == S_F01) || (st == S_F23);
    v_addr = (st == S_F23) ? sl_addr + 15'd8 : sl_addr;
    if (st == S_HI) o_addr = (cnt < 8'd8) ? 8'(8'd128 + cnt) : 8'd0;
    else            o_addr = (cnt > 8'd127) ? 8'd127 : cnt;
  end

  // pixels of the sliver being drawn (left to right) and where it lands
  logic [63:0] spix;
  logic [8:0]  sx, sx1;
  always_comb begin
    for (int p = 0; p < 8; p++) begin
      logic [2:0] b; logic [3:0] c;
      b = s_hfl[e] ? 3'(p) : 3'(7 - p);
      c = {v_rdata[{1'b1, b}], v_rdata[{1'b0, b}], p01[{1'b1, b}], p01[{1'b0, b}]};
      spix[8 * p +: 8] = (c == 4'd0) ? 8'd0 : {1'b1, s_pal[e], c};
    end
    sx  = s_x[e] + {1'b0, sl, 3'd0};
    sx1 = sx + 9'd8;
  end

  // word with sliver pixels placed at offset sh (upper = the following word)
  function automatic logic [63:0] merge(input logic [63:0] old, input logic [63:0] px,
                                        input logic [2:0] sh, input logic upper);
    logic [63:0] r;
    r = old;
    for (int q = 0; q < 8; q++) begin
      int p;
      p = upper ? q + 8 - int'(sh) : q - int'(sh);
      if (p >= 0 && p < 8 && px[8 * p +: 8] != 8'd0 && old[8 * q +: 8] == 8'd0)
        r[8 * q +: 8] = px[8 * p +: 8];
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; bank <= 1'b0; go_seen <= 1'b0; ln <= '0; cnt <= '0; hi <= '0;
      n_spr <= '0; e <= '0; sl <= '0; n_sl <= '0; p01 <= '0; done <= 1'b0;
      for (int i = 0; i < MAX_SPR; i++) begin
        s_x[i] <= '0; s_tile[i] <= '0; s_row[i] <= '0; s_pal[i] <= '0; s_hfl[i] <= 1'b0; s_w[i] <= '0;
      end
      for (int b = 0; b < 2; b++) for (int w = 0; w < 32; w++) lb[b][w] <= '0;
    end else begin
      done <= 1'b0;
      if (go) go_seen <= 1'b1;
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_HI; cnt <= '0; ln <= line; bank <= line[0]; n_spr <= '0; go_seen <= go;
          for (int w = 0; w < 32; w++) lb[line[0]][w] <= '0;
        end
        S_HI: begin
          // word 128 + cnt requested now, word 128 + cnt - 1 arrives
          if (cnt != 0) hi[{cnt[2:0] - 3'd1, 5'd0} +: 32] <= o_rdata;
          if (cnt == 8'd8) begin st <= S_EVAL; cnt <= 8'd1; end   // word 0 requested with cnt 0 below
          else cnt <= cnt + 1'b1;
        end
        S_EVAL: begin
          // word cnt requested now, word cnt - 1 arrives
          if (ev_on && n_spr < LW'(MAX_SPR)) begin
            s_x[EW'(n_spr)]    <= {hi[{ev_i, 1'b0}], o_rdata[7:0]};
            s_tile[EW'(n_spr)] <= {o_rdata[24], o_rdata[23:16]};
            s_row[EW'(n_spr)]  <= ev_row;
            s_pal[EW'(n_spr)]  <= o_rdata[27:25];
            s_hfl[EW'(n_spr)]  <= o_rdata[30];
            s_w[EW'(n_spr)]    <= 4'(ev_h >> 3);
            n_spr <= n_spr + 1'b1;
          end
          if (cnt == 8'd128) begin st <= S_WAIT; e <= '0; sl <= '0; n_sl <= '0; end
          else cnt <= cnt + 1'b1;
        end
        S_WAIT: if (go || go_seen) begin
          go_seen <= 1'b0;
          if (n_spr == 0) begin st <= S_IDLE; done <= 1'b1; end
          else st <= S_F01;
        end
        S_F01: st <= S_F23;                       // plane 0/1 word requested
        S_F23: begin p01 <= v_rdata; st <= S_FW; end
        S_FW: begin
          // the sliver covers pixels sx .. sx+7: the tail of word sx/8 and the
          // head of the next word; merge into both where nothing is drawn yet
          if (!sx[8])  lb[bank][sx[7:3]]  <= merge(lb[bank][sx[7:3]], spix, sx[2:0], 1'b0);
          if (!sx1[8]) lb[bank][sx1[7:3]] <= merge(lb[bank][sx1[7:3]], spix, sx[2:0], 1'b1);
          n_sl <= n_sl + 1'b1;
          if (n_sl == 6'(MAX_SLIVER - 1)) begin st <= S_IDLE; done <= 1'b1; end
          else if (sl == s_w[e] - 4'd1) begin
            sl <= '0;
            if (LW'(e) == n_spr - 1'b1) begin st <= S_IDLE; done <= 1'b1; end
            else begin e <= e + 1'b1; st <= S_F01; end
          end else begin
            sl <= sl + 1'b1; st <= S_F01;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy    = (st != S_IDLE);
  assign obj_pix = lb[rd_bank][rd_x[7:3]][{rd_x[2:0], 3'd0} +: 8];
endmodule
