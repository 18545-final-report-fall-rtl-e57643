// ppu: picture processing unit: two background layers and sprites.
//
// Puts together the register file, VRAM (32K x 16 bits = 64 KiB), CGRAM
// (256 x 15-bit colours = 512 bytes), the two memory arbiters that let the
// CPU side and the drawing side share those single-port memories, the
// background line renderer, the sprite renderer (whose OAM sits in the
// register file with its own read port), and the colour stage.
//
// Timing, all on the pixel clock: at pixel RENDER_H of each raster line the
// renderers start on the next game line: the background renderer draws it
// into its spare line buffer (265 clocks) while the sprite renderer finds
// the sprites on it in OAM; once the background renderer has released VRAM
// the sprite renderer fetches and draws their tiles (at most 103 clocks),
// all before the line is shown. While a game line (first 256 pixels of the
// first 240 lines) is shown, each pixel picks the sprite pixel if sprites are
// enabled (TM bit 4) and one is there, else layer 1 if it is enabled and not
// transparent, else layer 2, else the backdrop colour (CGRAM entry 0). It
// reads that CGRAM entry, applies colour math if CGADSUB enables it for
// the pixel's source (bit 0 BG1, 1 BG2, 4 sprites of palettes 4-7, 5
// backdrop): the fixed colour is added (clamped at 31) or, with bit 7,
// subtracted (clamped at 0), halved with bit 6; then it
// applies forced blank and the 16-step brightness. The colour comes out two
// clocks after the pixel's hcount/vcount (pix_valid marks game pixels).
// CGRAM colours are 0bbbbbgggggrrrrr, 5 bits per component.
module ppu #(
  parameter int unsigned V_TOT    = 525,
  parameter int unsigned RENDER_H = 320,
  parameter int unsigned GAME_W   = 256,
  parameter int unsigned GAME_H   = 240
) (
  input  logic       clk,
  input  logic       rst_n,
  // register bus
  input  logic       stb,
  input  logic       we,
  input  logic [5:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       ack,
  // raster position
  input  logic [9:0] hcount,
  input  logic [9:0] vcount,
  // colour out, two clocks after hcount/vcount
  output logic [4:0] pix_r,
  output logic [4:0] pix_g,
  output logic [4:0] pix_b,
  output logic       pix_valid,
  output logic       render_done
);
  logic        force_blank;
  logic [3:0]  brightness;
  logic [7:0]  cgadsub;
  logic [14:0] fixcol;
  logic [7:0]  bgmode, bg1sc, bg2sc, bg12nba, obsel, o_addr, obj_pix;
  logic [31:0] o_rdata;
  logic        obj_done, bg_done;
  assign render_done = obj_done;     // line complete: background and sprites
  logic [9:0]  bg1hofs, bg1vofs, bg2hofs, bg2vofs;
  logic [4:0]  tm;

  logic        cv_req, cv_we, cv_gnt, cv_ack;
  logic [14:0] cv_addr;
  logic [15:0] cv_wdata, cv_rdata;
  logic        cc_req, cc_we, cc_gnt, cc_ack;
  logic [7:0]  cc_addr;
  logic [14:0] cc_wdata, cc_rdata;

  ppu_regs u_regs (
    .clk, .rst_n, .stb, .we, .addr, .wdata, .rdata, .ack,
    .v_req(cv_req), .v_we(cv_we), .v_addr(cv_addr), .v_wdata(cv_wdata),
    .v_gnt(cv_gnt), .v_ack(cv_ack), .v_rdata(cv_rdata),
    .c_req(cc_req), .c_we(cc_we), .c_addr(cc_addr), .c_wdata(cc_wdata),
    .c_gnt(cc_gnt), .c_ack(cc_ack), .c_rdata(cc_rdata),
    .force_blank, .brightness, .bgmode, .bg1sc, .bg2sc, .bg12nba,
    .bg1hofs, .bg1vofs, .bg2hofs, .bg2vofs, .tm, .obsel, .cgadsub, .fixcol, .o_addr, .o_rdata
  );

  // ---- renderer and VRAM ----
  logic        r_req, r_busy, r_start;
  logic [14:0] r_addr;
  logic [15:0] r_rdata;
  logic [7:0]  bg1_pix, bg2_pix, next_line;
  logic        s_req;
  logic [14:0] s_addr, h_addr;
  logic [9:0]  nl;

  mem_arbiter #(.AW(15), .DW(16)) u_vram (
    .clk, .rst_n,
    .h_req(r_req || s_req), .h_addr(h_addr), .h_rdata(r_rdata), .h_valid(),
    .l_req(cv_req), .l_we(cv_we), .l_addr(cv_addr), .l_wdata(cv_wdata),
    .l_gnt(cv_gnt), .l_ack(cv_ack), .l_rdata(cv_rdata)
  );

  always_comb begin
    nl        = (vcount == 10'(V_TOT - 1)) ? 10'd0 : vcount + 1'b1;
    r_start   = (hcount == 10'(RENDER_H)) && (nl < 10'(GAME_H));
    next_line = nl[7:0];
    h_addr    = r_req ? r_addr : s_addr;   // the two renderers use VRAM one after the other
  end

  bg_render u_bg (
    .clk, .rst_n, .start(r_start), .line(next_line),
    .bgmode, .bg1sc, .bg2sc, .bg12nba, .bg1hofs, .bg1vofs, .bg2hofs, .bg2vofs,
    .v_req(r_req), .v_addr(r_addr), .v_rdata(r_rdata),
    .busy(r_busy), .done(bg_done),
    .rd_bank(vcount[0]), .rd_x(hcount[7:0]), .bg1_pix, .bg2_pix
  );

  obj_render u_obj (
    .clk, .rst_n, .start(r_start), .go(bg_done), .line(next_line), .obsel,
    .o_addr, .o_rdata, .v_req(s_req), .v_addr(s_addr), .v_rdata(r_rdata),
    .busy(), .done(obj_done),
    .rd_bank(vcount[0]), .rd_x(hcount[7:0]), .obj_pix
  );

  // ---- colour stage and CGRAM ----
  logic        in_game, in_game_d, fb_d, math, math_d;
  logic [14:0] mcol;
  logic [7:0]  cidx;
  logic [14:0] col;
  logic [3:0]  br_d;

  always_comb begin
    in_game = (hcount < 10'(GAME_W)) && (vcount < 10'(GAME_H));
    if (tm[4] && obj_pix != 8'd0)      begin cidx = obj_pix; math = cgadsub[4] && obj_pix[6]; end
    else if (tm[0] && bg1_pix != 8'd0) begin cidx = bg1_pix; math = cgadsub[0]; end
    else if (tm[1] && bg2_pix != 8'd0) begin cidx = bg2_pix; math = cgadsub[1]; end
    else                               begin cidx = 8'd0;    math = cgadsub[5]; end
  end

  mem_arbiter #(.AW(8), .DW(15)) u_cgram (
    .clk, .rst_n,
    .h_req(in_game), .h_addr(cidx), .h_rdata(col), .h_valid(),
    .l_req(cc_req), .l_we(cc_we), .l_addr(cc_addr), .l_wdata(cc_wdata),
    .l_gnt(cc_gnt), .l_ack(cc_ack), .l_rdata(cc_rdata)
  );

  function automatic logic [4:0] bright(input logic [4:0] c, input logic [3:0] b);
    logic [9:0] m;
    m = 10'(c) * (10'(b) + 10'd1);
    return m[8:4];
  endfunction

  // colour math against the fixed colour, one 5-bit component
  function automatic logic [4:0] cmath(input logic [4:0] a, input logic [4:0] f,
                                       input logic sub, input logic half);
    logic [5:0] r;
    if (sub) r = (a > f) ? 6'(a - f) : 6'd0;
    else     r = 6'(a) + 6'(f);
    if (half) r = r >> 1;
    return (r > 6'd31) ? 5'd31 : r[4:0];
  endfunction
  always_comb begin
    mcol = col;
    if (math_d) begin
      mcol[4:0]   = cmath(col[4:0],   fixcol[4:0],   cgadsub[7], cgadsub[6]);
      mcol[9:5]   = cmath(col[9:5],   fixcol[9:5],   cgadsub[7], cgadsub[6]);
      mcol[14:10] = cmath(col[14:10], fixcol[14:10], cgadsub[7], cgadsub[6]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      math_d <= 1'b0;
      in_game_d <= 1'b0; fb_d <= 1'b1; br_d <= '0;
      pix_r <= '0; pix_g <= '0; pix_b <= '0; pix_valid <= 1'b0;
    end else begin
      in_game_d <= in_game;
      math_d    <= math;
      fb_d      <= force_blank;
      br_d      <= brightness;
      pix_valid <= in_game_d;
      if (in_game_d && !fb_d) begin
        pix_r <= bright(mcol[4:0], br_d);
        pix_g <= bright(mcol[9:5], br_d);
        pix_b <= bright(mcol[14:10], br_d);
      end else begin
        pix_r <= '0; pix_g <= '0; pix_b <= '0;
      end
    end
  end
endmodule
