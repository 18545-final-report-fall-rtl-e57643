// tb_ppu: builds a scene through the PPU registers only (tiles, two tile
// maps, palette, scroll), runs the 640x480 raster, and checks every game
// pixel of a whole frame against colours the testbench works out from the
// scene it wrote: sprites in front, then layer 1, then layer 2, backdrop
// where all are transparent. Eight sprites (small and large, flipped,
// overlapping, one partly off the left edge) are written through OAMADD/
// OAMDATA; the others are parked below the game area. A second frame
// checks the brightness scaling, a third that forced blank gives black, a
// fourth and fifth colour math against the fixed colour (add and halve for
// BG1 and sprites of palettes 4-7; subtract for BG2 and the backdrop). Pixels come out two clocks after the raster
// position; that latency is checked as part of each comparison.
module tb_ppu;
  import snes_pkg::*;
  logic clk = 0, rst_n = 0, stb = 0, we = 0, ack;
  logic [5:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [9:0] hcount, vcount;
  logic [4:0] pr, pg, pb;
  logic pv, rdone, hs, vs, de, ghb, gvb, hstb, vstb, fstb;
  int checks = 0, failures = 0, lines_drawn = 0;
  localparam logic [9:0] H1 = 3, V1 = 5, H2 = 0, V2 = 250;
  always #5 clk = ~clk;

  video_timing tim (.clk, .rst_n, .hcount, .vcount, .hsync_n(hs), .vsync_n(vs), .de,
    .game_hblank(ghb), .game_vblank(gvb), .hblank_stb(hstb), .vblank_stb(vstb), .frame_stb(fstb));
  ppu dut (.clk, .rst_n, .stb, .we, .addr, .wdata, .rdata, .ack, .hcount, .vcount,
    .pix_r(pr), .pix_g(pg), .pix_b(pb), .pix_valid(pv), .render_done(rdone));
  always @(posedge clk) if (rst_n && rdone) lines_drawn++;

  task automatic wr(input logic [5:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; we = 1; stb = 1; @(negedge clk); stb = 0;
    while (!ack) @(negedge clk);
  endtask

  // scene
  function automatic logic [3:0] tcol(input int t, input int r, input int p);
    if (t == 0) return 4'd0;
    return 4'((t * 3 + r + p) % 16);
  endfunction
  function automatic int bg1_tile(input int tx, input int ty); return (tx + 2 * ty) % 4; endfunction
  function automatic logic [14:0] cg(input int i); return 15'(i * 16'h0123 + 7); endfunction
  localparam int NS = 8;
  int sx [NS] = '{20, 26, 90, 130, 160, 200, 236, 504};   // 504 = X of -8
  int sy [NS] = '{10, 14, 40, 70, 100, 150, 200, 60};
  int st [NS] = '{1, 2, 3, 1, 2, 2, 3, 1};
  int sa [NS] = '{8'h02, 8'h44, 8'h86, 8'hC8, 8'h0A, 8'h4C, 8'h8E, 8'h40};  // vflip, hflip, palette
  int sbig [NS] = '{0, 0, 0, 0, 1, 1, 0, 1};
  function automatic logic [7:0] spr_idx(input int x, input int y);
    for (int i = 0; i < NS; i++) begin
      int h, dy, dx, row, cp, t; logic [3:0] c;
      h = sbig[i] ? 16 : 8;
      dy = y - sy[i]; dx = (x - sx[i] + 512) % 512;
      if (dy < 0 || dy >= h || dx >= h) continue;
      row = sa[i][7] ? h - 1 - dy : dy;
      cp = sa[i][6] ? h - 1 - dx : dx;
      t = st[i] + cp / 8 + 16 * (row / 8);
      c = (t < 4) ? tcol(t, row % 8, cp % 8) : 4'd0;
      if (c != 0) return {1'b1, 3'(sa[i] >> 1), c};
    end
    return 8'd0;
  endfunction
  int spr_px = 0;
  function automatic logic [7:0] ref_idx(input int x, input int y);
    int xx, yy, t; logic [3:0] c; logic [7:0] s;
    s = spr_idx(x, y);
    if (s != 0) begin spr_px++; return s; end
    xx = (x + H1) % 256; yy = (y + V1) % 256;
    t = bg1_tile(xx / 8, yy / 8);
    c = tcol(t, yy % 8, xx % 8);
    if (c != 0) return {1'b0, 3'd1, c};
    // layer 2: tile 1 (all colours), palette 2, at its own scroll
    xx = (x + H2) % 256; yy = (y + V2) % 256;
    c = tcol(1, yy % 8, xx % 8);
    if (c != 0) return {1'b0, 3'd2, c};
    return 8'd0;
  endfunction

  // the colour seen on a clock belongs to the raster position of two clocks before
  logic [9:0] h1 = 0, v1 = 0, h2 = 0, v2 = 0;
  logic       checking = 0, cblank = 0;
  logic [3:0] cbr = 0;
  logic [7:0] cmath_sel = 0;
  logic [14:0] cfix = 0;
  function automatic logic [14:0] do_math(input logic [14:0] c, input logic [7:0] idx);
    logic en; logic [14:0] r;
    if (idx[7])              en = cmath_sel[4] && idx[6];
    else if (idx[6:4] == 1)  en = cmath_sel[0];
    else if (idx[6:4] == 2)  en = cmath_sel[1];
    else                     en = cmath_sel[5];
    if (!en) return c;
    for (int k = 0; k < 3; k++) begin
      int a, f, v;
      a = int'(c[5 * k +: 5]); f = int'(cfix[5 * k +: 5]);
      v = cmath_sel[7] ? ((a > f) ? a - f : 0) : a + f;
      if (cmath_sel[6]) v = v / 2;
      r[5 * k +: 5] = 5'((v > 31) ? 31 : v);
    end
    return r;
  endfunction
  int         ngame = 0;
  always @(negedge clk) if (rst_n) begin
    if (checking) begin
      if (h2 < 256 && v2 < 240) begin
        logic [14:0] c; logic [4:0] er, eg, eb;
        begin logic [7:0] ix; ix = ref_idx(h2, v2); c = do_math(cg(ix), ix); end
        er = cblank ? 0 : 5'((c[4:0] * (cbr + 1)) >> 4);
        eg = cblank ? 0 : 5'((c[9:5] * (cbr + 1)) >> 4);
        eb = cblank ? 0 : 5'((c[14:10] * (cbr + 1)) >> 4);
        checks++; ngame++;
        if (!pv || pr !== er || pg !== eg || pb !== eb) begin
          failures++; if (failures < 10) $display("pixel %0d,%0d: %h %h %h expected %h %h %h", h2, v2, pr, pg, pb, er, eg, eb);
        end
      end else begin
        checks++; if (pv) failures++;
      end
    end
    h2 = h1; v2 = v1; h1 = hcount; v1 = vcount;
  end

  task automatic check_frame(input logic [3:0] br, input logic blank);
    @(posedge clk iff fstb);
    @(negedge clk iff (hcount == 0 && vcount == 0));
    cbr = br; cblank = blank; checking = 1; ngame = 0;
    @(negedge clk iff (hcount == 0 && vcount == 241));
    checking = 0;
    checks++; if (ngame != 256 * 240) begin failures++; $display("game pixels %0d", ngame); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    wr(P_INIDISP, 8'h80);
    wr(P_BG1SC, 8'h00); wr(P_BG2SC, 8'h04); wr(P_BG12NBA, 8'h21);
    wr(P_BG1HOFS, 8'(H1)); wr(P_BG1HOFS, 8'(H1 >> 8)); wr(P_BG1VOFS, 8'(V1)); wr(P_BG1VOFS, 8'(V1 >> 8));
    wr(P_BG2HOFS, 8'(H2)); wr(P_BG2HOFS, 8'(H2 >> 8)); wr(P_BG2VOFS, 8'(V2)); wr(P_BG2VOFS, 8'(V2 >> 8));
    wr(P_VMAIN, 8'h80);
    // BG1 map at word 0x0000: palette 1
    wr(P_VMADDL, 8'h00); wr(P_VMADDH, 8'h00);
    for (int i = 0; i < 1024; i++) begin
      logic [15:0] e; e = 16'(bg1_tile(i % 32, i / 32)) | 16'h0400;
      wr(P_VMDATAL, e[7:0]); wr(P_VMDATAH, e[15:8]);
    end
    // BG2 map at word 0x0400: tile 1, palette 2
    wr(P_VMADDL, 8'h00); wr(P_VMADDH, 8'h04);
    for (int i = 0; i < 1024; i++) begin wr(P_VMDATAL, 8'h01); wr(P_VMDATAH, 8'h08); end
    // tiles 0..3 for BG1 at 0x1000, and for BG2 at 0x2000
    for (int base = 1; base <= 2; base++) begin
      wr(P_VMADDL, 8'h00); wr(P_VMADDH, 8'(base << 4));
      for (int t = 0; t < 4; t++)
        for (int half = 0; half < 2; half++)
          for (int r = 0; r < 8; r++) begin
            logic [7:0] lo, hi;
            for (int p = 0; p < 8; p++) begin
              lo[7 - p] = tcol(t, r, p)[half * 2];
              hi[7 - p] = tcol(t, r, p)[half * 2 + 1];
            end
            wr(P_VMDATAL, lo); wr(P_VMDATAH, hi);
          end
    end
    // palette
    wr(P_CGADD, 8'h00);
    for (int i = 0; i < 256; i++) begin wr(P_CGDATA, cg(i)[7:0]); wr(P_CGDATA, {1'b0, cg(i)[14:8]}); end
    // sprites: 8x8/16x16, tiles from the BG2 character area (word 0x2000)
    wr(P_OBSEL, 8'h01);
    wr(P_OAMADDL, 8'h00); wr(P_OAMADDH, 8'h00);
    for (int i = 0; i < 128; i++) begin
      if (i < NS) begin
        wr(P_OAMDATA, 8'(sx[i])); wr(P_OAMDATA, 8'(sy[i])); wr(P_OAMDATA, 8'(st[i])); wr(P_OAMDATA, 8'(sa[i]));
      end else begin
        wr(P_OAMDATA, 8'h00); wr(P_OAMDATA, 8'hF0); wr(P_OAMDATA, 8'h01); wr(P_OAMDATA, 8'h00);
      end
    end
    for (int j = 0; j < 32; j++) begin
      logic [7:0] b; b = 0;
      for (int k = 0; k < 4; k++) if (4 * j + k < NS) b |= 8'((sbig[4 * j + k] * 2 + sx[4 * j + k] / 256) << (2 * k));
      wr(P_OAMDATA, b);
    end
    wr(P_TM, 8'h13); wr(P_INIDISP, 8'h0F);
    check_frame(4'd15, 1'b0);
    wr(P_INIDISP, 8'h07);
    check_frame(4'd7, 1'b0);
    wr(P_INIDISP, 8'h8F);
    check_frame(4'd15, 1'b1);
    wr(P_INIDISP, 8'h0F);
    wr(P_COLDATA, 8'h34); wr(P_COLDATA, 8'h43); wr(P_COLDATA, 8'h9F); wr(P_CGADSUB, 8'h51);
    cmath_sel = 8'h51; cfix = {5'd31, 5'd3, 5'd20};
    check_frame(4'd15, 1'b0);
    wr(P_COLDATA, 8'h6A); wr(P_COLDATA, 8'h80); wr(P_CGADSUB, 8'hA2);
    cmath_sel = 8'hA2; cfix = {5'd0, 5'd10, 5'd10};
    check_frame(4'd15, 1'b0);
    checks++; if (spr_px == 0) begin failures++; $display("no sprite pixel"); end
    checks++; if (lines_drawn < 5 * 240) begin failures++; $display("lines drawn %0d", lines_drawn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5_000_000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
