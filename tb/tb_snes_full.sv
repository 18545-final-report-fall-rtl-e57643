// tb_snes_full: the whole-console run with every parameter of the console at its
// default (the 30 s sound loop does not restart within it).
//
// FULL = 1 marks the run with the console at its default parameters; the
// check that needs a short sound loop (the loop restart) is then skipped.
//
// A behavioural CPU (tasks driving the cpu_* port) sets up a picture the way
// a game does: it fills CPU RAM with a tile map, a palette and an HDMA table
// (part of it through the 0x2180 port), moves them and the tile graphics
// from ROM (flash) into VRAM and CGRAM with DMA, enables per-line horizontal
// scrolling by HDMA on BG1, shows BG2 behind it with 16x16 tiles from the same
// map, puts six sprites (two sizes, flips, overlap, tiles 256+ so they
// share BG1's graphics) in front by a DMA of a 544-byte OAM image into
// OAMDATA, adds a fixed colour to BG2 by colour math, and turns the screen on. A long ROM-to-RAM DMA then runs
// into the displayed frame so HDMA must cut into it. A whole frame is
// compared pixel by pixel with a reference computed from the flash contents
// and the data the CPU wrote. Pads, NMI, multiply/divide, the audio mailbox
// and the sound path are checked too, and every mechanism is counted.
module tb_snes_full;
  localparam bit FULL = 1'b1;

  logic clk = 0, rst_n = 0, ac97_bit_clk = 0;
  logic cpu_req = 0, cpu_we = 0, cpu_ack, cpu_rdy, cpu_nmi_n;
  logic [23:0] cpu_addr = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata;
  logic [21:0] flash_addr;
  logic [15:0] flash_dq;
  logic flash_ce_n, flash_oe_n;
  logic pad_latch, pad_clk, pad1_data, pad2_data;
  logic ac97_sync, ac97_sdata_out, ac97_reset_n;
  logic hsync_n, vsync_n, de;
  logic [7:0] red, green, blue;
  logic [3:0][7:0] to_apu, from_apu = 32'h11223344;
  int checks = 0, failures = 0;
  always #20 clk = ~clk;        // 25 MHz pixel clock
  always #40.69 ac97_bit_clk = ~ac97_bit_clk;   // 12.288 MHz codec bit clock

  flash_model #(.AW(22), .ACCESS_NS(70)) fm (.addr(flash_addr), .ce_n(flash_ce_n), .oe_n(flash_oe_n), .dq(flash_dq));
  pad_model p1 (.latch(pad_latch), .pclk(pad_clk), .buttons(16'h8421), .data(pad1_data));
  pad_model p2 (.latch(pad_latch), .pclk(pad_clk), .buttons(16'h0F0F), .data(pad2_data));

  // ---- mechanism counters ----
  int dma_bytes = 0, hdma_bytes = 0, hdma_in_dma = 0, cpu_held = 0, vram_waits = 0;
  int flash_waits = 0, snd_reads = 0, wraps = 0, pad_reads = 0, nmis = 0, ac97_frames = 0;
  logic nmi_q = 1;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dma.dma_byte_stb) dma_bytes++;
    if (dut.u_dma.hdma_byte_stb) hdma_bytes++;
    if (dut.u_dma.hdma_byte_stb && dut.u_dma.mdmaen != 0) hdma_in_dma++;
    if (cpu_req && !cpu_rdy) cpu_held++;
    if (dut.u_ppu.cv_req && !dut.u_ppu.cv_gnt) vram_waits++;
    if (dut.rom_req && dut.u_flash.st == dut.u_flash.S_SND) flash_waits++;
    if (dut.snd_ack) snd_reads++;
    if (dut.u_snd.wrapped) wraps++;
    if (dut.u_pads.done) pad_reads++;
    if (nmi_q && !cpu_nmi_n) nmis++;
    nmi_q = cpu_nmi_n;
  end
  always @(posedge ac97_bit_clk) if (rst_n && dut.u_ac97.frame_stb) ac97_frames++;

  // ---- behavioural CPU ----
  task automatic cpu(input logic w, input logic [23:0] a, input logic [7:0] d, output logic [7:0] q);
    @(negedge clk); cpu_req = 1; cpu_we = w; cpu_addr = a; cpu_wdata = d;
    do @(posedge clk); while (!cpu_ack);
    q = cpu_rdata; #1 cpu_req = 0;
  endtask
  task automatic wr(input logic [23:0] a, input logic [7:0] d); logic [7:0] q; cpu(1, a, d, q); endtask
  task automatic expect_rd(input logic [23:0] a, input logic [7:0] want);
    logic [7:0] q; cpu(0, a, 8'h00, q);
    checks++; if (q !== want) begin failures++; $display("CPU read %h = %h, expected %h", a, q, want); end
  endtask
  task automatic dma(input int ch, input logic [7:0] dmap, bbad, input logic [23:0] a, input logic [15:0] n, input logic go);
    logic [23:0] b; b = 24'h004300 | 24'(ch << 4);
    wr(b + 0, dmap); wr(b + 1, bbad); wr(b + 2, a[7:0]); wr(b + 3, a[15:8]); wr(b + 4, a[23:16]);
    wr(b + 5, n[7:0]); wr(b + 6, n[15:8]);
    if (go) wr(24'h00420B, 8'(1 << ch));
  endtask

  // ---- the scene ----
  localparam int NTILES = 96;   // tiles loaded; the map uses 0..63, 16x16 tiles reach 80
  function automatic logic [15:0] map_entry(input int tx, input int ty);
    logic [15:0] e;
    e = 16'((tx * 7 + ty * 3) % 64);
    e[12:10] = 3'((tx + ty) % 8);
    e[14] = (tx % 3 == 0);
    e[15] = (ty % 5 == 0);
    return e;
  endfunction
  function automatic logic [14:0] cg(input int i); return 15'(i * 16'h0159 + 3); endfunction
  function automatic logic [9:0] hofs_of(input int strobe); return 10'((strobe * 5) & 10'h3FF); endfunction
  // VRAM word 0x1000 + i holds flash word 0x4000 + i (ROM 01:8000 = byte 0x8000)
  function automatic logic [15:0] chr_word(input int i); return fm.word_at(22'(32'h4000 + i)); endfunction
  // colour index of one layer; big = 16x16 tiles (map covers 512x512)
  function automatic logic [7:0] layer_index(input int xx, input int yy, input bit big);
    logic [15:0] e, w01, w23; logic [2:0] row, col; int ca, tile, sx, sy; logic [3:0] c;
    e = big ? map_entry(xx / 16 % 32, yy / 16 % 32) : map_entry(xx / 8 % 32, yy / 8 % 32);
    row = e[15] ? 3'(7 - yy % 8) : 3'(yy % 8);
    col = e[14] ? 3'(7 - xx % 8) : 3'(xx % 8);
    tile = int'(e[9:0]);
    if (big) begin
      sx = (xx % 16) / 8; sy = (yy % 16) / 8;
      if (e[14]) sx = 1 - sx;
      if (e[15]) sy = 1 - sy;
      tile = tile + sx + 16 * sy;
    end
    ca = tile * 16 + int'(row);
    w01 = chr_word(ca); w23 = chr_word(ca + 8);
    c = {w23[15 - col], w23[7 - col], w01[15 - col], w01[7 - col]};
    return (c == 0) ? 8'h00 : {1'b0, e[12:10], c};
  endfunction
  int bg2_shown = 0, spr_shown = 0;
  localparam int NS = 6;
  int sx [NS] = '{30, 36, 100, 180, 240, 508};
  int sy [NS] = '{12, 16, 60, 120, 200, 90};
  int st [NS] = '{5, 9, 20, 33, 40, 2};
  int sa [NS] = '{8'h03, 8'h45, 8'h87, 8'hC9, 8'h0B, 8'h4D};   // vflip, hflip, palette, tile bit 8
  int sbig [NS] = '{0, 1, 0, 1, 0, 1};
  function automatic logic [7:0] oam_byte(input int a);
    if (a >= 512) begin
      logic [7:0] b; b = 0;
      for (int k = 0; k < 4; k++) if (4 * (a - 512) + k < NS) b |= 8'((sbig[4 * (a - 512) + k] * 2 + sx[4 * (a - 512) + k] / 256) << (2 * k));
      return b;
    end
    if (a / 4 >= NS) return (a % 4 == 1) ? 8'hF0 : 8'h00;
    unique case (a % 4)
      0: return 8'(sx[a / 4]);
      1: return 8'(sy[a / 4]);
      2: return 8'(st[a / 4]);
      default: return 8'(sa[a / 4]);
    endcase
  endfunction
  function automatic logic [7:0] spr_index(input int x, input int y);
    for (int i = 0; i < NS; i++) begin
      int h, dy, dx, row, cp, t, ca; logic [15:0] w01, w23; logic [3:0] c; logic [2:0] b;
      h = sbig[i] ? 16 : 8;
      dy = y - sy[i]; dx = (x - sx[i] + 512) % 512;
      if (dy < 0 || dy >= h || dx >= h) continue;
      row = sa[i][7] ? h - 1 - dy : dy;
      cp = sa[i][6] ? h - 1 - dx : dx;
      t = st[i] + cp / 8 + 16 * (row / 8);
      ca = t * 16 + row % 8;                   // tiles 256+ start at VRAM word 0x1000
      w01 = chr_word(ca); w23 = chr_word(ca + 8);
      b = 3'(7 - cp % 8);
      c = {w23[8 + b], w23[b], w01[8 + b], w01[b]};
      if (c != 0) return {1'b1, 3'(sa[i] >> 1), c};
    end
    return 8'd0;
  endfunction
  // colour math on BG2 pixels: the fixed colour (r 5, g 0, b 9) is added, clamped at 31
  function automatic logic [14:0] add_fixed(input logic [14:0] c);
    int r, b;
    r = int'(c[4:0]) + 5; b = int'(c[14:10]) + 9;
    return {5'((b > 31) ? 31 : b), c[9:5], 5'((r > 31) ? 31 : r)};
  endfunction
  function automatic logic [14:0] ref_colour(input int x, input int y);
    logic [7:0] i1, i2, s;
    s = spr_index(x, y);
    if (s != 0) begin spr_shown++; return cg(s); end
    i1 = layer_index((x + int'(hofs_of((y == 0) ? 239 : y - 1))) % 256, y, 1'b0);
    i2 = layer_index(x, y, 1'b1);
    if (i1 != 0) return cg(i1);
    if (i2 != 0) begin bg2_shown++; return add_fixed(cg(i2)); end
    return cg(0);
  endfunction

  // frame check: colour of a clock belongs to the raster position two clocks before
  logic [9:0] h1 = 0, v1 = 0, h2 = 0, v2 = 0;
  logic checking = 0;
  int ngame = 0, bad = 0;
  always @(negedge clk) if (rst_n) begin
    if (checking && de) begin
      logic [14:0] c; logic [7:0] er, eg, eb;
      if (h2 < 256 && v2 < 240) begin
        c = ref_colour(h2, v2);
        er = {c[4:0], c[4:2]}; eg = {c[9:5], c[9:7]}; eb = {c[14:10], c[14:12]};
        ngame++;
      end else begin er = 0; eg = 0; eb = 0; end
      checks++;
      if (red !== er || green !== eg || blue !== eb) begin
        failures++; bad++; if (bad < 10) $display("pixel %0d,%0d: %h%h%h expected %h%h%h", h2, v2, red, green, blue, er, eg, eb);
      end
    end
    h2 = h1; v2 = v1; h1 = dut.hcount; v1 = dut.vcount;
  end

  initial begin
    logic [7:0] q;
    int t;
    repeat (3) @(posedge clk); rst_n = 1;
    wr(24'h002100, 8'h80);                       // forced blank while loading
    wr(24'h004200, 8'h81);                       // NMI and pad auto-read on
    // tile map into CPU RAM at 7E:4000, palette at 7E:2000
    for (int i = 0; i < 1024; i++) begin
      logic [15:0] e; e = map_entry(i % 32, i / 32);
      wr(24'h7E4000 + 24'(2 * i), e[7:0]); wr(24'h7E4001 + 24'(2 * i), e[15:8]);
    end
    for (int i = 0; i < 256; i++) begin
      wr(24'h7E2000 + 24'(2 * i), cg(i)[7:0]); wr(24'h7E2001 + 24'(2 * i), {1'b0, cg(i)[14:8]});
    end
    // HDMA table at 7E:6000 through the 0x2180 port: two repeat entries, then the end
    wr(24'h002181, 8'h00); wr(24'h002182, 8'h60); wr(24'h002183, 8'h00);
    for (int e = 0; e < 2; e++) begin
      int n0, n; n0 = (e == 0) ? 0 : 127; n = (e == 0) ? 127 : 113;
      wr(24'h002180, 8'(8'h80 | n));
      for (int k = 0; k < n; k++) begin
        wr(24'h002180, hofs_of(n0 + k)[7:0]); wr(24'h002180, {6'b0, hofs_of(n0 + k)[9:8]});
      end
    end
    wr(24'h002180, 8'h00);
    // OAM image at 7E:7000
    for (int i = 0; i < 544; i++) wr(24'h7E7000 + 24'(i), oam_byte(i));
    // DMA: map to VRAM 0x0000, tiles from ROM to VRAM 0x1000, palette to CGRAM
    wr(24'h002115, 8'h80);
    wr(24'h002116, 8'h00); wr(24'h002117, 8'h00);
    dma(0, 8'h01, 8'h18, 24'h7E4000, 16'd2048, 1'b1);
    wr(24'h002116, 8'h00); wr(24'h002117, 8'h10);
    dma(1, 8'h01, 8'h18, 24'h018000, 16'(NTILES * 32), 1'b1);
    wr(24'h002121, 8'h00);
    dma(2, 8'h00, 8'h22, 24'h7E2000, 16'd512, 1'b1);
    wr(24'h002101, 8'h00); wr(24'h002102, 8'h00); wr(24'h002103, 8'h00);
    dma(4, 8'h00, 8'h04, 24'h7E7000, 16'd544, 1'b1);
    // picture settings, HDMA on channel 7 into BG1HOFS (two writes per line);
    // the first write waits for the palette DMA to finish
    wr(24'h002107, 8'h00); wr(24'h002108, 8'h00); wr(24'h00210B, 8'h11);
    wr(24'h002105, 8'h20);                       // BG2 with 16x16 tiles
    wr(24'h002132, 8'h25); wr(24'h002132, 8'h89); wr(24'h002131, 8'h02);   // BG2 + fixed colour
    wr(24'h002110, 8'h00); wr(24'h002110, 8'h00); wr(24'h00210F, 8'h00); wr(24'h00210F, 8'h00);
    checks++; if (dma_bytes != 2048 + NTILES * 32 + 512 + 544) begin failures++; $display("DMA bytes %0d", dma_bytes); end
    wr(24'h00210E, 8'h00); wr(24'h00210E, 8'h00);
    dma(7, 8'h02, 8'h0D, 24'h7E6000, 16'd0, 1'b0);
    wr(24'h00420C, 8'h80);
    wr(24'h00212C, 8'h13); wr(24'h002100, 8'h0F);
    // arithmetic and mailbox
    wr(24'h004202, 8'd200); wr(24'h004203, 8'd201);
    expect_rd(24'h004216, 8'((200 * 201) & 255)); expect_rd(24'h004217, 8'((200 * 201) >> 8));
    wr(24'h004204, 8'h39); wr(24'h004205, 8'h30); wr(24'h004206, 8'd77);
    expect_rd(24'h004214, 8'(16'h3039 / 77)); expect_rd(24'h004216, 8'(16'h3039 % 77));
    wr(24'h002141, 8'hA7);
    checks++; if (to_apu[1] !== 8'hA7) failures++;
    expect_rd(24'h002143, 8'h11);
    // wait for a frame with HDMA from its start, then start a long ROM-to-RAM DMA
    @(posedge clk iff dut.frame_stb);
    @(posedge clk iff dut.frame_stb);
    @(posedge clk iff (dut.vcount == 20));
    wr(24'h002181, 8'h00); wr(24'h002182, 8'h00); wr(24'h002183, 8'h01);
    dma(3, 8'h00, 8'h80, 24'h028000, 16'd3000, 1'b1);
    checks++; if (cpu_held == 0) begin failures++; $display("CPU never held by DMA"); end
    for (int i = 0; i < 3000; i += 331) begin
      logic [15:0] w; w = fm.word_at(22'((32'h10000 + i) >> 1));
      expect_rd(24'h7F0000 + 24'(i), i[0] ? w[15:8] : w[7:0]);
    end
    // one whole checked frame
    @(posedge clk iff dut.frame_stb);
    @(negedge clk iff (dut.hcount == 0 && dut.vcount == 0));
    checking = 1;
    @(negedge clk iff (dut.hcount == 0 && dut.vcount == 480));
    @(negedge clk); @(negedge clk);
    checking = 0;
    checks++; if (ngame != 256 * 240) begin failures++; $display("game pixels %0d", ngame); end
    // pads were read in vertical blank; NMI flag
    @(posedge clk iff (dut.vcount == 241));
    t = 0;
    do begin cpu(0, 24'h004212, 0, q); t++; end while (q[0] && t < 10000);
    expect_rd(24'h004218, 8'h21); expect_rd(24'h004219, 8'h84);
    expect_rd(24'h00421A, 8'h0F); expect_rd(24'h00421B, 8'h0F);
    checks++; if (cpu_nmi_n !== 1'b0) failures++;
    expect_rd(24'h004210, 8'h82);
    checks++; if (cpu_nmi_n !== 1'b1) failures++;
    // mechanisms
    checks++; if (hdma_bytes == 0)  begin failures++; $display("no HDMA"); end
    checks++; if (hdma_in_dma == 0) begin failures++; $display("HDMA never cut into a DMA"); end
    checks++; if (vram_waits == 0)  begin failures++; $display("VRAM arbitration never made the CPU side wait"); end
    checks++; if (flash_waits == 0) begin failures++; $display("ROM read never waited for a sound read"); end
    checks++; if (snd_reads == 0 || ac97_frames == 0) begin failures++; $display("sound path idle"); end
    checks++; if (!FULL && wraps == 0) begin failures++; $display("sound loop never restarted"); end
    checks++; if (pad_reads == 0 || nmis == 0) failures++;
    checks++; if (bg2_shown == 0) begin failures++; $display("BG2 never showed through BG1"); end
    checks++; if (spr_shown == 0) begin failures++; $display("no sprite pixel"); end
    $display("mechanisms: dma bytes %0d, hdma bytes %0d (%0d inside a DMA), CPU held %0d clocks, VRAM waits %0d, flash waits %0d, sound reads %0d, loop restarts %0d, pad reads %0d, NMIs %0d, AC97 frames %0d, BG2 pixels %0d, sprite pixels %0d",
             dma_bytes, hdma_bytes, hdma_in_dma, cpu_held, vram_waits, flash_waits, snd_reads, wraps, pad_reads, nmis, ac97_frames, bg2_shown, spr_shown);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  snes_top dut (.*);
endmodule
