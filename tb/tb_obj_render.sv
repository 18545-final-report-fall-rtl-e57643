// tb_obj_render: fills OAM (through the oam_ram it reads) with random
// sprites, many of them crossing the line under test, and VRAM with random
// tile data, then runs evaluation and drawing for random lines and OBSEL
// settings. The testbench's own model walks OAM in order, keeps the first
// 32 sprites on the line, draws their 8-pixel slivers left to right up to
// 34 per line with flips, the 4-bit tile-field wrap and first-sprite-wins,
// and every pixel of the line buffer is compared with it. Also checks that
// evaluation ends 138 clocks after start (9 table reads, 128 sprites, 1 to
// settle), each sliver takes three clocks (done one clock later), and that
// the sprite and sliver limits and the off-screen X bit 8 cases occur.
module tb_obj_render;
  logic clk = 0, rst_n = 0, start = 0, go = 0;
  logic [7:0] line = 0, obsel = 0, o_addr, rd_x = 0, obj_pix;
  logic [31:0] o_rdata;
  logic v_req, busy, done, rd_bank = 0;
  logic [14:0] v_addr;
  logic [15:0] v_rdata;
  int checks = 0, failures = 0, hit_spr_lim = 0, hit_sl_lim = 0, offscreen = 0, drawn = 0;
  always #5 clk = ~clk;

  spram #(.AW(15), .DW(16)) vram (.clk, .en(v_req), .we(1'b0), .addr(v_addr), .wdata(16'h0), .rdata(v_rdata));
  oam_ram oam (.clk, .a_en(1'b0), .a_we(1'b0), .a_addr(10'd0), .a_wdata(8'd0), .a_rdata(),
               .b_addr(o_addr), .b_rdata(o_rdata));
  obj_render dut (.*);

  function automatic logic [7:0] ob(input int a);   // OAM byte a
    unique case (a % 4)
      0: return oam.lane0[a / 4];
      1: return oam.lane1[a / 4];
      2: return oam.lane2[a / 4];
      default: return oam.lane3[a / 4];
    endcase
  endfunction
  function automatic int sz(input int sel, input int big);
    int t [6][2] = '{'{8, 16}, '{8, 32}, '{8, 64}, '{16, 32}, '{16, 64}, '{32, 64}};
    return t[sel > 5 ? 5 : sel][big];
  endfunction

  logic [7:0] expect_lb [256];
  int n_slivers;
  task automatic model(input int ln);
    int kept, nsl; kept = 0; nsl = 0;
    for (int x = 0; x < 256; x++) expect_lb[x] = 0;
    for (int i = 0; i < 128 && kept < 32; i++) begin
      int x9, y, tile, attr, hib, h, dy, row, w;
      hib = (ob(512 + i / 4) >> (2 * (i % 4))) & 3;
      x9 = ob(4 * i) + 256 * (hib & 1); y = ob(4 * i + 1); tile = ob(4 * i + 2); attr = ob(4 * i + 3);
      h = sz(int'(obsel[7:5]), hib >> 1);
      dy = (ln - y + 256) % 256;
      if (dy >= h) continue;
      if (kept == 31) hit_spr_lim++;
      kept++;
      row = attr[7] ? h - 1 - dy : dy;
      w = h / 8;
      for (int s = 0; s < w; s++) begin
        int c, tn, base; logic [15:0] w01, w23;
        if (nsl == 34) begin hit_sl_lim++; break; end
        nsl++;
        c = attr[6] ? w - 1 - s : s;
        tn = (tile & 8'hF0) + ((((tile >> 4) + row / 8) % 16) << 4) - (tile & 8'hF0) + ((tile & 15) + c) % 16;
        tn = tn + 256 * (attr & 1);
        base = int'(obsel[1:0]) * 8192;
        if (tn >= 256) base = base + (int'(obsel[4:3]) + 1) * 4096;
        base = (base + (tn % 256) * 16 + row % 8) % 32768;
        w01 = vram.mem[base]; w23 = vram.mem[(base + 8) % 32768];
        for (int p = 0; p < 8; p++) begin
          int pos, b; logic [3:0] cc;
          pos = (x9 + 8 * s + p) % 512;
          b = attr[6] ? p : 7 - p;
          cc = {w23[8 + b], w23[b], w01[8 + b], w01[b]};
          if (pos >= 256) begin offscreen++; continue; end
          if (cc != 0 && expect_lb[pos] == 0) expect_lb[pos] = {1'b1, 3'((attr >> 1) & 7), cc};
        end
      end
    end
    n_slivers = nsl;
  endtask

  initial begin
    int n;
    for (int i = 0; i < 32768; i++) vram.mem[i] = 16'($urandom) & 16'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int l = 0; l < 24; l++) begin
      line = 8'($urandom % 240);
      obsel = {3'($urandom % 6), 5'($urandom)};
      for (int i = 0; i < 128; i++) begin
        logic [7:0] y; y = (l % 3 == 0) ? 8'($urandom) : 8'(line - 8'($urandom % 40));
        oam.lane0[i] = 8'($urandom); oam.lane1[i] = y; oam.lane2[i] = 8'($urandom); oam.lane3[i] = 8'($urandom);
      end
      for (int i = 128; i < 136; i++) begin
        oam.lane0[i] = 8'($urandom); oam.lane1[i] = 8'($urandom); oam.lane2[i] = 8'($urandom); oam.lane3[i] = 8'($urandom);
      end
      model(line);
      @(negedge clk); start = 1; @(negedge clk); start = 0; n = 1;
      while (dut.st != dut.S_WAIT) begin @(negedge clk); n++; end
      checks++; if (n != 138) begin failures++; $display("evaluation took %0d clocks", n); end
      repeat ($urandom % 20) @(negedge clk);
      go = 1; @(negedge clk); go = 0; n = 1;
      while (!done) begin @(negedge clk); n++; end
      checks++; if (n != ((n_slivers == 0) ? 1 : 3 * n_slivers + 1)) begin failures++; $display("drawing %0d slivers took %0d clocks", n_slivers, n); end
      rd_bank = line[0];
      for (int x = 0; x < 256; x++) begin
        rd_x = 8'(x); #1;
        if (expect_lb[x] != 0) drawn++;
        checks++; if (obj_pix !== expect_lb[x]) begin
          failures++; if (failures < 10) $display("line %0d x %0d: %h expected %h", line, x, obj_pix, expect_lb[x]); end
      end
    end
    checks++; if (hit_spr_lim == 0 || hit_sl_lim == 0 || offscreen == 0 || drawn == 0) begin
      failures++; $display("case not reached: %0d %0d %0d %0d", hit_spr_lim, hit_sl_lim, offscreen, drawn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
