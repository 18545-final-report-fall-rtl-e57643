// tb_bg_render: fills a VRAM with random tile maps and tile graphics,
// draws random lines with random scroll offsets and bases, and compares
// every pixel of both layers, read through the display port, with a
// reference built in the testbench from the same VRAM words. Also checks
// that a line takes 264 busy clocks (done one clock later), the renderer's fixed cost.
// Half of the lines switch one or both layers to 16x16 tiles (BGMODE bits
// 4/5); the reference then picks the 8x8 sub-tile n, n+1, n+16 or n+17.
module tb_bg_render;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] line = 0, bg1sc, bg2sc, bg12nba, bgmode = 0, rd_x, bg1_pix, bg2_pix;
  logic [9:0] bg1hofs, bg1vofs, bg2hofs, bg2vofs;
  logic v_req, busy, done, rd_bank;
  logic [14:0] v_addr;
  logic [15:0] v_rdata;
  int checks = 0, failures = 0, flips = 0, transp = 0, bigs = 0;
  always #5 clk = ~clk;

  spram #(.AW(15), .DW(16)) vram (.clk, .en(v_req), .we(1'b0), .addr(v_addr), .wdata(16'h0), .rdata(v_rdata));
  bg_render dut (.*);

  function automatic logic [7:0] ref_pix(input logic [7:0] sc, input logic [2:0] nba,
      input logic [9:0] hofs, vofs, input logic [7:0] y, input logic [7:0] x, input logic big);
    logic [9:0] yy, xx, tile; logic [15:0] e, w01, w23; logic [2:0] row, col; logic [14:0] ca; logic [3:0] c;
    int sx, sy;
    yy = 10'(y) + vofs; xx = 10'(x) + hofs;
    if (big) e = vram.mem[{sc[6:2], yy[8:4], xx[8:4]}];
    else     e = vram.mem[{sc[6:2], yy[7:3], xx[7:3]}];
    if (e[15] && e[14]) flips++;
    row = e[15] ? ~yy[2:0] : yy[2:0];
    col = e[14] ? ~xx[2:0] : xx[2:0];
    tile = e[9:0];
    if (big) begin
      sx = (xx % 16) / 8; sy = (yy % 16) / 8;
      if (e[14]) sx = 1 - sx;
      if (e[15]) sy = 1 - sy;
      tile = 10'(int'(e[9:0]) + sx + 16 * sy); bigs++;
    end
    ca = {nba, 12'h000} + {1'b0, tile, 4'h0} + 15'(row);
    w01 = vram.mem[ca]; w23 = vram.mem[ca + 15'd8];
    c = {w23[15 - col], w23[7 - col], w01[15 - col], w01[7 - col]};
    return (c == 0) ? 8'h00 : {1'b0, e[12:10], c};
  endfunction

  initial begin
    int t0, n;
    for (int i = 0; i < 32768; i++) vram.mem[i] = 16'($urandom) & 16'($urandom) ;  // sparse bits: some transparent pixels
    repeat (2) @(posedge clk); rst_n = 1;
    for (int l = 0; l < 16; l++) begin
      bg1sc = 8'($urandom); bg2sc = 8'($urandom); bg12nba = 8'($urandom);
      bg1hofs = 10'($urandom); bg1vofs = 10'($urandom); bg2hofs = 10'($urandom); bg2vofs = 10'($urandom);
      bgmode = (l % 2 == 1) ? {2'b0, 2'($urandom), 4'h0} : 8'h00;
      if (l == 0) begin bg1hofs = 0; bg1vofs = 0; end
      if (l == 1) bgmode = 8'h30;
      line = 8'($urandom % 240);
      @(negedge clk); start = 1; @(negedge clk); start = 0; n = 1;
      while (!done) begin @(negedge clk); n++; end
      checks++; if (n != 265) begin failures++; $display("line took %0d clocks", n); end
      rd_bank = line[0];
      for (int x = 0; x < 256; x++) begin
        logic [7:0] e1, e2;
        rd_x = 8'(x); #1;
        e1 = ref_pix(bg1sc, bg12nba[2:0], bg1hofs, bg1vofs, line, 8'(x), bgmode[4]);
        e2 = ref_pix(bg2sc, bg12nba[6:4], bg2hofs, bg2vofs, line, 8'(x), bgmode[5]);
        if (e1 == 0) transp++;
        checks++; if (bg1_pix !== e1 || bg2_pix !== e2) begin
          failures++; if (failures < 10) $display("line %0d x %0d: %h %h expected %h %h", line, x, bg1_pix, bg2_pix, e1, e2); end
      end
    end
    checks++; if (flips == 0 || transp == 0 || bigs == 0) begin failures++; $display("flip/transparent case not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
