// tb_ppu_regs: the PPU register file with its two memory arbiters, while a
// drawing-side reader keeps VRAM and CGRAM busy on random clocks. Writes
// VRAM words with increment 1 and 32, reads them back through the
// prefetching read port, writes and reads CGRAM colours and OAM bytes, and
// checks the display settings, the two-write scroll registers and that every
// access is acknowledged.
module tb_ppu_regs;
  import snes_pkg::*;
  logic clk = 0, rst_n = 0, stb = 0, we = 0;
  logic [5:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic ack;
  logic v_req, v_we, v_gnt, v_ack, c_req, c_we, c_gnt, c_ack;
  logic [14:0] v_addr, c_wdata, c_rdata;
  logic [15:0] v_wdata, v_rdata;
  logic [7:0] c_addr;
  logic force_blank; logic [3:0] brightness;
  logic [7:0] bgmode, bg1sc, bg2sc, bg12nba; logic [9:0] bg1hofs, bg1vofs, bg2hofs, bg2vofs; logic [4:0] tm;
  logic [7:0] obsel, o_addr = 0, cgadsub; logic [31:0] o_rdata; logic [14:0] fixcol;
  logic hreq_v, hreq_c;
  int checks = 0, failures = 0, waits = 0;
  always #5 clk = ~clk;

  ppu_regs dut (.*);
  mem_arbiter #(.AW(15), .DW(16)) vram (.clk, .rst_n, .h_req(hreq_v), .h_addr(15'h7FFF), .h_rdata(), .h_valid(),
    .l_req(v_req), .l_we(v_we), .l_addr(v_addr), .l_wdata(v_wdata), .l_gnt(v_gnt), .l_ack(v_ack), .l_rdata(v_rdata));
  mem_arbiter #(.AW(8), .DW(15)) cgram (.clk, .rst_n, .h_req(hreq_c), .h_addr(8'hFF), .h_rdata(), .h_valid(),
    .l_req(c_req), .l_we(c_we), .l_addr(c_addr), .l_wdata(c_wdata), .l_gnt(c_gnt), .l_ack(c_ack), .l_rdata(c_rdata));
  always @(negedge clk) begin hreq_v <= ($urandom % 4) != 0; hreq_c <= ($urandom % 2) != 0; end
  always @(posedge clk) if (v_req && !v_gnt) waits++;

  task automatic acc(input logic w, input logic [5:0] a, input logic [7:0] d, output logic [7:0] q);
    int n = 0;
    @(negedge clk); addr = a; wdata = d; we = w; stb = 1; @(negedge clk); stb = 0;
    while (!ack && n < 100) begin @(negedge clk); n++; end
    checks++; if (!ack) begin failures++; $display("no ack for %h", a); end
    q = rdata;
  endtask
  task automatic wr(input logic [5:0] a, input logic [7:0] d); logic [7:0] q; acc(1, a, d, q); endtask
  task automatic expect_rd(input logic [5:0] a, input logic [7:0] want);
    logic [7:0] q; acc(0, a, 8'h00, q);
    checks++; if (q !== want) begin failures++; $display("read %h = %h, expected %h", a, q, want); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // settings
    wr(P_INIDISP, 8'h0F); wr(P_BGMODE, 8'h20); wr(P_BG1SC, 8'h7C); wr(P_BG2SC, 8'h78); wr(P_BG12NBA, 8'h42); wr(P_TM, 8'h13);
    wr(P_BG1HOFS, 8'h34); wr(P_BG1HOFS, 8'h01); wr(P_BG2VOFS, 8'hFF); wr(P_BG2VOFS, 8'h03);
    checks++; if (force_blank !== 0 || brightness !== 15 || bg1sc !== 8'h7C || bgmode !== 8'h20 || bg2sc !== 8'h78 ||
                  bg12nba !== 8'h42 || tm !== 5'h13) failures++;
    checks++; if (bg1hofs !== 10'h134 || bg2vofs !== 10'h3FF) begin failures++; $display("scroll %h %h", bg1hofs, bg2vofs); end
    // VRAM: 16 words from 0x1230, increment 1 after high byte
    wr(P_VMAIN, 8'h80); wr(P_VMADDL, 8'h30); wr(P_VMADDH, 8'h12);
    for (int i = 0; i < 16; i++) begin wr(P_VMDATAL, 8'(i * 3)); wr(P_VMDATAH, 8'(8'hA0 + i)); end
    // increment 32, words at 0x0400 + 32*i
    wr(P_VMAIN, 8'h81); wr(P_VMADDL, 8'h00); wr(P_VMADDH, 8'h04);
    for (int i = 0; i < 4; i++) begin wr(P_VMDATAL, 8'(8'h50 + i)); wr(P_VMDATAH, 8'h77); end
    checks++; if (vram.u_mem.mem[15'h0400 + 32 * 3] !== 16'h7753) failures++;
    // read back with the prefetch port
    wr(P_VMAIN, 8'h80); wr(P_VMADDL, 8'h30); wr(P_VMADDH, 8'h12);
    for (int i = 0; i < 16; i++) begin expect_rd(P_VMREADL, 8'(i * 3)); expect_rd(P_VMREADH, 8'(8'hA0 + i)); end
    // CGRAM: 8 colours from entry 0x10
    wr(P_CGADD, 8'h10);
    for (int i = 0; i < 8; i++) begin wr(P_CGDATA, 8'(8'h11 * i)); wr(P_CGDATA, 8'(8'hF0 | i)); end
    wr(P_CGADD, 8'h10);
    for (int i = 0; i < 8; i++) begin expect_rd(P_CGREAD, 8'(8'h11 * i)); expect_rd(P_CGREAD, 8'(8'h70 | i)); end
    // OAM: bytes from word address 0x20 (byte 0x40)
    wr(P_OAMADDL, 8'h20); wr(P_OAMADDH, 8'h00);
    for (int i = 0; i < 10; i++) wr(P_OAMDATA, 8'(8'hC0 + i));
    wr(P_OAMADDL, 8'h20); wr(P_OAMADDH, 8'h00);
    for (int i = 0; i < 10; i++) expect_rd(P_OAMREAD, 8'(8'hC0 + i));
    // the renderer's word port sees the same bytes: words 0x10-0x12 = bytes 0x40-0x4B
    for (int k = 0; k < 2; k++) begin
      @(negedge clk); o_addr = 8'(8'h10 + k); @(negedge clk);
      checks++; if (o_rdata !== {8'(8'hC3 + 4 * k), 8'(8'hC2 + 4 * k), 8'(8'hC1 + 4 * k), 8'(8'hC0 + 4 * k)}) begin
        failures++; $display("OAM word %0d = %h", k, o_rdata); end
    end
    // the size/X-bit-8 table sits at byte 0x200 = word 128
    wr(P_OAMADDL, 8'h00); wr(P_OAMADDH, 8'h01);
    for (int i = 0; i < 4; i++) wr(P_OAMDATA, 8'(8'h5A + i));
    @(negedge clk); o_addr = 8'd128; @(negedge clk);
    checks++; if (o_rdata !== 32'h5D5C5B5A) begin failures++; $display("OAM word 128 = %h", o_rdata); end
    wr(P_OBSEL, 8'h63);
    checks++; if (obsel !== 8'h63) failures++;
    // colour math settings: COLDATA sets the chosen components only
    wr(P_CGADSUB, 8'hA2); wr(P_COLDATA, 8'hE5); wr(P_COLDATA, 8'h4B); wr(P_COLDATA, 8'h3F);
    checks++; if (cgadsub !== 8'hA2 || fixcol !== {5'd5, 5'd11, 5'd31}) begin failures++; $display("math regs %h %h", cgadsub, fixcol); end
    checks++; if (waits == 0) begin failures++; $display("VRAM side never made the CPU wait"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
