// tb_video_timing: runs two full 640x480 frames at the default settings and
// counts sync pulses, their widths, visible pixels and the game strobes.
module tb_video_timing;
  logic clk = 0, rst_n = 0;
  logic [9:0] hcount, vcount;
  logic hsync_n, vsync_n, de, ghb, gvb, hstb, vstb, fstb;
  int checks = 0, failures = 0;
  int hs_low = 0, vs_low = 0, de_n = 0, hstb_n = 0, vstb_n = 0, fstb_n = 0, hs_pulses = 0, game = 0;
  logic hs_q = 1;
  always #5 clk = ~clk;

  video_timing dut (.clk, .rst_n, .hcount, .vcount, .hsync_n, .vsync_n, .de,
    .game_hblank(ghb), .game_vblank(gvb), .hblank_stb(hstb), .vblank_stb(vstb), .frame_stb(fstb));

  task automatic expect_eq(input string what, input int got, input int want);
    checks++; if (got != want) begin failures++; $display("%s: %0d, expected %0d", what, got, want); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      hs_low = 0; vs_low = 0; de_n = 0; hstb_n = 0; vstb_n = 0; fstb_n = 0; hs_pulses = 0; game = 0;
      for (int i = 0; i < 800 * 525; i++) begin
        @(negedge clk);
        if (!hsync_n) hs_low++;
        if (!vsync_n) vs_low++;
        if (de) de_n++;
        if (hstb) hstb_n++;
        if (vstb) vstb_n++;
        if (fstb) fstb_n++;
        if (!ghb && !gvb) game++;
        if (hs_q && !hsync_n) hs_pulses++;
        hs_q = hsync_n;
      end
      expect_eq("hsync pulses", hs_pulses, 525);
      expect_eq("hsync low clocks", hs_low, 96 * 525);
      expect_eq("vsync low clocks", vs_low, 2 * 800);
      expect_eq("visible pixels", de_n, 640 * 480);
      expect_eq("game pixels", game, 256 * 240);
      expect_eq("hblank strobes", hstb_n, 240);
      expect_eq("vblank strobes", vstb_n, 1);
      expect_eq("frame strobes", fstb_n, 1);
      checks++; if (hcount != 799 || vcount != 524) begin failures++; $display("frame not 800x525"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2_000_000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
