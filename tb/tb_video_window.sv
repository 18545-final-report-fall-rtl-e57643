// tb_video_window: random syncs and colours go in; checks that syncs come
// out delayed by LAT clocks and that colour is the widened PPU colour only
// where both display-enable and the game window are active, black elsewhere.
module tb_video_window;
  localparam int LAT = 2;
  logic clk = 0, rst_n = 0;
  logic hs_i, vs_i, de_i, pv, hs, vs, de;
  logic [4:0] r, g, b;
  logic [7:0] red, green, blue;
  logic [2:0] hist [LAT + 1];
  int checks = 0, failures = 0, black = 0, colour = 0;
  always #5 clk = ~clk;

  video_window #(.LAT(LAT)) dut (.clk, .rst_n, .hsync_n_in(hs_i), .vsync_n_in(vs_i), .de_in(de_i),
    .pix_r(r), .pix_g(g), .pix_b(b), .pix_valid(pv), .hsync_n(hs), .vsync_n(vs), .de, .red, .green, .blue);

  initial begin
    hs_i = 1; vs_i = 1; de_i = 0; pv = 0; r = 0; g = 0; b = 0;
    for (int i = 0; i <= LAT; i++) hist[i] = 3'b110;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      {hs_i, vs_i, de_i} = 3'($urandom);
      pv = 1'($urandom); r = 5'($urandom); g = 5'($urandom); b = 5'($urandom);
      #1;
      checks++;
      if (i >= LAT && {hs, vs, de} !== hist[LAT - 1]) begin failures++; $display("sync delay wrong at %0d", i); end
      if (de && pv) begin
        colour++;
        checks++; if (red !== {r, r[4:2]} || green !== {g, g[4:2]} || blue !== {b, b[4:2]}) failures++;
      end else begin
        black++;
        checks++; if (red !== 0 || green !== 0 || blue !== 0) failures++;
      end
      @(posedge clk);
      for (int k = LAT; k > 0; k--) hist[k] = hist[k - 1];
      hist[0] = {hs_i, vs_i, de_i};
    end
    checks++; if (black == 0 || colour == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
