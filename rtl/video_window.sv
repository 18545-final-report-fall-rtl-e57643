// video_window: fits the 256x240 game picture into the 640x480 output.
//
// The DVI encoder is driven with a 640x480 raster, larger than the game's
// 256x240 picture. This wrapper delays the sync and display-enable signals
// by the PPU's colour latency (LAT clocks) so they line up with the pixels,
// and sends the PPU colour, widened from 5 to 8 bits per component, inside
// the game window and black everywhere else. The picture sits unscaled in
// the top-left corner of the screen.
module video_window #(
  parameter int unsigned LAT = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       hsync_n_in,
  input  logic       vsync_n_in,
  input  logic       de_in,
  input  logic [4:0] pix_r,
  input  logic [4:0] pix_g,
  input  logic [4:0] pix_b,
  input  logic       pix_valid,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       de,
  output logic [7:0] red,
  output logic [7:0] green,
  output logic [7:0] blue
);
  import snes_pkg::c5to8;
  logic [LAT-1:0] hs_d, vs_d, de_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs_d <= '1; vs_d <= '1; de_d <= '0;
    end else begin
      hs_d <= {hs_d[LAT-2:0], hsync_n_in};
      vs_d <= {vs_d[LAT-2:0], vsync_n_in};
      de_d <= {de_d[LAT-2:0], de_in};
    end
  end

  always_comb begin
    hsync_n = hs_d[LAT-1];
    vsync_n = vs_d[LAT-1];
    de      = de_d[LAT-1];
    if (de && pix_valid) begin
      red = c5to8(pix_r); green = c5to8(pix_g); blue = c5to8(pix_b);
    end else begin
      red = 8'h00; green = 8'h00; blue = 8'h00;
    end
  end
endmodule
