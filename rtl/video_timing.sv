// video_timing: 640x480 at 60 Hz raster counters and sync pulses.
//
// Counts pixels (hcount) and lines (vcount) over the full 800x525 raster and
// produces active-low horizontal and vertical sync, a display-enable for the
// 640x480 visible area, and the strobes the rest of the console keys off:
// game-window hblank (end of the 256-pixel game line), vblank start (after
// game line 239) and frame start. The 640x480 output format is the one the
// DVI encoder was set up for; the standard VESA porch values are used.
module video_timing #(
  parameter int unsigned H_ACT = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int unsigned V_ACT = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33,
  parameter int unsigned GAME_W = 256, GAME_H = 240
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       de,          // inside 640x480
  output logic       game_hblank, // outside the 256 game pixels of a line
  output logic       game_vblank, // below the 240 game lines
  output logic       hblank_stb,  // one clock at the end of each game line
  output logic       vblank_stb,  // one clock when the game area ends
  output logic       frame_stb    // one clock at the start of the last raster line
);
  localparam int unsigned H_TOT = H_ACT + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_ACT + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcount <= '0; vcount <= '0;
    end else if (hcount == 10'(H_TOT - 1)) begin
      hcount <= '0;
      vcount <= (vcount == 10'(V_TOT - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  always_comb begin
    hsync_n     = !(hcount >= 10'(H_ACT + H_FP) && hcount < 10'(H_ACT + H_FP + H_SYNC));
    vsync_n     = !(vcount >= 10'(V_ACT + V_FP) && vcount < 10'(V_ACT + V_FP + V_SYNC));
    de          = (hcount < 10'(H_ACT)) && (vcount < 10'(V_ACT));
    game_hblank = (hcount >= 10'(GAME_W));
    game_vblank = (vcount >= 10'(GAME_H));
    hblank_stb  = (hcount == 10'(GAME_W)) && (vcount < 10'(GAME_H));
    vblank_stb  = (hcount == 10'd0) && (vcount == 10'(GAME_H));
    frame_stb   = (hcount == 10'd0) && (vcount == 10'(V_TOT - 1));
  end
endmodule
