// ac97_link: AC'97 codec output link for the mono sound loop.
//
// Runs on the codec's 12.288 MHz bit clock. Every 256 bit clocks it sends one
// AC-link output frame: a 16-bit tag (slot 0) and twelve 20-bit slots, MSB
// first, on sdata_out, changing on the rising edge of bit_clk. SYNC is high
// for 16 bit clocks around the tag, starting with the last bit of the
// previous frame. Slots 1 and 2 carry codec register writes taken in turn
// from a small start-up list (unmute master and headphone out, set PCM out
// gain); slots 3 and 4 carry the same sample on left and right, since only
// one channel of the music is stored. A sample from the system clock domain
// is taken when its toggle flag, passed through two flip-flops, changes.
// The frame layout is the AC'97 standard; the command list is this design's.
module ac97_link (
  input  logic        bit_clk,
  input  logic        rst_n,
  input  logic [15:0] sample,       // system clock domain, stable around a toggle
  input  logic        sample_tgl,
  output logic        sync,
  output logic        sdata_out,
  output logic        codec_reset_n,
  output logic        frame_stb     // one bit clock at each frame start
);
  localparam int NCMD = 4;
  logic [7:0]  bitcnt;
  logic [2:0]  tgl_sync;
  logic [15:0] pcm;
  logic [1:0]  cmd_idx;
  logic [255:0] frame, shreg;
  logic [6:0]  cmd_reg;
  logic [15:0] cmd_dat;

  always_comb begin
    unique case (cmd_idx)
      2'd0: begin cmd_reg = 7'h02; cmd_dat = 16'h0000; end  // master volume, 0 dB
      2'd1: begin cmd_reg = 7'h04; cmd_dat = 16'h0000; end  // headphone volume
      2'd2: begin cmd_reg = 7'h18; cmd_dat = 16'h0808; end  // PCM out gain
      default: begin cmd_reg = 7'h2C; cmd_dat = 16'd48000; end // DAC rate
    endcase
    frame = '0;
    frame[255:240] = 16'b1111_1000_0000_0000;            // frame, slots 1-4 valid
    frame[239:220] = {1'b0, cmd_reg, 12'h000};            // slot 1: write command
    frame[219:200] = {cmd_dat, 4'h0};                     // slot 2: command data
    frame[199:180] = {pcm, 4'h0};                         // slot 3: left
    frame[179:160] = {pcm, 4'h0};                         // slot 4: right
  end

  always_ff @(posedge bit_clk or negedge rst_n) begin
    if (!rst_n) begin
      bitcnt <= 8'd254; tgl_sync <= '0; pcm <= '0; cmd_idx <= '0;
      sync <= 1'b0; sdata_out <= 1'b0; codec_reset_n <= 1'b0; frame_stb <= 1'b0;
      shreg <= '0;
    end else begin
      codec_reset_n <= 1'b1;
      tgl_sync <= {tgl_sync[1:0], sample_tgl};
      if (tgl_sync[2] != tgl_sync[1]) pcm <= sample;
      bitcnt    <= bitcnt + 1'b1;             // position of the bit sent now
      if ((bitcnt + 8'd1) == 8'd0) begin         // frame captured whole at its start
        sdata_out <= frame[255];
        shreg     <= {frame[254:0], 1'b0};
      end else begin
        sdata_out <= shreg[255];
        shreg     <= {shreg[254:0], 1'b0};
      end
      sync      <= ((bitcnt + 8'd1) == 8'd255) || ((bitcnt + 8'd1) < 8'd15);
      frame_stb <= ((bitcnt + 8'd1) == 8'd0);
      if (bitcnt == 8'd0) cmd_idx <= (cmd_idx == 2'(NCMD - 1)) ? '0 : cmd_idx + 1'b1;
    end
  end
endmodule
