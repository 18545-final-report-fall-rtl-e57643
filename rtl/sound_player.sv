// sound_player: plays a pre-recorded mono sound loop stored in flash.
//
// Instead of running the sound program on a sound processor, the music is
// stored as 16-bit signed samples of one channel in flash. Every SAMPLE_DIV
// clocks the player reads the next word through the flash controller's sound
// port and presents it as the current sample; after SOUND_LEN samples it
// starts again at SOUND_BASE. Each new sample flips `sample_tgl` so an audio
// output running on another clock can pick it up safely.
module sound_player #(
  parameter int unsigned FLASH_AW   = 22,
  parameter int unsigned SOUND_BASE = 32'h0010_0000,  // word address of sample 0
  parameter int unsigned SOUND_LEN  = 1440000,     // 30 s at 48 kHz
  parameter int unsigned SAMPLE_DIV = 524          // 25.175 MHz / 48 kHz
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  output logic                snd_req,
  output logic [FLASH_AW-1:0] snd_addr,
  input  logic                snd_ack,
  input  logic [15:0]         snd_rdata,
  output logic [15:0]         sample,
  output logic                sample_tgl,
  output logic                wrapped      // one clock when the loop restarts
);
  logic [15:0] div;
  logic [31:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; idx <= '0; snd_req <= 1'b0; sample <= '0; sample_tgl <= 1'b0; wrapped <= 1'b0;
    end else begin
      wrapped <= 1'b0;
      if (enable && div == 16'(SAMPLE_DIV - 1)) begin
        div <= '0;
        snd_req <= 1'b1;
      end else if (enable) begin
        div <= div + 1'b1;
      end
      if (snd_req && snd_ack) begin
        snd_req    <= 1'b0;
        sample     <= snd_rdata;
        sample_tgl <= ~sample_tgl;
        if (idx == 32'(SOUND_LEN - 1)) begin
          idx <= '0; wrapped <= 1'b1;
        end else idx <= idx + 1'b1;
      end
    end
  end
  assign snd_addr = FLASH_AW'(SOUND_BASE) + FLASH_AW'(idx);
endmodule
