// flash_ctrl: shares the board's 16-bit parallel flash between game ROM
// reads and sound sample reads.
//
// Both the game ROM image and the sound samples live in one flash chip. The
// ROM port takes a byte address; the flash holds 16-bit words, so the word
// address is the byte address shifted right by one and the low address bit
// picks the byte (low byte first). The sound port reads whole words. A read
// drives the word address with chip and output enable low for WAIT_CYC
// clocks and then samples the data bus. When both ports ask at once the
// sound port goes first, since it must keep a steady sample rate and asks
// rarely; a ROM request waits at most one sound read. Each port holds its
// request until its ack pulse, which carries the data.
module flash_ctrl #(
  parameter int unsigned FLASH_AW = 22,  // word address bits
  parameter int unsigned WAIT_CYC = 3    // clocks per asynchronous read
) (
  input  logic                clk,
  input  logic                rst_n,
  // game ROM port (byte wide)
  input  logic                rom_req,
  input  logic [FLASH_AW:0]   rom_byte_addr,
  output logic                rom_ack,
  output logic [7:0]          rom_rdata,
  // sound port (word wide)
  input  logic                snd_req,
  input  logic [FLASH_AW-1:0] snd_addr,
  output logic                snd_ack,
  output logic [15:0]         snd_rdata,
  // flash pins
  output logic [FLASH_AW-1:0] flash_addr,
  input  logic [15:0]         flash_dq,
  output logic                flash_ce_n,
  output logic                flash_oe_n
);
  typedef enum logic [1:0] {S_IDLE, S_ROM, S_SND} state_e;
  state_e     st;
  logic [7:0] cnt;
  logic       hi_byte;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; hi_byte <= 1'b0; flash_addr <= '0;
      flash_ce_n <= 1'b1; flash_oe_n <= 1'b1;
      rom_ack <= 1'b0; snd_ack <= 1'b0; rom_rdata <= '0; snd_rdata <= '0;
    end else begin
      rom_ack <= 1'b0;
      snd_ack <= 1'b0;
      unique case (st)
        S_IDLE: begin
          if (snd_req) begin
            st <= S_SND; flash_addr <= snd_addr;
            flash_ce_n <= 1'b0; flash_oe_n <= 1'b0; cnt <= 8'(WAIT_CYC - 1);
          end else if (rom_req) begin
            st <= S_ROM; flash_addr <= rom_byte_addr[FLASH_AW:1]; hi_byte <= rom_byte_addr[0];
            flash_ce_n <= 1'b0; flash_oe_n <= 1'b0; cnt <= 8'(WAIT_CYC - 1);
          end
        end
        S_ROM, S_SND: begin
          if (cnt == 0) begin
            flash_ce_n <= 1'b1; flash_oe_n <= 1'b1; st <= S_IDLE;
            if (st == S_ROM) begin
              rom_ack <= 1'b1; rom_rdata <= hi_byte ? flash_dq[15:8] : flash_dq[7:0];
            end else begin
              snd_ack <= 1'b1; snd_rdata <= flash_dq;
            end
          end else cnt <= cnt - 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
