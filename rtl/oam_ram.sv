// oam_ram: sprite attribute memory, 544 bytes, with two ports.
//
// Port A is the CPU side (through OAMADD/OAMDATA): one byte per access,
// byte address 0-543, registered read (read-first). Port B is the sprite
// renderer's read-only port: one 32-bit word per clock, word address
// 0-135, registered read. Word i < 128 holds sprite i's four bytes (X low,
// Y, tile, attributes, byte 0 in bits 7:0); words 128-135 hold the 32-byte
// table of X bit 8 and size bit, two bits per sprite.
//
// It is built as four byte-wide lanes of 136 entries (lane = byte address
// bits 1:0), so each lane maps onto one true dual-port block RAM. The 544
// byte size follows the console's OAM; the two-port organisation is this
// design's choice, so the drawing side never has to wait for the CPU.
module oam_ram (
  input  logic        clk,
  // port A: CPU, bytes
  input  logic        a_en,
  input  logic        a_we,
  input  logic [9:0]  a_addr,
  input  logic [7:0]  a_wdata,
  output logic [7:0]  a_rdata,
  // port B: renderer, words
  input  logic [7:0]  b_addr,
  output logic [31:0] b_rdata
);
  logic [7:0] lane0 [136];
  logic [7:0] lane1 [136];
  logic [7:0] lane2 [136];
  logic [7:0] lane3 [136];
  logic [7:0] wa;
  assign wa = a_addr[9:2];

  initial for (int i = 0; i < 136; i++) begin
    lane0[i] = '0; lane1[i] = '0; lane2[i] = '0; lane3[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (a_en) begin
      unique case (a_addr[1:0])
        2'd0: begin a_rdata <= lane0[wa]; if (a_we) lane0[wa] <= a_wdata; end
        2'd1: begin a_rdata <= lane1[wa]; if (a_we) lane1[wa] <= a_wdata; end
        2'd2: begin a_rdata <= lane2[wa]; if (a_we) lane2[wa] <= a_wdata; end
        default: begin a_rdata <= lane3[wa]; if (a_we) lane3[wa] <= a_wdata; end
      endcase
    end
  end

  always_ff @(posedge clk)
    b_rdata <= {lane3[b_addr], lane2[b_addr], lane1[b_addr], lane0[b_addr]};
endmodule
