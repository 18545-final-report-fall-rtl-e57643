// apu_ports: the four byte-wide mailbox registers between the main CPU and
// the audio unit (CPU addresses 0x2140-0x2143).
//
// A CPU write to port n sets the byte the audio side reads on to_apu[n]; a
// CPU read of port n returns the byte the audio side drives on from_apu[n],
// so each address is really two registers, one per direction. Reads and
// writes complete in one bus strobe; read data is registered and valid the
// clock after the strobe, like every other register block on the bus.
module apu_ports (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            stb,
  input  logic            we,
  input  logic [1:0]      addr,
  input  logic [7:0]      wdata,
  output logic [7:0]      rdata,
  output logic [3:0][7:0] to_apu,
  input  logic [3:0][7:0] from_apu
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      to_apu <= '0; rdata <= '0;
    end else if (stb) begin
      if (we) to_apu[addr] <= wdata;
      else    rdata <= from_apu[addr];
    end
  end
endmodule
