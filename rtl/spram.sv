// spram: single-port synchronous RAM, the block RAM used for every on-chip
// memory (CPU RAM, VRAM, CGRAM, OAM).
//
// One read or write per clock. Read data appears one clock after the
// address (registered output, like an FPGA block RAM); a write also updates
// the read register with the old contents (read-first). Contents start at
// zero in simulation.
module spram #(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= wdata;
    end
  end
endmodule
