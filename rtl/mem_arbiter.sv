// mem_arbiter: shares one single-port video memory between the picture
// drawing side and the CPU register side.
//
// The drawing side (port H) has priority and may read every clock; its data
// returns one clock later, flagged by h_valid. The CPU side (port L) holds
// its request, address and write data until it is granted (l_gnt, one
// clock); a granted read returns l_rdata with l_ack one clock later, and a
// granted write also answers with l_ack. Because port L holds everything
// until the grant, a write from the CPU or DMA is never lost while the
// drawing side is busy. The memory is the registered-output spram.
module mem_arbiter #(
  parameter int unsigned AW = 15,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // drawing side: read only, highest priority
  input  logic          h_req,
  input  logic [AW-1:0] h_addr,
  output logic [DW-1:0] h_rdata,
  output logic          h_valid,
  // CPU side: held request
  input  logic          l_req,
  input  logic          l_we,
  input  logic [AW-1:0] l_addr,
  input  logic [DW-1:0] l_wdata,
  output logic          l_gnt,
  output logic          l_ack,
  output logic [DW-1:0] l_rdata
);
  logic          en, we;
  logic [AW-1:0] addr;
  logic [DW-1:0] rdata;

  always_comb begin
    l_gnt = l_req && !h_req;
    en    = h_req || l_req;
    we    = l_gnt && l_we;
    addr  = h_req ? h_addr : l_addr;
  end

  spram #(.AW(AW), .DW(DW)) u_mem (
    .clk(clk), .en(en), .we(we), .addr(addr), .wdata(l_wdata), .rdata(rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_valid <= 1'b0; l_ack <= 1'b0;
    end else begin
      h_valid <= h_req;
      l_ack   <= l_gnt;
    end
  end
  assign h_rdata = rdata;
  assign l_rdata = rdata;

  // the drawing side must never be blocked
  a_h_first: assert property (@(posedge clk) disable iff (!rst_n) h_req |-> !l_gnt);
endmodule
