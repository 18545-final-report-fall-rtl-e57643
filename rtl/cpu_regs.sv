// cpu_regs: the CPU-side register block at 0x4200-0x42FF.
//
// Holds the interrupt/auto-read enable (0x4200), the multiplier and divider
// operands (0x4202-0x4206) feeding the combinational muldiv unit, and the
// read-only status: NMI flag (0x4210, cleared when read), blanking and
// joypad-busy flags (0x4212), quotient (0x4214/15), product or remainder
// (0x4216/17) and the two pads' buttons (0x4218-0x421B). At the start of
// vertical blanking it sets the NMI flag and, if auto-read is enabled,
// starts the pad reader; nmi_n goes low while the flag is set and NMIs are
// enabled. Register numbers follow the console; the set kept is the one
// the rest of this design uses. Read data is valid the clock after `stb`.
module cpu_regs (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stb,
  input  logic        we,
  input  logic [7:0]  addr,        // low byte of 0x42xx
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  // timing
  input  logic        vblank_stb,
  input  logic        in_vblank,
  input  logic        in_hblank,
  // pads
  output logic        pad_start,
  input  logic        pad_busy,
  input  logic [15:0] joy1,
  input  logic [15:0] joy2,
  output logic        nmi_n
);
  logic [7:0]  nmitimen, mpya, mpyb, divb;
  logic [15:0] divd;
  logic        last_div, nmi_flag;
  logic [15:0] rdmpy, rddiv;

  muldiv u_muldiv (
    .mpy_a(mpya), .mpy_b(mpyb), .dividend(divd), .divisor(divb),
    .last_div(last_div), .rdmpy(rdmpy), .rddiv(rddiv)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nmitimen <= '0; mpya <= 8'hFF; mpyb <= '0; divb <= '0; divd <= 16'hFFFF;
      last_div <= 1'b0; nmi_flag <= 1'b0; rdata <= '0; pad_start <= 1'b0;
    end else begin
      pad_start <= vblank_stb && nmitimen[0];
      if (vblank_stb) nmi_flag <= 1'b1;
      if (stb && we) begin
        unique case (addr)
          8'h00: nmitimen <= wdata;
          8'h02: mpya <= wdata;
          8'h03: begin mpyb <= wdata; last_div <= 1'b0; end
          8'h04: divd[7:0]  <= wdata;
          8'h05: divd[15:8] <= wdata;
          8'h06: begin divb <= wdata; last_div <= 1'b1; end
          default: ;
        endcase
      end else if (stb) begin
        unique case (addr)
          8'h10: begin rdata <= {nmi_flag, 7'h02}; nmi_flag <= 1'b0; end
          8'h12: rdata <= {in_vblank, in_hblank, 5'b0, pad_busy};
          8'h14: rdata <= rddiv[7:0];
          8'h15: rdata <= rddiv[15:8];
          8'h16: rdata <= rdmpy[7:0];
          8'h17: rdata <= rdmpy[15:8];
          8'h18: rdata <= joy1[7:0];
          8'h19: rdata <= joy1[15:8];
          8'h1A: rdata <= joy2[7:0];
          8'h1B: rdata <= joy2[15:8];
          default: rdata <= 8'h00;
        endcase
      end
    end
  end
  assign nmi_n = !(nmi_flag && nmitimen[7]);
endmodule
