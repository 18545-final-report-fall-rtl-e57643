// tb_mem_access: the memory access unit with behavioural register targets
// and a behavioural ROM port that answers after a random delay. Checks the
// address map (which target each address reaches and with what address),
// CPU RAM through direct addresses, the low-RAM mirror and the 0x2180 port,
// LoROM translation, open-bus reads, ignored ROM writes, the four-clock
// access rate, and hand-over of the bus to the DMA master (CPU held, cpu_rdy
// low) and back.
module tb_mem_access;
  import snes_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cpu_req = 0, cpu_we = 0, cpu_ack, cpu_rdy;
  logic [23:0] cpu_addr = 0; logic [7:0] cpu_wdata = 0, cpu_rdata;
  logic dma_busy = 0, dma_req = 0, dma_we = 0, dma_ack;
  logic [23:0] dma_addr = 0; logic [7:0] dma_wdata = 0, dma_rdata;
  logic t_we; logic [15:0] t_addr; logic [7:0] t_wdata;
  logic ppu_stb, ppu_ack = 0, apu_stb, creg_stb, dreg_stb;
  logic [7:0] ppu_rdata = 0, apu_rdata = 0, creg_rdata = 0, dreg_rdata = 0;
  logic rom_req, rom_ack = 0; logic [22:0] rom_byte_addr; logic [7:0] rom_rdata = 0;
  bus_target_e tgt;
  int checks = 0, failures = 0;
  string last_stb = "";
  logic [15:0] last_taddr;
  always #5 clk = ~clk;

  mem_access #(.FLASH_AW(22)) dut (.*);

  // register targets: read data is a function of target and address
  always @(posedge clk) begin
    if (apu_stb)  begin last_stb = "apu";  last_taddr = t_addr; apu_rdata  <= 8'h10 ^ t_addr[7:0]; end
    if (creg_stb) begin last_stb = "creg"; last_taddr = t_addr; creg_rdata <= 8'h20 ^ t_addr[7:0]; end
    if (dreg_stb) begin last_stb = "dreg"; last_taddr = t_addr; dreg_rdata <= 8'h30 ^ t_addr[7:0]; end
  end
  initial forever begin
    @(posedge clk);
    if (ppu_stb) begin
      last_stb = "ppu"; last_taddr = t_addr;
      repeat (1 + $urandom % 4) @(posedge clk);
      ppu_rdata <= 8'h40 ^ t_addr[7:0]; ppu_ack <= 1; @(posedge clk); ppu_ack <= 0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (rom_req && !rom_ack) begin
      last_stb = "rom";
      repeat (2 + $urandom % 5) @(posedge clk);
      rom_rdata <= rom_byte_addr[7:0] ^ rom_byte_addr[15:8] ^ {1'b0, rom_byte_addr[22:16]};
      rom_ack <= 1; @(posedge clk); rom_ack <= 0;
    end
  end

  task automatic cpu(input logic w, input logic [23:0] a, input logic [7:0] d, output logic [7:0] q, output int n);
    @(negedge clk); cpu_req = 1; cpu_we = w; cpu_addr = a; cpu_wdata = d; n = 0;
    do begin @(posedge clk); #1; n++; end while (!cpu_ack);
    q = cpu_rdata; @(negedge clk); cpu_req = 0;
  endtask
  task automatic cw(input logic [23:0] a, input logic [7:0] d); logic [7:0] q; int n; cpu(1, a, d, q, n); endtask
  task automatic cr_expect(input logic [23:0] a, input logic [7:0] want, input string who);
    logic [7:0] q; int n;
    last_stb = "";
    cpu(0, a, 0, q, n);
    checks++; if (q !== want) begin failures++; $display("read %h = %h, expected %h", a, q, want); end
    checks++; if (last_stb != who) begin failures++; $display("read %h went to '%s', expected '%s'", a, last_stb, who); end
  endtask

  initial begin
    logic [7:0] q; int n;
    repeat (2) @(posedge clk); rst_n = 1;
    // register regions
    cr_expect(24'h002100, 8'h40 ^ 8'h00, "ppu");
    cr_expect(24'h80213F, 8'h40 ^ 8'h3F, "ppu");
    cr_expect(24'h002140, 8'h10 ^ 8'h40, "apu");
    cr_expect(24'h3F2143, 8'h10 ^ 8'h43, "apu");
    cr_expect(24'h004218, 8'h20 ^ 8'h18, "creg");
    cr_expect(24'h00420B, 8'h30 ^ 8'h0B, "dreg");
    cr_expect(24'h004375, 8'h30 ^ 8'h75, "dreg");
    // ROM, LoROM: bank 0x03, 0x9234 -> byte 0x1_9234
    cr_expect(24'h039234, 8'h34 ^ 8'h92 ^ 8'h01, "rom");
    cr_expect(24'h80FFFC, 8'hFC ^ 8'h7F ^ 8'h00, "rom");
    // open bus: an unmapped address reads the last byte on the bus
    cr_expect(24'h005000, 8'hFC ^ 8'h7F, "");
    // ROM write is ignored but answered
    cw(24'h018000, 8'h55);
    checks++; if (last_stb == "rom") failures++;
    // CPU RAM: direct, mirror, and bank 7F
    cw(24'h7E1234, 8'hA5); cw(24'h7F8001, 8'h5A); cw(24'h000010, 8'h33);
    cr_expect(24'h001234, 8'hA5, ""); cr_expect(24'h851234, 8'hA5, "");
    cr_expect(24'h7F8001, 8'h5A, ""); cr_expect(24'h7E0010, 8'h33, "");
    // 0x2180 port: address 0x1FFFE, three writes wrap into 0x00000
    cw(24'h002181, 8'hFE); cw(24'h002182, 8'hFF); cw(24'h002183, 8'h01);
    cw(24'h002180, 8'h11); cw(24'h002180, 8'h22); cw(24'h002180, 8'h33);
    cr_expect(24'h7FFFFE, 8'h11, ""); cr_expect(24'h7FFFFF, 8'h22, ""); cr_expect(24'h7E0000, 8'h33, "");
    cw(24'h002181, 8'h34); cw(24'h002182, 8'h12); cw(24'h002183, 8'h00);
    cr_expect(24'h002180, 8'hA5, "");
    // access rate: a RAM access is answered on the third clock
    cpu(0, 24'h7E0000, 0, q, n);
    checks++; if (n != 3) begin failures++; $display("RAM access took %0d clocks", n); end
    // DMA owns the bus: the CPU's request waits until the DMA is done
    @(negedge clk); dma_busy = 1;
    @(negedge clk); @(negedge clk);
    checks++; if (cpu_rdy) failures++;
    fork
      begin
        logic [7:0] qq; int nn;
        cpu(0, 24'h7F8001, 0, qq, nn);
        checks++; if (qq !== 8'h5A) failures++;
        checks++; if (dma_busy) begin failures++; $display("CPU served during DMA"); end
      end
      begin
        for (int i = 0; i < 4; i++) begin
          @(negedge clk); dma_req = 1; dma_we = 1; dma_addr = 24'h7E0100 + 24'(i); dma_wdata = 8'(8'hC0 + i);
          do @(posedge clk); while (!dma_ack);
          @(negedge clk); dma_req = 0;
        end
        @(negedge clk); dma_busy = 0;
      end
    join
    checks++; if (!cpu_rdy) failures++;
    for (int i = 0; i < 4; i++) cr_expect(24'h7E0100 + 24'(i), 8'(8'hC0 + i), "");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
