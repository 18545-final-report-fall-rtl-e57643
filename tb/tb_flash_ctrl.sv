// tb_flash_ctrl: the controller in front of the behavioural flash. ROM byte
// reads and sound word reads are issued, often at the same time; checks the
// data, the low/high byte choice, the read length in clocks and that the
// sound port wins a tie.
module tb_flash_ctrl;
  localparam int AW = 22, WAIT = 3;
  logic clk = 0, rst_n = 0;
  logic rom_req = 0, rom_ack, snd_req = 0, snd_ack, ce_n, oe_n;
  logic [AW:0] rom_a = 0;
  logic [AW-1:0] snd_a = 0, faddr;
  logic [7:0] rom_d;
  logic [15:0] snd_d, dq;
  int checks = 0, failures = 0, ties = 0;
  always #20 clk = ~clk;   // 25 MHz

  flash_ctrl #(.FLASH_AW(AW), .WAIT_CYC(WAIT)) dut (.clk, .rst_n, .rom_req, .rom_byte_addr(rom_a),
    .rom_ack, .rom_rdata(rom_d), .snd_req, .snd_addr(snd_a), .snd_ack, .snd_rdata(snd_d),
    .flash_addr(faddr), .flash_dq(dq), .flash_ce_n(ce_n), .flash_oe_n(oe_n));
  flash_model #(.AW(AW), .ACCESS_NS(100)) fm (.addr(faddr), .ce_n, .oe_n, .dq);

  function automatic logic [15:0] w(input logic [AW-1:0] a); return fm.word_at(a); endfunction

  initial begin
    int n;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic both;
      both = (i % 4 == 0);
      @(negedge clk);
      rom_a = (AW+1)'($urandom); rom_req = 1;
      if (both) begin snd_a = AW'($urandom); snd_req = 1; end
      n = 0;
      if (both) begin
        ties++;
        // sound goes first
        while (!snd_ack && !rom_ack) begin @(posedge clk); #1; n++; end
        checks++; if (!snd_ack) begin failures++; $display("ROM won a tie"); end
        checks++; if (snd_d !== w(snd_a)) failures++;
        checks++; if (n != WAIT + 1) begin failures++; $display("sound read took %0d", n); end
        snd_req = 0; n = 0;
      end
      while (!rom_ack) begin @(posedge clk); #1; n++; end
      checks++; if (rom_d !== (rom_a[0] ? w(rom_a[AW:1])[15:8] : w(rom_a[AW:1])[7:0])) begin
        failures++; $display("rom %h -> %h", rom_a, rom_d); end
      checks++; if (n != WAIT + 1) begin failures++; $display("rom read took %0d", n); end
      rom_req = 0;
      @(negedge clk);
    end
    checks++; if (ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
