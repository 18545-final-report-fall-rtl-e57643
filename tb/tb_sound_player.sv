// tb_sound_player: the player reading a short loop through the flash
// controller from the behavioural flash. Checks the sample period in clocks,
// every sample value against the flash contents, the wrap back to the
// first sample, and that each new sample flips the toggle.
module tb_sound_player;
  localparam int AW = 22, BASE = 'h1000, LEN = 37, DIV = 50;
  logic clk = 0, rst_n = 0;
  logic snd_req, snd_ack, ce_n, oe_n, tgl, wrapped;
  logic [AW-1:0] snd_a, faddr;
  logic [15:0] snd_d, dq, sample;
  int checks = 0, failures = 0, n = 0, wraps = 0, last_t = -1;
  logic tgl_q = 0;
  always #20 clk = ~clk;

  sound_player #(.FLASH_AW(AW), .SOUND_BASE(BASE), .SOUND_LEN(LEN), .SAMPLE_DIV(DIV)) dut (
    .clk, .rst_n, .enable(1'b1), .snd_req, .snd_addr(snd_a), .snd_ack, .snd_rdata(snd_d),
    .sample, .sample_tgl(tgl), .wrapped);
  flash_ctrl #(.FLASH_AW(AW), .WAIT_CYC(3)) fc (.clk, .rst_n, .rom_req(1'b0), .rom_byte_addr('0),
    .rom_ack(), .rom_rdata(), .snd_req, .snd_addr(snd_a), .snd_ack, .snd_rdata(snd_d),
    .flash_addr(faddr), .flash_dq(dq), .flash_ce_n(ce_n), .flash_oe_n(oe_n));
  flash_model #(.AW(AW), .ACCESS_NS(100)) fm (.addr(faddr), .ce_n, .oe_n, .dq);

  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n) begin
    if (wrapped) wraps++;
    if (tgl != tgl_q) begin
      checks++; if (sample !== fm.word_at(AW'(BASE + (n % LEN)))) begin
        failures++; $display("sample %0d = %h", n, sample); end
      if (last_t >= 0) begin
        checks++; if (cyc - last_t != DIV) begin failures++; $display("period %0d", cyc - last_t); end
      end
      last_t = cyc; n++;
    end
    tgl_q = tgl;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    wait (n == 3 * LEN + 5);
    checks++; if (wraps != 3) begin failures++; $display("wraps %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
