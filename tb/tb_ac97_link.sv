// tb_ac97_link: a behavioural codec receiver samples SYNC and SDATA_OUT on
// falling bit-clock edges and rebuilds each 256-bit frame. Samples are
// handed over from a separate system clock. Checks the frame length, the
// SYNC width, the tag, the register-write commands in turn, and that the
// PCM slots carry the latest sample on both channels.
module tb_ac97_link;
  logic bit_clk = 0, sclk = 0, rst_n = 0;
  logic [15:0] sample = 0;
  logic tgl = 0, sync, sdo, creset_n, fstb;
  int checks = 0, failures = 0, frames = 0, sync_len = 0, bits = -1;
  logic [255:0] fr;
  logic sync_q = 0;
  logic [6:0] exp_reg [4] = '{7'h02, 7'h04, 7'h18, 7'h2C};
  int cmd_i = -1;
  always #40.69 bit_clk = ~bit_clk;   // 12.288 MHz
  always #19.86 sclk = ~sclk;         // 25.175 MHz

  ac97_link dut (.bit_clk, .rst_n, .sample, .sample_tgl(tgl), .sync, .sdata_out(sdo),
                 .codec_reset_n(creset_n), .frame_stb(fstb));

  // new sample every 600 system clocks (a little slower than the frame rate)
  logic [15:0] prev = 0, s0, s1;
  initial forever begin
    repeat (600) @(posedge sclk);
    prev <= sample; sample <= 16'($urandom); @(posedge sclk); tgl <= ~tgl;
  end
  always @(posedge bit_clk) if (fstb) begin s0 = sample; s1 = prev; end

  always @(negedge bit_clk) if (rst_n) begin
    if (sync) sync_len++;
    if (bits >= 0) begin fr[255 - bits] = sdo; bits++; end
    if (bits == 256) begin
      frames++;
      checks++; if (fr[255:240] !== 16'hF800) begin failures++; $display("tag %h", fr[255:240]); end
      if (cmd_i < 0) for (int k = 0; k < 4; k++) if (fr[238:232] == exp_reg[k]) cmd_i = k;
      checks++; if (fr[239] !== 1'b0 || fr[238:232] !== exp_reg[cmd_i]) begin failures++; $display("cmd %h", fr[239:220]); end
      cmd_i = (cmd_i + 1) % 4;
      checks++; if (fr[199:180] !== fr[179:160] || fr[183:180] !== 0) failures++;
      // the PCM value is a sample the system side produced recently
      if (frames > 2) begin
        checks++; if (fr[199:184] !== s0 && fr[199:184] !== s1) begin failures++; $display("pcm %h", fr[199:184]); end
      end
      bits = 0;
    end
    if (sync && !sync_q) begin
      if (bits < 0) bits = 0;
    end
    if (!sync && sync_q) begin
      checks++; if (sync_len != 16) begin failures++; $display("sync %0d", sync_len); end
      sync_len = 0;
    end
    sync_q = sync;
  end

  initial begin
    #200 rst_n = 1;
    wait (frames == 30);
    checks++; if (!creset_n) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
