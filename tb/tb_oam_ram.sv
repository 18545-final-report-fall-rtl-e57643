// tb_oam_ram: random byte writes and reads on the CPU port and word reads
// on the renderer port, all compared with a 544-byte model kept in the
// testbench. Checks the one-clock read latency of both ports, read-first
// behaviour of port A, and that every byte lane and the high table
// (bytes 512-543, words 128-135) are reached.
module tb_oam_ram;
  logic clk = 0, a_en = 0, a_we = 0;
  logic [9:0] a_addr = 0;
  logic [7:0] a_wdata = 0, a_rdata, b_addr = 0;
  logic [31:0] b_rdata;
  logic [7:0] model [544];
  int checks = 0, failures = 0, hi_hits = 0;
  always #5 clk = ~clk;
  oam_ram dut (.*);

  initial begin
    for (int i = 0; i < 544; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      int a, b; logic [7:0] old; logic [31:0] wexp;
      a = $urandom % 544; b = $urandom % 136;
      a_en = 1; a_we = $urandom % 2; a_addr = 10'(a); a_wdata = 8'($urandom); b_addr = 8'(b);
      old = model[a];
      wexp = {model[4 * b + 3], model[4 * b + 2], model[4 * b + 1], model[4 * b]};
      @(negedge clk);
      if (a_we) model[a] = a_wdata;
      if (b >= 128) hi_hits++;
      checks++; if (a_rdata !== old) begin failures++; if (failures < 10) $display("A %0d = %h expected %h", a, a_rdata, old); end
      checks++; if (b_rdata !== wexp) begin failures++; if (failures < 10) $display("B %0d = %h expected %h", b, b_rdata, wexp); end
    end
    checks++; if (hi_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
