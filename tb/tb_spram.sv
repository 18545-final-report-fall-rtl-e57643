// tb_spram: writes random words, reads them back and checks the one-clock
// read latency and read-before-write behaviour of the block RAM.
module tb_spram;
  logic clk = 0, en, we;
  logic [9:0]  addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [1024];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spram #(.AW(10), .DW(16)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 1024; i++) model[i] = 0;
    // initial contents are zero
    @(negedge clk); en = 1; addr = 10'd77; @(negedge clk);
    checks++; if (rdata !== 16'd0) failures++;
    for (int i = 0; i < 300; i++) begin
      addr = 10'($urandom); wdata = 16'($urandom); we = 1;
      @(negedge clk);
      checks++; if (rdata !== model[addr]) failures++;   // old data returned on write
      model[addr] = wdata;
    end
    we = 0;
    for (int i = 0; i < 1024; i++) begin
      addr = 10'(i); @(negedge clk);
      checks++; if (rdata !== model[i]) begin failures++; $display("addr %0d: %h vs %h", i, rdata, model[i]); end
    end
    // en low holds the output
    en = 0; addr = 10'd5; @(negedge clk);
    checks++; if (rdata !== model[1023]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
