// tb_ctrl_reader: two behavioural pads with random buttons; checks the
// latch length, the 16 clock pulses per read, their period, and that both
// button words come back exactly.
module tb_ctrl_reader;
  localparam int LATCH = 12, HALF = 6;
  logic clk = 0, rst_n = 0, start = 0;
  logic pad_latch, pad_clk, d1, d2, busy, done;
  logic [15:0] joy1, joy2, b1, b2;
  int checks = 0, failures = 0, pulses = 0, latch_len = 0, busy_len = 0;
  always #5 clk = ~clk;

  ctrl_reader #(.LATCH_CYC(LATCH), .HALF_CYC(HALF)) dut (
    .clk, .rst_n, .start, .pad_latch, .pad_clk, .pad1_data(d1), .pad2_data(d2),
    .joy1, .joy2, .busy, .done);
  pad_model p1 (.latch(pad_latch), .pclk(pad_clk), .buttons(b1), .data(d1));
  pad_model p2 (.latch(pad_latch), .pclk(pad_clk), .buttons(b2), .data(d2));

  always @(posedge pad_clk) pulses++;
  always @(posedge clk) begin if (pad_latch) latch_len++; if (busy) busy_len++; end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      b1 = (r == 0) ? 16'h8001 : 16'($urandom); b2 = (r == 1) ? 16'hFFFF : 16'($urandom);
      pulses = 0; latch_len = 0; busy_len = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      @(posedge done);
      checks++; if (joy1 !== b1 || joy2 !== b2) begin failures++; $display("got %h %h want %h %h", joy1, joy2, b1, b2); end
      checks++; if (pulses != 15 && pulses != 16) begin failures++; $display("pulses %0d", pulses); end
      checks++; if (latch_len != LATCH) begin failures++; $display("latch %0d", latch_len); end
      // read length: latch + 16 full clock periods
      @(negedge clk);
      checks++; if (busy_len != LATCH + 32 * HALF) begin failures++; $display("cycles %0d", busy_len); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
