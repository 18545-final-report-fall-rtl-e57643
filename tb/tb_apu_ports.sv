// tb_apu_ports: CPU writes to the four ports must appear on to_apu only for
// the addressed port; CPU reads must return from_apu of the addressed port,
// not what the CPU wrote.
module tb_apu_ports;
  logic clk = 0, rst_n = 0, stb = 0, we = 0;
  logic [1:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [3:0][7:0] to_apu, from_apu, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  apu_ports dut (.clk, .rst_n, .stb, .we, .addr, .wdata, .rdata, .to_apu, .from_apu);

  initial begin
    model = '0; from_apu = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      from_apu = {$urandom, $urandom} ;
      addr = 2'($urandom); we = 1'($urandom); wdata = 8'($urandom); stb = 1;
      @(negedge clk); stb = 0;
      if (we) model[addr] = wdata;
      checks++; if (to_apu !== model) begin failures++; $display("to_apu %h vs %h", to_apu, model); end
      if (!we) begin checks++; if (rdata !== from_apu[addr]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
