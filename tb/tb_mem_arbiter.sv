// tb_mem_arbiter: a drawing-side reader asks on random clocks while the CPU
// side writes then reads back. Checks that the drawing side always gets its
// data one clock later, that the CPU side is only granted on free clocks,
// and that every CPU write lands.
module tb_mem_arbiter;
  logic clk = 0, rst_n = 0;
  logic h_req, h_valid, l_req, l_we, l_gnt, l_ack;
  logic [7:0] h_addr, l_addr;
  logic [15:0] h_rdata, l_wdata, l_rdata;
  logic [15:0] model [256];
  int checks = 0, failures = 0, waits = 0;
  always #5 clk = ~clk;

  mem_arbiter #(.AW(8), .DW(16)) dut (.*);

  logic [7:0] h_addr_d; logic h_req_d;
  always_ff @(posedge clk) begin h_addr_d <= h_addr; h_req_d <= h_req; end
  // drawing side check
  always @(negedge clk) if (rst_n && h_req_d) begin
    checks++; if (!h_valid || h_rdata !== model[h_addr_d]) begin failures++; if (failures < 5) $display("%t h %h got %h exp %h", $time, h_addr_d, h_rdata, model[h_addr_d]); end
  end
  always @(negedge clk) if (rst_n && l_req && !l_gnt) waits++;

  // drawing side: random reads of random addresses
  always @(negedge clk) begin h_req <= rst_n && ($urandom % 3 != 0); h_addr <= 8'($urandom); end

  task automatic cpu(input logic w, input logic [7:0] a, input logic [15:0] d, output logic [15:0] q);
    l_req = 1; l_we = w; l_addr = a; l_wdata = d;
    do @(posedge clk); while (!l_gnt);
    if (w) model[a] = d;
    #1 l_req = 0;
    checks++; if (!l_ack) failures++;
    q = l_rdata;
  endtask

  initial begin
    logic [15:0] q;
    l_req = 0; l_we = 0; l_addr = 0; l_wdata = 0; h_req = 0; h_addr = 0;
    for (int i = 0; i < 256; i++) model[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      cpu(1, 8'(i), 16'(i * 37 + 5), q);
    end
    for (int i = 0; i < 256; i++) begin
      cpu(0, 8'(i), 16'h0, q);
      checks++; if (q !== model[i]) failures++;
    end
    checks++; if (waits == 0) begin failures++; $display("CPU side was never made to wait"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
