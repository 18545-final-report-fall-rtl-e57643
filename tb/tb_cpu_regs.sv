// tb_cpu_regs: register-level test of the 0x42xx block: multiply and divide
// through the operand registers, NMI flag set at vblank and cleared by
// reading 0x4210, the NMI line gated by 0x4200 bit 7, blank flags in 0x4212,
// the pad auto-read start gated by 0x4200 bit 0, and the pad registers.
module tb_cpu_regs;
  logic clk = 0, rst_n = 0, stb = 0, we = 0, vstb = 0, invb = 0, inhb = 0, pad_busy = 0;
  logic [7:0] addr = 0, wdata = 0, rdata;
  logic [15:0] joy1 = 16'h1234, joy2 = 16'hABCD;
  logic pad_start, nmi_n;
  int checks = 0, failures = 0, starts = 0;
  always #5 clk = ~clk;

  cpu_regs dut (.clk, .rst_n, .stb, .we, .addr, .wdata, .rdata, .vblank_stb(vstb),
    .in_vblank(invb), .in_hblank(inhb), .pad_start, .pad_busy, .joy1, .joy2, .nmi_n);
  always @(posedge clk) if (pad_start) starts++;

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; we = 1; stb = 1; @(negedge clk); stb = 0; we = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    @(negedge clk); addr = a; we = 0; stb = 1; @(negedge clk); stb = 0; d = rdata;
  endtask
  task automatic expect8(input logic [7:0] a, input logic [7:0] want);
    logic [7:0] d;
    rd(a, d);
    checks++; if (d !== want) begin failures++; $display("reg %h = %h, expected %h", a, d, want); end
  endtask
  task automatic vblank();
    @(negedge clk); vstb = 1; @(negedge clk); vstb = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      logic [7:0] a, b, dv; logic [15:0] dd, p, q, r;
      a = 8'($urandom); b = 8'($urandom); dd = 16'($urandom); dv = 8'($urandom % 256);
      wr(8'h02, a); wr(8'h03, b); p = a * b;
      expect8(8'h16, p[7:0]); expect8(8'h17, p[15:8]);
      wr(8'h04, dd[7:0]); wr(8'h05, dd[15:8]); wr(8'h06, dv);
      q = (dv == 0) ? 16'hFFFF : dd / dv; r = (dv == 0) ? dd : dd % dv;
      expect8(8'h14, q[7:0]); expect8(8'h15, q[15:8]);
      expect8(8'h16, r[7:0]); expect8(8'h17, r[15:8]);
    end
    // NMI: flag set at vblank, line low only when enabled, cleared on read
    vblank();
    checks++; if (nmi_n !== 1'b1) failures++;
    checks++; if (starts != 0) failures++;
    wr(8'h00, 8'h81);
    checks++; if (nmi_n !== 1'b0) failures++;
    expect8(8'h10, 8'h82);
    checks++; if (nmi_n !== 1'b1) failures++;
    expect8(8'h10, 8'h02);
    vblank(); @(negedge clk);
    checks++; if (starts != 1) begin failures++; $display("auto-read not started"); end
    checks++; if (nmi_n !== 1'b0) failures++;
    invb = 1; inhb = 0; pad_busy = 1; expect8(8'h12, 8'h81);
    invb = 0; inhb = 1; pad_busy = 0; expect8(8'h12, 8'h40);
    expect8(8'h18, 8'h34); expect8(8'h19, 8'h12); expect8(8'h1A, 8'hCD); expect8(8'h1B, 8'hAB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
