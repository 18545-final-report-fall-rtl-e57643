// tb_dma_ctrl: the DMA/HDMA engine against a behavioural bus that answers
// after a random delay. The A-bus is a memory whose bytes are a function of
// the address unless written; B-bus writes (0x0021xx) are logged. Covers
// transfer modes 0/1/4, increment/fixed/decrement A address, B-to-A
// direction, two channels in one start (lowest first), an HDMA table with a
// plain entry, a repeat entry and the end marker, and an HDMA step cutting
// into a running DMA, which must then finish with nothing lost.
module tb_dma_ctrl;
  logic clk = 0, rst_n = 0, stb = 0, we = 0, hinit = 0, hline = 0;
  logic [15:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic m_req, m_we, m_ack = 0, busy, dstb, hstb;
  logic [23:0] m_addr;
  logic [7:0] m_wdata, m_rdata = 0;
  int checks = 0, failures = 0, dma_bytes = 0, hdma_bytes = 0;
  logic [7:0] amem [logic [23:0]];
  logic [31:0] blog [$];      // {addr[15:0], 8'h0, data}
  logic [23:0] alog [$];      // A-bus write addresses
  always #5 clk = ~clk;

  dma_ctrl dut (.clk, .rst_n, .stb, .we, .addr, .wdata, .rdata, .hdma_init(hinit), .hdma_line(hline),
    .m_req, .m_we, .m_addr, .m_wdata, .m_ack, .m_rdata, .busy, .dma_byte_stb(dstb), .hdma_byte_stb(hstb));
  always @(posedge clk) if (rst_n) begin if (dstb) dma_bytes++; if (hstb) hdma_bytes++; end

  function automatic logic [7:0] abyte(input logic [23:0] a);
    if (amem.exists(a)) return amem[a];
    return a[7:0] ^ a[15:8] ^ 8'h5A;
  endfunction

  // bus slave: answers a held request after 1-3 clocks
  initial forever begin
    @(posedge clk);
    if (m_req && !m_ack) begin
      repeat ($urandom % 3) @(posedge clk);
      if (m_we) begin
        if (m_addr[23:8] == 16'h0021) blog.push_back({m_addr[15:0], 8'h00, m_wdata});
        else begin amem[m_addr] = m_wdata; alog.push_back(m_addr); end
      end else m_rdata <= (m_addr[23:8] == 16'h0021) ? ~m_addr[7:0] : abyte(m_addr);
      m_ack <= 1; @(posedge clk); m_ack <= 0;
    end
  end

  task automatic wr(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; we = 1; stb = 1; @(negedge clk); stb = 0; we = 0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk); addr = a; we = 0; stb = 1; @(negedge clk); stb = 0; d = rdata;
  endtask
  task automatic setup(input int ch, input logic [7:0] dmap, bbad, input logic [23:0] a, input logic [15:0] n);
    logic [15:0] base; base = 16'h4300 | 16'(ch << 4);
    wr(base + 0, dmap); wr(base + 1, bbad);
    wr(base + 2, a[7:0]); wr(base + 3, a[15:8]); wr(base + 4, a[23:16]);
    wr(base + 5, n[7:0]); wr(base + 6, n[15:8]);
  endtask
  task automatic expect_b(input logic [15:0] ba, input logic [7:0] d);
    logic [31:0] e;
    checks++;
    if (blog.size() == 0) begin failures++; $display("missing B write %h", ba); return; end
    e = blog.pop_front();
    if (e[31:16] !== ba || e[7:0] !== d) begin failures++; $display("B write %h=%h, expected %h=%h", e[31:16], e[7:0], ba, d); end
  endtask
  task automatic wait_idle(); do @(negedge clk); while (busy); endtask
  task automatic expect_reg(input logic [15:0] a, input logic [7:0] want);
    logic [7:0] d; rd(a, d);
    checks++; if (d !== want) begin failures++; $display("reg %h = %h, expected %h", a, d, want); end
  endtask

  initial begin
    int t0;
    repeat (2) @(posedge clk); rst_n = 1;
    // 1. mode 1, incrementing, 10 bytes to 0x2118/0x2119
    setup(0, 8'h01, 8'h18, 24'h123400, 16'd10);
    wr(16'h420B, 8'h01); wait_idle();
    for (int i = 0; i < 10; i++) expect_b(16'h2118 + 16'(i % 2), abyte(24'h123400 + 24'(i)));
    expect_reg(16'h4302, 8'h0A); expect_reg(16'h4305, 8'h00);
    checks++; if (dma_bytes != 10) begin failures++; $display("dma bytes %0d", dma_bytes); end
    // 2. mode 0, fixed address, 5 bytes
    setup(1, 8'h08, 8'h22, 24'h7E0042, 16'd5);
    wr(16'h420B, 8'h02); wait_idle();
    for (int i = 0; i < 5; i++) expect_b(16'h2122, abyte(24'h7E0042));
    // 3. mode 4, decrementing, 8 bytes
    setup(2, 8'h14, 8'h40, 24'h008010, 16'd8);
    wr(16'h420B, 8'h04); wait_idle();
    for (int i = 0; i < 8; i++) expect_b(16'h2140 + 16'(i % 4), abyte(24'h008010 - 24'(i)));
    // 4. B to A, mode 0, 4 bytes from 0x2139 into 0x7F0100..
    setup(3, 8'h80, 8'h39, 24'h7F0100, 16'd4);
    wr(16'h420B, 8'h08); wait_idle();
    for (int i = 0; i < 4; i++) begin
      checks++; if (abyte(24'h7F0100 + 24'(i)) !== ~8'h39) begin failures++; $display("B to A %0d", i); end
    end
    // 5. two channels together: channel 5 before channel 6
    setup(6, 8'h00, 8'h80, 24'h010000, 16'd2);
    setup(5, 8'h00, 8'h81, 24'h020000, 16'd2);
    wr(16'h420B, 8'h60); wait_idle();
    expect_b(16'h2181, abyte(24'h020000)); expect_b(16'h2181, abyte(24'h020001));
    expect_b(16'h2180, abyte(24'h010000)); expect_b(16'h2180, abyte(24'h010001));
    // 6. HDMA table at 7E:1000: 2 lines with one write, 1 repeat line, end
    amem[24'h7E1000] = 8'h02; amem[24'h7E1001] = 8'hA1;
    amem[24'h7E1002] = 8'h81; amem[24'h7E1003] = 8'hB2; amem[24'h7E1004] = 8'h00;
    setup(7, 8'h00, 8'h26, 24'h7E1000, 16'd0);
    wr(16'h420C, 8'h80);
    @(negedge clk); hinit = 1; @(negedge clk); hinit = 0; wait_idle();
    checks++; if (blog.size() != 0) begin failures++; $display("HDMA init wrote"); end
    for (int l = 0; l < 5; l++) begin
      @(negedge clk); hline = 1; @(negedge clk); hline = 0; wait_idle();
      if (l == 0) expect_b(16'h2126, 8'hA1);
      else if (l == 2) expect_b(16'h2126, 8'hB2);
      checks++; if (blog.size() != 0) begin failures++; $display("extra HDMA write on line %0d", l); blog.delete(); end
    end
    expect_reg(16'h4378, 8'h05);   // table address past the end marker
    // 7. HDMA line step during a 40-byte DMA: HDMA goes first, DMA completes
    @(negedge clk); hinit = 1; @(negedge clk); hinit = 0; wait_idle();
    setup(0, 8'h00, 8'h04, 24'h050000, 16'd40);
    dma_bytes = 0;
    wr(16'h420B, 8'h01);
    wait (dma_bytes == 6); @(negedge clk); hline = 1; @(negedge clk); hline = 0;
    wait_idle();
    begin
      int hpos; hpos = -1;
      foreach (blog[i]) if (blog[i][31:16] == 16'h2126) hpos = i;
      checks++; if (hpos < 6 || hpos > 8) begin failures++; $display("HDMA write at position %0d", hpos); end
      if (hpos >= 0) blog.delete(hpos);
      for (int i = 0; i < 40; i++) expect_b(16'h2104, abyte(24'h050000 + 24'(i)));
    end
    checks++; if (hdma_bytes != 3) begin failures++; $display("hdma bytes %0d", hdma_bytes); end
    // 8. cost: each byte is one read and one write on the bus
    setup(0, 8'h00, 8'h04, 24'h050000, 16'd16);
    wr(16'h420B, 8'h01); t0 = $time;
    wait_idle();
    checks++; if (($time - t0) / 10 < 16 * 4) begin failures++; $display("too fast: %0d", ($time - t0) / 10); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
