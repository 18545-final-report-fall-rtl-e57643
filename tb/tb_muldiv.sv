// tb_muldiv: checks the multiplier and divider against reference arithmetic
// on corner values and random operands.
module tb_muldiv;
  logic [7:0]  a, b, dv;
  logic [15:0] dd, rdmpy, rddiv;
  logic        last_div;
  int checks = 0, failures = 0;

  muldiv dut (.mpy_a(a), .mpy_b(b), .dividend(dd), .divisor(dv), .last_div, .rdmpy, .rddiv);

  task automatic check(input logic [7:0] ta, tb_, tdv, input logic [15:0] tdd);
    logic [15:0] q, r;
    a = ta; b = tb_; dd = tdd; dv = tdv;
    last_div = 1'b0; #1;
    checks++; if (rdmpy != ta * tb_) begin failures++; $display("mul %0d*%0d=%0d", ta, tb_, rdmpy); end
    q = (tdv == 0) ? 16'hFFFF : tdd / tdv;
    r = (tdv == 0) ? tdd : tdd % tdv;
    last_div = 1'b1; #1;
    checks++; if (rddiv != q || rdmpy != r) begin failures++; $display("div %0d/%0d=%0d r%0d", tdd, tdv, rddiv, rdmpy); end
  endtask

  initial begin
    check(8'd0, 8'd0, 8'd1, 16'd0);
    check(8'hFF, 8'hFF, 8'hFF, 16'hFFFF);
    check(8'd12, 8'd13, 8'd0, 16'd1234);
    check(8'd200, 8'd3, 8'd7, 16'd50000);
    for (int i = 0; i < 500; i++) check(8'($urandom), 8'($urandom), 8'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
