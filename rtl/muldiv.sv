// muldiv: the CPU-side unsigned multiplier and divider.
//
// An 8x8 multiply (multiplicand A, multiplier B) and a 16/8 divide (dividend,
// divisor). Both are purely combinational, so the result registers follow the
// operand registers immediately, the way the register block was built with
// continuous assignments. The console shares one result register between the
// product and the remainder: `last_div` selects which of the two is shown.
// Division by zero returns quotient 0xFFFF and the dividend as remainder,
// this design's choice matching the console.
module muldiv (
  input  logic [7:0]  mpy_a,      // WRMPYA
  input  logic [7:0]  mpy_b,      // WRMPYB
  input  logic [15:0] dividend,   // WRDIVL/H
  input  logic [7:0]  divisor,    // WRDIVB
  input  logic        last_div,   // 1: last operation started was a divide
  output logic [15:0] rdmpy,      // product or remainder
  output logic [15:0] rddiv       // quotient
);
  logic [15:0] prod, quot, rem;

  always_comb begin
    prod = 16'(mpy_a) * 16'(mpy_b);
    if (divisor == 8'd0) begin
      quot = 16'hFFFF;
      rem  = dividend;
    end else begin
      quot = dividend / 16'(divisor);
      rem  = dividend % 16'(divisor);
    end
    rdmpy = last_div ? rem : prod;
    rddiv = quot;
  end
endmodule
