// flash_model: behavioural asynchronous 16-bit flash. Word w holds a value
// computed from its address (see word_at), so large images need no file.
// Data appears ACCESS_NS after the address with chip and output enable low,
// and reads as 0xDEAD before that, so a controller that samples too early
// sees wrong data.
module flash_model #(
  parameter int unsigned AW = 22,
  parameter int unsigned ACCESS_NS = 70
) (
  input  logic [AW-1:0] addr,
  input  logic          ce_n,
  input  logic          oe_n,
  output logic [15:0]   dq
);
  function automatic logic [15:0] word_at(input logic [AW-1:0] a);
    return 16'(a * 16'h9E37) ^ 16'(a >> 7);
  endfunction
  logic [15:0] val = 16'hDEAD;
  always @(addr or ce_n or oe_n) begin
    val = 16'hDEAD;
    if (!ce_n && !oe_n) val <= #(ACCESS_NS) word_at(addr);
  end
  assign dq = val;
endmodule
