// pad_model: behavioural game pad. While latch is high it loads the 16
// button states (1 = pressed, bit 15 first); each rising edge of the pad
// clock moves to the next button. The data line is low for a pressed
// button. After 16 bits it reads pressed (low) like the console expects.
module pad_model (
  input  logic        latch,
  input  logic        pclk,
  input  logic [15:0] buttons,
  output logic        data
);
  logic [15:0] sh = '0;
  always @(posedge pclk or posedge latch) begin
    if (latch) sh <= buttons;
    else       sh <= {sh[14:0], 1'b1};
  end
  always_comb data = latch ? ~buttons[15] : ~sh[15];
endmodule
