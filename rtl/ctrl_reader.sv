// ctrl_reader: reads two SNES game pads over their serial interface.
//
// On `start` it raises the latch line for LATCH_CYC clocks, then sends 16
// clock pulses (low for HALF_CYC, high for HALF_CYC). A pad drives its data
// line low for each pressed button, one button per pulse, so a bit is sampled
// on each falling edge of the pad clock and inverted. The first bit sampled
// becomes bit 15 (button B), the last bit 0; the result is presented as
// joy1/joy2 with a 1 for a pressed button, and `done` pulses for one clock.
// `busy` is high for the whole read. Pulse widths (12 us latch, 6 us half
// period) are this design's choice; the 16-pulse latch/clock scheme and the
// active-low data are the pad's protocol.
module ctrl_reader #(
  parameter int unsigned LATCH_CYC = 302,  // 12 us at 25.175 MHz
  parameter int unsigned HALF_CYC  = 151   // 6 us
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        pad_latch,
  output logic        pad_clk,
  input  logic        pad1_data,   // active low
  input  logic        pad2_data,
  output logic [15:0] joy1,
  output logic [15:0] joy2,
  output logic        busy,
  output logic        done
);
  typedef enum logic [1:0] {S_IDLE, S_LATCH, S_LOW, S_HIGH} state_e;
  state_e      st;
  logic [15:0] cnt;
  logic [4:0]  bitn;
  logic [15:0] sh1, sh2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; bitn <= '0; sh1 <= '0; sh2 <= '0;
      joy1 <= '0; joy2 <= '0; pad_latch <= 1'b0; pad_clk <= 1'b1; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_LATCH; cnt <= 16'(LATCH_CYC - 1); pad_latch <= 1'b1; bitn <= '0;
        end
        S_LATCH: if (cnt == 0) begin
          pad_latch <= 1'b0; pad_clk <= 1'b0; st <= S_LOW; cnt <= 16'(HALF_CYC - 1);
          sh1 <= {sh1[14:0], ~pad1_data}; sh2 <= {sh2[14:0], ~pad2_data};   // bit 0 (B)
        end else cnt <= cnt - 1'b1;
        S_LOW: if (cnt == 0) begin
          pad_clk <= 1'b1; st <= S_HIGH; cnt <= 16'(HALF_CYC - 1);
        end else cnt <= cnt - 1'b1;
        S_HIGH: if (cnt == 0) begin
          if (bitn == 5'd15) begin
            st <= S_IDLE; joy1 <= sh1; joy2 <= sh2; done <= 1'b1;
          end else begin
            pad_clk <= 1'b0; st <= S_LOW; cnt <= 16'(HALF_CYC - 1); bitn <= bitn + 1'b1;
            sh1 <= {sh1[14:0], ~pad1_data}; sh2 <= {sh2[14:0], ~pad2_data};
          end
        end else cnt <= cnt - 1'b1;
      endcase
    end
  end
  assign busy = (st != S_IDLE);
endmodule
