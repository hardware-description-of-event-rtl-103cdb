// Behavioural model of an NES game pad (CD4021 shift register) for
// testbenches: LATCH high loads the eight buttons (bit 0 = A), DATA shows
// the current bit inverted (active low), each rising CLK edge shifts the next
// button out; after the eighth bit DATA reads low (as a real pad does).
module nes_pad_model (
  input  logic [7:0] buttons,
  input  logic       latch,
  input  logic       clk,
  output logic       data
);
  logic [7:0] sr = 8'h00;
  always @(posedge clk or posedge latch) begin
    if (latch) sr <= buttons;
    else       sr <= {1'b1, sr[7:1]};
  end
  always_comb data = latch ? !buttons[0] : !sr[0];
endmodule
