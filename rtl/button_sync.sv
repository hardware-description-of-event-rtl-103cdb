// Synchronizer for the board's active-low pushbuttons (KEY0 up, KEY1 down,
// KEY2 shoot).
//
// Each button passes through two flip-flops to remove metastability and is
// inverted, so the outputs are active high, two clocks after the pin changes.
// The key assignment follows the game description; the synchronizer itself is
// this design's choice. No debouncing is done: the game samples the buttons
// only once per game tick (1/60 s), longer than typical contact bounce.
//
// Interface: clk, rst (asynchronous; outputs read "released"), key_n (pins),
// pressed (synchronized, active high).
module button_sync #(
  parameter int N = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] key_n,
  output logic [N-1:0] pressed
);
  logic [N-1:0] s1_reg, s2_reg;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      s1_reg <= '1;
      s2_reg <= '1;
    end else begin
      s1_reg <= key_n;
      s2_reg <= s1_reg;
    end
  end

  assign pressed = ~s2_reg;
endmodule
