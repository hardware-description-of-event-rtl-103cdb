// Free-running 16-bit Fibonacci LFSR used to plant mines at random places.
//
// Taps 16, 14, 13, 11 (x^16 + x^14 + x^13 + x^11 + 1) give the maximal
// period of 65535 states. It advances every clock, so the value sampled on a
// game tick depends on how many clocks have passed, which the player's
// timing varies. The mines' random placement follows the game description;
// the generator type and width are this design's choice.
//
// Interface: clk, rst (asynchronous, loads SEED), value (current state).
module lfsr #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst,
  output logic [15:0] value
);
  logic [15:0] state_reg;
  logic        fb;

  assign fb = state_reg[15] ^ state_reg[13] ^ state_reg[12] ^ state_reg[10];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state_reg <= (SEED == 16'h0) ? 16'h0001 : SEED;
    else     state_reg <= {state_reg[14:0], fb};
  end

  assign value = state_reg;
endmodule
