// Tick-counting one-shot timer (the ship's two-second explosion timer).
//
// A start pulse, taken on a game tick, loads TICKS-1; each later tick counts
// down. When the count reaches zero and the timer was started, `up` is high
// and stays high until the next start. So `up` is first seen on the tick
// TICKS ticks after the start tick: a state that waits on `up` lasts exactly
// TICKS ticks. The two-second delay comes from the game description; counting
// game ticks (60 per second, so 120 ticks) is this design's choice.
//
// Interface: clk, rst (asynchronous, active high), tick (one-clock game tick
// strobe), start (sampled only with tick), up (level).
module timer #(
  parameter int unsigned TICKS = 120
) (
  input  logic clk,
  input  logic rst,
  input  logic tick,
  input  logic start,
  output logic up
);
  localparam int CW = $clog2(TICKS + 1);
  logic [CW-1:0] cnt_reg;
  logic          armed_reg;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt_reg   <= '0;
      armed_reg <= 1'b0;
    end else if (tick) begin
      if (start) begin
        cnt_reg   <= CW'(TICKS - 1);
        armed_reg <= 1'b1;
      end else if (cnt_reg != '0) begin
        cnt_reg <= cnt_reg - 1'b1;
      end
    end
  end

  assign up = armed_reg && (cnt_reg == '0);
endmodule
