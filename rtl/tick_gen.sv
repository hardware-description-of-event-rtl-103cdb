// TIME_TICK generator: divides the pixel clock down to the game tick.
//
// A counter runs from DIV-1 to 0 and emits a one-clock strobe each time it
// wraps, so `tick` is high for one clock every DIV clocks. All game objects
// step their state only on this strobe, instead of using the tick itself as a
// clock as the game's original description does. The default divisor gives
// 60 ticks per second from a 25 MHz pixel clock; the rate is this design's
// choice.
//
// Interface: clk, rst (asynchronous), tick (one clock wide, every DIV clocks;
// the first strobe comes DIV clocks after reset).
module tick_gen #(
  parameter int unsigned DIV = 416_667
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt_reg;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt_reg <= CW'(DIV - 1);
      tick    <= 1'b0;
    end else begin
      tick <= (cnt_reg == '0);
      if (cnt_reg == '0) cnt_reg <= CW'(DIV - 1);
      else               cnt_reg <= cnt_reg - 1'b1;
    end
  end
endmodule
