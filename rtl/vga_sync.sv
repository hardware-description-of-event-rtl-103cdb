// VGA timing generator for 640x480 at 60 Hz (25 MHz pixel clock).
//
// A horizontal counter runs over 800 pixel clocks per line (640 visible,
// 16 front porch, 96 sync, 48 back porch) and a vertical counter over 525
// lines per frame (480 visible, 10 front porch, 2 sync, 33 back porch). Sync
// pulses are active low. Outputs come straight from the counter registers:
// px/py are the coordinates of the pixel being sent in this clock, video_on
// is high inside the visible area, frame_start is high for the first pixel
// of a frame. That the game drives a VGA monitor comes from its description;
// the mode and the timing numbers are the standard VGA mode chosen here.
//
// Interface: clk (pixel clock), rst (asynchronous), hsync, vsync, video_on,
// px, py, frame_start.
module vga_sync #(
  parameter int H_VISIBLE = 640,
  parameter int H_FRONT   = 16,
  parameter int H_SYNC    = 96,
  parameter int H_BACK    = 48,
  parameter int V_VISIBLE = 480,
  parameter int V_FRONT   = 10,
  parameter int V_SYNC    = 2,
  parameter int V_BACK    = 33
) (
  input  logic       clk,
  input  logic       rst,
  output logic       hsync,
  output logic       vsync,
  output logic       video_on,
  output logic [9:0] px,
  output logic [9:0] py,
  output logic       frame_start
);
  localparam int H_TOTAL = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;
  localparam int V_TOTAL = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;

  logic [9:0] h_reg, v_reg;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      h_reg <= '0;
      v_reg <= '0;
    end else if (h_reg == 10'(H_TOTAL - 1)) begin
      h_reg <= '0;
      v_reg <= (v_reg == 10'(V_TOTAL - 1)) ? '0 : v_reg + 1'b1;
    end else begin
      h_reg <= h_reg + 1'b1;
    end
  end

  assign hsync = !((h_reg >= 10'(H_VISIBLE + H_FRONT)) &&
                   (h_reg <  10'(H_VISIBLE + H_FRONT + H_SYNC)));
  assign vsync = !((v_reg >= 10'(V_VISIBLE + V_FRONT)) &&
                   (v_reg <  10'(V_VISIBLE + V_FRONT + V_SYNC)));
  assign video_on    = (h_reg < 10'(H_VISIBLE)) && (v_reg < 10'(V_VISIBLE));
  assign px          = h_reg;
  assign py          = v_reg;
  assign frame_start = (h_reg == '0) && (v_reg == '0);
endmodule
