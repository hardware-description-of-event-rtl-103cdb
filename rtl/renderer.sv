// Pixel generator of the tunnel's VGA driver.
//
// For the pixel (px, py) that the VGA timing generator is sending, it
// decides the colour from the objects, front to back: ship (flashing red and
// yellow while it explodes), missile, Mine1, Mine2 (its colour changes after
// the first hit), exploding mines (flashing), the score, the tunnel walls,
// and the background, whose colour shows the game state: blue on the welcome screen,
// black while playing, dark red after game over. Outside the visible area the
// colour is black. Colour and syncs are registered together, so the VGA
// outputs lag the timing generator by one pixel clock and stay aligned with
// each other. The score is five decimal digits in the top wall, drawn as
// seven-segment figures: digit k occupies the 10x18-pixel box at
// x = 8 + 16k, y = 7, with 2-pixel-thick segments. That the tunnel draws all objects on a VGA monitor comes from
// the game description; the sprites (plain rectangles) and colours are this
// design's choice.
//
// Interface: clk (pixel clock), rst, timing in (px, py, video_on, hsync,
// vsync), object state in; rgb, hsync_o, vsync_o, blank_n out.
module renderer
  import flyshoot_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [9:0]  px,
  input  logic [9:0]  py,
  input  logic        video_on,
  input  logic        hsync,
  input  logic        vsync,
  input  game_state_e game_state,
  input  logic        ship_active,
  input  coord_t      ship_x,
  input  coord_t      ship_y,
  input  logic        ship_exploding,
  input  logic [7:0]  ship_exp_ctr,
  input  obj_pos_t    missile,
  input  obj_pos_t    mine1,
  input  logic        mine1_exploding,
  input  obj_pos_t    mine2,
  input  logic        mine2_exploding,
  input  logic [1:0]  mine2_hits,
  input  logic [19:0] score_digits,
  output rgb_t        rgb,
  output logic        hsync_o,
  output logic        vsync_o,
  output logic        blank_n
);
  localparam rgb_t C_BLACK   = 24'h000000;
  localparam rgb_t C_WELCOME = 24'h000060;
  localparam rgb_t C_OVER    = 24'h400000;
  localparam rgb_t C_WALL    = 24'h00A000;
  localparam rgb_t C_SHIP    = 24'hFFFFFF;
  localparam rgb_t C_RED     = 24'hFF0000;
  localparam rgb_t C_YELLOW  = 24'hFFFF00;
  localparam rgb_t C_MISSILE = 24'hFF8000;
  localparam rgb_t C_MINE1   = 24'hFF00FF;
  localparam rgb_t C_MINE2   = 24'h00FFFF;
  localparam rgb_t C_MINE2H  = 24'h0080FF;
  localparam rgb_t C_SCORE   = 24'hFFFFFF;

  // score digit boxes
  localparam int DIG_X0 = 8, DIG_Y0 = 7, DIG_PITCH = 16;
  localparam int DIG_W = 10, DIG_H = 18, SEG_T = 2;

  // segments {g,f,e,d,c,b,a} lit for a decimal digit
  function automatic logic [6:0] seg_of(input logic [3:0] d);
    unique case (d)
      4'd0: return 7'b0111111;
      4'd1: return 7'b0000110;
      4'd2: return 7'b1011011;
      4'd3: return 7'b1001111;
      4'd4: return 7'b1100110;
      4'd5: return 7'b1101101;
      4'd6: return 7'b1111101;
      4'd7: return 7'b0000111;
      4'd8: return 7'b1111111;
      4'd9: return 7'b1101111;
      default: return 7'b1000000;
    endcase
  endfunction

  // segments that cover pixel (dx, dy) of a digit box
  function automatic logic [6:0] seg_at(input int dx, input int dy);
    logic [6:0] s;
    s[0] = dy < SEG_T;                                     // a
    s[1] = dx >= DIG_W - SEG_T && dy <= DIG_H / 2;         // b
    s[2] = dx >= DIG_W - SEG_T && dy >= DIG_H / 2 - 1;     // c
    s[3] = dy >= DIG_H - SEG_T;                            // d
    s[4] = dx < SEG_T && dy >= DIG_H / 2 - 1;              // e
    s[5] = dx < SEG_T && dy <= DIG_H / 2;                  // f
    s[6] = dy >= DIG_H / 2 - 1 && dy <= DIG_H / 2;         // g
    return s;
  endfunction

  function automatic logic in_rect(input logic [9:0] x, input logic [9:0] y,
                                  input coord_t ox, input coord_t oy,
                                  input int w, input int h);
    return (int'(x) >= int'(ox)) && (int'(x) < int'(ox) + w) &&
           (int'(y) >= int'(oy)) && (int'(y) < int'(oy) + h);
  endfunction

  rgb_t c;
  logic in_ship, in_missile, in_mine1, in_mine2, in_wall, in_score;
  int   sx, sy;
  logic [2:0] didx;
  logic [3:0] dval;

  always_comb begin
    in_ship    = ship_active && in_rect(px, py, ship_x, ship_y, SHIP_WIDTH, SHIP_HEIGHT);
    in_missile = missile.valid && in_rect(px, py, missile.x, missile.y, MISSILE_WIDTH, MISSILE_HEIGHT);
    in_mine1   = (mine1.valid || mine1_exploding) &&
                 in_rect(px, py, mine1.x, mine1.y, MINE_SIZE, MINE_SIZE);
    in_mine2   = (mine2.valid || mine2_exploding) &&
                 in_rect(px, py, mine2.x, mine2.y, MINE_SIZE, MINE_SIZE);
    in_wall    = (int'(py) < WALL_H) || (int'(py) >= MAX_Y - WALL_H);
    sx         = int'(px) - DIG_X0;
    sy         = int'(py) - DIG_Y0;
    didx       = 3'(sx / DIG_PITCH);
    unique case (didx)
      3'd0:    dval = score_digits[19:16];
      3'd1:    dval = score_digits[15:12];
      3'd2:    dval = score_digits[11:8];
      3'd3:    dval = score_digits[7:4];
      default: dval = score_digits[3:0];
    endcase
    in_score   = (sx >= 0) && (sx < 5 * DIG_PITCH) && (sy >= 0) && (sy < DIG_H) &&
                 ((sx % DIG_PITCH) < DIG_W) &&
                 ((seg_at(sx % DIG_PITCH, sy) & seg_of(dval)) != '0);

    unique case (game_state)
      G_WELCOME:  c = C_WELCOME;
      G_GAMEOVER: c = C_OVER;
      default:    c = C_BLACK;
    endcase
    if (in_wall) c = C_WALL;
    if (in_score) c = C_SCORE;
    if (in_mine2) begin
      if (mine2_exploding)        c = px[2] ^ py[2] ? C_YELLOW : C_RED;
      else if (mine2_hits != '0)  c = C_MINE2H;
      else                        c = C_MINE2;
    end
    if (in_mine1) c = mine1_exploding ? (px[2] ^ py[2] ? C_YELLOW : C_RED) : C_MINE1;
    if (in_missile) c = C_MISSILE;
    if (in_ship) c = ship_exploding ? (ship_exp_ctr[2] ? C_YELLOW : C_RED) : C_SHIP;
    if (!video_on) c = C_BLACK;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rgb     <= C_BLACK;
      hsync_o <= 1'b1;
      vsync_o <= 1'b1;
      blank_n <= 1'b0;
    end else begin
      rgb     <= c;
      hsync_o <= hsync;
      vsync_o <= vsync;
      blank_n <= video_on;
    end
  end
endmodule
