// Tunnel: the game-flow controller, the collision detection and the VGA
// driver of the game.
//
// Game flow is a three-state machine stepped on the game tick:
//  WELCOME  - welcome screen; when the ship starts flying, play begins.
//  PLAYING  - each tick an unused mine is planted (Mine1 first, at most one
//             per tick) at a random place in the right half of the tunnel,
//             taken from the LFSR; GAME_OVER from the ship ends play.
//  GAMEOVER - shown for GAMEOVER_TICKS ticks, then back to WELCOME.
// Outside PLAYING the missile and the mines are cleared; during GAMEOVER
// the ship's move event is held off so that the game-over screen is seen.
// The tunnel also passes the game tick on to the other objects, and on each
// SCORE event from the ship converts the score to decimal for the display. Collision
// flags come from collision_detect, combined per receiver: the ship gets
// HIT_WALL and HIT_MINE (either mine), the missile gets HIT_WALL and
// HIT_MINE, each mine gets the missile's hit on it. The tunnel being the
// object that detects collisions, drives the VGA monitor and relays the tick
// follows the game description; the three game states, the planting rule and
// the game-over delay are this design's choice.
//
// Interface: clk (pixel clock), rst, tick in; tick_o, game state, planting,
// clear, hit flags out; VGA pins out. All flags are levels, meaningful on
// the tick.
module tunnel
  import flyshoot_pkg::*;
#(
  parameter int unsigned GAMEOVER_TICKS = 2 * TICK_HZ
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  output logic        tick_o,
  // ship
  input  logic        ship_active,
  input  coord_t      ship_x,
  input  coord_t      ship_y,
  input  logic        ship_flying,
  input  logic        ship_exploding,
  input  logic [7:0]  ship_exp_ctr,
  input  logic        game_over,
  input  logic        score_ev,
  input  score_t      score,
  // missile and mines
  input  obj_pos_t    missile,
  input  obj_pos_t    mine1,
  input  logic        mine1_exploding,
  input  logic        mine1_unused,
  input  obj_pos_t    mine2,
  input  logic        mine2_exploding,
  input  logic        mine2_unused,
  input  logic [1:0]  mine2_hits,
  // control out
  output game_state_e game_state,
  output logic        move_enable,
  output logic        clear,
  output logic        plant1,
  output logic        plant2,
  output coord_t      plant_x,
  output coord_t      plant_y,
  output logic        ship_hit_wall,
  output logic        ship_hit_mine,
  output logic        missile_hit_wall,
  output logic        missile_hit_mine,
  output logic        mine1_hit,
  output logic        mine2_hit,
  // VGA
  output rgb_t        vga_rgb,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        vga_blank_n
);
  localparam int CW       = $clog2(GAMEOVER_TICKS + 1);
  localparam int X_SPAN   = MAX_X / 2 - MINE_SIZE;
  localparam int Y_SPAN   = MAX_Y - 2 * WALL_H - MINE_SIZE;

  game_state_e   state_reg, state_next;
  logic [CW-1:0] cnt_reg, cnt_next;
  logic [15:0]   rnd;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state_reg <= G_WELCOME;
      cnt_reg   <= '0;
    end else if (tick) begin
      state_reg <= state_next;
      cnt_reg   <= cnt_next;
    end
  end

  always_comb begin
    state_next = state_reg;
    cnt_next   = cnt_reg;
    unique case (state_reg)
      G_WELCOME: if (ship_flying) state_next = G_PLAYING;
      G_PLAYING: if (game_over) begin
        state_next = G_GAMEOVER;
        cnt_next   = CW'(GAMEOVER_TICKS - 1);
      end
      G_GAMEOVER: begin
        if (cnt_reg == '0) state_next = G_WELCOME;
        else               cnt_next   = cnt_reg - 1'b1;
      end
      default: state_next = G_WELCOME;
    endcase
  end

  lfsr u_lfsr (.clk(clk), .rst(rst), .value(rnd));

  // Random place: x in [MAX_X/2, MAX_X-MINE_SIZE), y inside the tunnel.
  assign plant_x = coord_t'(MAX_X / 2 + ((32'(rnd[7:0]) * X_SPAN) >> 8));
  assign plant_y = coord_t'(WALL_H + ((32'(rnd[15:8]) * Y_SPAN) >> 8));

  assign game_state  = state_reg;
  assign clear       = (state_reg != G_PLAYING);
  assign move_enable = (state_reg != G_GAMEOVER);
  assign plant1      = (state_reg == G_PLAYING) && mine1_unused;
  assign plant2      = (state_reg == G_PLAYING) && !mine1_unused && mine2_unused;
  assign tick_o      = tick;

  obj_pos_t ship_pos;
  logic s_wall, s_m1, s_m2, m_wall, m_m1, m_m2;
  assign ship_pos = '{valid: ship_flying, x: ship_x, y: ship_y};

  collision_detect u_collide (
    .ship(ship_pos), .missile(missile), .mine1(mine1), .mine2(mine2),
    .ship_hit_wall(s_wall), .ship_hit_mine1(s_m1), .ship_hit_mine2(s_m2),
    .missile_hit_wall(m_wall), .missile_hit_mine1(m_m1), .missile_hit_mine2(m_m2)
  );

  assign ship_hit_wall    = s_wall;
  assign ship_hit_mine    = s_m1 | s_m2;
  assign missile_hit_wall = m_wall;
  assign missile_hit_mine = m_m1 | m_m2;
  assign mine1_hit        = m_m1;
  assign mine2_hit        = m_m2;

  // SCORE event: convert the ship's score to decimal for the display
  // (one clock after the event, when the ship's score register holds the
  // new value)
  logic [19:0] score_digits;
  logic        bcd_busy, score_ev_d;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) score_ev_d <= 1'b0;
    else     score_ev_d <= score_ev;
  end
  score_bcd u_score (
    .clk(clk), .rst(rst), .start(score_ev_d), .bin(score),
    .bcd(score_digits), .busy(bcd_busy)
  );

  logic [9:0] px, py;
  logic       video_on, hs, vs, frame_start;

  vga_sync u_vga (
    .clk(clk), .rst(rst), .hsync(hs), .vsync(vs), .video_on(video_on),
    .px(px), .py(py), .frame_start(frame_start)
  );

  renderer u_render (
    .clk(clk), .rst(rst), .px(px), .py(py), .video_on(video_on),
    .hsync(hs), .vsync(vs), .game_state(state_reg),
    .ship_active(ship_active), .ship_x(ship_x), .ship_y(ship_y),
    .ship_exploding(ship_exploding), .ship_exp_ctr(ship_exp_ctr),
    .missile(missile), .mine1(mine1), .mine1_exploding(mine1_exploding),
    .mine2(mine2), .mine2_exploding(mine2_exploding), .mine2_hits(mine2_hits),
    .score_digits(score_digits),
    .rgb(vga_rgb), .hsync_o(vga_hsync), .vsync_o(vga_vsync), .blank_n(vga_blank_n)
  );
endmodule
