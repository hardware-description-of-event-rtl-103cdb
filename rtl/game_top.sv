// GameTop of the Fly-n-Shoot game: a ship flies through a scrolling tunnel,
// steered up and down by the player, and shoots its single missile at two
// kinds of mines. The game is a set of communicating state machines (Tunnel,
// Ship, Missile, Mine1, Mine2) that exchange events as signals.
//
// This module makes the game tick (TIME_TICK, 60 per second) from the pixel
// clock, turns the board pushbuttons (KEY0 up, KEY1 down, KEY2 shoot) and an
// NES pad into the player events, and wires the objects together:
//   PLAYER_SHIP_MOVE = up or down held (held off by the tunnel on the
//                      game-over screen)
//   PLAYER_FIRE      = shoot pressed (rising edge, seen on a tick)
//   ship -> missile  : MISSILE_FIRE and the ship position
//   mine -> missile -> ship : mine destroyed, with its score (20 or 50)
//   ship -> tunnel   : SCORE (shown on screen), GAME_OVER, position, state
//   tunnel -> all    : tick, hit events, mine planting, clear
// Every register steps on the one pixel clock, gated by the tick strobe. The
// reset is held while the PLL is not locked and released synchronously.
// The objects and their events follow the game description; the tick rate,
// the input mapping details and the reset scheme are this design's choice.
// The PLL that makes the 25 MHz pixel clock from the board clock is vendor IP
// and sits outside this module: its clock and lock signal are inputs.
//
// Interface: clk_pix (25 MHz), pll_locked, key_n[2:0] (active low),
// NES pad pins, 24-bit VGA with syncs, blank, sync_n and clock, the score.
module game_top
  import flyshoot_pkg::*;
#(
  parameter int unsigned TICK_DIV           = 416_667, // 25 MHz / 60 Hz
  parameter int unsigned NES_HALF           = 150,     // 6 us at 25 MHz
  parameter int unsigned EXPLODE_TICKS      = 2 * TICK_HZ,
  parameter int unsigned GAMEOVER_TICKS     = 2 * TICK_HZ,
  parameter int unsigned MINE_EXPLODE_TICKS = 15
) (
  input  logic        clk_pix,
  input  logic        pll_locked,
  input  logic [2:0]  key_n,
  input  logic        nes_data,
  output logic        nes_latch,
  output logic        nes_clk,
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic        vga_clk,
  output score_t      score,
  output logic [1:0]  game_state
);
  // ---------------- reset: asynchronous assert, synchronous release
  logic [1:0] rst_sync_reg;
  logic       rst;
  always_ff @(posedge clk_pix or negedge pll_locked) begin
    if (!pll_locked) rst_sync_reg <= 2'b11;
    else             rst_sync_reg <= {rst_sync_reg[0], 1'b0};
  end
  assign rst = rst_sync_reg[1];

  // ---------------- game tick
  logic tick_raw, tick;
  tick_gen #(.DIV(TICK_DIV)) u_tick (.clk(clk_pix), .rst(rst), .tick(tick_raw));

  // ---------------- player input
  logic [2:0] key_pressed;
  logic       nes_up, nes_down, nes_fire, nes_valid;
  logic [7:0] nes_buttons;
  button_sync #(.N(3)) u_keys (.clk(clk_pix), .rst(rst), .key_n(key_n), .pressed(key_pressed));
  nes_controller #(.HALF(NES_HALF)) u_nes (
    .clk(clk_pix), .rst(rst), .poll(tick_raw), .nes_data(nes_data),
    .nes_latch(nes_latch), .nes_clk(nes_clk), .buttons(nes_buttons), .valid(nes_valid),
    .up(nes_up), .down(nes_down), .fire(nes_fire)
  );

  logic btn_up, btn_down, btn_fire, fire_prev_reg;
  assign btn_up   = key_pressed[0] | nes_up;
  assign btn_down = key_pressed[1] | nes_down;
  assign btn_fire = key_pressed[2] | nes_fire;
  always_ff @(posedge clk_pix or posedge rst) begin
    if (rst)       fire_prev_reg <= 1'b0;
    else if (tick) fire_prev_reg <= btn_fire;
  end

  // ---------------- objects
  coord_t      ship_x, ship_y;
  logic        ship_active, ship_flying, ship_exploding, explosion_ship;
  logic [7:0]  ship_exp_ctr;
  logic        score_ev, missile_fire, game_over;
  logic        destroyed_mine;
  score_inc_t  score_inc_val;
  obj_pos_t    missile_pos, mine1_pos, mine2_pos;
  logic        mine1_exploding, mine2_exploding, mine1_unused, mine2_unused;
  logic [1:0]  mine1_hits, mine2_hits;
  logic        mine1_destroyed, mine2_destroyed;
  score_inc_t  mine1_score, mine2_score;
  game_state_e gstate;
  logic        move_enable, clear, plant1, plant2;
  coord_t      plant_x, plant_y;
  logic        ship_hit_wall, ship_hit_mine, missile_hit_wall, missile_hit_mine;
  logic        mine1_hit, mine2_hit;
  rgb_t        rgb;

  tunnel #(.GAMEOVER_TICKS(GAMEOVER_TICKS)) u_tunnel (
    .clk(clk_pix), .rst(rst), .tick(tick_raw), .tick_o(tick),
    .ship_active(ship_active), .ship_x(ship_x), .ship_y(ship_y),
    .ship_flying(ship_flying), .ship_exploding(ship_exploding),
    .ship_exp_ctr(ship_exp_ctr), .game_over(game_over),
    .score_ev(score_ev), .score(score),
    .missile(missile_pos),
    .mine1(mine1_pos), .mine1_exploding(mine1_exploding), .mine1_unused(mine1_unused),
    .mine2(mine2_pos), .mine2_exploding(mine2_exploding), .mine2_unused(mine2_unused),
    .mine2_hits(mine2_hits),
    .game_state(gstate), .move_enable(move_enable), .clear(clear),
    .plant1(plant1), .plant2(plant2), .plant_x(plant_x), .plant_y(plant_y),
    .ship_hit_wall(ship_hit_wall), .ship_hit_mine(ship_hit_mine),
    .missile_hit_wall(missile_hit_wall), .missile_hit_mine(missile_hit_mine),
    .mine1_hit(mine1_hit), .mine2_hit(mine2_hit),
    .vga_rgb(rgb), .vga_hsync(vga_hs), .vga_vsync(vga_vs), .vga_blank_n(vga_blank_n)
  );

  ship #(.EXPLODE_TICKS(EXPLODE_TICKS)) u_ship (
    .clk(clk_pix), .rst(rst), .tick(tick),
    .btn_up(btn_up), .btn_down(btn_down),
    .player_ship_move(move_enable && (btn_up || btn_down)),
    .player_fire(btn_fire && !fire_prev_reg),
    .destroyed_mine(destroyed_mine), .score_inc_val(score_inc_val),
    .hit_mine(ship_hit_mine), .hit_wall(ship_hit_wall),
    .x(ship_x), .y(ship_y), .active(ship_active), .ship_flying(ship_flying),
    .exploding(ship_exploding), .exp_ctr(ship_exp_ctr), .score(score),
    .score_ev(score_ev), .missile_fire(missile_fire),
    .explosion_ship(explosion_ship), .game_over(game_over)
  );

  missile u_missile (
    .clk(clk_pix), .rst(rst), .tick(tick), .clear(clear), .fire(missile_fire),
    .ship_x(ship_x), .ship_y(ship_y),
    .hit_wall(missile_hit_wall), .hit_mine(missile_hit_mine),
    .mine_destroyed(mine1_destroyed | mine2_destroyed),
    .mine_score(mine1_destroyed ? mine1_score : mine2_score),
    .pos(missile_pos), .destroyed_mine(destroyed_mine), .score_inc_val(score_inc_val)
  );

  mine #(.HITS(1), .SCORE(MINE1_SCORE), .EXPLODE_TICKS(MINE_EXPLODE_TICKS)) u_mine1 (
    .clk(clk_pix), .rst(rst), .tick(tick), .clear(clear),
    .plant(plant1), .plant_x(plant_x), .plant_y(plant_y), .hit(mine1_hit),
    .pos(mine1_pos), .exploding(mine1_exploding), .unused(mine1_unused),
    .hit_count(mine1_hits), .destroyed(mine1_destroyed), .score_val(mine1_score)
  );

  mine #(.HITS(MINE2_HITS), .SCORE(MINE2_SCORE), .EXPLODE_TICKS(MINE_EXPLODE_TICKS)) u_mine2 (
    .clk(clk_pix), .rst(rst), .tick(tick), .clear(clear),
    .plant(plant2), .plant_x(plant_x), .plant_y(plant_y), .hit(mine2_hit),
    .pos(mine2_pos), .exploding(mine2_exploding), .unused(mine2_unused),
    .hit_count(mine2_hits), .destroyed(mine2_destroyed), .score_val(mine2_score)
  );

  assign vga_r      = rgb.r;
  assign vga_g      = rgb.g;
  assign vga_b      = rgb.b;
  assign vga_sync_n = 1'b0;      // no sync-on-green
  assign vga_clk    = clk_pix;
  assign game_state = gstate;
endmodule
