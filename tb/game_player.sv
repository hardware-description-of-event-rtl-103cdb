// Scripted player and checker for the whole game, shared by the end-to-end
// testbenches. With SHORT set it plays one game: take-off, shoot a mine,
// fly into the top wall, game over, welcome screen. Otherwise two games: the first with the board keys (shoots
// Mine1 and Mine2, lets a mine scroll past, fires a missile that leaves the
// screen, then flies into the top wall), the second with the NES pad (takes
// off, shoots a mine, then flies into a mine). Between the games it holds
// Up during the game-over screen to check that take-off is blocked.
// It checks the tick period, the explosion and game-over lengths, the score
// against a tally kept here (one point per 31 ticks flown, 20 per Mine1,
// 50 per Mine2) and its decimal digits on screen, the ship's pixels on the VGA output and the line and frame
// periods, and counts each mechanism; one that never happened is a failure.
module game_player
  import flyshoot_pkg::*;
#(
  parameter int unsigned TICK_DIV       = 64,
  parameter int unsigned EXPLODE_TICKS  = 20,
  parameter int unsigned GAMEOVER_TICKS = 10,
  parameter longint      MAX_CLOCKS     = 64'd20_000_000,
  parameter bit          SHORT          = 1'b0   // one short game only
) (
  input  logic        clk,
  output logic        pll_locked,
  output logic [2:0]  key_n,
  output logic        nes_data,
  input  logic        nes_latch,
  input  logic        nes_clk,
  // observed inside the design
  input  logic        tick,
  input  logic        ship_active,
  input  logic        ship_flying,
  input  logic        ship_exploding,
  input  coord_t      ship_y,
  input  logic        ship_hit_wall,
  input  logic        ship_hit_mine,
  input  obj_pos_t    missile,
  input  obj_pos_t    mine1,
  input  obj_pos_t    mine2,
  input  logic        mine1_exploding,
  input  logic        mine2_exploding,
  input  logic [1:0]  mine2_hits,
  input  logic        mine1_destroyed,
  input  logic        mine2_destroyed,
  input  logic [9:0]  px,
  input  logic [9:0]  py,
  input  logic        video_on,
  // design outputs
  input  logic [1:0]  game_state,
  input  score_t      score,
  input  logic [19:0] score_digits,
  input  logic [7:0]  vga_r,
  input  logic [7:0]  vga_g,
  input  logic [7:0]  vga_b,
  input  logic        vga_hs,
  input  logic        vga_vs
);
  typedef enum int {M_IDLE, M_TAKEOFF, M_HUNT, M_AVOID, M_CRASH_WALL, M_CRASH_MINE, M_HOLD_UP} mode_e;

  int checks = 0, failures = 0;
  mode_e mode = M_IDLE;
  bit    use_nes = 0;
  logic  up_cmd = 0, down_cmd = 0, fire_cmd = 0;
  logic [7:0] pad;

  nes_pad_model u_pad (.buttons(pad), .latch(nes_latch), .clk(nes_clk), .data(nes_data));

  always_comb begin
    pad   = use_nes ? {2'b00, down_cmd, up_cmd, 3'b000, fire_cmd} : 8'h00;
    key_n = use_nes ? 3'b111 : ~{fire_cmd, down_cmd, up_cmd};
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters and tallies
  int n_takeoff = 0, n_nes_takeoff = 0, n_points = 0, n_launch = 0, n_offscreen = 0;
  int n_mine1_destroyed = 0, n_mine2_first_hit = 0, n_mine2_destroyed = 0;
  int n_scrolled_off = 0, n_wall_crash = 0, n_mine_crash = 0, n_gameover = 0;
  int n_blocked = 0, n_ship_pixels = 0, n_plant = 0;
  int flown = 0, mine_pts = 0, tick_no = 0, hit_tick = -1, go_tick = -1;
  longint cyc = 0, last_tick_cyc = -1;

  logic [1:0] gs_prev = 0;
  obj_pos_t   m1_prev = '0, m2_prev = '0, mis_prev = '0;
  logic [1:0] m2h_prev = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tick && pll_locked) begin
      if (last_tick_cyc >= 0)
        check(cyc - last_tick_cyc == TICK_DIV, $sformatf("tick period %0d", cyc - last_tick_cyc));
      last_tick_cyc <= cyc;
      tick_no <= tick_no + 1;
      // state seen before this tick's update
      if (ship_flying) begin
        flown = flown + 1;
        if (flown % 31 == 0) n_points++;
        if (mine1_destroyed) mine_pts = mine_pts + 20;
        if (mine2_destroyed) mine_pts = mine_pts + 50;
        if (ship_hit_wall) begin n_wall_crash++; hit_tick = tick_no; end
        else if (ship_hit_mine) begin n_mine_crash++; hit_tick = tick_no; end
      end
      if (mine1_destroyed) n_mine1_destroyed++;
      if (mine2_destroyed) n_mine2_destroyed++;
      if (m2h_prev == 0 && mine2_hits == 1 && m2_prev.valid) n_mine2_first_hit++;
      if ((m1_prev.valid && !mine1.valid && !mine1_exploding && m1_prev.x < 4) ||
          (m2_prev.valid && !mine2.valid && !mine2_exploding && m2_prev.x < 4)) n_scrolled_off++;
      if ((!m1_prev.valid && mine1.valid) || (!m2_prev.valid && mine2.valid)) n_plant++;
      if (!mis_prev.valid && missile.valid) n_launch++;
      if (mis_prev.valid && !missile.valid && mis_prev.x > 600) n_offscreen++;
      m1_prev  <= mine1; m2_prev <= mine2; mis_prev <= missile; m2h_prev <= mine2_hits;
      // game-flow transitions (values from the previous tick)
      if (gs_prev == G_WELCOME && game_state == G_PLAYING) begin
        n_takeoff++;
        if (use_nes) n_nes_takeoff++;
      end
      if (gs_prev == G_PLAYING && game_state == G_GAMEOVER) begin
        n_gameover++;
        go_tick = tick_no - 1;
        check(go_tick - hit_tick == EXPLODE_TICKS,
              $sformatf("explosion lasted %0d ticks", go_tick - hit_tick));
        check(score == score_t'(flown / 31 + mine_pts),
              $sformatf("score %0d expected %0d", score, flown / 31 + mine_pts));
        check(score_digits == {4'(score / 10000), 4'((score / 1000) % 10), 4'((score / 100) % 10),
                               4'((score / 10) % 10), 4'(score % 10)},
              $sformatf("score on screen %h for %0d", score_digits, score));
      end
      if (gs_prev == G_GAMEOVER && game_state == G_WELCOME)
        check(tick_no - 1 - go_tick == GAMEOVER_TICKS,
              $sformatf("game-over screen %0d ticks", tick_no - 1 - go_tick));
      if (game_state == G_GAMEOVER && up_cmd && !ship_active) n_blocked++;
      if (game_state == G_GAMEOVER) check(!ship_active, "no take-off on game-over screen");
      gs_prev <= game_state;
      if (gs_prev == G_WELCOME && game_state == G_PLAYING) begin
        flown = 0; mine_pts = 0;
      end
    end
  end

  // ---------------- the ship's pixels on the VGA output (one clock later)
  logic [9:0] px_d, py_d;
  logic       von_d, ship_d;
  coord_t     sy_d;
  always @(posedge clk) begin
    if (pll_locked && von_d && ship_d &&
        int'(px_d) < SHIP_WIDTH && py_d >= sy_d && int'(py_d) < int'(sy_d) + SHIP_HEIGHT) begin
      n_ship_pixels++;
      if ({vga_r, vga_g, vga_b} != 24'hFFFFFF) begin
        failures++; checks++;
        $display("FAIL: ship pixel %0d,%0d colour %h", px_d, py_d, {vga_r, vga_g, vga_b});
      end
    end
    px_d <= px; py_d <= py; von_d <= video_on; sy_d <= ship_y;
    ship_d <= ship_active && !ship_exploding;
  end

  // ---------------- VGA line and frame periods
  logic hs_p = 1, vs_p = 1;
  longint hs_last = -1, vs_last = -1;
  int n_lines = 0, n_frames = 0;
  always @(posedge clk) begin
    if (pll_locked) begin
      if (hs_p && !vga_hs) begin
        if (hs_last >= 0 && n_lines < 2000) begin
          checks++;
          if (cyc - hs_last != 800) begin failures++; $display("FAIL line %0d", cyc - hs_last); end
        end
        hs_last <= cyc; n_lines++;
      end
      if (vs_p && !vga_vs) begin
        if (vs_last >= 0) begin
          checks++;
          if (cyc - vs_last != 800 * 525) begin failures++; $display("FAIL frame %0d", cyc - vs_last); end
        end
        vs_last <= cyc; n_frames++;
      end
    end
    hs_p <= vga_hs; vs_p <= vga_vs;
  end

  // ---------------- the player's hands, set right after each tick
  function automatic int hunt_target(output bit ok, output int my);
    ok = 0; my = 0;
    if (mine1.valid && mine1.x > 160) begin ok = 1; my = int'(mine1.y); end
    else if (mine2.valid && mine2.x > 160) begin ok = 1; my = int'(mine2.y); end
    return my + 1;
  endfunction

  function automatic bit row_free(int y);
    // no mine in the missile's row
    int my = y + SHIP_HEIGHT / 2 - MISSILE_HEIGHT / 2;
    if (mine1.valid && my + MISSILE_HEIGHT > int'(mine1.y) && my < int'(mine1.y) + MINE_SIZE) return 0;
    if (mine2.valid && my + MISSILE_HEIGHT > int'(mine2.y) && my < int'(mine2.y) + MINE_SIZE) return 0;
    return 1;
  endfunction

  // a mine close to the ship and near its rows: dodge it
  function automatic bit near_row(obj_pos_t m);
    return m.valid && m.x < 160 &&
           int'(m.y) + MINE_SIZE + 12 > int'(ship_y) && int'(m.y) < int'(ship_y) + SHIP_HEIGHT + 12;
  endfunction

  function automatic bit danger();
    return near_row(mine1) || near_row(mine2);
  endfunction

  function automatic int avoid_target();
    int best = 240, bestd = -1;
    for (int c = 40; c <= 420; c += 20) begin
      int d = 1000;
      if (mine1.valid) d = (c > int'(mine1.y)) ? c - int'(mine1.y) : int'(mine1.y) - c;
      if (mine2.valid) begin
        int d2 = (c > int'(mine2.y)) ? c - int'(mine2.y) : int'(mine2.y) - c;
        if (d2 < d) d = d2;
      end
      if (d > bestd) begin bestd = d; best = c; end
    end
    return best;
  endfunction

  bit   want_offscreen = 0;
  int   tgt, my;
  bit   ok;
  always @(posedge clk) begin
    if (tick && pll_locked) begin
      logic u, d, f;
      u = 0; d = 0; f = 0;
      unique case (mode)
        M_TAKEOFF, M_HOLD_UP: u = 1;
        M_CRASH_WALL: u = 1;
        M_HUNT: begin
          tgt = hunt_target(ok, my);
          if (!ok) tgt = 240;
          if (danger()) begin tgt = avoid_target(); ok = 0; end
          if (tgt > int'(ship_y) + 3) d = 1;
          else if (tgt + 3 < int'(ship_y)) u = 1;
          if (ok && !missile.valid && !fire_cmd &&
              int'(ship_y) + 7 >= my && int'(ship_y) + 7 <= my + 14) f = 1;
        end
        M_AVOID: begin
          tgt = avoid_target();
          if (tgt > int'(ship_y) + 3) d = 1;
          else if (tgt + 3 < int'(ship_y)) u = 1;
          if (want_offscreen && !missile.valid && !fire_cmd && row_free(int'(ship_y))) f = 1;
        end
        M_CRASH_MINE: begin
          if (mine1.valid) tgt = int'(mine1.y);
          else if (mine2.valid) tgt = int'(mine2.y);
          else tgt = 240;
          if (tgt > int'(ship_y) + 3) d = 1;
          else if (tgt + 3 < int'(ship_y)) u = 1;
        end
        default: ;
      endcase
      up_cmd <= u; down_cmd <= d; fire_cmd <= f;
    end
  end

  // ---------------- the script
  task automatic wait_ticks(input int n);
    repeat (n) @(posedge clk iff tick);
  endtask

  initial begin
    pll_locked = 0;
    repeat (10) @(negedge clk);
    pll_locked = 1;
    wait_ticks(3);
    check(game_state == G_WELCOME && !ship_active, "welcome screen after reset");
    // game 1, board keys
    mode = M_TAKEOFF;
    wait (game_state == G_PLAYING);
    check(ship_flying, "ship flying after take-off");
    mode = M_HUNT;
    if (SHORT) begin
      wait (n_mine1_destroyed + n_mine2_destroyed >= 1 && flown >= 40);
      mode = M_CRASH_WALL;
      wait (game_state == G_GAMEOVER);
      mode = M_IDLE;
      wait (game_state == G_WELCOME);
      wait_ticks(2);
      finish_up();
    end
    wait (n_mine1_destroyed >= 1 && n_mine2_destroyed >= 1 && flown >= 40);
    mode = M_AVOID; want_offscreen = 1;
    wait (n_offscreen >= 1);
    want_offscreen = 0;
    wait (n_scrolled_off >= 1);
    check(n_wall_crash == 0 && n_mine_crash == 0, "no crash before the planned one");
    mode = M_CRASH_WALL;
    wait (game_state == G_GAMEOVER);
    mode = M_HOLD_UP;                // must not take off on this screen
    wait (game_state == G_WELCOME);
    mode = M_IDLE;
    wait_ticks(2);
    check(!ship_flying, "no flight straight from the game-over screen");
    // game 2, NES pad
    use_nes = 1;
    mode = M_TAKEOFF;
    wait (game_state == G_PLAYING);
    mode = M_HUNT;
    wait (n_mine1_destroyed + n_mine2_destroyed >= 3);
    mode = M_CRASH_MINE;
    wait (game_state == G_GAMEOVER);
    mode = M_IDLE;
    wait (game_state == G_WELCOME);
    wait_ticks(2);
    finish_up();
  end

  task automatic need(input int n, input string what);
    $display("INFO %-28s %0d", what, n);
    check(n > 0, $sformatf("mechanism never happened: %s", what));
  endtask

  task automatic finish_up();
    need(n_takeoff, "take-offs");
    if (!SHORT) need(n_nes_takeoff, "take-offs with NES pad");
    need(n_points, "31-tick points");
    need(n_plant, "mines planted");
    need(n_launch, "missile launches");
    need(n_mine1_destroyed + n_mine2_destroyed, "mines destroyed");
    need(n_wall_crash, "ship hit wall");
    need(n_gameover, "game overs");
    if (!SHORT) begin
      need(n_offscreen, "missile left screen");
      need(n_mine1_destroyed, "Mine1 destroyed");
      need(n_mine2_first_hit, "Mine2 first hit survived");
      need(n_mine2_destroyed, "Mine2 destroyed");
      need(n_scrolled_off, "mine scrolled off");
      need(n_mine_crash, "ship hit mine");
      need(n_blocked, "take-off blocked");
    end
    need(n_ship_pixels, "ship pixels checked");
    need(n_frames, "VGA frames");
    check(n_gameover == (SHORT ? 1 : 2), "all games played");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    wait (cyc >= MAX_CLOCKS);
    failures++;
    $display("FAIL: watchdog, mode %0d", mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
