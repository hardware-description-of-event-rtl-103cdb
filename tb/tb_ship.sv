// Testbench of ship: walks the hierarchical state machine through take-off,
// steering to both screen limits, the score period of 31 ticks, firing,
// a destroyed mine, a hit and the explosion of exactly EXPLODE_TICKS ticks,
// and checks positions, score and the event pulses against values worked
// out by hand from the rules.
module tb_ship;
  import flyshoot_pkg::*;
  localparam int EXPL = 10;
  localparam int Y_HOME = (MAX_Y - SHIP_HEIGHT) / 2;

  logic clk = 0, rst = 1, tick = 0;
  logic btn_up = 0, btn_down = 0, player_ship_move = 0, player_fire = 0;
  logic destroyed_mine = 0, hit_mine = 0, hit_wall = 0;
  score_inc_t score_inc_val = 0;
  coord_t x, y;
  logic active, ship_flying, exploding, explosion_ship;
  logic [7:0] exp_ctr;
  score_t score;
  logic score_ev, missile_fire, game_over;
  int checks = 0, failures = 0;
  int n_score_ev, n_fire, n_over;

  ship #(.EXPLODE_TICKS(EXPL)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one game tick; event pulses seen during it are counted
  task automatic step();
    @(negedge clk); tick = 1;
    #1;
    n_score_ev += int'(score_ev);
    n_fire     += int'(missile_fire);
    n_over     += int'(game_over);
    @(negedge clk); tick = 0;
    #1;
    if (score_ev || missile_fire || game_over) begin
      failures++; $display("FAIL: event outside tick");
    end
  endtask

  task automatic clear_counts();
    n_score_ev = 0; n_fire = 0; n_over = 0;
  endtask

  int exp_y;
  initial begin
    clear_counts();
    repeat (2) @(negedge clk);
    rst = 0;
    check(!active && y == Y_HOME && x == 0 && score == 0, "reset state");
    repeat (3) step();
    check(!active, "stays inactive without move");
    player_fire = 1; step(); player_fire = 0;
    check(n_fire == 0, "no fire while inactive");
    // take-off
    player_ship_move = 1; step();
    check(active && !ship_flying, "move -> ACTIVE, Parked");
    clear_counts();
    step(); player_ship_move = 0;
    check(ship_flying && score == 0 && n_score_ev == 1, "second move -> Flying, SCORE event");
    // steer down to the limit
    exp_y = Y_HOME; btn_down = 1;
    for (int i = 0; i < 80; i++) begin
      step();
      if (exp_y + SHIP_HEIGHT - 1 < MAX_Y - 1 - SHIP_DELTA_V) exp_y += SHIP_DELTA_V;
      if (i < 3) check(y == exp_y, $sformatf("down step %0d y=%0d", i, y));
    end
    btn_down = 0;
    check(y == exp_y && y == 460, $sformatf("lower limit y=%0d", y));
    btn_up = 1;
    for (int i = 0; i < 150; i++) begin
      step();
      if (exp_y > SHIP_DELTA_V) exp_y -= SHIP_DELTA_V;
    end
    btn_up = 0;
    check(y == exp_y && y == 4, $sformatf("upper limit y=%0d", y));
    // 80 + 150 = 230 ticks flown -> 230/31 = 7 points
    check(score == 7, $sformatf("score after 230 ticks = %0d", score));
    // exact period: run to the next point
    clear_counts();
    for (int i = 0; i < 248 - 230; i++) step(); // to tick 248 (8th point)
    check(score == 8 && n_score_ev == 1, $sformatf("8th point at tick 248: %0d", score));
    repeat (30) step();
    check(score == 8, "no point before 31 ticks");
    step();
    check(score == 9, "9th point at 31 ticks");
    // fire
    clear_counts();
    player_fire = 1; step(); player_fire = 0;
    check(n_fire == 1, "MISSILE_FIRE event");
    // destroyed mine (20 points)
    destroyed_mine = 1; score_inc_val = 8'd20; step(); destroyed_mine = 0;
    check(score == 29, $sformatf("score after mine = %0d", score));
    destroyed_mine = 1; score_inc_val = 8'd50; step(); destroyed_mine = 0;
    check(score == 79, $sformatf("score after mine2 = %0d", score));
    // hit the wall
    clear_counts();
    hit_wall = 1; step(); hit_wall = 0;
    check(exploding && !ship_flying, "hit -> Exploding");
    #1; check(explosion_ship, "EXPLOSION_SHIP shown");
    player_fire = 1; step(); player_fire = 0;
    check(n_fire == 0, "no fire while exploding");
    for (int i = 2; i < EXPL; i++) step();
    check(exploding && n_over == 0, "still exploding before EXPLODE_TICKS");
    step();
    check(!active && !exploding && n_over == 1, "GAME_OVER after EXPLODE_TICKS ticks");
    check(score == 79, "score kept after game over");
    // new game via hit_mine
    player_ship_move = 1; step(); step(); player_ship_move = 0;
    check(ship_flying && score == 0 && y == Y_HOME, "restart clears score and position");
    hit_mine = 1; step(); hit_mine = 0;
    check(exploding, "mine hit -> Exploding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
