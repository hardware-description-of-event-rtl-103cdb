// Testbench of tunnel: the game-flow states (welcome, playing, game over and
// its length), mine planting rules and the range of the random places,
// clear and move_enable, the score conversion on SCORE, routing of the collision flags to their receivers,
// the tick relay and the VGA sync timing through the tunnel.
module tb_tunnel;
  import flyshoot_pkg::*;
  localparam int GO = 5;
  logic clk = 0, rst = 1, tick = 0, tick_o;
  logic ship_active = 0, ship_flying = 0, ship_exploding = 0, game_over = 0;
  coord_t ship_x = 0, ship_y = 200;
  logic [7:0] ship_exp_ctr = 0;
  obj_pos_t missile = '0, mine1 = '0, mine2 = '0;
  logic mine1_exploding = 0, mine1_unused = 1, mine2_exploding = 0, mine2_unused = 1;
  logic [1:0] mine2_hits = 0;
  logic score_ev = 0;
  score_t score = 0;
  game_state_e game_state;
  logic move_enable, clear, plant1, plant2;
  coord_t plant_x, plant_y;
  logic ship_hit_wall, ship_hit_mine, missile_hit_wall, missile_hit_mine, mine1_hit, mine2_hit;
  rgb_t vga_rgb;
  logic vga_hsync, vga_vsync, vga_blank_n;
  int checks = 0, failures = 0;

  tunnel #(.GAMEOVER_TICKS(GO)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step();
    @(negedge clk); tick = 1; #1;
    check(tick_o, "tick relayed");
    @(negedge clk); tick = 0; #1;
    check(!tick_o, "tick relay low");
  endtask

  int hs_fall, cyc, nx_distinct;
  coord_t first_x;
  initial begin
    // sync timing: first hsync fall 656 pixels + 1 register after reset
    @(negedge clk); rst = 0;
    cyc = 0; hs_fall = -1;
    while (hs_fall < 0 && cyc < 2000) begin
      @(negedge clk); cyc++;
      if (!vga_hsync) hs_fall = cyc;
    end
    check(hs_fall == 657, $sformatf("first hsync low at clock %0d", hs_fall));

    check(game_state == G_WELCOME && clear && move_enable && !plant1 && !plant2, "welcome");
    repeat (2) step();
    check(game_state == G_WELCOME, "waits for take-off");
    ship_active = 1; ship_flying = 1; step();
    check(game_state == G_PLAYING && !clear, "take-off -> playing");
    check(plant1 && !plant2, "Mine1 planted first");
    mine1_unused = 0; #1;
    check(!plant1 && plant2, "then Mine2");
    mine2_unused = 0; #1;
    check(!plant1 && !plant2, "no planting when both in use");
    // random places in range, and varying
    first_x = plant_x; nx_distinct = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(plant_x >= MAX_X / 2 && int'(plant_x) + MINE_SIZE <= MAX_X, $sformatf("plant_x %0d", plant_x));
      check(plant_y >= WALL_H && int'(plant_y) + MINE_SIZE <= MAX_Y - WALL_H, $sformatf("plant_y %0d", plant_y));
      if (plant_x != first_x) nx_distinct++;
    end
    check(nx_distinct > 2000, "places vary");
    // collision routing
    ship_y = 100; mine1 = '{1'b1, 10'd20, 10'd110}; #1;
    check(ship_hit_mine && !ship_hit_wall && !mine1_hit, "ship hits mine1");
    ship_flying = 0; #1;
    check(!ship_hit_mine, "parked ship collides with nothing");
    ship_flying = 1; ship_y = 20; mine1 = '0; #1;
    check(ship_hit_wall && !ship_hit_mine, "ship in top wall");
    ship_y = 200;
    missile = '{1'b1, 10'd400, 10'd300}; mine2 = '{1'b1, 10'd405, 10'd295}; #1;
    check(missile_hit_mine && mine2_hit && !mine1_hit && !missile_hit_wall && !ship_hit_mine,
          "missile hits mine2");
    mine1 = '{1'b1, 10'd402, 10'd290}; mine2 = '0; #1;
    check(missile_hit_mine && mine1_hit && !mine2_hit, "missile hits mine1");
    missile = '{1'b1, 10'd400, 10'd460}; mine1 = '0; #1;
    check(missile_hit_wall && !missile_hit_mine, "missile in bottom wall");
    // SCORE event converts the score for the display
    // (the ship's score register takes the new value on the event's edge)
    score = 16'd999; @(negedge clk); score_ev = 1; @(negedge clk); score_ev = 0;
    score = 16'd12345;
    repeat (20) @(negedge clk);
    check(dut.score_digits == 20'h12345, $sformatf("score digits %h", dut.score_digits));
    // game over
    ship_flying = 0; game_over = 1; step(); game_over = 0;
    check(game_state == G_GAMEOVER && clear && !move_enable, "game over screen");
    mine1_unused = 1; #1;
    check(!plant1, "no planting after game over");
    for (int i = 1; i < GO; i++) step();
    check(game_state == G_GAMEOVER, "game over held GO ticks");
    step();
    check(game_state == G_WELCOME && move_enable, "back to welcome");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
