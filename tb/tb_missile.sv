// Testbench of missile: launch point, speed, the number of ticks to leave the
// screen, ignoring fire while in flight, stopping on wall and mine hits,
// clear, and passing a destroyed mine's score on to the ship.
module tb_missile;
  import flyshoot_pkg::*;
  logic clk = 0, rst = 1, tick = 0, clear = 0, fire = 0;
  coord_t ship_x = 0, ship_y = 100;
  logic hit_wall = 0, hit_mine = 0, mine_destroyed = 0, destroyed_mine;
  score_inc_t mine_score = 0, score_inc_val;
  obj_pos_t pos;
  int checks = 0, failures = 0;

  missile dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step();
    @(negedge clk); tick = 1;
    @(negedge clk); tick = 0;
  endtask

  int ex, n;
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    check(!pos.valid, "armed after reset");
    repeat (2) step();
    check(!pos.valid, "stays armed without fire");
    fire = 1; step(); fire = 0;
    ex = SHIP_WIDTH;
    check(pos.valid && pos.x == ex && pos.y == 100 + SHIP_HEIGHT / 2 - MISSILE_HEIGHT / 2,
          $sformatf("launch at %0d,%0d", pos.x, pos.y));
    // fly to the right edge: count ticks until armed
    n = 0;
    while (pos.valid && n < 200) begin
      if (n == 3) begin fire = 1; ship_y = 300; end
      step(); fire = 0; n++;
      if (pos.valid) begin
        ex += MISSILE_SPEED;
        check(pos.x == ex && pos.y == 107, $sformatf("flight x=%0d y=%0d expected %0d", pos.x, pos.y, ex));
      end
    end
    // x runs 32, 40, ..., 632 (76 positions), then it leaves the screen
    check(n == 76, $sformatf("ticks until off screen: %0d", n));
    check(ex == 632, $sformatf("last x %0d", ex));
    // wall hit
    fire = 1; step(); fire = 0;
    check(pos.valid && pos.y == 300 + 7, "relaunch from new ship position");
    step();
    hit_wall = 1; step(); hit_wall = 0;
    check(!pos.valid, "wall hit -> armed");
    // mine hit
    fire = 1; step(); fire = 0; step();
    hit_mine = 1; step(); hit_mine = 0;
    check(!pos.valid, "mine hit -> armed");
    // clear
    fire = 1; step(); fire = 0;
    check(pos.valid, "fired again");
    clear = 1; step(); clear = 0;
    check(!pos.valid, "clear -> armed");
    clear = 1; fire = 1; step(); clear = 0; fire = 0;
    check(!pos.valid, "no fire while cleared");
    // forward destroyed mine
    mine_destroyed = 1; mine_score = 8'd50; #1;
    check(destroyed_mine && score_inc_val == 50, "destroyed mine forwarded");
    mine_destroyed = 0; #1;
    check(!destroyed_mine, "forward drops");
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
