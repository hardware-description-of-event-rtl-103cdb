// Testbench of collision_detect: random object positions, with an
// independent reference written from the rectangle sizes; plus hand-picked
// edge cases (touching edges, invalid objects, wall limits).
module tb_collision_detect;
  import flyshoot_pkg::*;
  obj_pos_t ship, missile, mine1, mine2;
  logic ship_hit_wall, ship_hit_mine1, ship_hit_mine2;
  logic missile_hit_wall, missile_hit_mine1, missile_hit_mine2;
  int checks = 0, failures = 0;

  collision_detect dut (.*);

  function automatic bit ov(obj_pos_t a, int aw, int ah, obj_pos_t b, int bw, int bh);
    // overlap when neither is completely left/right/above/below the other
    if (!a.valid || !b.valid) return 0;
    if (a.x + aw <= b.x) return 0;
    if (b.x + bw <= a.x) return 0;
    if (a.y + ah <= b.y) return 0;
    if (b.y + bh <= a.y) return 0;
    return 1;
  endfunction

  function automatic bit wl(obj_pos_t a, int ah);
    return a.valid && (a.y <= WALL_H - 1 || a.y + ah - 1 >= MAX_Y - WALL_H);
  endfunction

  task automatic compare(input string tag);
    bit [5:0] exp, got;
    #1;
    exp = {wl(ship, SHIP_HEIGHT),
           ov(ship, SHIP_WIDTH, SHIP_HEIGHT, mine1, MINE_SIZE, MINE_SIZE),
           ov(ship, SHIP_WIDTH, SHIP_HEIGHT, mine2, MINE_SIZE, MINE_SIZE),
           wl(missile, MISSILE_HEIGHT),
           ov(missile, MISSILE_WIDTH, MISSILE_HEIGHT, mine1, MINE_SIZE, MINE_SIZE),
           ov(missile, MISSILE_WIDTH, MISSILE_HEIGHT, mine2, MINE_SIZE, MINE_SIZE)};
    got = {ship_hit_wall, ship_hit_mine1, ship_hit_mine2,
           missile_hit_wall, missile_hit_mine1, missile_hit_mine2};
    checks++;
    if (exp != got) begin
      failures++;
      $display("FAIL %s: got %b expected %b", tag, got, exp);
    end
  endtask

  function automatic obj_pos_t near(obj_pos_t ref_o, int spread);
    obj_pos_t o;
    o.valid = ($urandom % 8) != 0;
    o.x = coord_t'(int'(ref_o.x) + int'($urandom % (2 * spread)) - spread);
    o.y = coord_t'(int'(ref_o.y) + int'($urandom % (2 * spread)) - spread);
    if (o.x > 600) o.x = 600;
    if (o.y > 460) o.y = 460;
    return o;
  endfunction

  int n_hits;
  initial begin
    // edge cases
    ship = '{1'b1, 10'd0, 10'd200}; missile = '{1'b1, 10'd100, 10'd100};
    mine1 = '{1'b1, 10'd32, 10'd200}; mine2 = '{1'b1, 10'd31, 10'd215};
    compare("ship touches mine1 edge (no hit), overlaps mine2 corner");
    mine1 = '{1'b0, 10'd10, 10'd200};
    compare("invalid mine1");
    ship.y = 10'(WALL_H); compare("ship just below top wall");
    ship.y = 10'(WALL_H - 1); compare("ship in top wall");
    ship.y = 10'(MAX_Y - WALL_H - SHIP_HEIGHT); compare("ship just above bottom wall");
    ship.y = 10'(MAX_Y - WALL_H - SHIP_HEIGHT + 1); compare("ship in bottom wall");
    missile = '{1'b1, 10'd300, 10'd300}; mine2 = '{1'b1, 10'd307, 10'd301};
    compare("missile hits mine2");
    checks++;
    if (!missile_hit_mine2 || missile_hit_mine1) begin failures++; $display("FAIL direct missile/mine2"); end
    // random
    n_hits = 0;
    for (int i = 0; i < 20000; i++) begin
      mine1 = '{1'b1, coord_t'($urandom % 600), coord_t'($urandom % 470)};
      mine2 = near(mine1, 40);
      ship = near(mine1, 40);
      missile = near(mine2, 20);
      if ($urandom % 4 == 0) ship.y = coord_t'($urandom % 470);
      compare($sformatf("random %0d", i));
      n_hits += int'(missile_hit_mine1 | missile_hit_mine2 | ship_hit_mine1);
    end
    checks++;
    if (n_hits < 1000) begin failures++; $display("FAIL too few hits exercised %0d", n_hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
