// Collision detection of the tunnel: produces HIT_WALL, HIT_MINE1 and
// HIT_MINE2 for the ship and for the missile.
//
// Every object is an axis-aligned rectangle (its top-left corner from the
// position inputs, its size from the package). Two rectangles collide when
// they overlap in x and in y. The walls are the bands y < WALL_H and
// y >= MAX_Y - WALL_H. An object whose `valid` is low collides with nothing.
// The logic is purely combinational on the registered positions; the game
// objects sample its outputs on the game tick. Which collisions exist
// follows the game description; the rectangle test and the straight walls
// are this design's choice.
//
// Interface: ship, missile, mine1, mine2 positions in; six hit flags out.
module collision_detect
  import flyshoot_pkg::*;
(
  input  obj_pos_t ship,
  input  obj_pos_t missile,
  input  obj_pos_t mine1,
  input  obj_pos_t mine2,
  output logic     ship_hit_wall,
  output logic     ship_hit_mine1,
  output logic     ship_hit_mine2,
  output logic     missile_hit_wall,
  output logic     missile_hit_mine1,
  output logic     missile_hit_mine2
);
  function automatic logic overlap(input obj_pos_t a, input int aw, input int ah,
                                   input obj_pos_t b, input int bw, input int bh);
    int ax, ay, bx, by;
    ax = int'(a.x); ay = int'(a.y);
    bx = int'(b.x); by = int'(b.y);
    return a.valid && b.valid &&
           (ax < bx + bw) && (bx < ax + aw) &&
           (ay < by + bh) && (by < ay + ah);
  endfunction

  function automatic logic in_wall(input obj_pos_t a, input int ah);
    return a.valid && ((int'(a.y) < WALL_H) || (int'(a.y) + ah > MAX_Y - WALL_H));
  endfunction

  assign ship_hit_wall     = in_wall(ship, SHIP_HEIGHT);
  assign ship_hit_mine1    = overlap(ship, SHIP_WIDTH, SHIP_HEIGHT, mine1, MINE_SIZE, MINE_SIZE);
  assign ship_hit_mine2    = overlap(ship, SHIP_WIDTH, SHIP_HEIGHT, mine2, MINE_SIZE, MINE_SIZE);
  assign missile_hit_wall  = in_wall(missile, MISSILE_HEIGHT);
  assign missile_hit_mine1 = overlap(missile, MISSILE_WIDTH, MISSILE_HEIGHT, mine1, MINE_SIZE, MINE_SIZE);
  assign missile_hit_mine2 = overlap(missile, MISSILE_WIDTH, MISSILE_HEIGHT, mine2, MINE_SIZE, MINE_SIZE);
endmodule
