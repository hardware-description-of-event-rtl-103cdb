// Testbench of mine, as Mine1 (one hit, 20 points) and Mine2 (two hits, 50
// points): planting, scrolling, the hit counter, the destroyed event with its
// score, the explosion length, leaving at the left edge and clear.
module tb_mine;
  import flyshoot_pkg::*;
  localparam int EXPL = 4;
  logic clk = 0, rst = 1, tick = 0, clear = 0, plant = 0, hit1 = 0, hit2 = 0;
  coord_t plant_x = 0, plant_y = 0;
  obj_pos_t pos1, pos2;
  logic exp1, exp2, un1, un2, d1, d2;
  logic [1:0] hc1, hc2;
  score_inc_t sv1, sv2;
  int checks = 0, failures = 0, nd1 = 0, nd2 = 0;

  mine #(.HITS(1), .SCORE(MINE1_SCORE), .EXPLODE_TICKS(EXPL)) m1 (
    .clk, .rst, .tick, .clear, .plant, .plant_x, .plant_y, .hit(hit1),
    .pos(pos1), .exploding(exp1), .unused(un1), .hit_count(hc1), .destroyed(d1), .score_val(sv1));
  mine #(.HITS(MINE2_HITS), .SCORE(MINE2_SCORE), .EXPLODE_TICKS(EXPL)) m2 (
    .clk, .rst, .tick, .clear, .plant, .plant_x, .plant_y, .hit(hit2),
    .pos(pos2), .exploding(exp2), .unused(un2), .hit_count(hc2), .destroyed(d2), .score_val(sv2));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step();
    @(negedge clk); tick = 1; #1;
    if (d1) begin nd1++; check(sv1 == 20, "Mine1 worth 20"); end
    if (d2) begin nd2++; check(sv2 == 50, "Mine2 worth 50"); end
    @(negedge clk); tick = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    check(un1 && un2 && !pos1.valid && !pos2.valid, "unused after reset");
    plant = 1; plant_x = 400; plant_y = 100; step(); plant = 0;
    check(pos1.valid && pos1.x == 400 && pos1.y == 100, "Mine1 planted");
    check(pos2.valid && pos2.x == 400, "Mine2 planted");
    step();
    check(pos1.x == 400 - SCROLL_SPEED && pos1.y == 100, "scrolls left");
    // Mine1: one hit destroys it
    hit1 = 1; step(); hit1 = 0;
    check(nd1 == 1 && exp1 && !pos1.valid, "Mine1 destroyed by one hit");
    // Mine2: first hit only counted
    hit2 = 1; step(); hit2 = 0;
    check(nd2 == 0 && pos2.valid && hc2 == 1, "Mine2 survives first hit");
    step();
    hit2 = 1; step(); hit2 = 0;
    check(nd2 == 1 && exp2 && !pos2.valid, "Mine2 destroyed by second hit");
    // explosion length: Mine1 exploded at tick e; unused after EXPL ticks
    // Mine1 exploding since 3 ticks now (tick of hit counts as entry)
    check(exp1, "Mine1 still exploding");
    step();
    check(un1 && !exp1, "Mine1 unused after EXPL ticks of explosion");
    repeat (2) step();
    check(exp2, "Mine2 exploding for EXPL ticks");
    step();
    check(un2, "Mine2 unused after explosion");
    check(nd1 == 1 && nd2 == 1, "one destroyed event each");
    // scroll off the left edge
    plant = 1; plant_x = 7; plant_y = 50; step(); plant = 0;
    step(); check(pos1.valid && pos1.x == 5, "x 5");
    step(); step(); check(pos1.valid && pos1.x == 1, "x 1");
    step(); check(un1 && !pos1.valid && nd1 == 1, "gone at left edge without score");
    // clear
    plant = 1; plant_x = 300; step(); plant = 0;
    hit2 = 1; step(); hit2 = 0;
    check(hc2 == 1, "one hit counted");
    clear = 1; step(); clear = 0;
    check(un1 && un2, "clear removes mines");
    plant = 1; step(); plant = 0;
    check(hc2 == 0, "hit counter restarts on planting");
    hit2 = 1; step(); hit2 = 0;
    check(nd2 == 1 && pos2.valid, "fresh Mine2 needs two hits again");
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
