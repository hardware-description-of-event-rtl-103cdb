// Testbench of renderer: sets up a scene and probes chosen pixels (inside,
// on the edge of and just outside each object, walls, background in each
// game state, blanking); checks colour and the one-clock delay of colour and
// syncs.
module tb_renderer;
  import flyshoot_pkg::*;
  logic clk = 0, rst = 1;
  logic [9:0] px = 0, py = 0;
  logic video_on = 1, hsync = 1, vsync = 1;
  game_state_e game_state = G_PLAYING;
  logic ship_active = 1, ship_exploding = 0;
  coord_t ship_x = 0, ship_y = 200;
  logic [7:0] ship_exp_ctr = 0;
  obj_pos_t missile = '{1'b1, 10'd100, 10'd150};
  obj_pos_t mine1 = '{1'b1, 10'd300, 10'd100};
  obj_pos_t mine2 = '{1'b1, 10'd400, 10'd300};
  logic mine1_exploding = 0, mine2_exploding = 0;
  logic [1:0] mine2_hits = 0;
  logic [19:0] score_digits = 20'h00008;
  rgb_t rgb;
  logic hsync_o, vsync_o, blank_n;
  int checks = 0, failures = 0;

  renderer dut (.*);

  always #5 clk = ~clk;

  task automatic probe(input int x, input int y, input logic [23:0] exp, input string what);
    @(negedge clk); px = 10'(x); py = 10'(y);
    @(negedge clk);
    checks++;
    if (rgb !== exp) begin failures++; $display("FAIL %s at %0d,%0d: %h expected %h", what, x, y, rgb, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    probe(0, 200, 24'hFFFFFF, "ship corner");
    probe(31, 215, 24'hFFFFFF, "ship far corner");
    probe(32, 215, 24'h000000, "right of ship");
    probe(10, 216, 24'h000000, "below ship");
    probe(100, 150, 24'hFF8000, "missile");
    probe(107, 151, 24'hFF8000, "missile end");
    probe(108, 151, 24'h000000, "after missile");
    probe(100, 152, 24'h000000, "below missile");
    probe(300, 100, 24'hFF00FF, "mine1");
    probe(315, 115, 24'hFF00FF, "mine1 corner");
    probe(316, 115, 24'h000000, "right of mine1");
    probe(410, 310, 24'h00FFFF, "mine2");
    probe(200, 10, 24'h00A000, "top wall");
    probe(200, 31, 24'h00A000, "top wall edge");
    probe(200, 32, 24'h000000, "below top wall");
    probe(200, 448, 24'h00A000, "bottom wall");
    probe(200, 447, 24'h000000, "above bottom wall");
    // score digits in the top wall: 0 0 0 0 8
    probe(72, 7, 24'hFFFFFF, "digit 4 (8) segment a");
    probe(76, 15, 24'hFFFFFF, "digit 4 (8) segment g");
    probe(76, 12, 24'h00A000, "digit 4 (8) inside, no segment");
    probe(82, 12, 24'h00A000, "right of digit box");
    probe(8, 15, 24'hFFFFFF, "digit 0 (0) segment f");
    probe(12, 15, 24'h00A000, "digit 0 (0) has no g");
    score_digits = 20'h10000;
    probe(8, 7, 24'h00A000, "digit 0 (1) has no a");
    probe(16, 7, 24'hFFFFFF, "digit 0 (1) segment b");
    probe(17, 24, 24'hFFFFFF, "digit 0 (1) segment c bottom");
    probe(17, 25, 24'h00A000, "below digit box");
    mine2_hits = 1;
    probe(410, 310, 24'h0080FF, "mine2 after one hit");
    mine1.valid = 0;
    probe(300, 100, 24'h000000, "mine1 gone");
    mine1_exploding = 1;
    probe(300, 100, 24'hFF0000, "mine1 explosion (even cell)");
    probe(304, 100, 24'hFFFF00, "mine1 explosion (odd cell)");
    ship_exploding = 1; ship_exp_ctr = 8'd4;
    probe(5, 205, 24'hFFFF00, "exploding ship phase 1");
    ship_exp_ctr = 8'd8;
    probe(5, 205, 24'hFF0000, "exploding ship phase 0");
    ship_active = 0;
    probe(5, 205, 24'h000000, "inactive ship hidden");
    game_state = G_WELCOME;
    probe(200, 200, 24'h000060, "welcome background");
    game_state = G_GAMEOVER;
    probe(200, 200, 24'h400000, "game over background");
    video_on = 0;
    probe(200, 10, 24'h000000, "blanked");
    checks++; if (blank_n) begin failures++; $display("FAIL blank_n"); end
    // syncs delayed by one clock
    @(negedge clk); hsync = 0; vsync = 0; #1;
    checks++; if (!hsync_o || !vsync_o) begin failures++; $display("FAIL sync too early"); end
    @(negedge clk);
    checks++; if (hsync_o || vsync_o) begin failures++; $display("FAIL sync not delayed by one"); end
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
