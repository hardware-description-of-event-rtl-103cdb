// End-to-end testbench of the game at its real timing: 25 MHz pixel clock,
// 60 game ticks per second, 6 us NES half period, 2 s explosion and 2 s
// game-over screen (every parameter of the top at its default). The scripted
// player plays one short game through the top's pins (see game_player):
// take-off, a mine shot, a crash into the wall, the 2 s explosion, the 2 s
// game-over screen and the return to the welcome screen, several seconds of
// game time (a few hundred million pixel clocks).
module tb_game_top_full;
  import flyshoot_pkg::*;
  localparam int TD = 416_667, EX = 120, GO = 120;
  logic clk = 0;
  logic pll_locked, nes_data, nes_latch, nes_clk;
  logic [2:0] key_n;
  logic [7:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs, vga_blank_n, vga_sync_n, vga_clk;
  score_t score;
  logic [1:0] game_state;

  always #20 clk = ~clk;   // 25 MHz

  game_top dut (
    .clk_pix(clk), .pll_locked, .key_n, .nes_data, .nes_latch, .nes_clk,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n, .vga_sync_n, .vga_clk,
    .score, .game_state);

  game_player #(.TICK_DIV(TD), .EXPLODE_TICKS(EX), .GAMEOVER_TICKS(GO),
                .MAX_CLOCKS(64'd400_000_000), .SHORT(1'b1)) player (
    .clk, .pll_locked, .key_n, .nes_data, .nes_latch, .nes_clk,
    .tick(dut.tick), .ship_active(dut.ship_active), .ship_flying(dut.ship_flying),
    .ship_exploding(dut.ship_exploding), .ship_y(dut.ship_y),
    .ship_hit_wall(dut.ship_hit_wall), .ship_hit_mine(dut.ship_hit_mine),
    .missile(dut.missile_pos), .mine1(dut.mine1_pos), .mine2(dut.mine2_pos),
    .mine1_exploding(dut.mine1_exploding), .mine2_exploding(dut.mine2_exploding),
    .mine2_hits(dut.mine2_hits), .mine1_destroyed(dut.mine1_destroyed),
    .mine2_destroyed(dut.mine2_destroyed),
    .px(dut.u_tunnel.px), .py(dut.u_tunnel.py), .video_on(dut.u_tunnel.video_on),
    .game_state, .score, .score_digits(dut.u_tunnel.score_digits), .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);
endmodule
